// tb_mikumari_node -- end-to-end test of a MIKUMARI master and slave, both
// mikumari_node at their default parameters (CDCM-10-2.5, scrambler on),
// joined by behavioural SERDES/cable models with word phases 3 and 7.
// All checking is in mikumari_link_driver.
`timescale 1ns/1ps
module tb_mikumari_node;
  import mikumari_tb_pkg::*;

  logic      clk = 1'b0;
  logic      rst, lock_s;
  ch_mode_e  mode_ms, mode_sm;
  node_in_t  in_m, in_s;
  node_out_t out_m, out_s;
  logic [9:0] pat_m, pat_s, word_m, word_s;

  always #4 clk = ~clk;

  mikumari_node u_master (
    .clk(clk), .rst(rst), .clk_lock(1'b1),
    .pulse_in(in_m.pulse_in), .pulse_type_in(in_m.pulse_type_in),
    .pulse_dropped(out_m.pulse_dropped), .pulse_out(out_m.pulse_out),
    .pulse_type_out(out_m.pulse_type_out),
    .tx_data(in_m.tx_data), .tx_valid(in_m.tx_valid), .tx_last(in_m.tx_last),
    .tx_ack(out_m.tx_ack),
    .rx_data(out_m.rx_data), .rx_valid(out_m.rx_valid), .rx_last(out_m.rx_last),
    .rx_csum_err(out_m.rx_csum_err), .rx_frame_err(out_m.rx_frame_err),
    .lane_up(out_m.lane_up), .bit_aligned(), .char_aligned(),
    .pattern_err(out_m.pattern_err), .wdt_timeout(out_m.wdt_timeout),
    .sent_t(out_m.sent_t), .sent_dm(out_m.sent_dm),
    .pattern_out(pat_m), .pattern_in(word_m)
  );

  mikumari_node u_slave (
    .clk(clk), .rst(rst), .clk_lock(lock_s),
    .pulse_in(in_s.pulse_in), .pulse_type_in(in_s.pulse_type_in),
    .pulse_dropped(out_s.pulse_dropped), .pulse_out(out_s.pulse_out),
    .pulse_type_out(out_s.pulse_type_out),
    .tx_data(in_s.tx_data), .tx_valid(in_s.tx_valid), .tx_last(in_s.tx_last),
    .tx_ack(out_s.tx_ack),
    .rx_data(out_s.rx_data), .rx_valid(out_s.rx_valid), .rx_last(out_s.rx_last),
    .rx_csum_err(out_s.rx_csum_err), .rx_frame_err(out_s.rx_frame_err),
    .lane_up(out_s.lane_up), .bit_aligned(), .char_aligned(),
    .pattern_err(out_s.pattern_err), .wdt_timeout(out_s.wdt_timeout),
    .sent_t(out_s.sent_t), .sent_dm(out_s.sent_dm),
    .pattern_out(pat_s), .pattern_in(word_s)
  );

  assign out_m.slip = u_master.u_cbt.u_rx.slip;
  assign out_s.slip = u_slave.u_cbt.u_rx.slip;

  serdes_channel #(.OFFSET(3)) u_ch_ms (.clk(clk), .mode(mode_ms), .tx_pattern(pat_m), .rx_word(word_s));
  serdes_channel #(.OFFSET(7)) u_ch_sm (.clk(clk), .mode(mode_sm), .tx_pattern(pat_s), .rx_word(word_m));

  // 23 cycles (9 link + 14 CBT) plus one cycle of cable for a non-zero word phase
  mikumari_link_driver #(.LAT_MS(24), .LAT_SM(24), .FRAMES(40), .WDT(1024)) u_drv (
    .clk(clk), .rst(rst), .lock_s(lock_s), .mode_ms(mode_ms), .mode_sm(mode_sm),
    .in_m(in_m), .in_s(in_s), .out_m(out_m), .out_s(out_s),
    .done(), .checks_o(), .failures_o()
  );

endmodule
