// mikumari_node -- one end of a MIKUMARI clock/data distribution link: the
// MIKUMARI link layer on top of the CDCM based transceiver (CBT).
//
// All logic runs on the slow clock F0 (the master clock on the master side,
// the recovered clock on a slave).  pattern_out is the 10-segment CDCM
// waveform for one F0 cycle, to be sent by an OSERDES in DDR mode on a 5xF0
// fast clock; pattern_in is the 10-bit word an ISERDES captures from the far
// end.  The SERDES primitives, the IDELAY and the clock-recovery PLL are
// outside this module.  clk_lock is the lock of the clock-recovery PLL on a
// slave; tie it high on a master.
//
// User side: frames in and out (tx_data/tx_valid/tx_last/tx_ack,
// rx_data/rx_valid/rx_last plus check-sum and frame errors) and one-shot
// pulses with a 3-bit type, delivered with a fixed latency.  Defaults:
// CDCM-10-2.5 with scrambler, the document's main configuration.
// The fixed high and low segments of pattern_out are constant by design.
module mikumari_node
  import cdcm_pkg::*;
#(
  parameter cdcm_mode_e  MODE             = CDCM_10_2P5,
  parameter bit          SCRAMBLE         = 1'b1,
  parameter int unsigned DOG_INTERVAL     = 32,
  parameter int unsigned WDT_CYCLES       = 1024,
  parameter int unsigned INIT_IDLE_CYCLES = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clk_lock,
  // pulses
  input  logic       pulse_in,
  input  logic [2:0] pulse_type_in,
  output logic       pulse_dropped,
  output logic       pulse_out,
  output logic [2:0] pulse_type_out,
  // frames
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  input  logic       tx_last,
  output logic       tx_ack,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       rx_last,
  output logic       rx_csum_err,
  output logic       rx_frame_err,
  // status
  output logic       lane_up,
  output logic       bit_aligned,
  output logic       char_aligned,
  output logic       pattern_err,
  output logic       wdt_timeout,
  output logic       sent_t,
  output logic       sent_dm,
  // IOSERDES
  output logic [9:0] pattern_out,
  input  logic [9:0] pattern_in
);

  logic [7:0] ctx_char, crx_char;
  logic       ctx_is_k, ctx_valid, ctx_ack, crx_valid, crx_is_k;

  mikumari_link #(.MODE(MODE), .SCRAMBLE(SCRAMBLE)) u_link (
    .clk(clk), .rst(rst), .link_up(lane_up),
    .pulse_in(pulse_in), .pulse_type_in(pulse_type_in), .pulse_dropped(pulse_dropped),
    .pulse_out(pulse_out), .pulse_type_out(pulse_type_out),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_last(tx_last), .tx_ack(tx_ack),
    .rx_data(rx_data), .rx_valid(rx_valid), .rx_last(rx_last),
    .rx_csum_err(rx_csum_err), .rx_frame_err(rx_frame_err),
    .cbt_tx_char(ctx_char), .cbt_tx_is_k(ctx_is_k), .cbt_tx_valid(ctx_valid),
    .cbt_tx_ack(ctx_ack),
    .cbt_rx_valid(crx_valid), .cbt_rx_is_k(crx_is_k), .cbt_rx_char(crx_char)
  );

  cbt #(
    .MODE(MODE), .DOG_INTERVAL(DOG_INTERVAL),
    .WDT_CYCLES(WDT_CYCLES), .INIT_IDLE_CYCLES(INIT_IDLE_CYCLES)
  ) u_cbt (
    .clk(clk), .rst(rst), .clk_lock(clk_lock),
    .tx_char(ctx_char), .tx_is_k(ctx_is_k), .tx_valid(ctx_valid), .tx_ack(ctx_ack),
    .rx_valid(crx_valid), .rx_is_k(crx_is_k), .rx_char(crx_char),
    .lane_up(lane_up), .bit_aligned(bit_aligned), .char_aligned(char_aligned),
    .pattern_err(pattern_err), .wdt_timeout(wdt_timeout),
    .sent_t(sent_t), .sent_dm(sent_dm), .slot(),
    .pattern_out(pattern_out), .pattern_in(pattern_in)
  );

endmodule
