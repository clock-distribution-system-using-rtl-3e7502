// mikumari_link -- MIKUMARI link layer: frames, pulses and the scrambler on
// top of the CBT character interface.
//
// Transmit: three sources share the CBT transmitter.  A pending pulse K
// character always wins (the document gives pulses the highest priority);
// otherwise the normal frame generator's character goes out, its D
// characters through the PRBS16 scrambler.  The transceiver adds its own T
// characters under this.  Receive: the CBT's characters are registered once
// and descrambled, then go to the frame parser and, for pulse K characters,
// to the pulse reproducer.
//
// Pulse latency.  A pulse waits 0..CHAR_CYCLES-1 cycles for a slot, sends
// that wait in its timing field, and the reproducer waits PULSE_FIX minus it.
// Counted from the clock edge that samples pulse_in to the edge after which
// pulse_out is high, the link adds PULSE_FIX + 2 cycles to the CBT's own
// delay from tx_ack to rx_valid (3 + CHAR_CYCLES-1 transmit, 6 receive,
// plus the cable): 9 + 13 = 22 cycles in CDCM-10-2.5 with PULSE_FIX = 7 and
// zero cable delay, the document's "9 + CBT latency".  In CDCM-10-1.5 the
// wait can reach 9, so PULSE_FIX is 9 and the link adds 11 cycles.
module mikumari_link
  import cdcm_pkg::*;
#(
  parameter cdcm_mode_e  MODE      = CDCM_10_2P5,
  parameter bit          SCRAMBLE  = 1'b1,
  parameter int unsigned PULSE_FIX = (MODE == CDCM_10_2P5) ? 7 : 9
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       link_up,       // CBT lane up
  // user: pulses
  input  logic       pulse_in,
  input  logic [2:0] pulse_type_in,
  output logic       pulse_dropped,
  output logic       pulse_out,
  output logic [2:0] pulse_type_out,
  // user: frames
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  input  logic       tx_last,
  output logic       tx_ack,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       rx_last,
  output logic       rx_csum_err,
  output logic       rx_frame_err,
  // CBT character interface
  output logic [7:0] cbt_tx_char,
  output logic       cbt_tx_is_k,
  output logic       cbt_tx_valid,
  input  logic       cbt_tx_ack,
  input  logic       cbt_rx_valid,
  input  logic       cbt_rx_is_k,
  input  logic [7:0] cbt_rx_char
);

  logic       p_valid, p_ack;
  logic [7:0] p_body;
  logic       f_valid, f_is_k, f_is_fsk, f_is_data, f_ack;
  logic [7:0] f_char, f_scr;
  logic [7:0] rx_descr;
  logic       q_valid, q_is_k;
  logic [7:0] q_char;

  // ---------------- transmit ----------------
  mikumari_pulse_gen u_pgen (
    .clk(clk), .rst(rst), .link_up(link_up),
    .pulse_in(pulse_in), .pulse_type(pulse_type_in),
    .ack(p_ack), .k_valid(p_valid), .k_body(p_body), .dropped(pulse_dropped)
  );

  mikumari_frame_gen u_fgen (
    .clk(clk), .rst(rst), .link_up(link_up),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_last(tx_last), .tx_ack(tx_ack),
    .c_valid(f_valid), .c_is_k(f_is_k), .c_char(f_char),
    .is_fsk(f_is_fsk), .is_data(f_is_data), .ack(f_ack)
  );

  prbs16_scrambler #(.SCRAMBLE(SCRAMBLE)) u_scr (
    .clk(clk), .rst(rst),
    .reseed(f_ack && f_is_fsk), .advance(f_ack && f_is_data),
    .din(f_char), .dout(f_scr)
  );

  assign p_ack = cbt_tx_ack && p_valid;
  assign f_ack = cbt_tx_ack && !p_valid && f_valid;

  always_comb begin
    if (p_valid) begin
      cbt_tx_valid = 1'b1;
      cbt_tx_is_k  = 1'b1;
      cbt_tx_char  = p_body;
    end else begin
      cbt_tx_valid = f_valid;
      cbt_tx_is_k  = f_is_k;
      cbt_tx_char  = f_is_k ? f_char : f_scr;
    end
  end

  // ---------------- receive ----------------
  prbs16_scrambler #(.SCRAMBLE(SCRAMBLE)) u_descr (
    .clk(clk), .rst(rst),
    .reseed(cbt_rx_valid && cbt_rx_is_k && cbt_rx_char == K_FSK),
    .advance(cbt_rx_valid && !cbt_rx_is_k),
    .din(cbt_rx_char), .dout(rx_descr)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      q_valid <= 1'b0;
      q_is_k  <= 1'b0;
      q_char  <= '0;
    end else begin
      q_valid <= cbt_rx_valid;
      q_is_k  <= cbt_rx_is_k;
      q_char  <= cbt_rx_is_k ? cbt_rx_char : rx_descr;
    end
  end

  mikumari_frame_parser u_parse (
    .clk(clk), .rst(rst),
    .in_valid(q_valid), .in_is_k(q_is_k), .in_char(q_char),
    .rx_data(rx_data), .rx_valid(rx_valid), .rx_last(rx_last),
    .rx_csum_err(rx_csum_err), .rx_frame_err(rx_frame_err)
  );

  mikumari_pulse_rep #(.PULSE_FIX(PULSE_FIX)) u_prep (
    .clk(clk), .rst(rst),
    .k_valid(q_valid && q_is_k), .k_body(q_char),
    .pulse_out(pulse_out), .pulse_type(pulse_type_out)
  );

endmodule
