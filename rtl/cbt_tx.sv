// cbt_tx -- transmit half of the CDCM based transceiver (CBT).
//
// Once per character period (5 slow-clock cycles in CDCM-10-2.5, 10 in
// CDCM-10-1.5) the transmitter picks the next 10-bit character with the
// document's priority K > T > D, then sends it as 5 (10) symbols through the
// CDCM encoder, header first.
//   * K: the link layer's special characters (header 11), body unchanged.
//   * T: CBT control characters (header 00).  Sent while the lane is not up,
//     whenever the link layer has nothing to send, and as "dogfood" for the
//     far-end watchdog when DOG_INTERVAL characters have passed without one.
//     A T character replaces a pending D character, which then gets no ack.
//   * D: data.  The body is sent as is (header 01, D+) or inverted (header
//     10, D-), whichever moves the running waveform disparity towards zero.
//     The D+/D- headers are the document's; the choice rule is this design's.
// While `send_idle` is set the line carries the plain IDLE pattern, used by
// the far end to tune its sampling.
//
// Interface: the link layer holds tx_char/tx_is_k/tx_valid; tx_ack is a
// one-cycle strobe in the cycle the character is taken.  Timing: the first
// pattern of a character is on `pattern` 3 cycles after tx_ack, the last
// 3+CHAR_CYCLES-1 cycles after (the document's "3+5 (3+10)").
// As in cdcm_encoder, the always-high and always-low segments of `pattern`
// are constant by design.
module cbt_tx
  import cdcm_pkg::*;
#(
  parameter cdcm_mode_e  MODE         = CDCM_10_2P5,
  parameter int unsigned DOG_INTERVAL = 32       // characters between dogfood T characters
) (
  input  logic       clk,
  input  logic       rst,
  // control from the lane controller
  input  logic       send_idle,    // send raw IDLE patterns
  input  logic       user_en,      // lane up: link characters allowed
  input  logic [7:0] t_body,       // T body to send while the lane is not up
  // link-layer character interface
  input  logic [7:0] tx_char,
  input  logic       tx_is_k,
  input  logic       tx_valid,
  output logic       tx_ack,
  // status
  output logic       slot,         // first cycle of a character period
  output logic       sent_t,       // a T character was chosen in this slot
  output logic       sent_dm,      // a D- character was chosen in this slot
  // to the OSERDES
  output logic [9:0] pattern
);

  localparam int unsigned N  = char_cycles(MODE);
  localparam int unsigned W  = sym_width(MODE);
  localparam int unsigned DW = $clog2(DOG_INTERVAL + 1);

  logic [3:0]    cnt;
  logic [DW-1:0] dog_cnt;
  logic          dog_due;
  logic signed [7:0] rd;             // running disparity
  logic [9:0]    ch_d, ch_q, sreg;
  logic          idle_q, sidle, load_q;
  logic          take_user, take_t;
  cdcm_sym_t     sym;

  assign slot    = (cnt == 4'd0);
  assign dog_due = (dog_cnt >= DW'(DOG_INTERVAL - 1));

  // character choice for this slot (K > T > D)
  always_comb begin
    take_user = 1'b0;
    take_t    = 1'b0;
    ch_d      = {HDR_T, t_body};
    if (!send_idle) begin
      if (!user_en) begin
        take_t = 1'b1;
        ch_d   = {HDR_T, t_body};
      end else if (tx_valid && tx_is_k) begin
        take_user = 1'b1;
        ch_d      = {HDR_K, tx_char};
      end else if (tx_valid && !dog_due) begin
        take_user = 1'b1;
        if (((rd > 0) && (char_disp(MODE, {HDR_DP, tx_char}) > 0)) ||
            ((rd < 0) && (char_disp(MODE, {HDR_DP, tx_char}) < 0)))
          ch_d = {HDR_DM, ~tx_char};
        else
          ch_d = {HDR_DP, tx_char};
      end else begin
        take_t = 1'b1;
        ch_d   = {HDR_T, T_READY};
      end
    end
  end

  assign tx_ack  = slot && take_user;
  assign sent_t  = slot && take_t;
  assign sent_dm = slot && take_user && (ch_d[9:8] == HDR_DM);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      dog_cnt <= '0;
      rd      <= '0;
      ch_q    <= '0;
      idle_q  <= 1'b1;
      load_q  <= 1'b0;
      sreg    <= '0;
      sidle   <= 1'b1;
    end else begin
      cnt    <= (cnt == 4'(N - 1)) ? 4'd0 : cnt + 4'd1;
      load_q <= slot;
      // stage 1: chosen character
      if (slot) begin
        ch_q   <= ch_d;
        idle_q <= send_idle;
        if (!send_idle) rd <= rd + 8'(char_disp(MODE, ch_d));
        if (take_t || send_idle) dog_cnt <= '0;
        else if (!dog_due)       dog_cnt <= dog_cnt + 1'b1;
      end
      // stage 2: symbol shift register, header first
      if (load_q) begin
        sreg  <= ch_q;
        sidle <= idle_q;
      end else begin
        sreg  <= sreg << W;
      end
    end
  end

  always_comb begin
    sym.idle = sidle;
    sym.bits = (W == 2) ? sreg[9:8] : {1'b0, sreg[9]};
  end

  // stage 3: waveform pattern
  cdcm_encoder #(.MODE(MODE)) u_enc (
    .clk(clk), .rst(rst), .sym(sym), .pattern(pattern)
  );

endmodule
