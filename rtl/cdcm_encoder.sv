// cdcm_encoder -- CDCM modulator: turns one symbol per slow-clock cycle into
// the 10-segment waveform pattern handed to the OSERDES.
//
// Registered, one cycle from `sym` to `pattern`.  In CDCM-10-2.5 two data
// bits pick one of four falling-edge positions (30/40/60/70 % duty) and the
// IDLE symbol gives 50 %; in CDCM-10-1.5 one bit picks 40 or 60 % and IDLE
// 50 %.  The encode table is the document's; the segment order of the code
// (first code bit on segment 3) is read from its duty-cycle test patterns.
// Reset drives the IDLE pattern, so a plain clock leaves the transmitter.
// The first three segments of every pattern are always high and the last
// three always low (four each in CDCM-10-1.5): those pattern bits are
// constant by design, which is what makes the waveform a clock.
module cdcm_encoder
  import cdcm_pkg::*;
#(
  parameter cdcm_mode_e MODE = CDCM_10_2P5
) (
  input  logic       clk,
  input  logic       rst,
  input  cdcm_sym_t  sym,
  output logic [9:0] pattern      // bit 9 = first segment on the line
);

  function automatic logic [9:0] encode(cdcm_sym_t s);
    logic [3:0] code;   // code[0] drives segment 3 ... code[3] segment 6
    if (MODE == CDCM_10_2P5) begin
      if (s.idle) code = 4'b0011;
      else case (s.bits)
        2'b00:   code = 4'b0000;
        2'b01:   code = 4'b0001;
        2'b10:   code = 4'b0111;
        default: code = 4'b1111;
      endcase
      return {3'b111, code[0], code[1], code[2], code[3], 3'b000};
    end else begin
      // segments 4,5: 00 = 40 %, 10 = IDLE 50 %, 11 = 60 %
      if (s.idle) return {4'b1111, 2'b10, 4'b0000};
      return s.bits[0] ? {4'b1111, 2'b11, 4'b0000} : {4'b1111, 2'b00, 4'b0000};
    end
  endfunction

  always_ff @(posedge clk) begin
    if (rst) pattern <= IDLE_PATTERN;
    else     pattern <= encode(sym);
  end

endmodule
