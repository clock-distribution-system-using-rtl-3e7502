// cdcm_decoder -- CDCM demodulator and receive quality monitor.
//
// Takes one word-aligned 10-segment pattern per cycle (from the bit-slip
// stage) and returns the symbol it carries, registered (one cycle).  `ok` is
// low for any pattern that is not one of the legal falling-edge positions of
// the selected mode: this is the "broken pattern" check of the document's Rx
// quality monitor.  Its meaning of each pattern is the inverse of
// cdcm_encoder.
module cdcm_decoder
  import cdcm_pkg::*;
#(
  parameter cdcm_mode_e MODE = CDCM_10_2P5
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] word,
  output cdcm_sym_t  sym,
  output logic       ok          // pattern is a legal CDCM pattern
);

  cdcm_sym_t s_d;
  logic      ok_d;

  always_comb begin
    s_d  = '{idle: 1'b0, bits: 2'b00};
    ok_d = 1'b0;
    if (MODE == CDCM_10_2P5) begin
      if (word[9:7] == 3'b111 && word[2:0] == 3'b000) begin
        ok_d = 1'b1;
        case (word[6:3])
          4'b0000: s_d.bits = 2'b00;
          4'b1000: s_d.bits = 2'b01;
          4'b1100: s_d.idle = 1'b1;
          4'b1110: s_d.bits = 2'b10;
          4'b1111: s_d.bits = 2'b11;
          default: ok_d = 1'b0;
        endcase
      end
    end else begin
      if (word[9:6] == 4'b1111 && word[3:0] == 4'b0000) begin
        ok_d = 1'b1;
        case (word[5:4])
          2'b00:   s_d.bits = 2'b00;
          2'b10:   s_d.idle = 1'b1;
          2'b11:   s_d.bits = 2'b01;
          default: ok_d = 1'b0;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sym <= '{idle: 1'b1, bits: 2'b00};
      ok  <= 1'b0;
    end else begin
      sym <= s_d;
      ok  <= ok_d;
    end
  end

endmodule
