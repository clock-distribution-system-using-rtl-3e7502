// cbt_clk_monitor -- detects a clock-like signal on the modulated-clock input.
//
// The document says the CBT master side learns that a modulated clock is
// present from a clock monitor inside the CBT (the slave side uses the lock
// of its clock-recovery PLL).  This monitor looks at the raw ISERDES words:
// a word with at least one high and one low segment shows a toggling line.
// `present` rises after PRESENT_WORDS such words in a row and falls at the
// first flat (all-0 or all-1) word.  The counting rule and threshold are
// this design's own choice.
module cbt_clk_monitor #(
  parameter int unsigned PRESENT_WORDS = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] word,
  output logic       present
);

  localparam int unsigned CW = $clog2(PRESENT_WORDS + 1);
  logic [CW-1:0] run;
  logic          toggling;

  assign toggling = (word != '0) && (word != '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      run     <= '0;
      present <= 1'b0;
    end else if (!toggling) begin
      run     <= '0;
      present <= 1'b0;
    end else if (run != CW'(PRESENT_WORDS)) begin
      run     <= run + 1'b1;
      present <= (run == CW'(PRESENT_WORDS - 1));
    end
  end

endmodule
