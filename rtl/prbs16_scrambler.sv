// prbs16_scrambler -- synchronous (additive) scrambler / descrambler on a
// 16-bit PRBS, one byte per step.
//
// dout = din XOR key, where key is the high byte of a 16-bit Fibonacci LFSR
// (x^16 + x^15 + x^13 + x^4 + 1).  `advance` steps the LFSR 8 times;
// `reseed` loads SEED.  The same module scrambles on the transmit side and
// descrambles on the receive side: both reseed on the frame-start character
// and advance on every D character, so they stay in step.  Enabling it
// (SCRAMBLE=1) is the document's main configuration; SCRAMBLE=0 sends clear
// text.  The document names PRBS16 only; polynomial, seed and the reseed
// point are this design's choice.
module prbs16_scrambler #(
  parameter bit          SCRAMBLE = 1'b1,
  parameter logic [15:0] SEED     = 16'hFFFF
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       reseed,
  input  logic       advance,
  input  logic [7:0] din,
  output logic [7:0] dout
);

  logic [15:0] lfsr;

  function automatic logic [15:0] step8(logic [15:0] s);
    logic [15:0] r = s;
    for (int i = 0; i < 8; i++) r = {r[14:0], r[15] ^ r[14] ^ r[12] ^ r[3]};
    return r;
  endfunction

  assign dout = SCRAMBLE ? (din ^ lfsr[15:8]) : din;

  always_ff @(posedge clk) begin
    if (rst || reseed) lfsr <= SEED;
    else if (advance)  lfsr <= step8(lfsr);
  end

endmodule
