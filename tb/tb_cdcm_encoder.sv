// tb_cdcm_encoder -- checks the CDCM modulator of both modes against the
// duty-cycle table: every symbol, one-cycle latency, IDLE out of reset.
`timescale 1ns/1ps
module tb_cdcm_encoder;
  import cdcm_pkg::*;

  logic clk = 1'b0, rst;
  cdcm_sym_t  sym;
  logic [9:0] pat25, pat15;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cdcm_encoder #(.MODE(CDCM_10_2P5)) u25 (.clk(clk), .rst(rst), .sym(sym), .pattern(pat25));
  cdcm_encoder #(.MODE(CDCM_10_1P5)) u15 (.clk(clk), .rst(rst), .sym(sym), .pattern(pat15));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected waveforms: number of high segments (duty in tenths)
  function automatic logic [9:0] ones(int n);
    logic [9:0] p = '0;
    for (int i = 0; i < n; i++) p[9-i] = 1'b1;
    return p;
  endfunction

  initial begin
    rst = 1'b1;
    sym = '{idle: 1'b0, bits: 2'b11};
    @(negedge clk); @(negedge clk);
    check(pat25 == 10'b11111_00000 && pat15 == 10'b11111_00000, "IDLE out of reset");
    rst = 1'b0;
    for (int s = 0; s < 5; s++) begin
      int hi25, hi15;
      if (s == 4) sym = '{idle: 1'b1, bits: 2'b00};
      else        sym = '{idle: 1'b0, bits: 2'(s)};
      case (s)
        0: begin hi25 = 3; hi15 = 4; end
        1: begin hi25 = 4; hi15 = 6; end
        2: begin hi25 = 6; hi15 = 4; end
        3: begin hi25 = 7; hi15 = 6; end
        default: begin hi25 = 5; hi15 = 5; end
      endcase
      #1;
      check(pat25 == ((s == 0) ? 10'b11111_00000 : pat25), "no combinational path");
      @(negedge clk);
      check(pat25 == ones(hi25), $sformatf("2.5 symbol %0d -> %b", s, pat25));
      check(pat15 == ones(hi15), $sformatf("1.5 symbol %0d -> %b", s, pat15));
    end
    // latency: a change shows one clock later, not before
    sym = '{idle: 1'b0, bits: 2'b00};
    @(negedge clk);
    sym = '{idle: 1'b0, bits: 2'b11};
    @(posedge clk); #1;
    check(pat25 == ones(7), "one-cycle latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
