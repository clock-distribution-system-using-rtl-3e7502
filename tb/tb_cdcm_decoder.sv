// tb_cdcm_decoder -- runs all 1024 words through the CDCM demodulator of
// both modes and compares symbol and legality with a table of the legal
// patterns (a single falling edge at the allowed positions).
`timescale 1ns/1ps
module tb_cdcm_decoder;
  import cdcm_pkg::*;

  logic clk = 1'b0, rst;
  logic [9:0] word;
  cdcm_sym_t  s25, s15;
  logic       ok25, ok15;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cdcm_decoder #(.MODE(CDCM_10_2P5)) u25 (.clk(clk), .rst(rst), .word(word), .sym(s25), .ok(ok25));
  cdcm_decoder #(.MODE(CDCM_10_1P5)) u15 (.clk(clk), .rst(rst), .word(word), .sym(s15), .ok(ok15));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // number of leading ones if the word is ones followed by zeros, else -1
  function automatic int edge_pos(logic [9:0] w);
    int n = 0;
    while (n < 10 && w[9-n]) n++;
    for (int i = n; i < 10; i++) if (w[9-i]) return -1;
    return n;
  endfunction

  initial begin
    rst  = 1'b1;
    word = '0;
    @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < 1024; w++) begin
      int e;
      word = 10'(w);
      e = edge_pos(word);
      @(negedge clk);
      // CDCM-10-2.5: 3,4,5,6,7 high segments = 00,01,IDLE,10,11
      check(ok25 == (e >= 3 && e <= 7), $sformatf("2.5 legality %b", word));
      if (e >= 3 && e <= 7) begin
        if (e == 5) check(s25.idle, "2.5 idle");
        else check(!s25.idle && s25.bits == ((e == 3) ? 2'b00 : (e == 4) ? 2'b01 : (e == 6) ? 2'b10 : 2'b11),
                   $sformatf("2.5 bits of %b", word));
      end
      // CDCM-10-1.5: 4,5,6 high segments = 0,IDLE,1
      check(ok15 == (e >= 4 && e <= 6), $sformatf("1.5 legality %b", word));
      if (e >= 4 && e <= 6) begin
        if (e == 5) check(s15.idle, "1.5 idle");
        else check(!s15.idle && s15.bits[0] == (e == 6), $sformatf("1.5 bit of %b", word));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
