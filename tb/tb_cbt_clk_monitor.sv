// tb_cbt_clk_monitor -- flat line, then toggling words: `present` must rise
// exactly after 64 clock-like words and fall at the first flat word.
`timescale 1ns/1ps
module tb_cbt_clk_monitor;
  logic clk = 1'b0, rst, present;
  logic [9:0] word;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cbt_clk_monitor u_dut (.clk(clk), .rst(rst), .word(word), .present(present));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst  = 1'b1;
    word = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (100) begin
      @(negedge clk);
      check(!present, "absent on flat-0 line");
    end
    word = '1;
    repeat (100) begin
      @(negedge clk);
      check(!present, "absent on flat-1 line");
    end
    for (int rounds = 0; rounds < 3; rounds++) begin
      for (int i = 1; i <= 70; i++) begin
        word = (i % 2) ? 10'b11111_00000 : 10'b11100_00000;
        @(negedge clk);
        check(present == (i >= 64), $sformatf("present after %0d words: %0d", i, present));
      end
      word = (rounds == 1) ? '1 : '0;
      @(negedge clk);
      check(!present, "drops at a flat word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
