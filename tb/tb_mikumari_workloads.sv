// tb_mikumari_workloads -- the link configurations that are evaluated besides
// the default one, run side by side: CDCM-10-1.5 with the scrambler
// (S1), CDCM-10-1.5 without it (C1) and CDCM-10-2.5 without it (C2).  The
// default, CDCM-10-2.5 with the scrambler (S2), is tb_mikumari_node.  Each
// pair sends 8-bit incremental data and goes through power-up, two-way frame and pulse traffic with a fixed
// pulse latency, a broken pattern, a stuck line, a hot plug and an
// undetectable bit error (see mikumari_link_driver).  The line rate only
// sets the clock period, which is immaterial to the logic, so one clock
// serves all three.
`timescale 1ns/1ps
module tb_mikumari_workloads;
  import cdcm_pkg::*;

  logic clk = 1'b0;
  always #4 clk = ~clk;

  logic done [3];
  int   chk  [3], fail [3];

  mikumari_pair #(.MODE(CDCM_10_1P5), .SCRAMBLE(1'b1), .FRAMES(20)) u_s1 (
    .clk(clk), .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  mikumari_pair #(.MODE(CDCM_10_1P5), .SCRAMBLE(1'b0), .FRAMES(20)) u_c1 (
    .clk(clk), .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  mikumari_pair #(.MODE(CDCM_10_2P5), .SCRAMBLE(1'b0), .FRAMES(20)) u_c2 (
    .clk(clk), .done(done[2]), .checks(chk[2]), .failures(fail[2]));

  initial begin
    int checks, failures;
    repeat (2) @(posedge clk);   // let every pair clear its done flag first
    wait (done[0] && done[1] && done[2]);
    checks   = chk[0] + chk[1] + chk[2];
    failures = fail[0] + fail[1] + fail[2];
    $display("S1 checks=%0d failures=%0d, C1 checks=%0d failures=%0d, C2 checks=%0d failures=%0d",
             chk[0], fail[0], chk[1], fail[1], chk[2], fail[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (700000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2],
             fail[0] + fail[1] + fail[2] + 1);
    $finish;
  end
endmodule
