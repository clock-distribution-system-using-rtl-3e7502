// tb_mikumari_pulse_rep -- pulse K characters with random timing fields,
// some overlapping in flight: each pulse must come out PULSE_FIX - timing + 1
// cycles after its character, with its type; non-pulse K characters must
// give nothing.
`timescale 1ns/1ps
module tb_mikumari_pulse_rep;
  localparam int FIX = 7;
  logic clk = 1'b0, rst, k_valid, pulse_out;
  logic [7:0] k_body;
  logic [2:0] ptype;
  int checks = 0, failures = 0, cyc = 0, n_out = 0;
  int due_q [$];
  logic [2:0] ty_q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mikumari_pulse_rep #(.PULSE_FIX(FIX)) u_dut (
    .clk(clk), .rst(rst), .k_valid(k_valid), .k_body(k_body), .pulse_out(pulse_out), .pulse_type(ptype)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  always @(negedge clk) if (!rst) begin
    if (pulse_out) begin
      if (due_q.size() == 0) check(0, "unexpected pulse");
      else begin
        automatic int due = due_q.pop_front();
        automatic logic [2:0] ty = ty_q.pop_front();
        check(cyc == due, $sformatf("pulse at %0d due %0d", cyc, due));
        check(ptype == ty, "type");
        n_out++;
      end
    end
  end

  initial begin
    rst = 1'b1; k_valid = 1'b0; k_body = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      automatic int t = $urandom % (FIX + 1);
      automatic logic [2:0] ty = 3'($urandom);
      automatic bit is_pulse = ($urandom % 5 != 0);
      @(negedge clk);
      k_valid = 1'b1;
      k_body  = is_pulse ? {1'b1, ty, 4'(t)} : {1'b0, 7'($urandom)};
      if (is_pulse) begin
        // due: pulses keep their order only if their due times do
        due_q.push_back(cyc + FIX - t + 1);
        ty_q.push_back(ty);
      end
      @(negedge clk);
      k_valid = 1'b0;
      repeat (FIX + 1) @(negedge clk);   // keep due times ordered
    end
    repeat (20) @(negedge clk);
    check(due_q.size() == 0 && n_out > 200, $sformatf("all pulses out (%0d)", n_out));
    // overlap: two pulses in flight at once
    @(negedge clk); k_valid = 1'b1; k_body = {1'b1, 3'd5, 4'd0}; due_q.push_back(cyc + FIX + 1); ty_q.push_back(3'd5);
    @(negedge clk); k_valid = 1'b0;
    @(negedge clk); k_valid = 1'b1; k_body = {1'b1, 3'd2, 4'd1}; due_q.push_back(cyc + FIX); ty_q.push_back(3'd2);
    @(negedge clk); k_valid = 1'b0;
    repeat (20) @(negedge clk);
    check(due_q.size() == 0, "overlapping pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
