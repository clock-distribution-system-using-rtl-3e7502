// tb_mikumari_pulse_gen -- pulses at random phases against character slots
// every 5 cycles: the K body must carry {1, type, cycles waited}; a second
// request while one is pending, or any request while the link is down, must
// be dropped.
`timescale 1ns/1ps
module tb_mikumari_pulse_gen;
  logic clk = 1'b0, rst, link_up, pulse_in, ack, k_valid, dropped;
  logic [2:0] ptype;
  logic [7:0] k_body;
  int checks = 0, failures = 0, cyc = 0;
  int t_req = -1;
  logic [2:0] ty_req;
  int n_sent = 0, n_drop = 0, max_wait = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mikumari_pulse_gen u_dut (
    .clk(clk), .rst(rst), .link_up(link_up), .pulse_in(pulse_in), .pulse_type(ptype),
    .ack(ack), .k_valid(k_valid), .k_body(k_body), .dropped(dropped)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // sampled at the rising edge
  always @(posedge clk) if (!rst) begin
    if (ack && k_valid) begin
      check(t_req >= 0, "character without request");
      check(k_body == {1'b1, ty_req, 4'(cyc - t_req - 1)},
            $sformatf("body %h, waited %0d", k_body, cyc - t_req - 1));
      if (cyc - t_req - 1 > max_wait) max_wait = cyc - t_req - 1;
      t_req = -1;
      n_sent++;
    end
  end

  initial begin
    rst = 1'b1; link_up = 1'b0; pulse_in = 1'b0; ptype = '0; ack = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // link down: dropped
    pulse_in = 1'b1; #1;
    check(dropped, "dropped while link down");
    @(negedge clk);
    pulse_in = 1'b0;
    check(!k_valid, "nothing pending while link down");
    link_up = 1'b1;
    for (int n = 0; n < 200; n++) begin
      repeat ($urandom % 13) @(negedge clk);
      pulse_in = 1'b1;
      ptype = 3'($urandom);
      #1;
      check(dropped == k_valid, "drop only while pending");
      if (!dropped) begin t_req = cyc; ty_req = ptype; end
      else n_drop++;
      @(negedge clk);
      pulse_in = 1'b0;
    end
    repeat (10) @(negedge clk);
    check(n_sent > 100 && n_drop > 10, $sformatf("sent %0d dropped %0d", n_sent, n_drop));
    check(max_wait == 4, $sformatf("wait spans a full slot period (max %0d)", max_wait));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slot every 5 cycles
  always @(negedge clk) ack = (cyc % 5 == 0);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
