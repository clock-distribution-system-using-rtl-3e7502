// tb_mikumari_frame_parser -- character streams with gaps, pulse K
// characters and stray D characters between frames: good frames must come
// out byte for byte with rx_last on the final byte and no error; a wrong
// check sum must raise rx_csum_err; an FSK inside a frame and a frame
// without room for data and check sum must raise rx_frame_err.
`timescale 1ns/1ps
module tb_mikumari_frame_parser;
  import cdcm_pkg::*;

  logic clk = 1'b0, rst, in_valid, in_is_k, rx_valid, rx_last, rx_csum_err, rx_frame_err;
  logic [7:0] in_char, rx_data;
  int checks = 0, failures = 0;
  logic [8:0] exp_q [$];
  int n_csum = 0, n_ferr = 0, exp_csum = 0, exp_ferr = 0, n_bytes = 0;

  always #5 clk = ~clk;

  mikumari_frame_parser u_dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_is_k(in_is_k), .in_char(in_char),
    .rx_data(rx_data), .rx_valid(rx_valid), .rx_last(rx_last),
    .rx_csum_err(rx_csum_err), .rx_frame_err(rx_frame_err)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (!rst) begin
    if (rx_valid) begin
      if (exp_q.size() == 0) check(0, "unexpected byte");
      else begin
        automatic logic [8:0] e = exp_q.pop_front();
        check({rx_last, rx_data} == e, $sformatf("got %h/%0d want %h/%0d", rx_data, rx_last, e[7:0], e[8]));
        n_bytes++;
      end
    end
    if (rx_csum_err) n_csum++;
    if (rx_frame_err) n_ferr++;
  end

  task automatic put(bit k, logic [7:0] c);
    // random gaps and pulse K characters between any two characters
    while ($urandom % 3 == 0) begin
      @(negedge clk);
      in_valid = ($urandom % 2 == 0); in_is_k = 1'b1; in_char = {1'b1, 7'($urandom)};
    end
    @(negedge clk);
    in_valid = 1'b1; in_is_k = k; in_char = c;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic frame(int len, bit bad_sum, bit expect_out);
    logic [7:0] sum = '0;
    put(1'b1, K_FSK);
    for (int i = 0; i < len; i++) begin
      automatic logic [7:0] b = 8'($urandom);
      put(1'b0, b);
      sum += b;
      if (expect_out) exp_q.push_back({i == len - 1, b});
    end
    put(1'b0, bad_sum ? ~sum : sum);
    put(1'b1, K_FEK);
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_is_k = 1'b0; in_char = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    put(1'b0, 8'h12);                         // stray D outside a frame
    for (int f = 0; f < 80; f++) begin
      automatic int sel = $urandom % 8;
      if (sel == 0) begin
        frame(1 + $urandom % 10, 1'b1, 1'b1);   // bad check sum
        exp_csum++;
      end else if (sel == 1) begin
        put(1'b1, K_FSK);                     // frame cut short by a new FSK
        put(1'b0, 8'($urandom));
        exp_ferr++;
        frame(1 + $urandom % 10, 1'b0, 1'b1);
      end else if (sel == 2) begin
        put(1'b1, K_FSK);                     // only one D: no room for data + sum
        put(1'b0, 8'($urandom));
        put(1'b1, K_FEK);
        exp_ferr++;
      end else begin
        frame(1 + $urandom % 30, 1'b0, 1'b1);
      end
    end
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "all bytes out");
    check(n_csum == exp_csum, $sformatf("check-sum errors %0d want %0d", n_csum, exp_csum));
    check(n_ferr == exp_ferr, $sformatf("frame errors %0d want %0d", n_ferr, exp_ferr));
    check(exp_csum > 0 && exp_ferr > 0, "error cases exercised");
    $display("bytes=%0d csum_err=%0d frame_err=%0d", n_bytes, n_csum, n_ferr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
