// tb_mikumari_frame_gen -- random frames with random user gaps against a
// slot model (every 5 cycles, some slots taken by others): the accepted
// character sequence must be FSK, the data bytes, their 8-bit sum, FEK,
// with is_fsk / is_data flags, and tx_ack exactly once per data byte.
`timescale 1ns/1ps
module tb_mikumari_frame_gen;
  import cdcm_pkg::*;

  logic clk = 1'b0, rst, link_up;
  logic [7:0] tx_data, c_char;
  logic tx_valid, tx_last, tx_ack, c_valid, c_is_k, is_fsk, is_data, ack;
  int checks = 0, failures = 0, cyc = 0;
  typedef struct packed { logic k; logic fsk; logic dat; logic [7:0] c; } ch_t;
  ch_t exp_q [$];
  int n_chars = 0, n_frames = 0, n_acks = 0, n_bytes = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mikumari_frame_gen u_dut (
    .clk(clk), .rst(rst), .link_up(link_up), .tx_data(tx_data), .tx_valid(tx_valid),
    .tx_last(tx_last), .tx_ack(tx_ack), .c_valid(c_valid), .c_is_k(c_is_k), .c_char(c_char),
    .is_fsk(is_fsk), .is_data(is_data), .ack(ack)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // slot model: ack only when offered, in slot cycles, 1 in 4 slots lost
  always @(negedge clk) begin
    #2;
    ack = !rst && (cyc % 5 == 0) && c_valid && ($urandom % 4 != 0);
  end

  always @(posedge clk) if (!rst) begin
    if (tx_ack) n_acks++;
    if (ack) begin
      check(c_valid, "ack only when offered");
      if (exp_q.size() == 0) check(0, "unexpected character");
      else begin
        automatic ch_t e = exp_q.pop_front();
        check({c_is_k, is_fsk, is_data, c_char} == e,
              $sformatf("char %0d%0d%0d %h want %0d%0d%0d %h", c_is_k, is_fsk, is_data, c_char,
                        e.k, e.fsk, e.dat, e.c));
      end
      n_chars++;
    end
  end

  task automatic send_frame(int len);
    logic [7:0] sum = '0;
    exp_q.push_back('{k: 1'b1, fsk: 1'b1, dat: 1'b0, c: K_FSK});
    for (int i = 0; i < len; i++) begin
      automatic logic [7:0] b = 8'($urandom);
      if ($urandom % 5 == 0) begin
        tx_valid = 1'b0;
        repeat ($urandom % 15) @(negedge clk);
      end
      tx_data = b; tx_valid = 1'b1; tx_last = (i == len - 1);
      exp_q.push_back('{k: 1'b0, fsk: 1'b0, dat: 1'b1, c: b});
      sum += b;
      forever begin
        @(posedge clk);
        if (tx_ack) break;
      end
      n_bytes++;
      @(negedge clk);
    end
    tx_valid = 1'b0; tx_last = 1'b0;
    exp_q.push_back('{k: 1'b0, fsk: 1'b0, dat: 1'b1, c: sum});
    exp_q.push_back('{k: 1'b1, fsk: 1'b0, dat: 1'b0, c: K_FEK});
    n_frames++;
  endtask

  initial begin
    rst = 1'b1; link_up = 1'b0; tx_data = '0; tx_valid = 1'b0; tx_last = 1'b0; ack = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    tx_valid = 1'b1;
    repeat (30) @(negedge clk);
    check(!c_valid, "nothing offered while link down");
    tx_valid = 1'b0;
    link_up = 1'b1;
    for (int f = 0; f < 60; f++) begin
      send_frame(1 + $urandom % 20);
      repeat ($urandom % 10) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    check(exp_q.size() == 0, "all characters sent");
    check(n_acks == n_bytes, $sformatf("one tx_ack per byte (%0d/%0d)", n_acks, n_bytes));
    check(!c_valid, "idle between frames");
    $display("frames=%0d bytes=%0d chars=%0d", n_frames, n_bytes, n_chars);
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
