// tb_cbt_tx -- CBT transmitter.  The waveform is demodulated in the
// testbench by falling-edge position and reassembled into characters three
// cycles after each slot (checking the 3+5 latency).  Phases: IDLE patterns,
// T_INIT while the lane is down, then a biased random mix of D and K
// characters: each must arrive in order with its header (K=11, D+=01 body
// as is, D-=10 body inverted), K must never be displaced by dogfood, no
// more than DOG_INTERVAL D characters may pass without a T, and the running
// waveform disparity must stay bounded although the data is biased.  A D
// character never takes |rd| past one character's worst case (20 segments)
// and T codes are neutral, but the K characters, which the transmitter may
// not invert, can push it further: the check allows 40.
`timescale 1ns/1ps
module tb_cbt_tx;
  import cdcm_pkg::*;

  localparam int DOG = 8;

  logic clk = 1'b0, rst;
  logic send_idle, user_en, tx_is_k, tx_valid, tx_ack, slot, sent_t, sent_dm;
  logic [7:0] t_body, tx_char;
  logic [9:0] pattern;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;

  cbt_tx #(.MODE(CDCM_10_2P5), .DOG_INTERVAL(DOG)) u_dut (
    .clk(clk), .rst(rst), .send_idle(send_idle), .user_en(user_en), .t_body(t_body),
    .tx_char(tx_char), .tx_is_k(tx_is_k), .tx_valid(tx_valid), .tx_ack(tx_ack),
    .slot(slot), .sent_t(sent_t), .sent_dm(sent_dm), .pattern(pattern)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic int highs(logic [9:0] p);
    int n = 0;
    while (n < 10 && p[9-n]) n++;
    return n;
  endfunction

  // expected slot contents: start cycle, kind (0 T, 1 user), K flag, body
  typedef struct { int start; bit user; bit k; logic [7:0] body; logic [7:0] tb; } exp_t;
  exp_t eq[$];
  logic [9:0] acc;
  int nsym = -1, cur_start = 0;
  exp_t cur;
  int rd = 0, max_rd = 0, n_dm = 0, n_dp = 0, n_k = 0, n_t = 0, run_d = 0, n_dog = 0, n_chars = 0;
  int prev_slot = -1;
  int phase = 0;
  bit adv = 1'b0;   // the character was taken at the last posedge

  initial begin
    rst = 1'b1; send_idle = 1'b1; user_en = 1'b0; t_body = T_INIT;
    tx_char = '0; tx_is_k = 1'b0; tx_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
  end

  always @(negedge clk) begin
    cyc++;
    if (!rst) begin
      // ---- sample ----
      if (slot) begin
        automatic exp_t e;
        if (prev_slot >= 0) check(cyc - prev_slot == 5, "slot period 5");
        prev_slot = cyc;
        e.start = cyc + 3; e.user = tx_ack; e.k = tx_is_k; e.body = tx_char; e.tb = user_en ? T_READY : t_body;
        if (!send_idle) eq.push_back(e);
        if (user_en && tx_valid && tx_is_k) check(tx_ack, "K not displaced by T");
      end
      if (phase == 0 && cyc > 8) check(pattern == IDLE_PATTERN, "IDLE while send_idle");
      if (eq.size() > 0 && eq[0].start == cyc) begin
        cur = eq.pop_front();
        nsym = 0;
        acc = '0;
      end
      if (nsym >= 0) begin
        automatic int h = highs(pattern);
        check(h >= 3 && h <= 7 && h != 5, $sformatf("data symbol pattern %b", pattern));
        rd += h - 5;
        if (rd > max_rd) max_rd = rd;
        if (-rd > max_rd) max_rd = -rd;
        acc = {acc[7:0], (h == 3) ? 2'b00 : (h == 4) ? 2'b01 : (h == 6) ? 2'b10 : 2'b11};
        nsym++;
        if (nsym == 5) begin
          nsym = -1;
          n_chars++;
          if (!cur.user) begin
            check(acc[9:8] == 2'b00, "T header");
            check(acc[7:0] == cur.tb, "T body");
            n_t++;
            if (user_en && tx_valid) n_dog++;
            run_d = 0;
          end else if (cur.k) begin
            check(acc == {2'b11, cur.body}, $sformatf("K char %h", acc));
            n_k++;
          end else begin
            check(acc == {2'b01, cur.body} || acc == {2'b10, ~cur.body}, $sformatf("D char %h", acc));
            if (acc[9:8] == 2'b10) n_dm++; else n_dp++;
            run_d++;
            check(run_d <= DOG, "dogfood at least every DOG characters");
          end
        end
      end
      // ---- drive ----
      if (cyc == 40) begin send_idle = 1'b0; phase = 1; end
      if (cyc == 120) begin user_en = 1'b1; tx_valid = 1'b1; phase = 2; rd = 0; end
      if (phase == 2 && (adv || cyc == 120)) begin
        automatic int r = $urandom % 10;
        tx_is_k = (r == 0);
        tx_char = (r < 7 && r > 0) ? 8'hFF - 8'($urandom % 2) : 8'($urandom);
      end
      adv = tx_ack;
      if (cyc == 3000) begin
        check(n_dm > 20 && n_dp > 20, $sformatf("both D+ and D- used (%0d/%0d)", n_dp, n_dm));
        check(n_k > 10, "K characters sent");
        check(n_dog > 10, "dogfood inserted while data waited");
        check(max_rd <= 40, $sformatf("running disparity bounded (%0d)", max_rd));
        check(n_chars > 500, "characters seen");
        $display("chars=%0d D+=%0d D-=%0d K=%0d T=%0d dog=%0d max|rd|=%0d",
                 n_chars, n_dp, n_dm, n_k, n_t, n_dog, max_rd);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
