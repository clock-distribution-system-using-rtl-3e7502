// tb_cbt -- two CBTs in CDCM-10-1.5 mode joined by behavioural SERDES/cable
// models (word phases 2 and 9).  Checks automatic lane up from a dead line,
// in-order delivery of random D and K characters both ways with a fixed
// latency of 3 + 9 + 6 cycles plus one cable cycle from tx_ack to rx_valid,
// and the watchdog: a stuck line without dogfood must take the lane down,
// after which it must come back up by itself.
`timescale 1ns/1ps
module tb_cbt;
  import cdcm_pkg::*;
  import mikumari_tb_pkg::*;

  localparam int LAT = 3 + 9 + 6 + 1;

  logic clk = 1'b0, rst;
  ch_mode_e mode_ab, mode_ba;
  logic [9:0] pat_a, pat_b, w_a, w_b;
  logic [7:0] txc [2], rxc [2];
  logic txk [2], txv [2], ack [2], rxv [2], rxk [2], up [2], wdt [2], perr [2];
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  cbt #(.MODE(CDCM_10_1P5), .WDT_CYCLES(600), .INIT_IDLE_CYCLES(200)) u_a (
    .clk(clk), .rst(rst), .clk_lock(1'b1),
    .tx_char(txc[0]), .tx_is_k(txk[0]), .tx_valid(txv[0]), .tx_ack(ack[0]),
    .rx_valid(rxv[0]), .rx_is_k(rxk[0]), .rx_char(rxc[0]),
    .lane_up(up[0]), .bit_aligned(), .char_aligned(), .pattern_err(perr[0]),
    .wdt_timeout(wdt[0]), .sent_t(), .sent_dm(), .slot(),
    .pattern_out(pat_a), .pattern_in(w_a)
  );
  cbt #(.MODE(CDCM_10_1P5), .WDT_CYCLES(600), .INIT_IDLE_CYCLES(200)) u_b (
    .clk(clk), .rst(rst), .clk_lock(1'b1),
    .tx_char(txc[1]), .tx_is_k(txk[1]), .tx_valid(txv[1]), .tx_ack(ack[1]),
    .rx_valid(rxv[1]), .rx_is_k(rxk[1]), .rx_char(rxc[1]),
    .lane_up(up[1]), .bit_aligned(), .char_aligned(), .pattern_err(perr[1]),
    .wdt_timeout(wdt[1]), .sent_t(), .sent_dm(), .slot(),
    .pattern_out(pat_b), .pattern_in(w_b)
  );

  serdes_channel #(.OFFSET(2), .ONE_P5(1'b1)) u_ab (.clk(clk), .mode(mode_ab), .tx_pattern(pat_a), .rx_word(w_b));
  serdes_channel #(.OFFSET(9), .ONE_P5(1'b1)) u_ba (.clk(clk), .mode(mode_ba), .tx_pattern(pat_b), .rx_word(w_a));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  typedef struct { int t; bit k; logic [7:0] c; } item_t;
  item_t q [2][$];
  bit run = 1'b0;
  bit adv [2];
  int n_rx = 0, n_wdt = 0;

  // sources and sinks, all at the falling edge
  always @(negedge clk) begin
    for (int s = 0; s < 2; s++) begin
      // sink of the characters sent by side 1-s
      if (rxv[s]) begin
        if (q[1-s].size() == 0) check(0, "unexpected character");
        else begin
          automatic item_t e = q[1-s].pop_front();
          check(rxc[s] == e.c && rxk[s] == e.k, $sformatf("char %h/%0d want %h/%0d", rxc[s], rxk[s], e.c, e.k));
          check(cyc - e.t == LAT, $sformatf("latency %0d", cyc - e.t));
          n_rx++;
        end
      end
      if (wdt[s]) n_wdt++;
      // source (acks are sampled at the rising edge, below)
      if (adv[s] || !txv[s]) begin
        txv[s] = run && ($urandom % 4 != 0);
        txk[s] = ($urandom % 5 == 0);
        txc[s] = 8'($urandom);
      end
      adv[s] = 1'b0;
    end
  end

  always @(posedge clk) begin
    for (int s = 0; s < 2; s++) begin
      if (ack[s]) q[s].push_back('{t: cyc, k: txk[s], c: txc[s]});
      if (ack[s]) adv[s] = 1'b1;
    end
  end

  task automatic wait_up(string what);
    int n = 0;
    while (!(up[0] && up[1]) && n < 6000) begin @(negedge clk); n++; end
    check(up[0] && up[1], {"lane up: ", what});
  endtask

  initial begin
    rst = 1'b1;
    mode_ab = CH_UNPLUG;
    mode_ba = CH_UNPLUG;
    for (int s = 0; s < 2; s++) begin txv[s] = 1'b0; txk[s] = 1'b0; txc[s] = '0; adv[s] = 1'b0; end
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (50) @(negedge clk);
    check(!up[0] && !up[1], "down without a cable");
    mode_ab = CH_OK;
    mode_ba = CH_OK;
    wait_up("power up");
    run = 1'b1;
    repeat (6000) @(negedge clk);
    run = 1'b0;
    repeat (60) @(negedge clk);
    check(q[0].size() == 0 && q[1].size() == 0, "all characters delivered");
    check(n_rx > 500, $sformatf("characters delivered %0d", n_rx));
    // stuck line: no dogfood, watchdog fires and both sides re-initialise
    mode_ba = CH_STUCK;
    repeat (700) @(negedge clk);
    check(n_wdt > 0, "watchdog timeout");
    check(!up[0], "lane down after watchdog");
    mode_ba = CH_OK;
    wait_up("after watchdog");
    $display("delivered=%0d wdt=%0d", n_rx, n_wdt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
