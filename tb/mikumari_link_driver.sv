// mikumari_link_driver -- stimulus and scoreboard for a master/slave pair of
// MIKUMARI nodes joined by two serdes_channel models.
//
// It brings the pair up from a dead cable, runs frames both ways (random
// lengths and data, random gaps inside frames) together with one-shot
// pulses, and checks every received byte, frame end and pulse against what
// was sent, including a fixed pulse latency.  Then it injects cable faults:
// one broken pattern, a stuck line (no dogfood, watchdog), an unplugged
// cable with PLL lock loss (hot plug), and an undetectable bit error that
// must be caught by the frame check sum.  After each fault the lane must
// come back up by itself.  Each mechanism is counted; one that never
// happened counts as a failure.  It prints the TB_RESULT line and ends the
// simulation, or with OWN_FINISH = 0 raises `done` and leaves both to a
// testbench that runs several pairs at once.
`timescale 1ns/1ps
module mikumari_link_driver
  import mikumari_tb_pkg::*;
#(
  parameter int unsigned LAT_MS = 24,     // pulse latency master -> slave
  parameter int unsigned LAT_SM = 24,     // pulse latency slave -> master
  parameter int unsigned FRAMES = 40,     // frames per direction in the main run
  parameter int unsigned WDT    = 1024,
  parameter int unsigned MAXCYC = 400000,
  parameter bit          OWN_FINISH = 1'b1, // 0: report through done/checks_o/failures_o only
  parameter bit          INCREMENTAL = 1'b0 // 1: data bytes count up (0, 1, 2, ...) instead of random
) (
  input  logic      clk,
  output logic      rst,
  output logic      lock_s,
  output ch_mode_e  mode_ms,
  output ch_mode_e  mode_sm,
  output node_in_t  in_m,
  output node_in_t  in_s,
  input  node_out_t out_m,
  input  node_out_t out_s,
  output logic      done,
  output int        checks_o,
  output int        failures_o
);

  node_in_t  nin  [2];
  node_out_t nout [2];
  assign in_m = nin[0];
  assign in_s = nin[1];
  assign nout[0] = out_m;
  assign nout[1] = out_s;

  int checks = 0, failures = 0, cyc = 0;
  logic [8:0] exp_q [2][$];
  int         pt_q  [2][$];
  logic [2:0] pty_q [2][$];
  logic       flush [2];
  logic       in_frame [2];
  int n_up = 0, n_dm = 0, n_t_in_frame = 0, n_gap = 0, n_preempt = 0, n_drop = 0;
  int n_patt = 0, n_wdt = 0, n_hotplug = 0, n_csum = 0, n_pulse = 0, n_bytes = 0;
  logic up_q = 1'b0;

  always @(posedge clk) cyc <= cyc + 1;
  assign checks_o   = checks;
  assign failures_o = failures;
  initial done = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- monitors ----------------
  always @(negedge clk) begin
    for (int r = 0; r < 2; r++) begin
      automatic int d = 1 - r;
      if (nout[r].rx_valid && !flush[d]) begin
        if (exp_q[d].size() == 0) check(0, $sformatf("node %0d: unexpected byte", r));
        else begin
          automatic logic [8:0] e = exp_q[d].pop_front();
          check({nout[r].rx_last, nout[r].rx_data} == e,
                $sformatf("node %0d: got %h/%0d want %h/%0d", r, nout[r].rx_data,
                          nout[r].rx_last, e[7:0], e[8]));
          n_bytes++;
        end
      end
      if ((nout[r].rx_csum_err || nout[r].rx_frame_err) && !flush[d])
        check(0, $sformatf("node %0d: frame error on a clean link", r));
      if ((nout[r].rx_csum_err || nout[r].rx_frame_err) && flush[d]) n_csum++;
      if (nout[r].pulse_out && !flush[d]) begin
        if (pt_q[d].size() == 0) check(0, $sformatf("node %0d: unexpected pulse", r));
        else begin
          automatic int t0 = pt_q[d].pop_front();
          automatic logic [2:0] ty = pty_q[d].pop_front();
          check(cyc - t0 == ((d == 0) ? LAT_MS : LAT_SM),
                $sformatf("node %0d: pulse latency %0d", r, cyc - t0));
          check(nout[r].pulse_type_out == ty, "pulse type");
          n_pulse++;
        end
      end
      if (nout[r].sent_dm) n_dm++;
      if (nout[r].sent_t && nout[r].lane_up && in_frame[r]) n_t_in_frame++;
      if (nout[r].pattern_err && nout[r].lane_up) n_patt++;
      if (nout[r].wdt_timeout) n_wdt++;
    end
    if (out_m.lane_up && out_s.lane_up && !up_q) n_up++;
    up_q <= out_m.lane_up && out_s.lane_up;
  end

  // ---------------- stimulus ----------------
  logic [7:0] incr [2] = '{8'd0, 8'd0};

  task automatic send_frame(int d, int len, bit gaps);
    in_frame[d] = 1'b1;
    for (int i = 0; i < len; i++) begin
      automatic logic [7:0] b = INCREMENTAL ? incr[d] : 8'($urandom);
      incr[d] = incr[d] + 8'd1;
      if (gaps && ($urandom % 6 == 0)) begin
        nin[d].tx_valid <= 1'b0;
        repeat (1 + $urandom % 20) @(negedge clk);
        n_gap++;
      end
      nin[d].tx_data  <= b;
      nin[d].tx_valid <= 1'b1;
      nin[d].tx_last  <= (i == len - 1);
      forever begin
        #1;
        if (nout[d].tx_ack) break;
        @(negedge clk);
      end
      exp_q[d].push_back({i == len - 1, b});
      @(negedge clk);
    end
    nin[d].tx_valid <= 1'b0;
    nin[d].tx_last  <= 1'b0;
    in_frame[d] = 1'b0;
  endtask

  task automatic sender(int d, int frames);
    for (int f = 0; f < frames; f++) begin
      send_frame(d, 1 + $urandom % 24, 1'b1);
      repeat ($urandom % 30) @(negedge clk);
    end
  endtask

  task automatic one_pulse(int d);
    automatic logic [2:0] ty = 3'($urandom);
    nin[d].pulse_in      <= 1'b1;
    nin[d].pulse_type_in <= ty;
    #1;
    if (nout[d].pulse_dropped) n_drop++;
    else begin
      pt_q[d].push_back(cyc);
      pty_q[d].push_back(ty);
      if (in_frame[d]) n_preempt++;
    end
    @(negedge clk);
    nin[d].pulse_in <= 1'b0;
  endtask

  task automatic pulser(int d, int count);
    for (int k = 0; k < count; k++) begin
      repeat (20 + $urandom % 80) @(negedge clk);
      one_pulse(d);
      if (k % 8 == 3) one_pulse(d);   // back-to-back request: second one is dropped
    end
  endtask

  task automatic wait_up(int limit, string what);
    int n = 0;
    while (!(out_m.lane_up && out_s.lane_up) && n < limit) begin
      @(negedge clk);
      n++;
    end
    check(out_m.lane_up && out_s.lane_up, {"lane up after ", what});
  endtask

  task automatic wait_down(int limit, string what);
    int n = 0;
    while (out_m.lane_up && out_s.lane_up && n < limit) begin
      @(negedge clk);
      n++;
    end
    check(!(out_m.lane_up && out_s.lane_up), {"lane down on ", what});
  endtask

  task automatic drain();
    repeat (300) @(negedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all bytes delivered");
    check(pt_q[0].size() == 0 && pt_q[1].size() == 0, "all pulses delivered");
  endtask

  initial begin
    rst     = 1'b1;
    lock_s  = 1'b0;
    mode_ms = CH_UNPLUG;
    mode_sm = CH_UNPLUG;
    for (int d = 0; d < 2; d++) begin
      nin[d]      = '0;
      flush[d]    = 1'b0;
      in_frame[d] = 1'b0;
    end
    repeat (10) @(negedge clk);
    rst <= 1'b0;
    repeat (20) @(negedge clk);
    // cable plugged in; the slave PLL locks a little later
    mode_ms <= CH_OK;
    mode_sm <= CH_OK;
    repeat (100) @(negedge clk);
    lock_s <= 1'b1;
    wait_up(5000, "power up");
    check(out_m.slip != 4'd0 && out_s.slip != 4'd0, "bit slip tuned away from 0");

    // ---- main traffic run ----
    fork
      sender(0, FRAMES);
      sender(1, FRAMES);
      pulser(0, FRAMES / 2);
      pulser(1, FRAMES / 2);
    join
    drain();

    // ---- broken pattern ----
    mode_ms <= CH_BREAK;
    @(negedge clk);
    mode_ms <= CH_OK;
    wait_down(50, "broken pattern");
    wait_up(5000, "broken pattern");

    // ---- stuck line: watchdog ----
    mode_sm <= CH_STUCK;
    wait_down(WDT + 200, "stuck line");
    repeat (50) @(negedge clk);
    mode_sm <= CH_OK;
    wait_up(5000, "stuck line");

    // ---- hot plug ----
    mode_ms <= CH_UNPLUG;
    mode_sm <= CH_UNPLUG;
    lock_s  <= 1'b0;
    wait_down(200, "unplug");
    repeat (300) @(negedge clk);
    mode_ms <= CH_OK;
    mode_sm <= CH_OK;
    repeat (100) @(negedge clk);
    lock_s <= 1'b1;
    wait_up(5000, "re-plug");
    if (out_m.lane_up && out_s.lane_up) n_hotplug++;

    // ---- bit error inside a frame: check sum ----
    flush[0] = 1'b1;
    fork
      send_frame(0, 40, 1'b0);
      begin
        repeat (60) @(negedge clk);
        mode_ms <= CH_SWAP;            // the channel changes one symbol only
        repeat (40) @(negedge clk);
        mode_ms <= CH_OK;
      end
    join
    send_frame(0, 4, 1'b0);
    repeat (300) @(negedge clk);
    exp_q[0].delete();
    pt_q[0].delete();
    pty_q[0].delete();
    flush[0] = 1'b0;
    check(out_m.lane_up && out_s.lane_up, "lane stays up through a bit error");

    // ---- traffic after all faults ----
    fork
      sender(0, 8);
      sender(1, 8);
      pulser(0, 4);
      pulser(1, 4);
    join
    drain();

    // ---- every mechanism must have happened ----
    check(n_up >= 4,          $sformatf("lane-up events %0d", n_up));
    check(n_bytes > 100,      $sformatf("bytes delivered %0d", n_bytes));
    check(n_pulse > 10,       $sformatf("pulses delivered %0d", n_pulse));
    check(n_dm > 0,           "D- characters sent");
    check(n_t_in_frame > 0,   "dogfood T characters inside frames");
    check(n_gap > 0,          "user gaps inside frames");
    check(n_preempt > 0,      "pulses during frames");
    check(n_drop > 0,         "pulse requests dropped while one pending");
    check(n_patt > 0,         "pattern errors detected");
    check(n_wdt > 0,          "watchdog timeouts");
    check(n_hotplug > 0,      "hot-plug recovery");
    check(n_csum > 0,         "corrupted frame flagged");
    $display("mechanisms: up=%0d bytes=%0d pulses=%0d dminus=%0d t_in_frame=%0d gaps=%0d preempt=%0d drop=%0d patt=%0d wdt=%0d hotplug=%0d csum=%0d",
             n_up, n_bytes, n_pulse, n_dm, n_t_in_frame, n_gap, n_preempt, n_drop,
             n_patt, n_wdt, n_hotplug, n_csum);
    done = 1'b1;
    if (OWN_FINISH) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    done = 1'b1;
    if (OWN_FINISH) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule
