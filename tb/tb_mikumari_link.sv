// tb_mikumari_link -- two link layers back to back through a model of the
// CBT character interface (one character slot every 5 cycles, like
// CDCM-10-2.5, and a fixed 13-cycle delay from a character's acceptance to
// its arrival, 3 + 4 + 6 as the real transceiver pair adds it).  Both ends
// send random frames and random pulses at once.  It checks: every byte
// arrives in order with rx_last; every pulse arrives with its type after
// exactly 9 + 13 cycles from the edge that samples it, whatever slot phase it met; pulses pre-empt frame
// characters; D characters on the wire are scrambled (differ from the plain
// bytes) and the receiver undoes it; one corrupted wire byte raises a
// check-sum error and nothing else.
`timescale 1ns/1ps
module tb_mikumari_link;
  import cdcm_pkg::*;

  localparam int DLY = 13;
  localparam int LAT = 9 + DLY + 1;   // +1: t0 is taken before the sampling edge

  logic clk = 1'b0, rst;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic       pin [2], pdrop [2], pout [2];
  logic [2:0] ptin [2], ptout [2];
  logic [7:0] txd [2], rxd [2];
  logic       txv [2], txl [2], txa [2], rxv [2], rxl [2], cerr [2], ferr [2];
  logic [7:0] wchar [2], rchar [2];
  logic       wk [2], wv [2], wack [2], rv [2], rk [2];
  logic       corrupt, corrupted;

  for (genvar i = 0; i < 2; i++) begin : g_link
    mikumari_link u_link (
      .clk(clk), .rst(rst), .link_up(!rst),
      .pulse_in(pin[i]), .pulse_type_in(ptin[i]), .pulse_dropped(pdrop[i]),
      .pulse_out(pout[i]), .pulse_type_out(ptout[i]),
      .tx_data(txd[i]), .tx_valid(txv[i]), .tx_last(txl[i]), .tx_ack(txa[i]),
      .rx_data(rxd[i]), .rx_valid(rxv[i]), .rx_last(rxl[i]),
      .rx_csum_err(cerr[i]), .rx_frame_err(ferr[i]),
      .cbt_tx_char(wchar[i]), .cbt_tx_is_k(wk[i]), .cbt_tx_valid(wv[i]), .cbt_tx_ack(wack[i]),
      .cbt_rx_valid(rv[i]), .cbt_rx_is_k(rk[i]), .cbt_rx_char(rchar[i])
    );
    assign wack[i] = !rst && (cyc % 5 == 0) && wv[i];
  end

  // character channel model: delay line of DLY cycles, link i -> link 1-i
  logic [9:0] dl [2][DLY];
  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++) if (rst) begin
      for (int j = 0; j < DLY; j++) dl[i][j] <= '0;
    end else begin
      dl[i][0] <= {wack[i], wk[i], (corrupt && !corrupted && i == 0 && wack[i] && !wk[i]) ? ~wchar[i] : wchar[i]};
      for (int j = 1; j < DLY; j++) dl[i][j] <= dl[i][j-1];
    end
  end
  for (genvar i = 0; i < 2; i++) begin : g_rx
    assign {rv[1-i], rk[1-i], rchar[1-i]} = rst ? 10'd0 : dl[i][DLY-1];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  logic [8:0] exp_q [2][$];     // bytes sent by link i
  int         pt_q  [2][$];     // pulse send cycles of link i
  logic [2:0] pty_q [2][$];
  logic [7:0] plain_q [2][$];   // plain bytes (data + check sum) in wire order
  int n_bytes = 0, n_pulse = 0, n_pre = 0, n_scr_diff = 0, n_scr = 0, n_csum = 0, n_drop = 0;
  bit expect_csum = 1'b0;
  int lat_seen [int];

  // monitors
  always @(negedge clk) if (!rst) begin
    for (int r = 0; r < 2; r++) begin
      automatic int d = 1 - r;
      if (rxv[r]) begin
        if (exp_q[d].size() == 0) check(0, "unexpected byte");
        else begin
          automatic logic [8:0] e = exp_q[d].pop_front();
          check({rxl[r], rxd[r]} == e, $sformatf("link %0d got %h want %h", r, {rxl[r], rxd[r]}, e));
          n_bytes++;
        end
      end
      if (cerr[r]) begin
        check(expect_csum && r == 1, "check-sum error only for the corrupted frame");
        n_csum++;
      end
      check(!ferr[r], "no frame error");
      if (pout[r]) begin
        if (pt_q[d].size() == 0) check(0, "unexpected pulse");
        else begin
          automatic int t0 = pt_q[d].pop_front();
          automatic logic [2:0] ty = pty_q[d].pop_front();
          check(cyc - t0 == LAT, $sformatf("pulse latency %0d want %0d", cyc - t0, LAT));
          check(ptout[r] == ty, "pulse type");
          lat_seen[cyc - t0] = 1;
          n_pulse++;
        end
      end
      if (pdrop[r]) n_drop++;
    end
  end

  // wire monitor: scrambled D characters, pre-emption of frames by pulses
  logic in_fr [2];
  always @(posedge clk) if (rst) begin
    in_fr[0] <= 1'b0; in_fr[1] <= 1'b0; corrupted <= 1'b0;
  end else begin
    if (corrupt && wack[0] && !wk[0]) corrupted <= 1'b1;   // only the first D character
    for (int i = 0; i < 2; i++) if (wack[i]) begin
      if (wk[i] && wchar[i] == K_FSK) in_fr[i] <= 1'b1;
      else if (wk[i] && wchar[i] == K_FEK) in_fr[i] <= 1'b0;
      else if (wk[i] && wchar[i][7] && in_fr[i]) n_pre++;
      if (!wk[i]) begin
        if (plain_q[i].size() == 0) check(0, "D character with no byte behind it");
        else begin
          automatic logic [7:0] p = plain_q[i].pop_front();
          n_scr++;
          if (p != wchar[i]) n_scr_diff++;
        end
      end
    end
  end

  // pulse sources: a random pulse every ~40 cycles, never two in one slot
  for (genvar i = 0; i < 2; i++) begin : g_pulse
    initial begin
      pin[i] = 1'b0; ptin[i] = '0;
      @(negedge clk iff !rst);
      repeat (50) @(negedge clk);
      repeat (120) begin
        repeat (12 + $urandom % 50) @(negedge clk);
        pin[i] = 1'b1; ptin[i] = 3'($urandom);
        pt_q[i].push_back(cyc); pty_q[i].push_back(ptin[i]);
        @(negedge clk);
        pin[i] = 1'b0;
      end
    end
  end

  task automatic send_frame(int i, int len);
    logic [7:0] sum = '0;
    for (int k = 0; k < len; k++) begin
      automatic logic [7:0] b = 8'($urandom);
      txd[i] = b; txv[i] = 1'b1; txl[i] = (k == len - 1);
      exp_q[i].push_back({k == len - 1, b});
      plain_q[i].push_back(b);
      sum += b;
      @(posedge clk iff txa[i]);
      @(negedge clk);
    end
    txv[i] = 1'b0; txl[i] = 1'b0;
    plain_q[i].push_back(sum);
  endtask

  for (genvar i = 0; i < 2; i++) begin : g_frames
    initial begin
      txd[i] = '0; txv[i] = 1'b0; txl[i] = 1'b0;
      @(negedge clk iff !rst);
      repeat (20) @(negedge clk);
      for (int f = 0; f < 25; f++) begin
        send_frame(i, 1 + $urandom % 24);
        repeat ($urandom % 8) @(negedge clk);
      end
    end
  end

  initial begin
    rst = 1'b1; corrupt = 1'b0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (7000) @(negedge clk);
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all bytes delivered");
    check(pt_q[0].size() == 0 && pt_q[1].size() == 0, "all pulses delivered");
    // one frame with a corrupted wire byte: only a check-sum error
    expect_csum = 1'b1;
    corrupt = 1'b1;
    plain_q[0].push_back(8'h5A); plain_q[0].push_back(8'h5A);
    exp_q[0].push_back({1'b1, 8'h5A ^ 8'hFF});   // wrong byte still delivered, then flagged
    txd[0] = 8'h5A; txv[0] = 1'b1; txl[0] = 1'b1;
    @(posedge clk iff txa[0]);
    @(negedge clk);
    txv[0] = 1'b0; txl[0] = 1'b0;
    repeat (40) @(negedge clk);
    corrupt = 1'b0;
    repeat (40) @(negedge clk);
    check(n_csum == 1, $sformatf("one check-sum error (%0d)", n_csum));
    check(n_pulse == 240, $sformatf("pulses %0d", n_pulse));
    check(n_pre > 0, "pulses pre-empted frames");
    check(n_scr_diff > n_scr / 2, $sformatf("scrambled %0d of %0d", n_scr_diff, n_scr));
    check(lat_seen.num() == 1, "one fixed latency");
    check(n_drop == 0, "no pulse dropped");
    $display("bytes=%0d pulses=%0d preempt=%0d scrambled=%0d/%0d csum=%0d",
             n_bytes, n_pulse, n_pre, n_scr_diff, n_scr, n_csum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
