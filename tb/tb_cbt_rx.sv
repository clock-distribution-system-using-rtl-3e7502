// tb_cbt_rx -- CBT receiver fed by a testbench-generated CDCM-10-2.5 stream
// whose word boundary is rotated by OFFSET segments.  Phases: IDLE patterns
// (bit slip must find the word phase), T_INIT characters (character
// alignment), then random D+, D-, K and T_READY characters, each of which
// must come out with the right body and type exactly 6 cycles after the
// word that completes it.  Finally one broken pattern must raise
// pattern_err and an IDLE pattern idle_seen.
`timescale 1ns/1ps
module tb_cbt_rx;
  import cdcm_pkg::*;

  localparam int OFFSET = 6;

  logic clk = 1'b0, rst;
  logic [9:0] word;
  logic bit_aligned, char_aligned, pattern_err, idle_seen, t_valid, rx_valid, rx_is_k;
  logic [3:0] slip;
  logic [7:0] t_body, rx_char;
  int checks = 0, failures = 0, k = 0;

  always #5 clk = ~clk;

  cbt_rx #(.MODE(CDCM_10_2P5)) u_dut (
    .clk(clk), .rst(rst), .word(word), .bit_aligned(bit_aligned), .char_aligned(char_aligned),
    .slip(slip), .pattern_err(pattern_err), .idle_seen(idle_seen), .t_valid(t_valid),
    .t_body(t_body), .rx_valid(rx_valid), .rx_is_k(rx_is_k), .rx_char(rx_char)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", k, what); end
  endtask

  function automatic logic [9:0] pat(int h);   // h high segments then low
    logic [9:0] p = '0;
    for (int i = 0; i < h; i++) p[9-i] = 1'b1;
    return p;
  endfunction

  function automatic logic [9:0] sym_pat(logic [1:0] b);
    return pat((b == 2'b00) ? 3 : (b == 2'b01) ? 4 : (b == 2'b10) ? 6 : 7);
  endfunction

  typedef struct { int due; bit t; bit kk; logic [7:0] body; } exp_t;
  exp_t eq[$];
  logic [9:0] prev_p = IDLE_PATTERN;
  bit ignore = 1'b0;
  int n_d = 0, n_k = 0, n_t = 0, n_perr = 0, n_idle = 0;

  // drive one pattern per cycle through the rotating "cable"
  task automatic send(logic [9:0] p);
    @(negedge clk);
    k++;
    word = {prev_p[OFFSET-1:0], p[9:OFFSET]};
    prev_p = p;
  endtask

  task automatic send_char(logic [9:0] c, bit expect_out, bit is_t, bit is_k, logic [7:0] body);
    for (int i = 0; i < 5; i++) send(sym_pat(c[9-2*i -: 2]));
    // the last segments arrive with the next word
    if (expect_out) eq.push_back('{due: k + 1 + 6, t: is_t, kk: is_k, body: body});
  endtask

  // output monitor
  always @(negedge clk) begin
    #2;
    if ((rx_valid || t_valid) && !ignore) begin
      if (eq.size() == 0) check(0, "unexpected character");
      else begin
        automatic exp_t e = eq.pop_front();
        check(k == e.due, $sformatf("latency: at %0d, due %0d", k, e.due));
        check(t_valid == e.t && rx_valid == !e.t, "T / non-T");
        if (e.t) begin check(t_body == e.body, "T body"); n_t++; end
        else begin
          check(rx_char == e.body, $sformatf("body %h want %h", rx_char, e.body));
          check(rx_is_k == e.kk, "K flag");
          if (e.kk) n_k++; else n_d++;
        end
      end
    end
    if (pattern_err) n_perr++;
    if (idle_seen) n_idle++;
  end

  initial begin
    rst  = 1'b1;
    word = IDLE_PATTERN;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (120) send(IDLE_PATTERN);
    check(bit_aligned, "bit aligned on IDLE");
    check(slip == 4'(OFFSET), $sformatf("slip %0d", slip));
    check(!char_aligned, "not char aligned on IDLE");
    for (int i = 0; i < 8; i++) send_char({HDR_T, T_INIT}, i >= 4, 1'b1, 1'b0, T_INIT);
    check(char_aligned, "char aligned on T_INIT");
    for (int i = 0; i < 400; i++) begin
      automatic int r = $urandom % 4;
      automatic logic [7:0] b = 8'($urandom);
      unique case (r)
        0: send_char({HDR_DP, b},  1'b1, 1'b0, 1'b0, b);
        1: send_char({HDR_DM, ~b}, 1'b1, 1'b0, 1'b0, b);
        2: send_char({HDR_K, b},   1'b1, 1'b0, 1'b1, b);
        default: send_char({HDR_T, T_READY}, 1'b1, 1'b1, 1'b0, T_READY);
      endcase
    end
    repeat (2) send_char({HDR_DP, 8'h55}, 1'b1, 1'b0, 1'b0, 8'h55);
    repeat (10) send(sym_pat(2'b01));
    check(eq.size() == 0, "all characters delivered");
    ignore = 1'b1;
    check(n_perr == 0 && n_idle == 0, "no errors on a clean stream");
    send(10'b11011_00000);          // broken pattern
    repeat (5) send(sym_pat(2'b01));
    check(n_perr == 1, $sformatf("one pattern error (%0d)", n_perr));
    send(IDLE_PATTERN);
    repeat (5) send(sym_pat(2'b01));
    check(n_idle == 1, "IDLE detected after alignment");
    check(n_d > 100 && n_k > 50 && n_t > 50, "all character types seen");
    $display("D=%0d K=%0d T=%0d", n_d, n_k, n_t);
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
