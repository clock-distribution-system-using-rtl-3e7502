// tb_prbs16_scrambler -- compares the byte key with a bit-serial model of
// the PRBS16 (x^16 + x^15 + x^13 + x^4 + 1), checks that descrambling
// restores the data, that reseed restarts the sequence, that the state does
// not repeat within 4000 bytes, and that SCRAMBLE=0 passes data through.
`timescale 1ns/1ps
module tb_prbs16_scrambler;
  logic clk = 1'b0, rst, reseed, advance;
  logic [7:0] din, s_out, d_out, c_out;
  int checks = 0, failures = 0;
  bit hist [$];

  always #5 clk = ~clk;

  prbs16_scrambler #(.SCRAMBLE(1'b1)) u_scr   (.clk(clk), .rst(rst), .reseed(reseed), .advance(advance), .din(din),   .dout(s_out));
  prbs16_scrambler #(.SCRAMBLE(1'b1)) u_descr (.clk(clk), .rst(rst), .reseed(reseed), .advance(advance), .din(s_out), .dout(d_out));
  prbs16_scrambler #(.SCRAMBLE(1'b0)) u_clear (.clk(clk), .rst(rst), .reseed(reseed), .advance(advance), .din(din),   .dout(c_out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic model_seed();
    hist.delete();
    for (int i = 0; i < 16; i++) hist.push_back(1'b1);   // seed 0xFFFF, oldest first
  endtask

  function automatic logic [7:0] model_key();
    logic [7:0] k;
    for (int i = 0; i < 8; i++) k[7-i] = hist[i];
    return k;
  endfunction

  task automatic model_step8();
    for (int i = 0; i < 8; i++) begin
      automatic bit nb = hist[0] ^ hist[1] ^ hist[3] ^ hist[12];
      void'(hist.pop_front());
      hist.push_back(nb);
    end
  endtask

  function automatic logic [15:0] model_state();
    logic [15:0] s;
    for (int i = 0; i < 16; i++) s[15-i] = hist[i];
    return s;
  endfunction

  initial begin
    int same;
    rst = 1'b1; reseed = 1'b0; advance = 1'b0; din = '0;
    model_seed();
    @(negedge clk);
    rst = 1'b0;
    same = 0;
    for (int n = 0; n < 4000; n++) begin
      din = 8'($urandom);
      advance = ($urandom % 4 != 0);
      reseed  = (n == 2500);
      #1;
      check(s_out == (din ^ model_key()), $sformatf("key at byte %0d", n));
      check(d_out == din, "descrambled");
      check(c_out == din, "clear text passes");
      @(negedge clk);
      if (reseed) model_seed();
      else if (advance) begin
        model_step8();
        if (model_state() == 16'hFFFF) same++;
      end
      if (reseed) check(u_scr.lfsr == 16'hFFFF, "reseed");
    end
    check(same == 0, "no short period");
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
