// mikumari_pulse_rep -- pulse reproducer.
//
// On a received pulse K character {1, type, timing} it re-creates the
// one-shot pulse PULSE_FIX - timing cycles later (plus one register), so that
// the wait the transmitter spent for a character slot is made up and every
// pulse crosses the link with the same latency.  A 16-entry delay line holds
// pulses in flight, so a new one may arrive before the last has left.
// Timing values above PULSE_FIX are treated as PULSE_FIX.
module mikumari_pulse_rep #(
  parameter int unsigned PULSE_FIX = 7
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       k_valid,      // pulse K character received
  input  logic [7:0] k_body,
  output logic       pulse_out,
  output logic [2:0] pulse_type
);

  typedef struct packed {
    logic       v;
    logic [2:0] t;
  } slot_t;

  slot_t     line [16];
  logic [3:0] d;

  always_comb begin
    if (k_body[3:0] >= 4'(PULSE_FIX)) d = '0;
    else                              d = 4'(PULSE_FIX) - k_body[3:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) line[i] <= '0;
      pulse_out  <= 1'b0;
      pulse_type <= '0;
    end else begin
      for (int i = 0; i < 15; i++) line[i] <= line[i+1];
      line[15] <= '0;
      if (k_valid && k_body[7] && d != 4'd0)
        line[d - 4'd1] <= '{v: 1'b1, t: k_body[6:4]};
      pulse_out  <= (k_valid && k_body[7] && d == 4'd0) ? 1'b1 : line[0].v;
      pulse_type <= (k_valid && k_body[7] && d == 4'd0) ? k_body[6:4] : line[0].t;
    end
  end

endmodule
