// mikumari_pulse_gen -- pulse K-character generator.
//
// A one-shot pulse on `pulse_in` (with its 3-bit type) becomes a pending
// pulse K character {1, type[2:0], timing[3:0]}.  `timing` counts the cycles
// the request has waited for a character slot; the receiving side delays its
// output by the complement, so the pulse crosses the link with a fixed
// latency, as the document asks of the 4-bit pulse timing field.  The
// character is offered with top priority until `ack`.  A request that
// arrives while one is pending, or while the link is down, is dropped and
// counted on `dropped` (this design's choice).
//
// Timing: pulse_in in cycle p gives k_valid from cycle p+1; timing is 0 if
// the character is taken in cycle p+1.
// k_body[7] is constant 1: it marks the K character as a pulse.
module mikumari_pulse_gen (
  input  logic       clk,
  input  logic       rst,
  input  logic       link_up,
  input  logic       pulse_in,
  input  logic [2:0] pulse_type,
  input  logic       ack,
  output logic       k_valid,
  output logic [7:0] k_body,
  output logic       dropped
);

  logic [2:0] type_q;
  logic [3:0] wait_q;

  assign k_body  = {1'b1, type_q, wait_q};
  assign dropped = pulse_in && (k_valid || !link_up);

  always_ff @(posedge clk) begin
    if (rst) begin
      k_valid <= 1'b0;
      type_q  <= '0;
      wait_q  <= '0;
    end else if (k_valid) begin
      if (ack || !link_up) k_valid <= 1'b0;
      else if (wait_q != 4'hF) wait_q <= wait_q + 4'd1;
    end else if (pulse_in && link_up) begin
      k_valid <= 1'b1;
      type_q  <= pulse_type;
      wait_q  <= '0;
    end
  end

endmodule
