// mikumari_frame_parser -- normal frame parser with check-sum test.
//
// Receives the link's D and K characters (D already descrambled).  After an
// FSK, every D character is data, except that the one right before FEK is
// the check sum; so the parser holds back the two latest D characters and
// releases the older one when a newer one arrives.  On FEK the held data
// byte goes out with rx_last, and the held check sum is compared with the
// 8-bit sum of the frame's data bytes: rx_csum_err flags a mismatch (one
// cycle, with rx_last).  A frame cut short by a new FSK, or one too short to
// hold data and check sum, raises rx_frame_err.  Pulse K characters are
// ignored here.  The output lags the character input by one cycle for
// data, and rx_data of the last byte is released with FEK.
module mikumari_frame_parser
  import cdcm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic       in_is_k,
  input  logic [7:0] in_char,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       rx_last,
  output logic       rx_csum_err,
  output logic       rx_frame_err
);

  logic       in_frame;
  logic [1:0] held;          // number of held D characters
  logic [7:0] h_old, h_new;
  logic [7:0] sum;           // sum of released data bytes

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame     <= 1'b0;
      held         <= '0;
      h_old        <= '0;
      h_new        <= '0;
      sum          <= '0;
      rx_data      <= '0;
      rx_valid     <= 1'b0;
      rx_last      <= 1'b0;
      rx_csum_err  <= 1'b0;
      rx_frame_err <= 1'b0;
    end else begin
      rx_valid     <= 1'b0;
      rx_last      <= 1'b0;
      rx_csum_err  <= 1'b0;
      rx_frame_err <= 1'b0;
      if (in_valid && in_is_k && in_char == K_FSK) begin
        rx_frame_err <= in_frame;
        in_frame     <= 1'b1;
        held         <= '0;
        sum          <= '0;
      end else if (in_valid && in_is_k && in_char == K_FEK) begin
        in_frame <= 1'b0;
        held     <= '0;
        if (in_frame && held == 2'd2) begin
          rx_data     <= h_old;
          rx_valid    <= 1'b1;
          rx_last     <= 1'b1;
          rx_csum_err <= (sum + h_old) != h_new;
        end else if (in_frame) begin
          rx_frame_err <= 1'b1;
        end
      end else if (in_valid && !in_is_k && in_frame) begin
        h_new <= in_char;
        h_old <= h_new;
        if (held == 2'd2) begin
          rx_data  <= h_old;
          rx_valid <= 1'b1;
          sum      <= sum + h_old;
        end else begin
          held <= held + 2'd1;
        end
      end
    end
  end

endmodule
