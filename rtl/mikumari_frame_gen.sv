// mikumari_frame_gen -- normal frame generator with 8-bit check sum.
//
// Frame format (document): FSK, data 0 .. data N, check sum, FEK, where FSK
// and FEK are K characters and data and check sum are D characters.  The
// frame starts when the user raises tx_valid; the byte flagged tx_last ends
// the data body.  The check sum is the 8-bit sum, modulo 256, of the data
// bytes (the document says only "8-bit check sum": the sum is this design's
// choice).
//
// Interface: the user holds tx_data/tx_valid/tx_last until tx_ack, a
// one-cycle strobe in the cycle the byte is taken.  The generator offers
// one character at a time on c_* and moves on when `ack` comes from the
// link multiplexer.  While a frame is open and the user has no byte, it
// offers nothing; the transceiver then fills the slot with its own
// (invisible) T character.  is_fsk / is_data tell the scrambler when to
// reseed and when to advance.
module mikumari_frame_gen
  import cdcm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       link_up,
  // user side
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  input  logic       tx_last,
  output logic       tx_ack,
  // character offered to the link multiplexer
  output logic       c_valid,
  output logic       c_is_k,
  output logic [7:0] c_char,
  output logic       is_fsk,
  output logic       is_data,
  input  logic       ack
);

  typedef enum logic [1:0] {F_IDLE, F_DATA, F_CSUM, F_FEK} fstate_e;

  fstate_e    st;
  logic [7:0] csum;

  always_comb begin
    c_valid = 1'b0;
    c_is_k  = 1'b0;
    c_char  = tx_data;
    is_fsk  = 1'b0;
    is_data = 1'b0;
    unique case (st)
      F_IDLE: begin
        c_valid = tx_valid && link_up;
        c_is_k  = 1'b1;
        c_char  = K_FSK;
        is_fsk  = 1'b1;
      end
      F_DATA: begin
        c_valid = tx_valid;
        c_char  = tx_data;
        is_data = 1'b1;
      end
      F_CSUM: begin
        c_valid = 1'b1;
        c_char  = csum;
        is_data = 1'b1;
      end
      F_FEK: begin
        c_valid = 1'b1;
        c_is_k  = 1'b1;
        c_char  = K_FEK;
      end
    endcase
  end

  assign tx_ack = ack && (st == F_DATA);

  always_ff @(posedge clk) begin
    if (rst || !link_up) begin
      st   <= F_IDLE;
      csum <= '0;
    end else if (ack) begin
      unique case (st)
        F_IDLE: begin
          st   <= F_DATA;
          csum <= '0;
        end
        F_DATA: begin
          csum <= csum + tx_data;
          if (tx_last) st <= F_CSUM;
        end
        F_CSUM:  st <= F_FEK;
        F_FEK:   st <= F_IDLE;
      endcase
    end
  end

endmodule
