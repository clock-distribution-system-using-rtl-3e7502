// cbt_rx -- receive half of the CDCM based transceiver (CBT).
//
// Pipeline (one register each), from the ISERDES word to the character:
//   1 input register, keeping the previous word as well
//   2 bit slip: a 10-bit window picked out of the last two words
//   3 CDCM decode and pattern check (cdcm_decoder)
//   4 symbol shift register and character-boundary tracking
//   5 header decode, D- bodies inverted back
//   6 output register
// so a character is on rx_char 6 cycles after the word carrying its last
// symbol, as the document gives for the CBT receiver.
//
// Bit slip.  Every legal pattern starts high and ends low with one falling
// edge, so only one of the ten rotations of a received word is legal.  While
// not bit-aligned the slip is advanced whenever a decoded word is illegal,
// and alignment is declared after BS_GOOD legal words in a row.  The
// document tunes the ISERDES bit slip on the IDLE pattern; here the slip is
// done in fabric after the ISERDES, which has the same effect, and any legal
// pattern is accepted, so tuning still works if the far end has already left
// its IDLE phase.  IDELAY tap tuning is not part of this block.
// Character alignment.  The document adjusts the decoder bit order with T
// characters.  Here, when a T code (T_INIT or T_READY) shows up in the
// symbol shift register, that position becomes the character boundary;
// alignment is declared after CA_GOOD T codes on the same boundary.
// After alignment an illegal pattern raises pattern_err and an IDLE pattern
// raises idle_seen; the lane controller takes the lane down on both.
module cbt_rx
  import cdcm_pkg::*;
#(
  parameter cdcm_mode_e  MODE    = CDCM_10_2P5,
  parameter int unsigned BS_GOOD = 16,
  parameter int unsigned CA_GOOD = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] word,          // from the ISERDES, bit 9 oldest segment
  output logic       bit_aligned,
  output logic       char_aligned,
  output logic [3:0] slip,          // current bit-slip position 0..9
  output logic       pattern_err,   // illegal pattern after bit alignment
  output logic       idle_seen,     // IDLE pattern after character alignment
  output logic       t_valid,       // T character received (dogfood)
  output logic [7:0] t_body,
  output logic       rx_valid,      // D or K character received
  output logic       rx_is_k,
  output logic [7:0] rx_char
);

  localparam int unsigned N  = char_cycles(MODE);
  localparam int unsigned W  = sym_width(MODE);
  localparam int unsigned BW = $clog2(BS_GOOD + 1);
  localparam int unsigned CW = $clog2(CA_GOOD + 1);

  // stage 1, 2
  logic [9:0]  w_q, w_p, al_q;
  logic [19:0] win;
  // stage 3
  cdcm_sym_t   sym;
  logic        sym_ok;
  // bit slip control
  logic [BW-1:0] good_cnt;
  logic [1:0]    settle;
  // stage 4
  logic [8:0]  csr;
  logic [9:0]  csr_nx;
  logic [3:0]  sym_cnt;
  logic [CW-1:0] hits;
  logic        is_t_code, at_end, shift;
  logic [9:0]  chr_q;
  logic        chr_v;
  // stage 5
  logic [7:0]  body5;
  logic [1:0]  hdr5;
  logic        v5;

  assign win = {w_p, w_q};

  always_ff @(posedge clk) begin
    if (rst) begin
      w_q  <= '0;
      w_p  <= '0;
      al_q <= '0;
    end else begin
      w_q  <= word;
      w_p  <= w_q;
      al_q <= win[19 - slip -: 10];
    end
  end

  cdcm_decoder #(.MODE(MODE)) u_dec (
    .clk(clk), .rst(rst), .word(al_q), .sym(sym), .ok(sym_ok)
  );

  // ---- bit slip ----
  always_ff @(posedge clk) begin
    if (rst) begin
      slip        <= '0;
      good_cnt    <= '0;
      settle      <= 2'd3;
      bit_aligned <= 1'b0;
    end else if (!bit_aligned) begin
      if (settle != 2'd0) begin
        settle <= settle - 2'd1;
      end else if (!sym_ok) begin
        slip     <= (slip == 4'd9) ? 4'd0 : slip + 4'd1;
        good_cnt <= '0;
        settle   <= 2'd3;           // new window reaches the decoder output in 2 cycles
      end else if (good_cnt == BW'(BS_GOOD - 1)) begin
        bit_aligned <= 1'b1;
      end else begin
        good_cnt <= good_cnt + 1'b1;
      end
    end
  end

  assign pattern_err = bit_aligned && !sym_ok;
  assign idle_seen   = char_aligned && sym_ok && sym.idle;

  // ---- character alignment ----
  assign shift     = bit_aligned && sym_ok && !sym.idle;
  assign csr_nx    = (W == 2) ? {csr[7:0], sym.bits} : {csr[8:0], sym.bits[0]};
  assign is_t_code = (csr_nx == {HDR_T, T_INIT}) || (csr_nx == {HDR_T, T_READY});
  assign at_end    = (sym_cnt == 4'(N - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      csr          <= '0;
      sym_cnt      <= '0;
      hits         <= '0;
      char_aligned <= 1'b0;
      chr_q        <= '0;
      chr_v        <= 1'b0;
    end else begin
      chr_v <= 1'b0;
      if (bit_aligned && sym_ok && sym.idle && !char_aligned) begin
        sym_cnt <= '0;
        hits    <= '0;
      end else if (shift) begin
        csr <= csr_nx[8:0];
        if (char_aligned) begin
          sym_cnt <= at_end ? 4'd0 : sym_cnt + 4'd1;
          if (at_end) begin
            chr_q <= csr_nx;
            chr_v <= 1'b1;
          end
        end else begin
          if (is_t_code) begin
            sym_cnt <= '0;
            if (at_end) begin
              if (hits == CW'(CA_GOOD - 1)) char_aligned <= 1'b1;
              else                          hits <= hits + 1'b1;
            end else begin
              hits <= CW'(1);
            end
          end else begin
            sym_cnt <= at_end ? 4'd0 : sym_cnt + 4'd1;
            if (at_end) hits <= '0;
          end
        end
      end
    end
  end

  // ---- stage 5: header decode ----
  always_ff @(posedge clk) begin
    if (rst) begin
      v5    <= 1'b0;
      hdr5  <= HDR_T;
      body5 <= '0;
    end else begin
      v5    <= chr_v;
      hdr5  <= chr_q[9:8];
      body5 <= (chr_q[9:8] == HDR_DM) ? ~chr_q[7:0] : chr_q[7:0];
    end
  end

  // ---- stage 6: outputs ----
  always_ff @(posedge clk) begin
    if (rst) begin
      t_valid  <= 1'b0;
      t_body   <= '0;
      rx_valid <= 1'b0;
      rx_is_k  <= 1'b0;
      rx_char  <= '0;
    end else begin
      t_valid  <= v5 && (hdr5 == HDR_T);
      t_body   <= body5;
      rx_valid <= v5 && (hdr5 != HDR_T);
      rx_is_k  <= (hdr5 == HDR_K);
      rx_char  <= body5;
    end
  end

endmodule
