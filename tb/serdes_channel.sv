// serdes_channel -- behavioural model of OSERDES, cable and ISERDES for one
// direction of a CDCM link, in the slow-clock domain.
//
// The 10-segment pattern of each cycle is sent as a bit stream and captured
// by the far end with an unknown word phase: the received word holds the
// last OFFSET segments of the previous pattern followed by the first
// 10-OFFSET segments of the current one.  `mode` injects cable faults:
// unplug (flat line), one illegal pattern, a stuck legal pattern, or a legal
// pattern swapped for another legal one (a bit error that the CDCM check
// cannot see; only the first swappable pattern after entering the mode is
// changed, so exactly one symbol is wrong).  Not synthesizable in intent; used by testbenches only.
module serdes_channel
  import mikumari_tb_pkg::*;
#(
  parameter int unsigned OFFSET = 3,
  parameter bit          ONE_P5 = 1'b0   // CDCM-10-1.5 patterns for CH_SWAP
) (
  input  logic       clk,
  input  ch_mode_e   mode,
  input  logic [9:0] tx_pattern,
  output logic [9:0] rx_word
);

  logic [9:0] cur, prev, swp;
  logic       swapped;

  always_comb begin
    unique case (mode)
      CH_OK:     cur = tx_pattern;
      CH_UNPLUG: cur = '0;
      CH_BREAK:  cur = 10'b10101_00000;
      CH_STUCK:  cur = 10'b11110_00000;
      CH_SWAP:   cur = swapped ? tx_pattern : swp;
      default:   cur = tx_pattern;
    endcase
  end

  always_comb begin
    if (ONE_P5)
      swp = (tx_pattern == 10'b11110_00000) ? 10'b11111_10000 : tx_pattern;
    else
      swp = (tx_pattern == 10'b11111_10000) ? 10'b11111_11000 :
            (tx_pattern == 10'b11100_00000) ? 10'b11110_00000 : tx_pattern;
  end

  initial swapped = 1'b0;
  always_ff @(posedge clk) begin
    prev    <= cur;
    swapped <= (mode == CH_SWAP) && (swapped || swp != tx_pattern);
  end

  if (OFFSET == 0) begin : g_aligned
    assign rx_word = cur;
  end else begin : g_shift
    assign rx_word = {prev[OFFSET-1:0], cur[9:OFFSET]};
  end

endmodule
