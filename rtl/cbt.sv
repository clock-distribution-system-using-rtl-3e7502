// cbt -- CDCM based transceiver: transmitter, receiver, clock monitor and the
// lane controller that brings the lane up on its own and takes it down.
//
// Lane controller states:
//   WAIT_CLK  line carries IDLE patterns, receiver held in reset, until a
//             modulated clock is seen: `clk_lock` (the clock-recovery PLL lock
//             on a slave, tie high on a master) and the in-CBT clock monitor.
//   INIT_IDLE IDLE patterns for INIT_IDLE_CYCLES cycles so the far end can
//             tune its bit slip; the local receiver tunes its own.
//   INIT_T    T characters: T_INIT until the local receiver is character
//             aligned, T_READY after.  The lane goes up when the receiver is
//             aligned and a T_READY has come in from the far end.
//   UP        link characters flow; T_READY dogfood is sent periodically.
// The lane drops (back to WAIT_CLK) on a broken pattern, an IDLE pattern or
// a T_INIT from the far end while up, a lost clock, or when the watchdog sees
// no valid T character for WDT_CYCLES cycles (during INIT_T too).  This covers the
// document's cable detection, automatic initialization, quality monitor and
// dogfood watchdog; the two-code handshake and all counts are this design's.
//
// Character interface to the link layer as in cbt_tx / cbt_rx; rx_valid is
// only raised while the lane is up.
// The fixed high and low segments of pattern_out are constant by design.
module cbt
  import cdcm_pkg::*;
#(
  parameter cdcm_mode_e  MODE             = CDCM_10_2P5,
  parameter int unsigned DOG_INTERVAL     = 32,
  parameter int unsigned WDT_CYCLES       = 1024,
  parameter int unsigned INIT_IDLE_CYCLES = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clk_lock,
  // link-layer side
  input  logic [7:0] tx_char,
  input  logic       tx_is_k,
  input  logic       tx_valid,
  output logic       tx_ack,
  output logic       rx_valid,
  output logic       rx_is_k,
  output logic [7:0] rx_char,
  // status
  output logic       lane_up,
  output logic       bit_aligned,
  output logic       char_aligned,
  output logic       pattern_err,
  output logic       wdt_timeout,
  output logic       sent_t,
  output logic       sent_dm,
  output logic       slot,
  // IOSERDES side
  output logic [9:0] pattern_out,
  input  logic [9:0] pattern_in
);

  typedef enum logic [1:0] {WAIT_CLK, INIT_IDLE, INIT_T, UP} lane_state_e;

  localparam int unsigned IW = $clog2(INIT_IDLE_CYCLES + 1);
  localparam int unsigned WW = $clog2(WDT_CYCLES + 1);

  lane_state_e   st;
  logic [IW-1:0] icnt;
  logic [WW-1:0] wdt;
  logic          clk_present, clk_ok, rx_rst;
  logic          t_valid, idle_seen, rx_valid_i, drop, dogfood;
  logic [7:0]    t_body;

  cbt_clk_monitor u_mon (
    .clk(clk), .rst(rst), .word(pattern_in), .present(clk_present)
  );

  assign clk_ok = clk_lock && clk_present;
  assign rx_rst = rst || (st == WAIT_CLK);

  cbt_tx #(.MODE(MODE), .DOG_INTERVAL(DOG_INTERVAL)) u_tx (
    .clk(clk), .rst(rst),
    .send_idle(st == WAIT_CLK || st == INIT_IDLE),
    .user_en(st == UP),
    .t_body(char_aligned ? T_READY : T_INIT),
    .tx_char(tx_char), .tx_is_k(tx_is_k), .tx_valid(tx_valid), .tx_ack(tx_ack),
    .slot(slot), .sent_t(sent_t), .sent_dm(sent_dm),
    .pattern(pattern_out)
  );

  cbt_rx #(.MODE(MODE)) u_rx (
    .clk(clk), .rst(rx_rst), .word(pattern_in),
    .bit_aligned(bit_aligned), .char_aligned(char_aligned), .slip(),
    .pattern_err(pattern_err), .idle_seen(idle_seen),
    .t_valid(t_valid), .t_body(t_body),
    .rx_valid(rx_valid_i), .rx_is_k(rx_is_k), .rx_char(rx_char)
  );

  assign rx_valid    = rx_valid_i && (st == UP);
  // only the two defined T codes feed the watchdog
  assign dogfood     = t_valid && (t_body == T_READY || t_body == T_INIT);
  assign wdt_timeout = (st == INIT_T || st == UP) && (wdt == WW'(WDT_CYCLES));
  assign drop        = !clk_ok || wdt_timeout ||
                       ((st == UP) && (pattern_err || idle_seen ||
                                       (t_valid && t_body == T_INIT)));
  assign lane_up     = (st == UP);

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= WAIT_CLK;
      icnt <= '0;
      wdt  <= '0;
    end else begin
      if (dogfood || st == WAIT_CLK || st == INIT_IDLE) wdt <= '0;
      else if (wdt != WW'(WDT_CYCLES))                   wdt <= wdt + 1'b1;
      unique case (st)
        WAIT_CLK: begin
          icnt <= '0;
          if (clk_ok) st <= INIT_IDLE;
        end
        INIT_IDLE: begin
          if (!clk_ok)                               st <= WAIT_CLK;
          else if (icnt == IW'(INIT_IDLE_CYCLES - 1)) st <= INIT_T;
          else                                        icnt <= icnt + 1'b1;
        end
        INIT_T: begin
          if (drop) st <= WAIT_CLK;
          else if (char_aligned && t_valid && t_body == T_READY) st <= UP;
        end
        UP: begin
          if (drop) st <= WAIT_CLK;
        end
      endcase
    end
  end

endmodule
