// mikumari_tb_pkg -- bundles used by the MIKUMARI link testbenches to pass a
// node's user-side inputs and outputs between the test driver and the
// testbench top.
package mikumari_tb_pkg;

  typedef struct packed {
    logic       pulse_in;
    logic [2:0] pulse_type_in;
    logic [7:0] tx_data;
    logic       tx_valid;
    logic       tx_last;
  } node_in_t;

  typedef struct packed {
    logic       pulse_dropped;
    logic       pulse_out;
    logic [2:0] pulse_type_out;
    logic       tx_ack;
    logic [7:0] rx_data;
    logic       rx_valid;
    logic       rx_last;
    logic       rx_csum_err;
    logic       rx_frame_err;
    logic       lane_up;
    logic       pattern_err;
    logic       wdt_timeout;
    logic       sent_t;
    logic       sent_dm;
    logic [3:0] slip;
  } node_out_t;

  // channel fault modes
  typedef enum logic [2:0] {
    CH_OK      = 3'd0,   // patterns pass
    CH_UNPLUG  = 3'd1,   // flat line: cable removed
    CH_BREAK   = 3'd2,   // illegal pattern (one word)
    CH_STUCK   = 3'd3,   // legal data pattern repeated, no T characters
    CH_SWAP    = 3'd4    // legal pattern replaced by another legal one
  } ch_mode_e;

endpackage
