// cdcm_pkg -- types, constants and helper functions shared by the CDCM based
// transceiver (CBT) and the MIKUMARI link layer.
//
// A CDCM waveform pattern is one period of the slow clock F0 cut into ten
// segments; bit 9 is the first segment sent, bit 0 the last.  Every pattern
// starts high and ends low, and only the position of the falling edge carries
// data:
//   CDCM-10-2.5 : segments 0-2 high, 7-9 low, segments 3-6 thermometer coded,
//                 30/40/50/60/70 % duty for 00/01/IDLE/10/11 (2 bits per cycle)
//   CDCM-10-1.5 : segments 0-3 high, 6-9 low, segments 4-5 coded,
//                 40/50/60 % duty for 0/IDLE/1 (1 bit per cycle)
// The 2.5 encode table (00->0000, 01->0001, IDLE->0011, 10->0111, 11->1111)
// and the IDLE pattern 0b11111_00000 follow the document; the way the 4-bit
// code lands on segments 3..6 is read from the five duty-cycle test patterns
// it lists.  A CBT character is a 2-bit header plus an 8-bit body; header
// values T=00, D+=01, D-=10, K=11 follow the document.  The T-character and
// link K-character body codes are this design's own choice.
package cdcm_pkg;

  typedef enum logic {
    CDCM_10_2P5 = 1'b0,   // 2 bits per slow-clock cycle, 5 cycles per character
    CDCM_10_1P5 = 1'b1    // 1 bit  per slow-clock cycle, 10 cycles per character
  } cdcm_mode_e;

  typedef enum logic [1:0] {
    HDR_T  = 2'b00,       // CBT control character, never leaves the CBT
    HDR_DP = 2'b01,       // data, body sent as is
    HDR_DM = 2'b10,       // data, body sent inverted (DC balance)
    HDR_K  = 2'b11        // link-layer special character
  } cbt_hdr_e;

  // One transmitted or received symbol: either the IDLE pattern or data bits
  // (bit 0 only in CDCM-10-1.5).
  typedef struct packed {
    logic       idle;
    logic [1:0] bits;
  } cdcm_sym_t;

  localparam logic [9:0] IDLE_PATTERN = 10'b11111_00000;

  // T-character bodies (CBT internal).  Both codes, and each code repeated,
  // have no false match at any other 1- or 2-bit offset of the stream, and
  // both characters are DC neutral in CDCM-10-2.5 (+2 / -2 in CDCM-10-1.5).
  localparam logic [7:0] T_INIT  = 8'h5F;  // sender's receiver not aligned yet
  localparam logic [7:0] T_READY = 8'h2B;  // sender's receiver aligned (also the dogfood)

  // MIKUMARI K-character bodies.  Bit 7 set marks a pulse character:
  // {1, pulse type[2:0], pulse timing[3:0]}.
  localparam logic [7:0] K_FSK = 8'h1B;           // frame start
  localparam logic [7:0] K_FEK = 8'h4E;           // frame end

  function automatic int unsigned sym_width(cdcm_mode_e mode);
    return (mode == CDCM_10_2P5) ? 2 : 1;
  endfunction

  function automatic int unsigned char_cycles(cdcm_mode_e mode);
    return (mode == CDCM_10_2P5) ? 5 : 10;
  endfunction

  // Disparity of a whole 10-bit character, symbols taken MSB first: the sum
  // over its symbols of the duty deviation from IDLE in segments
  // (2.5: 00/01/10/11 = -2/-1/+1/+2; 1.5: 0/1 = -1/+1).
  function automatic logic signed [5:0] char_disp(cdcm_mode_e mode, logic [9:0] c);
    logic signed [5:0] d;
    logic [1:0]        b;
    d = '0;
    if (mode == CDCM_10_2P5) begin
      for (int i = 0; i < 5; i++) begin
        b = c[9-2*i -: 2];
        d = d + ((b == 2'b00) ? -6'sd2 : (b == 2'b01) ? -6'sd1 :
                 (b == 2'b10) ?  6'sd1 :  6'sd2);
      end
    end else begin
      for (int i = 0; i < 10; i++) d = d + (c[9-i] ? 6'sd1 : -6'sd1);
    end
    return d;
  endfunction

endpackage
