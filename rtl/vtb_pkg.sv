// Shared constants and types of the reconfigurable Viterbi traceback.
//
// The traceback serves trellises of 2^(K-1) states, K = 5..9, whose
// decisions come from eight ACS units (8 decision bits per clock). The
// decisions of one trellis stage form a segment of 2^(K-1)/8 = 2^(K-4)
// bytes in a 2K x 8 path-history RAM; one RAM holds one window of
// WL = 6*K stages, and four RAMs are used in rotation. The 11-bit RAM
// address is {stage, word-within-segment}, i.e. stage << (K-4) | word.
//
// The sizes (8 ACS units, 2K x 8 RAMs, four windows, 6-bit counter, 10-bit
// shifter, WL = 6K, K up to 9) follow the published design. The K range 5..9 is
// this design's choice: K = 4 and below would give less than one RAM word
// per stage.
package vtb_pkg;

  localparam int unsigned NUM_ACS   = 8;   // P, decision bits per clock
  localparam int unsigned SEL_W     = 3;   // M = log2(P), bits picked by M1
  localparam int unsigned STATE_W   = 8;   // K_MAX - 1, register D1..D8
  localparam int unsigned K_MIN     = 5;
  localparam int unsigned K_MAX     = 9;
  localparam int unsigned ADDR_W    = 11;  // 2K words per RAM
  localparam int unsigned RAM_DEPTH = 2048;
  localparam int unsigned NUM_WIN   = 4;   // PH RAMs / windows
  localparam int unsigned WIN_W     = 2;   // log2(NUM_WIN)
  localparam int unsigned CNT_W     = 6;   // down counter
  localparam int unsigned SHIFT_W   = 10;  // arithmetic shifter
  localparam int unsigned SEG_LSB_W = 5;   // low address bits taken from the state
  localparam int unsigned WL_FACTOR = 6;   // window length = 6 * K

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [STATE_W-1:0] state_t;
  typedef logic [CNT_W-1:0]   cnt_t;
  typedef logic [3:0]         k_t;       // constraint length 5..9

  // Everything the datapath needs to know about the configured trellis.
  typedef struct packed {
    k_t         k;          // constraint length
    logic [2:0] seg_bits;   // log2(words per stage) = K-4
    logic [2:0] shift;      // shifter shift amount = K-5
    logic [3:0] buf_state;  // B1..B4 on: address bits 4..1 from the state
    logic [3:0] buf_shift;  // B5..B8 on: address bits 4..1 from the shifter
    cnt_t       last_stage; // WL-1, counter load value
    logic [5:0] words;      // words per stage = 2^(K-4)
  } cfg_t;

endpackage
