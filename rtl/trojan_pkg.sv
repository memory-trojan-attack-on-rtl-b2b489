// trojan_pkg: types and constants shared by the memory-controller Trojan.
//
// The monitored memory bus follows the usual DDR arrangement the design is
// built around: a 64-bit data bus and a burst length of 8, so one request
// moves 64 bytes. For the input image a request holds an 8x8 array of 8-bit
// pixels, one row of eight pixels per beat. The pixel layout inside a burst
// (byte i of beat r = row r, column i) is this design's choice.
package trojan_pkg;

  localparam int unsigned BEAT_W    = 64;                 // data bus width
  localparam int unsigned BURST_LEN = 8;                  // beats per request
  localparam int unsigned PIX_W     = 8;                  // bits per pixel
  localparam int unsigned SUB_DIM   = 8;                  // sub-image is SUB_DIM x SUB_DIM
  localparam int unsigned SUB_PIX   = SUB_DIM * SUB_DIM;  // 64 pixels
  localparam int unsigned SPEC_W    = $clog2(SUB_PIX + 1);// 0..64 fits in 7 bits
  localparam int unsigned MAX_SETS  = 4;   // size of the per-set threshold arrays

  typedef logic [BEAT_W-1:0]  beat_t;
  typedef logic [SUB_PIX-1:0] submask_t;   // bit r*8+c = 1: pixel (r,c) is black
  typedef logic [SPEC_W-1:0]  spectrum_t;

  // Phases of the Trojan (triggering phase split in two, then payload).
  typedef enum logic [1:0] {
    ST_MONITOR = 2'd0,   // watching traffic, waiting for the end of an FC layer
    ST_ANALYSE = 2'd1,   // current layer may be the first layer: check its reads
    ST_PAYLOAD = 2'd2    // triggered: zero the data written back
  } trojan_state_e;

  // The two zero-setting circuits: OR gate into the flip-flop's reset, or a
  // multiplexer in front of its D input.
  typedef enum logic {
    PAYLOAD_OR_RESET  = 1'b0,
    PAYLOAD_MUX_INPUT = 1'b1
  } payload_style_e;

endpackage
