// adc_fist_pkg: sizes, command encoding and shared types of the ADC-free
// in-sensor tracking back end.
//
// Array geometry follows the published configuration: a 32 x 16 grid of
// regions of 64 x 64 pixels, event detection on one pixel per 9 x 9 box,
// eight shared vertical buses (so at most eight regions of interest are
// processed at once) and a 9 x 9 Gabor kernel. The maximum bit-stream
// length of 1024 and the default of 64 are the lengths the design was
// evaluated at. The 8-bit pixel level code (a stand-in for the analog
// bit-line voltage in the models), the command encoding and the weight
// format are this implementation's own choices.
package adc_fist_pkg;

  // Pixel array and region geometry.
  localparam int unsigned REG_COLS  = 32;   // regions across
  localparam int unsigned REG_ROWS  = 16;   // regions down
  localparam int unsigned REG_SIZE  = 64;   // pixels per region side
  localparam int unsigned ARRAY_W   = REG_COLS * REG_SIZE;
  localparam int unsigned ARRAY_H   = REG_ROWS * REG_SIZE;

  // Event detection sampling: one centre pixel per BOX x BOX box.
  localparam int unsigned BOX       = 9;
  localparam int unsigned BOX_COLS  = ARRAY_W / BOX;
  localparam int unsigned BOX_ROWS  = ARRAY_H / BOX;

  // Object tracking.
  localparam int unsigned NUM_BUS   = 8;    // ROIs active at once
  localparam int unsigned KSIZE     = 9;    // Gabor kernel side
  localparam int unsigned NMAX_LOG2 = 10;   // longest bit stream 2^10
  localparam int unsigned NDEF_LOG2 = 6;    // default bit stream 2^6 = 64
  localparam int unsigned NMIN_LOG2 = 1;

  // Level code that stands for an analog bit-line voltage in the models:
  // value v means v / 2^PIX_BITS of the comparator reference.
  localparam int unsigned PIX_BITS  = 8;

  // Signed kernel coefficient: sign plus magnitude, magnitude read as
  // mag / 2^NMAX_LOG2.
  typedef struct packed {
    logic                 neg;
    logic [NMAX_LOG2-1:0] mag;
  } weight_t;

  // Engine enables. With ede and ote both set, detected regions are
  // tracked; with ote alone every region is processed.
  typedef struct packed {
    logic continuous;   // rescan after each frame until stopped
    logic ote;          // object tracking engine enabled
    logic ede;          // event detection engine enabled
  } mode_t;

  typedef enum logic [2:0] {
    OP_NOP      = 3'd0,
    OP_SET_MODE = 3'd1,   // data[2:0] = mode_t
    OP_SET_PREC = 3'd2,   // data[3:0] = log2 of the bit-stream length
    OP_LOAD_W   = 3'd3,   // addr = tap (row * KSIZE + col), data = weight_t
    OP_START    = 3'd4,
    OP_STOP     = 3'd5
  } cmd_op_e;

  localparam int unsigned CMD_ADDR_W = 7;
  localparam int unsigned CMD_DATA_W = 16;

endpackage
