// Shared types and constants of the frame-memory LCD datapath.
//
// Geometry: the panel is 160 x 120 RGB pixels with horizontal colour stripes,
// so it has 360 display lines (120 pixel rows x 3 colours), each holding 160
// sub-pixels of a single colour. A sub-pixel is coded to 4 bits in the frame
// memory, so one display line is 640 bits = 40 columns x 16-bit words, which
// is exactly one DRAM row and exactly the length of the built-in test circuit.
// On the panel side every sub-pixel is 6 bits (6-bit DACs).
//
// The four operations of the built-in test circuit follow the original design;
// the 2-bit encoding below is this design's own choice.
package sog_pkg;

  localparam int unsigned PANEL_PIXELS = 160;  // sub-pixels per display line
  localparam int unsigned PANEL_ROWS   = 120;  // pixel rows
  localparam int unsigned PANEL_COLOURS = 3;    // R, G, B lines per pixel row
  localparam int unsigned PANEL_LINES  = PANEL_ROWS * PANEL_COLOURS;  // 360 DRAM rows
  localparam int unsigned DRAM_WORD_BITS = 16;   // DRAM word width
  localparam int unsigned DRAM_COLS    = 40;   // words per DRAM row
  localparam int unsigned DRAM_ROW_BITS = DRAM_WORD_BITS * DRAM_COLS;    // 640
  localparam int unsigned CODE_BITS  = 4;    // coded bits per sub-pixel
  localparam int unsigned RAW_BITS   = 6;    // uncoded bits per sub-pixel

  // Operation of the built-in test circuit
  typedef enum logic [1:0] {
    OP_NORMAL  = 2'd0,  // parallel in, parallel out: normal display / parallel transfer test
    OP_MEMTEST = 2'd1,  // parallel in, serial out: memory test
    OP_DISPTEST= 2'd2,  // serial in, parallel out: display test
    OP_SERTEST = 2'd3   // serial in, serial out: serial transfer self test
  } op_e;

  // 18-bit RGB pixel as delivered on the CPU bus
  typedef struct packed {
    logic [RAW_BITS-1:0] r;
    logic [RAW_BITS-1:0] g;
    logic [RAW_BITS-1:0] b;
  } rgb18_t;

  // 12-bit coded pixel
  typedef struct packed {
    logic [CODE_BITS-1:0] r;
    logic [CODE_BITS-1:0] g;
    logic [CODE_BITS-1:0] b;
  } rgb12_t;

endpackage
