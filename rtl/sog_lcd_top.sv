// Digital part of a DRAM-frame-memory LCD with a quad-functional built-in
// test circuit.
//
// Data path: CPU-bus pixels (18-bit RGB) -> frontend with coder (12 bits per
// pixel) -> DRAM frame memory (one 640-bit row per display line) -> built-in
// test circuit (640 multiplexed-input flip-flops standing in for the output
// register) -> decoder (6 bits per sub-pixel) -> line_levels, which go to the
// horizontal driver's DACs while line_addr selects the line through the
// vertical driver. Those drivers and the pixel array are analog and lie
// outside this module; line_load marks each line they should take.
//
// The controller runs one of four operations per start pulse (see
// test_controller.sv): a normal display frame (parallel in, parallel out),
// memory test (row latched in parallel, shifted out on so), display test
// (coded line shifted in on si, written to every line) and the serial transfer
// self test (si to so). With sel_test high the test circuit is clocked
// directly from the pins tck1/tck2 with tts as TS and si as serial input,
// bypassing the controller.
//
// Parameters: PIXELS sub-pixels per line and PIX_ROWS pixel rows (160 x 120
// by default); everything else is derived: LINES = 3*PIX_ROWS DRAM rows and
// display lines, N_FF = 4*PIXELS test-circuit cells, PIXELS/4 words per row.
// Reset is asynchronous, active low; one system clock drives everything except
// the test-circuit latches, whose phases come from the controller or the pins.
module sog_lcd_top
  import sog_pkg::*;
#(
  parameter int unsigned PIXELS   = PANEL_PIXELS,
  parameter int unsigned PIX_ROWS = PANEL_ROWS,
  localparam int unsigned N_LINES = 3 * PIX_ROWS,
  localparam int unsigned N_FF    = 4 * PIXELS,
  localparam int unsigned N_COLS  = PIXELS / 4,
  localparam int unsigned X_W     = $clog2(PIXELS),
  localparam int unsigned Y_W     = $clog2(PIX_ROWS),
  localparam int unsigned RA_W    = $clog2(N_LINES),
  localparam int unsigned CA_W    = $clog2(N_COLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU pixel bus
  input  logic              px_valid,
  output logic              px_ready,
  input  logic [X_W-1:0]    px_x,
  input  logic [Y_W-1:0]    px_y,
  input  rgb18_t            px_data,
  // operation control
  input  logic              start,
  input  op_e               op,
  input  logic [RA_W-1:0]   test_row,
  output logic              busy,
  output logic              done,
  // serial test pins
  input  logic              si,
  input  logic              si_valid,
  output logic              si_ready,
  output logic              so,
  output logic              so_valid,
  // test-mode clocks
  input  logic              sel_test,
  input  logic              tck1,
  input  logic              tck2,
  input  logic              tts,
  // to the horizontal and vertical drivers
  output logic              line_load,
  output logic [RA_W-1:0]   line_addr,
  output logic [6*PIXELS-1:0] line_levels
);

  logic              mem_wr_en;
  logic [RA_W-1:0]   mem_wr_row;
  logic [CA_W-1:0]   mem_wr_col;
  logic [15:0]       mem_wr_data;
  logic              mem_rd_en;
  logic [RA_W-1:0]   mem_rd_row;
  logic [N_FF-1:0]   mem_rd_data;
  logic              ck1, ck2, ts, sin;
  logic [N_FF-1:0]   reg_q;

  frontend #(.PIXELS(PIXELS), .PIX_ROWS(PIX_ROWS)) u_frontend (
    .clk, .rst_n,
    .px_valid, .px_ready, .px_x, .px_y, .px_data,
    .mem_wr_en, .mem_wr_row, .mem_wr_col, .mem_wr_data
  );

  frame_memory #(.ROWS(N_LINES), .COLS(N_COLS), .WORD_BITS(16)) u_mem (
    .clk,
    .wr_en(mem_wr_en), .wr_row(mem_wr_row), .wr_col(mem_wr_col), .wr_data(mem_wr_data),
    .rd_en(mem_rd_en), .rd_row(mem_rd_row), .rd_data(mem_rd_data)
  );

  test_controller #(.N_LINES(N_LINES), .N_FF(N_FF)) u_ctrl (
    .clk, .rst_n,
    .start, .op, .test_row, .busy, .done,
    .mem_rd_en, .mem_rd_row,
    .ck1, .ck2, .ts, .sin,
    .si, .si_valid, .si_ready, .so_valid,
    .line_load, .line_addr
  );

  builtin_test_circuit #(.N_FF(N_FF)) u_btc (
    .sys_ck1(ck1), .sys_ck2(ck2), .sys_ts(ts), .sys_sin(sin),
    .tst_ck1(tck1), .tst_ck2(tck2), .tst_ts(tts), .tst_sin(si),
    .sel_test,
    .mem_data(mem_rd_data),
    .q(reg_q),
    .sout(so)
  );

  decoder #(.PIXELS(PIXELS)) u_dec (
    .coded(reg_q),
    .levels(line_levels)
  );

endmodule
