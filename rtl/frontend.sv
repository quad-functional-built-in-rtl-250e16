// Frontend: CPU-bus pixel writes into the frame memory.
//
// Each accepted pixel (18-bit RGB at x, y) passes through the coder and its
// three 4-bit colour codes are placed in three 16-bit word buffers, one per
// colour, at nibble x mod 4. When the pixel with x mod 4 = 3 is accepted the
// group of four pixels is complete and the three words are written on the
// next three clocks: red to row 3y, green to row 3y+1, blue to row 3y+2, all
// at column x/4. px_ready is low during those three clocks.
//
// Interface: valid/ready handshake on the pixel bus; a pixel is taken on a
// clock edge where px_valid and px_ready are both high. Memory writes are one
// word per clock. Reset is asynchronous, active low.
//
// The coder and the 18-bit to 12-bit conversion follow the original design; the bus
// handshake, the grouping of four pixels per word and the colour-to-row order
// (R, G, B lines of a pixel row in consecutive rows) are this design's
// choices. Pixels must be written in whole groups of four, x mod 4 = 0..3.
module frontend #(
  parameter int unsigned PIXELS   = 160,
  parameter int unsigned PIX_ROWS = 120,
  localparam int unsigned X_W     = $clog2(PIXELS),
  localparam int unsigned Y_W     = $clog2(PIX_ROWS),
  localparam int unsigned RA_W    = $clog2(PIX_ROWS * 3),
  localparam int unsigned CA_W    = $clog2(PIXELS / 4)
) (
  input  logic             clk,
  input  logic             rst_n,
  // pixel bus
  input  logic             px_valid,
  output logic             px_ready,
  input  logic [X_W-1:0]   px_x,
  input  logic [Y_W-1:0]   px_y,
  input  sog_pkg::rgb18_t  px_data,
  // frame memory write port
  output logic             mem_wr_en,
  output logic [RA_W-1:0]  mem_wr_row,
  output logic [CA_W-1:0]  mem_wr_col,
  output logic [15:0]      mem_wr_data
);

  sog_pkg::rgb12_t   coded;
  logic [2:0][15:0]  word_buf;     // [0] red, [1] green, [2] blue
  logic [1:0]        wr_cnt;       // 0: idle, 1..3: writing colour wr_cnt-1
  logic [RA_W-1:0]   base_row;
  logic [CA_W-1:0]   col;

  coder u_coder (.pix_in(px_data), .pix_out(coded));

  assign px_ready = (wr_cnt == 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_buf <= '0;
      wr_cnt   <= 2'd0;
      base_row <= '0;
      col      <= '0;
    end else if (wr_cnt != 2'd0) begin
      wr_cnt <= (wr_cnt == 2'd3) ? 2'd0 : wr_cnt + 2'd1;
    end else if (px_valid) begin
      word_buf[0][4*px_x[1:0] +: 4] <= coded.r;
      word_buf[1][4*px_x[1:0] +: 4] <= coded.g;
      word_buf[2][4*px_x[1:0] +: 4] <= coded.b;
      if (px_x[1:0] == 2'd3) begin
        wr_cnt   <= 2'd1;
        base_row <= RA_W'(px_y) * RA_W'(3);
        col      <= CA_W'(px_x >> 2);
      end
    end
  end

  always_comb begin
    mem_wr_en   = (wr_cnt != 2'd0);
    mem_wr_row  = base_row + RA_W'((wr_cnt == 2'd0) ? 2'd0 : 2'(wr_cnt - 2'd1));
    mem_wr_col  = col;
    mem_wr_data = word_buf[(wr_cnt == 2'd0) ? 2'd0 : wr_cnt - 2'd1];
  end

endmodule
