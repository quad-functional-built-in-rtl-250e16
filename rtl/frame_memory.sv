// Frame memory: ROWS rows of COLS words of WORD_BITS bits (360 x 40 x 16 =
// 230,400 bits by default, one row per display line).
//
// Write port: one word per clock at (wr_row, wr_col), as the frontend stores
// coded data. Read port: a whole row at once, as every bitline of the array
// reaches the output register; rd_data is valid the clock after rd_en and
// holds until the next read. Word c of a row occupies row bits
// [16c+15:16c].
//
// The sizes and the row-wide read follow the original design. The separate write
// and read ports, the one-clock read latency and the absence of any refresh
// logic are this design's choices: the cells are modelled as ideal storage,
// and in the panel the regular display read of every row is what refreshes
// the dynamic cells, so no refresh controller is needed.
module frame_memory #(
  parameter int unsigned ROWS      = 360,
  parameter int unsigned COLS      = 40,
  parameter int unsigned WORD_BITS = 16,
  localparam int unsigned ROW_BITS = COLS * WORD_BITS,
  localparam int unsigned RA_W     = $clog2(ROWS),
  localparam int unsigned CA_W     = $clog2(COLS)
) (
  input  logic                 clk,
  // word write
  input  logic                 wr_en,
  input  logic [RA_W-1:0]      wr_row,
  input  logic [CA_W-1:0]      wr_col,
  input  logic [WORD_BITS-1:0] wr_data,
  // row read
  input  logic                 rd_en,
  input  logic [RA_W-1:0]      rd_row,
  output logic [ROW_BITS-1:0]  rd_data
);

  logic [COLS-1:0][WORD_BITS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_row) < ROWS) && (32'(wr_col) < COLS))
      mem[wr_row][wr_col] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en && (32'(rd_row) < ROWS))
      rd_data <= mem[rd_row];
  end

endmodule
