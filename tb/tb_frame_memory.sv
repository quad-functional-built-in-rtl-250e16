// Testbench for frame_memory at its full 360 x 40 x 16 size: fills every word
// with a value derived from its address, overwrites a random subset, then
// reads every row and compares with a reference array kept here. Also checks
// the one-clock read latency and that rd_data holds without rd_en.
module tb_frame_memory;
  localparam int ROWS = 360, COLS = 40, W = 16;
  logic clk = 0;
  logic wr_en, rd_en;
  logic [8:0] wr_row, rd_row;
  logic [5:0] wr_col;
  logic [W-1:0] wr_data;
  logic [COLS*W-1:0] rd_data;
  logic [W-1:0] ref_mem [ROWS][COLS];
  int checks = 0, failures = 0;

  frame_memory #(.ROWS(ROWS), .COLS(COLS), .WORD_BITS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int r, input int c, input logic [W-1:0] d);
    wr_en = 1; wr_row = 9'(r); wr_col = 6'(c); wr_data = d;
    @(posedge clk); #1;
    wr_en = 0;
    ref_mem[r][c] = d;
  endtask

  task automatic rd_check(input int r);
    rd_en = 1; rd_row = 9'(r);
    @(posedge clk); #1;
    rd_en = 0;
    checks++;
    for (int c = 0; c < COLS; c++) begin
      if (rd_data[c*W +: W] !== ref_mem[r][c]) begin
        failures++;
        $display("FAIL row %0d col %0d: %h expected %h", r, c, rd_data[c*W +: W], ref_mem[r][c]);
        break;
      end
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_row = 0; rd_row = 0; wr_col = 0; wr_data = 0;
    @(posedge clk); #1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        wr(r, c, W'(r * 97 + c * 13 + 5));
    for (int i = 0; i < 2000; i++)
      wr($urandom_range(ROWS-1), $urandom_range(COLS-1), W'($urandom));
    for (int r = 0; r < ROWS; r++) rd_check(r);
    // latency: data must not appear in the same cycle as the request
    rd_check(7);
    rd_en = 1; rd_row = 9'd8;
    #1;
    checks++;
    if (rd_data[15:0] !== ref_mem[7][0]) begin failures++; $display("FAIL read not registered"); end
    @(posedge clk); #1; rd_en = 0;
    // hold without rd_en
    rd_row = 9'd3;
    @(posedge clk); @(posedge clk); #1;
    checks++;
    if (rd_data[15:0] !== ref_mem[8][0]) begin failures++; $display("FAIL rd_data not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
