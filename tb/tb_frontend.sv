// Testbench for frontend: streams random pixels for several pixel rows with
// random gaps in px_valid, and checks every frame-memory write (row, column
// and 16-bit word of four coded sub-pixels) against words packed here from
// the 6-bit inputs, plus the three-clock busy time after each group of four.
module tb_frontend;
  import sog_pkg::*;
  localparam int P = 160, R = 120;
  logic clk = 0, rst_n;
  logic px_valid, px_ready;
  logic [7:0] px_x;
  logic [6:0] px_y;
  rgb18_t px_data;
  logic mem_wr_en;
  logic [8:0] mem_wr_row;
  logic [5:0] mem_wr_col;
  logic [15:0] mem_wr_data;
  int checks = 0, failures = 0;

  // expected writes, in order
  int exp_row[$], exp_col[$];
  logic [15:0] exp_data[$];

  frontend #(.PIXELS(P), .PIX_ROWS(R)) dut (.*);

  function automatic int q(input logic [5:0] v);
    return int'(real'(v) * 15.0 / 63.0);
  endfunction

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write monitor
  int writes = 0;
  always @(posedge clk) begin
    if (rst_n && mem_wr_en) begin
      checks++;
      writes++;
      if (exp_row.size() == 0) begin
        failures++; $display("FAIL unexpected write");
      end else begin
        int er, ec; logic [15:0] ed;
        er = exp_row.pop_front(); ec = exp_col.pop_front(); ed = exp_data.pop_front();
        if (int'(mem_wr_row) != er || int'(mem_wr_col) != ec || mem_wr_data != ed) begin
          failures++;
          $display("FAIL write row %0d col %0d data %h, expected row %0d col %0d data %h",
                   mem_wr_row, mem_wr_col, mem_wr_data, er, ec, ed);
        end
      end
    end
  end

  initial begin
    logic [15:0] w [3];
    rgb18_t p;
    int busy_cycles;
    rst_n = 0; px_valid = 0; px_x = 0; px_y = 0; px_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (w[i]) w[i] = '0;
    for (int y = 0; y < 6; y++) begin
      int yy;
      yy = (y < 3) ? y : R - 1 - (y - 3);
      for (int x = 0; x < P; x++) begin
        p = rgb18_t'($urandom);
        // idle gap now and then
        if ($urandom_range(3) == 0) begin
          px_valid = 0; @(posedge clk); #1;
        end
        px_valid = 1; px_x = 8'(x); px_y = 7'(yy); px_data = p;
        w[0][4*(x%4) +: 4] = 4'(q(p.r));
        w[1][4*(x%4) +: 4] = 4'(q(p.g));
        w[2][4*(x%4) +: 4] = 4'(q(p.b));
        if (x % 4 == 3) begin
          for (int c = 0; c < 3; c++) begin
            exp_row.push_back(3*yy + c); exp_col.push_back(x/4); exp_data.push_back(w[c]);
          end
        end
        checks++;
        if (!px_ready) begin failures++; $display("FAIL not ready when idle"); end
        @(posedge clk); #1;
        px_valid = 0;
        if (x % 4 == 3) begin
          busy_cycles = 0;
          while (!px_ready) begin busy_cycles++; @(posedge clk); #1; end
          checks++;
          if (busy_cycles != 3) begin failures++; $display("FAIL busy for %0d clocks", busy_cycles); end
        end
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (exp_row.size() != 0 || writes != 6 * P / 4 * 3) begin
      failures++; $display("FAIL %0d writes seen, %0d missing", writes, exp_row.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
