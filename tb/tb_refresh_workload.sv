// Refresh workload for sog_lcd_top at its default size. The dynamic frame
// memory is refreshed only by the row reads of the display; cells hold their
// data for 166 ms, so every row must be read at least that often. With a
// 1 MHz system clock (one memory access per clock) that is 166,000 clocks.
//
// Part 1 runs normal frames back to back and measures, for every line, the
// longest gap between two reads (seen as line_load); it must stay below the
// retention limit, and the frame rate must exceed 6 frames/s.
// Part 2 runs the memory test over all 360 rows, inserting one normal frame
// after every ROWS_PER_FRAME memory-test rows, and checks that no row goes
// unread for longer than the limit (memory-test reads are counted through the
// serial strobes of each row). Without the inserted frames a full memory test
// takes over a second, far beyond the retention time.
module tb_refresh_workload;
  import sog_pkg::*;
  localparam int P = 160, R = 120, L = 360;
  localparam int CLK_HZ = 1_000_000;
  localparam int RETENTION_CLKS = 166 * CLK_HZ / 1000;   // 166 ms
  localparam int ROWS_PER_FRAME = 40;
  logic clk = 0, rst_n;
  logic px_valid, px_ready;
  logic [7:0] px_x;
  logic [6:0] px_y;
  rgb18_t px_data;
  logic start, busy, done;
  op_e op;
  logic [8:0] test_row;
  logic si, si_valid, si_ready, so, so_valid;
  logic sel_test, tck1, tck2, tts;
  logic line_load;
  logic [8:0] line_addr;
  logic [6*P-1:0] line_levels;
  int checks = 0, failures = 0;

  sog_lcd_top dut (.*);

  always #500 clk = ~clk;   // 1 MHz

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #3s;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cycle;
  longint last_read [L];
  longint max_gap;
  int     reads;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic note_read(input int row);
    longint gap;
    gap = cycle - last_read[row];
    if (gap > max_gap) max_gap = gap;
    last_read[row] = cycle;
    reads++;
  endtask

  always @(posedge clk) if (line_load) note_read(int'(line_addr));

  task automatic run(input op_e o, input int row);
    op = o; test_row = 9'(row);
    start = 1; @(posedge clk); #1; start = 0;
    for (int n = 0; !done; n++) begin
      if (n > 10000) begin check(0, "operation never finished"); break; end
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    longint t0, frame_clks;
    rst_n = 0; px_valid = 0; px_x = 0; px_y = 0; px_data = '0;
    start = 0; op = OP_NORMAL; test_row = 0; si = 0; si_valid = 0;
    sel_test = 0; tck1 = 0; tck2 = 0; tts = 0;
    cycle = 0; max_gap = 0; reads = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int r = 0; r < L; r++) last_read[r] = cycle;

    // part 1: continuous display
    max_gap = 0;
    t0 = cycle;
    for (int f = 0; f < 4; f++) run(OP_NORMAL, 0);
    frame_clks = (cycle - t0) / 4;
    check(reads == 4 * L, $sformatf("%0d line reads in 4 frames", reads));
    check(max_gap <= RETENTION_CLKS,
          $sformatf("display: longest unread gap %0d clocks, limit %0d", max_gap, RETENTION_CLKS));
    check(frame_clks * 6 < CLK_HZ,
          $sformatf("frame takes %0d clocks: %0d frames/s", frame_clks, CLK_HZ / frame_clks));
    $display("display: %0d clocks per frame, %0d frames/s, longest unread gap %0d clocks",
             frame_clks, CLK_HZ / frame_clks, max_gap);

    // part 2: full memory test with interleaved frames
    max_gap = 0;
    for (int r = 0; r < L; r++) begin
      int nbits = 0;
      op = OP_MEMTEST; test_row = 9'(r);
      start = 1; @(posedge clk); #1; start = 0;
      note_read(r);
      while (!done) begin
        if (so_valid) nbits++;
        @(posedge clk); #1;
      end
      @(posedge clk); #1;
      if (r == 0) check(nbits == 640, $sformatf("memory test row gave %0d bits", nbits));
      if ((r + 1) % ROWS_PER_FRAME == 0) run(OP_NORMAL, 0);
    end
    run(OP_NORMAL, 0);
    check(max_gap <= RETENTION_CLKS,
          $sformatf("memory test: longest unread gap %0d clocks, limit %0d", max_gap, RETENTION_CLKS));
    $display("memory test with a frame every %0d rows: longest unread gap %0d clocks (%0d ms at 1 MHz)",
             ROWS_PER_FRAME, max_gap, max_gap / 1000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
