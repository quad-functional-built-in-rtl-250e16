// Testbench for test_controller with a small panel (8 lines, 16 cells).
// For each of the four operations it counts the row reads, CK1/CK2 pairs and
// their TS value, serial strobes and line loads, checks the serial input bits
// reach the chain in order, that CK1 and CK2 never overlap and that every
// operation takes the documented number of clocks from start to done.
module tb_test_controller;
  import sog_pkg::*;
  localparam int L = 8, N = 16;
  logic clk = 0, rst_n;
  logic start, busy, done;
  op_e op;
  logic [2:0] test_row;
  logic mem_rd_en;
  logic [2:0] mem_rd_row;
  logic ck1, ck2, ts, sin;
  logic si, si_valid, si_ready, so_valid;
  logic line_load;
  logic [2:0] line_addr;
  int checks = 0, failures = 0;

  test_controller #(.N_LINES(L), .N_FF(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters, cleared per operation
  int n_rd, n_par, n_shift, n_so, n_load, n_overlap, cyc;
  int rd_rows[$], load_addrs[$];
  logic sin_seen[$];
  logic ck1_d;

  always @(posedge clk) begin
    ck1_d <= ck1;
    if (busy) cyc++;
    if (ck1 && ck2) n_overlap++;
    if (mem_rd_en) begin n_rd++; rd_rows.push_back(int'(mem_rd_row)); end
    if (ck1 && !ck1_d) begin
      if (ts) n_par++; else begin n_shift++; sin_seen.push_back(sin); end
    end
    if (so_valid) n_so++;
    if (line_load) begin n_load++; load_addrs.push_back(int'(line_addr)); end
  end

  // serial source: a fixed pattern, valid with random gaps
  logic [N-1:0] pattern;
  int si_idx;
  always @(posedge clk) begin
    if (si_valid && si_ready) si_idx <= si_idx + 1;
  end
  always_comb si = pattern[si_idx % N];

  task automatic clear;
    n_rd = 0; n_par = 0; n_shift = 0; n_so = 0; n_load = 0; n_overlap = 0; cyc = 0;
    rd_rows.delete(); load_addrs.delete(); sin_seen.delete();
  endtask

  task automatic run(input op_e o, input int row);
    clear();
    op = o; test_row = 3'(row);
    start = 1; @(posedge clk); #1; start = 0;
    while (!done) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    check(!busy, "idle after done");
  endtask

  initial begin
    rst_n = 0; start = 0; op = OP_NORMAL; test_row = 0; si_valid = 1;
    pattern = 16'hB3C5; si_idx = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // normal: one frame
    run(OP_NORMAL, 0);
    check(n_rd == L && n_par == L && n_shift == 0 && n_load == L && n_so == 0,
          $sformatf("normal counts rd=%0d par=%0d shift=%0d load=%0d", n_rd, n_par, n_shift, n_load));
    begin
      bit ok = 1;
      for (int i = 0; i < L; i++) if (rd_rows[i] != i || load_addrs[i] != i) ok = 0;
      check(ok, "normal reads and loads lines in order");
    end
    check(cyc == 7 * L + 1, $sformatf("normal takes %0d clocks, expected %0d", cyc, 7 * L + 1));
    check(n_overlap == 0, "no overlap in normal");

    // memory test of row 5
    run(OP_MEMTEST, 5);
    check(n_rd == 1 && rd_rows[0] == 5, "memory test reads test_row");
    check(n_par == 1 && n_shift == N - 1 && n_so == N && n_load == 0,
          $sformatf("memory test counts par=%0d shift=%0d so=%0d", n_par, n_shift, n_so));
    check(cyc == 5 * N + 3, $sformatf("memory test takes %0d clocks, expected %0d", cyc, 5 * N + 3));

    // display test: shift N bits, load every line
    si_idx = 0;
    run(OP_DISPTEST, 0);
    check(n_rd == 0 && n_par == 0 && n_shift == N && n_load == L && n_so == 0,
          $sformatf("display test counts rd=%0d shift=%0d load=%0d", n_rd, n_shift, n_load));
    begin
      bit ok = 1;
      for (int i = 0; i < N; i++) if (sin_seen[i] != pattern[i]) ok = 0;
      check(ok, "display test shifts the serial input in order");
    end
    check(cyc == 5 * N + L + 1, $sformatf("display test takes %0d clocks, expected %0d", cyc, 5 * N + L + 1));

    // serial transfer test with gaps in si_valid
    si_idx = 0;
    fork
      begin
        while (1) begin
          @(posedge clk); #2;
          si_valid = ($urandom_range(2) != 0);
        end
      end
      run(OP_SERTEST, 0);
    join_any
    disable fork;
    si_valid = 1;
    check(n_shift == N && n_so == N && n_rd == 0 && n_load == 0,
          $sformatf("serial test counts shift=%0d so=%0d", n_shift, n_so));
    begin
      bit ok = 1;
      for (int i = 0; i < N; i++) if (sin_seen[i] != pattern[i]) ok = 0;
      check(ok, "serial test shifts the serial input in order");
    end
    check(n_overlap == 0, "no overlap overall");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
