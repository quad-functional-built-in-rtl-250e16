// End-to-end testbench for sog_lcd_top at its default size (160 x 120 RGB,
// 360 lines, 640-cell test circuit). It
//   1. writes a random frame over the pixel bus,
//   2. runs a normal frame and checks all 360 decoded lines against the
//      frame coded and decoded here in real arithmetic,
//   3. runs the memory test on every row and checks each serial bit stream
//      against the coded frame, and its decoded sub-pixels against the 6-bit
//      data written (full memory read-back),
//   4. runs the display test with a vertical stripe pattern and checks that
//      every line is loaded with the stripes,
//   5. runs the serial transfer test twice: the second run must return the
//      first run's input,
//   6. clocks the test circuit from the test-mode pins, shifting a line in
//      and reading it in parallel and serially,
//   7. runs a second normal frame to show the tests left the memory intact.
// Each mechanism is counted and a failure is counted for any that never
// happened. Cycle counts of the operations are checked against the
// controller's documented costs.
module tb_sog_lcd_top;
  import sog_pkg::*;
  localparam int P = 160, R = 120, L = 360, N = 640;
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

  always #5 clk = ~clk;

  // reference frame: coded 4-bit sub-pixels per display line
  logic [3:0] code [L][P];
  logic [5:0] raw  [L][P];   // 6-bit levels as written

  function automatic int quant(input logic [5:0] v);
    return int'(real'(v) * 15.0 / 63.0);
  endfunction
  function automatic int level(input int c);
    return int'(real'(c) * 63.0 / 15.0);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // mechanism counters
  int m_frames, m_memtest_rows, m_disptest, m_sertest, m_testclk, m_backpressure, m_lines;

  initial begin
    #40ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial input source
  logic [N-1:0] si_pat;
  int si_idx;
  always @(posedge clk) if (si_valid && si_ready) si_idx <= si_idx + 1;
  always_comb si = sel_test ? si_pat[N-1-(si_idx % N)] : si_pat[N-1-(si_idx % N)];

  // serial output sink
  logic so_bits[$];
  always @(posedge clk) if (so_valid) so_bits.push_back(so);

  // line sink: expected-value check per loaded line
  int exp_mode;           // 0: frame contents, 1: stripe pattern
  logic [6*P-1:0] stripe_levels;
  always @(posedge clk) begin
    if (line_load) begin
      m_lines++;
      if (exp_mode == 0) begin
        int bad = 0;
        for (int x = 0; x < P; x++)
          if (int'(line_levels[6*x +: 6]) != level(int'(code[line_addr][x]))) bad++;
        check(bad == 0, $sformatf("line %0d: %0d sub-pixels differ", line_addr, bad));
      end else begin
        check(line_levels == stripe_levels, $sformatf("display test line %0d", line_addr));
      end
    end
  end

  int cyc;
  always @(posedge clk) if (busy) cyc++;

  task automatic run(input op_e o, input int row);
    op = o; test_row = 9'(row); cyc = 0;
    start = 1; @(posedge clk); #1; start = 0;
    for (int n = 0; !done; n++) begin
      if (n > 10000) begin
        check(0, $sformatf("operation %s never finished", o.name()));
        break;
      end
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
  endtask

  task automatic tpulse;
    tck1 = 1; #7; tck1 = 0; #7; tck2 = 1; #7; tck2 = 0; #7;
  endtask

  task automatic write_frame;
    for (int y = 0; y < R; y++) begin
      for (int x = 0; x < P; x++) begin
        rgb18_t p;
        p = rgb18_t'($urandom);
        raw[3*y][x] = p.r; raw[3*y+1][x] = p.g; raw[3*y+2][x] = p.b;
        code[3*y][x] = 4'(quant(p.r));
        code[3*y+1][x] = 4'(quant(p.g));
        code[3*y+2][x] = 4'(quant(p.b));
        px_valid = 1; px_x = 8'(x); px_y = 7'(y); px_data = p;
        @(posedge clk);
        while (!px_ready) @(posedge clk);
        #1;
        px_valid = 0;
        if (!px_ready) m_backpressure++;
      end
    end
    while (!px_ready) begin @(posedge clk); #1; end
  endtask

  initial begin
    rst_n = 0; px_valid = 0; px_x = 0; px_y = 0; px_data = '0;
    start = 0; op = OP_NORMAL; test_row = 0; si_valid = 1; si_pat = '0; si_idx = 0;
    sel_test = 0; tck1 = 0; tck2 = 0; tts = 0; exp_mode = 0;
    m_frames = 0; m_memtest_rows = 0; m_disptest = 0; m_sertest = 0;
    m_testclk = 0; m_backpressure = 0; m_lines = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // 1. frame write
    write_frame();

    // 2. normal frame
    m_lines = 0;
    run(OP_NORMAL, 0);
    m_frames++;
    check(m_lines == L, $sformatf("normal frame loaded %0d lines", m_lines));
    check(cyc == 7 * L + 1, $sformatf("normal frame took %0d clocks, expected %0d", cyc, 7 * L + 1));

    // 3. memory test of every row
    for (int r = 0; r < L && failures < 20; r++) begin
      int bad = 0;
      so_bits.delete();
      run(OP_MEMTEST, r);
      m_memtest_rows++;
      if (r == 0) check(cyc == 5 * N + 3, $sformatf("memory test took %0d clocks", cyc));
      check(so_bits.size() == N, $sformatf("row %0d: %0d serial bits", r, so_bits.size()));
      for (int k = 0; k < N && k < so_bits.size(); k++) begin
        int b;
        b = N - 1 - k;
        if (so_bits[k] != code[r][b / 4][b % 4]) bad++;
      end
      check(bad == 0, $sformatf("memory test row %0d: %0d bits differ", r, bad));
      // as in a read-back test of the panel: decode the read-out and compare
      // with the 6-bit data written, allowing the coding error
      bad = 0;
      for (int x = 0; x < P && so_bits.size() == N; x++) begin
        int c, d;
        c = 0;
        for (int j = 3; j >= 0; j--) c = c * 2 + int'(so_bits[N - 1 - (4 * x + j)]);
        d = level(c) - int'(raw[r][x]);
        if (d > 2 || d < -2) bad++;
      end
      check(bad == 0, $sformatf("memory test row %0d: %0d decoded sub-pixels off", r, bad));
    end

    // 4. display test: stripes two sub-pixels wide, full white / black
    for (int x = 0; x < P; x++) begin
      si_pat[4*x +: 4] = ((x / 2) % 2 == 0) ? 4'hF : 4'h0;
      stripe_levels[6*x +: 6] = ((x / 2) % 2 == 0) ? 6'd63 : 6'd0;
    end
    si_idx = 0; exp_mode = 1; m_lines = 0;
    run(OP_DISPTEST, 0);
    m_disptest++;
    check(m_lines == L, $sformatf("display test loaded %0d lines", m_lines));
    check(cyc == 5 * N + L + 1, $sformatf("display test took %0d clocks", cyc));
    exp_mode = 0;

    // 5. serial transfer test: first run loads A, second returns A
    begin
      logic [N-1:0] a;
      int bad = 0;
      for (int i = 0; i < N; i += 32) a[i +: 32] = $urandom;
      si_pat = a; si_idx = 0;
      run(OP_SERTEST, 0);
      m_sertest++;
      si_pat = ~a; si_idx = 0; so_bits.delete();
      run(OP_SERTEST, 0);
      m_sertest++;
      check(so_bits.size() == N, "serial test bit count");
      for (int k = 0; k < N && k < so_bits.size(); k++) if (so_bits[k] != a[N-1-k]) bad++;
      check(bad == 0, $sformatf("serial transfer: %0d bits differ", bad));
      check(cyc == 5 * N + 1, $sformatf("serial test took %0d clocks", cyc));
    end

    // 6. test-mode clocks from the pins
    begin
      logic [N-1:0] b;
      int bad = 0;
      for (int i = 0; i < N; i += 32) b[i +: 32] = $urandom;
      sel_test = 1; tts = 0;
      for (int k = 0; k < N; k++) begin
        si_pat = b; si_idx = k;
        #1;
        tpulse();
        m_testclk++;
      end
      for (int x = 0; x < P; x++)
        if (int'(line_levels[6*x +: 6]) != level(int'(b[4*x +: 4]))) bad++;
      check(bad == 0, $sformatf("test-clock load seen in parallel: %0d differ", bad));
      bad = 0;
      for (int k = 0; k < N; k++) begin
        if (so != b[N-1-k]) bad++;
        tpulse();
      end
      check(bad == 0, $sformatf("test-clock serial read-out: %0d differ", bad));
      sel_test = 0;
      si_idx = 0;
    end

    // 7. normal frame again: memory untouched by the tests
    m_lines = 0;
    run(OP_NORMAL, 0);
    m_frames++;
    check(m_lines == L, "second frame line count");

    check(m_frames == 2, "normal frames");
    check(m_memtest_rows == L, "memory test rows");
    check(m_disptest > 0, "display test ran");
    check(m_sertest > 0, "serial transfer test ran");
    check(m_testclk > 0, "test-mode clocks used");
    check(m_backpressure > 0, "frontend back-pressure seen");
    $display("mechanisms: frames=%0d memtest_rows=%0d disptest=%0d sertest=%0d testclk_steps=%0d backpressure=%0d",
             m_frames, m_memtest_rows, m_disptest, m_sertest, m_testclk, m_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
