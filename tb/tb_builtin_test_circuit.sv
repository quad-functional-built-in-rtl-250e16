// Testbench for builtin_test_circuit at its full 640 cells. It exercises the
// four ways of using the chain: parallel latch then parallel read (normal),
// parallel latch then serial read-out (memory test), serial load then
// parallel read (display test), serial in to serial out (serial test), and
// the selection between system clocks and test-mode clocks.
module tb_builtin_test_circuit;
  localparam int N = 640;
  logic sys_ck1, sys_ck2, sys_ts, sys_sin;
  logic tst_ck1, tst_ck2, tst_ts, tst_sin, sel_test;
  logic [N-1:0] mem_data, q, pat, pat2;
  logic sout;
  int checks = 0, failures = 0;

  builtin_test_circuit #(.N_FF(N)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one CK1/CK2 pair on the selected clock source
  task automatic step(input logic use_test);
    if (use_test) begin tst_ck1 = 1; #5; tst_ck1 = 0; #5; tst_ck2 = 1; #5; tst_ck2 = 0; #5; end
    else begin sys_ck1 = 1; #5; sys_ck1 = 0; #5; sys_ck2 = 1; #5; sys_ck2 = 0; #5; end
  endtask

  function automatic logic [N-1:0] rand_vec();
    logic [N-1:0] v;
    for (int i = 0; i < N; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sys_ck1 = 0; sys_ck2 = 0; sys_ts = 0; sys_sin = 0;
    tst_ck1 = 0; tst_ck2 = 0; tst_ts = 0; tst_sin = 0; sel_test = 0;
    mem_data = '0;
    #5;

    // normal / parallel transfer: two different rows latched in parallel
    for (int r = 0; r < 4; r++) begin
      pat = rand_vec();
      mem_data = pat; sys_ts = 1;
      step(0);
      mem_data = ~pat;   // bitlines change after the latch
      #1;
      check(q == pat, "parallel latch");
    end

    // memory test: latch a row, shift it out; last cell first
    pat = rand_vec();
    mem_data = pat; sys_ts = 1; step(0);
    sys_ts = 0; sys_sin = 0;
    begin
      int bad = 0;
      for (int k = 0; k < N; k++) begin
        if (sout !== pat[N-1-k]) bad++;
        step(0);
      end
      check(bad == 0, "memory test serial read-out");
      check(q == '0, "chain filled from the serial input");
    end

    // display test: shift a line in, read it in parallel
    pat = rand_vec();
    sys_ts = 0;
    for (int k = 0; k < N; k++) begin
      sys_sin = pat[N-1-k];
      step(0);
    end
    #1;
    check(q == pat, "display test serial load");

    // serial transfer test: what goes in comes out N steps later
    pat2 = rand_vec();
    begin
      int bad = 0;
      for (int k = 0; k < N; k++) begin
        if (sout !== pat[N-1-k]) bad++;
        sys_sin = pat2[N-1-k];
        step(0);
      end
      check(bad == 0, "serial transfer in to out");
      check(q == pat2, "serial transfer second pattern loaded");
    end

    // test-mode clocks: system clocks must be ignored, test clocks used
    sel_test = 1;
    pat = rand_vec();
    mem_data = pat; sys_ts = 0; tst_ts = 1;
    step(0);            // system clocks: no effect while test clocks selected
    #1;
    check(q == pat2, "system clocks ignored under test-mode clocks");
    step(1);            // test clocks with TS from the test pin: parallel latch
    #1;
    check(q == pat, "test-mode clocks latch in parallel");
    tst_ts = 0; tst_sin = 1;
    step(1);
    #1;
    check(q == {pat[N-2:0], 1'b1}, "test-mode clocks shift from the test input");
    sel_test = 0;
    step(1);
    #1;
    check(q == {pat[N-2:0], 1'b1}, "test clocks ignored under system clocks");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
