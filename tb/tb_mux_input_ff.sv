// Testbench for mux_input_ff: checks the TS data selection, that Q only
// changes on the CK2 phase, and that a CK1 pulse alone or a CK2 pulse alone
// does not pass new data through.
module tb_mux_input_ff;
  logic d1, d2, ts, ck1, ck2, q;
  int checks = 0, failures = 0;

  mux_input_ff dut (.d1, .d2, .ts, .ck1, .ck2, .q);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic pulse_ck1; ck1 = 1; #5; ck1 = 0; #5; endtask
  task automatic pulse_ck2; ck2 = 1; #5; ck2 = 0; #5; endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp, prev;
    ck1 = 0; ck2 = 0; d1 = 0; d2 = 0; ts = 0;
    #5;
    // establish a known state
    pulse_ck1; pulse_ck2;
    check(q, 1'b0, "initial load of d1=0");
    for (int i = 0; i < 200; i++) begin
      prev = q;
      d1 = 1'($urandom); d2 = 1'($urandom); ts = 1'($urandom);
      exp = ts ? d2 : d1;
      #2;
      pulse_ck1;
      check(q, prev, "Q held after CK1 only");
      // change inputs after the master closed: must not matter
      d1 = ~d1; d2 = ~d2;
      #2;
      pulse_ck2;
      check(q, exp, ts ? "TS=1 takes D2" : "TS=0 takes D1");
      // CK2 again without CK1: value stays
      pulse_ck2;
      check(q, exp, "Q stable on repeated CK2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
