// Testbench for decoder: random coded lines at the full 160 sub-pixels; each
// 6-bit level must equal code * 63 / 15 rounded to the nearest integer,
// computed here in real arithmetic.
module tb_decoder;
  localparam int P = 160;
  logic [4*P-1:0] coded;
  logic [6*P-1:0] levels;
  int checks = 0, failures = 0;

  decoder #(.PIXELS(P)) dut (.coded, .levels);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int x = 0; x < P; x++) coded[4*x +: 4] = (t < 16) ? 4'(t) : 4'($urandom);
      #1;
      for (int x = 0; x < P; x++) begin
        int c, e;
        c = int'(coded[4*x +: 4]);
        e = int'(real'(c) * 63.0 / 15.0);   // nearest level
        checks++;
        if (int'(levels[6*x +: 6]) != e) begin
          failures++;
          $display("FAIL x=%0d code=%0d level=%0d expected %0d", x, c, levels[6*x +: 6], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
