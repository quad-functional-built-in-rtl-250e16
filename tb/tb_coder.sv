// Testbench for coder: every 6-bit colour value on each channel, checked
// against nearest-level quantisation to 4 bits, with the other channels random.
module tb_coder;
  import sog_pkg::*;
  rgb18_t pin;
  rgb12_t pout;
  int checks = 0, failures = 0;

  coder dut (.pix_in(pin), .pix_out(pout));

  // nearest of 16 evenly spaced levels, in real arithmetic
  function automatic int q(input logic [5:0] v);
    return int'(real'(v) * 15.0 / 63.0);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      for (int ch = 0; ch < 3; ch++) begin
        pin = rgb18_t'($urandom);
        if (ch == 0) pin.r = 6'(v);
        if (ch == 1) pin.g = 6'(v);
        if (ch == 2) pin.b = 6'(v);
        #1;
        checks++;
        if (int'(pout.r) != q(pin.r) || int'(pout.g) != q(pin.g) || int'(pout.b) != q(pin.b)) begin
          failures++;
          $display("FAIL in=%h out=%h", pin, pout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
