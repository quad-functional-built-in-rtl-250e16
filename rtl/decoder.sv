// Decoder: expands one coded display line to 6 bits per sub-pixel.
//
// The output register (the built-in test circuit) holds one display line of
// PIXELS coded 4-bit sub-pixels, sub-pixel x in bits [4x+3:4x]. Each is
// expanded to a 6-bit level for the 6-bit DACs of the horizontal driver,
// sub-pixel x in bits [6x+5:6x]. The original design names this decompression but
// not its rule; this design uses the inverse of its coder (coder.sv):
// level = round(code * 63 / 15) = (126*code + 15) / 30, so codes 0 and 15
// give levels 0 and 63. Purely combinational, one expander per sub-pixel.
module decoder #(
  parameter int unsigned PIXELS = 160
) (
  input  logic [4*PIXELS-1:0] coded,
  output logic [6*PIXELS-1:0] levels
);

  function automatic logic [5:0] expand(input logic [3:0] c);
    logic [11:0] num;
    num = 12'(c) * 12'd126 + 12'd15;
    return 6'(num / 12'd30);
  endfunction

  always_comb begin
    for (int x = 0; x < PIXELS; x++) begin
      levels[6*x +: 6] = expand(coded[4*x +: 4]);
    end
  end

endmodule
