// Coder: 18-bit pixel (R:G:B = 6:6:6) to 12-bit pixel (r:g:b = 4:4:4).
//
// The two formats follow the original design; its coding rule is not
// reproduced here. This design uses uniform quantisation with rounding: each 6-bit colour level v
// (0..63) becomes the nearest of 16 evenly spaced levels,
// code = round(v * 15 / 63) = (30*v + 63) / 126, so 0 and 63 map to the ends
// 0 and 15. The matching decoder (decoder.sv) maps a code back to
// round(code * 63 / 15); a round trip is off by at most 2 levels.
// Purely combinational, one instance per pixel.
module coder
  import sog_pkg::*;
(
  input  rgb18_t pix_in,
  output rgb12_t pix_out
);

  function automatic logic [CODE_BITS-1:0] quantise(input logic [RAW_BITS-1:0] v);
    logic [11:0] num;
    num = 12'(v) * 12'd30 + 12'd63;
    return CODE_BITS'(num / 12'd126);
  endfunction

  always_comb begin
    pix_out.r = quantise(pix_in.r);
    pix_out.g = quantise(pix_in.g);
    pix_out.b = quantise(pix_in.b);
  end

endmodule
