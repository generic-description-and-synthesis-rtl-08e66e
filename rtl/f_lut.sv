// f_lut: the f / f^-1 box of the magnitude datapath.
//
// Computes y = f(x) = -ln(tanh(x/2)) on a 5-bit magnitude with 2 fractional
// bits (see ldpc_pkg::f_phi for the table and its formula). f is an
// involution, so one instance placed before the interconnection network acts
// as f and one placed after the inverse network acts as f^-1, as in the
// magnitude datapath of the vertical-shuffle decoder. Purely combinational.
// The function is the source method's; the quantization is this design's.
module f_lut
  import ldpc_pkg::*;
(
  input  mag_t x,
  output mag_t y
);
  always_comb y = f_phi(x);
endmodule
