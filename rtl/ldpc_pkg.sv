// ldpc_pkg: types, constants and shared arithmetic of the LDPC decoder.
//
// Message format: every check-to-variable and variable-to-check message is a
// W = 6 bit two's-complement LLR with 2 fractional bits (LSB = 0.25), so
// magnitudes run from 0 to 31 (7.75). The word width and point position are
// this design's choice; the source method only says all messages share one
// w-bit fixed-point format. Sign convention: a negative LLR means bit 1.
//
// f_phi() is the quantized f(x) = -ln(tanh(|x|/2)) used by the check node
// update. Entry k holds min(31, round(4 * f(k/4))), with f(0) taken as the
// saturated value 31. Because f is its own inverse, the same table serves as
// f^-1. The table is fixed to the 5-bit magnitude format above.
//
// star() is the generic "star" operator a * b = F(a, b) on two LLRs, built
// as sign(a)sign(b) f( f|a| + f|b| ). qc_shift() gives the circulant shift of
// block (row r, column c) of the quasi-cyclic parity-check matrix used by
// the decoder: (r * c) mod Z, an array-code construction that has no
// 4-cycles when Z is prime to the row and column index differences.
package ldpc_pkg;

  localparam int W    = 6;          // message width (signed)
  localparam int MAGW = W - 1;      // magnitude width
  localparam int MAGMAX = (1 << MAGW) - 1;

  typedef logic signed [W-1:0] llr_t;
  typedef logic [MAGW-1:0]     mag_t;

  // Associative operator of a generic node processor.
  typedef enum logic [1:0] {OP_SUM = 2'd0, OP_XOR = 2'd1, OP_STAR = 2'd2} gop_e;

  function automatic mag_t f_phi(input mag_t x);
    case (x)
      5'd0:  return 5'd31;
      5'd1:  return 5'd8;
      5'd2:  return 5'd6;
      5'd3:  return 5'd4;
      5'd4:  return 5'd3;
      5'd5:  return 5'd2;
      5'd6:  return 5'd2;
      5'd7, 5'd8, 5'd9, 5'd10, 5'd11: return 5'd1;
      default: return 5'd0;
    endcase
  endfunction

  // Saturate a non-negative integer to the magnitude range.
  function automatic mag_t sat_mag(input int v);
    return (v > MAGMAX) ? mag_t'(MAGMAX) : mag_t'(v);
  endfunction

  // Magnitude of a signed integer, saturated.
  function automatic mag_t abs_sat(input int v);
    return sat_mag((v < 0) ? int'(-v) : int'(v));
  endfunction

  // Star operator on two LLRs (the check node function F of a degree-3 node).
  function automatic llr_t star(input llr_t a, input llr_t b);
    mag_t fa, fb, m;
    logic s;
    fa = f_phi(abs_sat(int'(a)));
    fb = f_phi(abs_sat(int'(b)));
    m  = f_phi(sat_mag(int'(fa) + int'(fb)));
    s  = a[W-1] ^ b[W-1];
    return s ? -llr_t'(m) : llr_t'(m);
  endfunction

  function automatic int qc_shift(input int r, input int c, input int z);
    return (r * c) % z;
  endfunction

endpackage
