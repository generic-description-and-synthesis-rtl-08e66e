// gnp_trellis: parallel generic node processor, trellis (forward-backward)
// scheme.
//
// Forward partial results f_k = e_1 OP ... OP e_k and backward partial
// results b_k = e_k OP ... OP e_D are formed along two chains; output j is
// s_j = f_{j-1} OP b_{j+1}, with s_1 = b_2 and s_D = f_{D-1} at the edges
// (the chain ends that would otherwise combine with a constant are dropped).
// The scheme needs no inverse, so besides OP_SUM and OP_XOR it supports
// OP_STAR, the check node function F on LLRs (ldpc_pkg::star), for which
// WM must equal the message width ldpc_pkg::W.
// Output width: WO = WM + clog2(D) + 1 for OP_SUM, WM otherwise. STAR results
// saturate to the message range by construction. Combinational.
// The scheme is the source method's; the edge handling and widths are this
// design's.
module gnp_trellis
  import ldpc_pkg::*;
#(
  parameter int   D  = 4,
  parameter int   WM = 6,
  parameter gop_e OP = OP_SUM,
  localparam int  WO = (OP == OP_SUM) ? WM + $clog2(D) + 1 : WM
) (
  input  logic signed [WM-1:0] e [D],
  output logic signed [WO-1:0] s [D]
);
  logic signed [WO-1:0] fw [D];
  logic signed [WO-1:0] bw [D];

  function automatic logic signed [WO-1:0] op(input logic signed [WO-1:0] a,
                                              input logic signed [WO-1:0] b);
    case (OP)
      OP_SUM:  return a + b;
      OP_XOR:  return a ^ b;
      default: return WO'(star(llr_t'(a), llr_t'(b)));
    endcase
  endfunction

  always_comb begin
    fw[0]   = WO'(e[0]);
    bw[D-1] = WO'(e[D-1]);
    for (int k = 1; k < D; k++)      fw[k] = op(fw[k-1], WO'(e[k]));
    for (int k = D - 2; k >= 0; k--) bw[k] = op(WO'(e[k]), bw[k+1]);
    s[0]   = bw[1];
    s[D-1] = fw[D-2];
    for (int j = 1; j < D - 1; j++) s[j] = op(fw[j-1], bw[j+1]);
  end

  initial assert (D >= 2 && (OP != OP_STAR || WM == W)) else $error("bad gnp_trellis parameters");
endmodule
