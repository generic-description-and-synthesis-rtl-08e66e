// gnp_total_sum: parallel generic node processor, "total sum first" scheme.
//
// A node processor with D input/output ports computes every output as the
// generic associative operator applied to all inputs but its own:
//   s_j = OP_{i != j} e_i.
// The total-sum scheme first forms the total s = OP_i e_i once and then
// removes input j with the inverse operator, which is cheaper than the
// direct form for large D but needs an invertible operator. Two operators
// are offered: OP_SUM (signed addition, inverse = subtraction; the variable
// node and the f-domain check node magnitude) and OP_XOR (the sign part of
// the check node; XOR is its own inverse).
// Timing: combinational when PIPE = 0; PIPE = 1 adds one output register
// stage (one cycle latency), the optional pipelining the method allows.
// Output width: WO = WI + clog2(D) + 1 for OP_SUM, so nothing overflows.
module gnp_total_sum
  import ldpc_pkg::*;
#(
  parameter int   D    = 6,
  parameter int   WI   = 6,
  parameter gop_e OP   = OP_SUM,
  parameter bit   PIPE = 1'b0,
  localparam int  WO   = (OP == OP_XOR) ? WI : WI + $clog2(D) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [WI-1:0] e [D],
  output logic signed [WO-1:0] s [D]
);
  logic signed [WO-1:0] total;
  logic signed [WO-1:0] s_c [D];

  always_comb begin
    total = '0;
    for (int i = 0; i < D; i++) begin
      if (OP == OP_XOR) total = total ^ WO'(e[i]);
      else              total = total + WO'(e[i]);
    end
    for (int j = 0; j < D; j++) begin
      if (OP == OP_XOR) s_c[j] = total ^ WO'(e[j]);
      else              s_c[j] = total - WO'(e[j]);
    end
  end

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) for (int j = 0; j < D; j++) s[j] <= '0;
      else        for (int j = 0; j < D; j++) s[j] <= s_c[j];
    end
  end else begin : g_comb
    always_comb for (int j = 0; j < D; j++) s[j] = s_c[j];
  end

  initial assert (OP != OP_STAR) else $error("the total-sum scheme needs an invertible operator");
endmodule
