// vss_decoder: LDPC decoder running the vertical shuffle schedule (VSS) of
// belief propagation, with serial variable and serial check processors.
//
// Code: quasi-cyclic, base matrix of MB x NB blocks, every block a Z x Z
// identity rotated by qc_shift(r, c) = (r*c) mod Z (ldpc_pkg). Variable
// n = c*Z + p sits in variable lane p, check m = r*Z + q in check lane q, and
// they are joined when p = (q + shift) mod Z. The code is regular with
// d_v = MB and d_c = NB; the defaults (3, 6) with Z = 12 give N = 72.
// Architecture: Z variable lanes and Z check lanes, each handling one edge
// per cycle, so Z edges are processed per cycle (P = Z). In each cycle all
// lanes work on one block (r, c):
//   check lanes  -> R_mn, sign(E_mn)  -> pi^-1 (rotate by Z - shift)
//   -> variable lanes (f^-1, serial sum processor, + I_n, f)
//   -> Q_nm, sign(T_nm), decision -> pi (rotate by shift, MB cycles later)
//   -> check lanes (straight spread update of R_m and S_m).
// The f and f^-1 tables sit on the variable side, so the network carries
// f-domain magnitudes.
// Interface: in_valid/in_ready take NB beats of Z intrinsic LLRs (6-bit,
// 2 fractional bits, negative = bit 1), block column 0 first. The decoder
// then runs an initialization pass and up to IMAX iterations, stopping early
// when all parity checks hold, and returns NB beats of Z decisions on
// out_valid/out_ready with out_iters and out_converged. mode_exact is
// sampled with the last input beat: 0 = full-rate overlapped columns,
// 1 = exact VSS order.
// Timing: each pass (the initialization pass and every iteration) takes
// NB*MB + MB + 1 cycles in mode 0 and 2*NB*MB + 1 in mode 1, including the
// drain and the stop decision; the first output beat is valid
// passes * period + 1 cycles after the last input beat is accepted.
// QVAR selects where the per-edge Q_nm memory sits: 0 (default) in the
// check lanes, 1 in the variable lanes, which then also send the replaced
// Q_nm and sign through pi so the check lanes can update R_m and S_m.
// Both placements give bit-identical decoding.
// Beside the decoder, the top also brings out three generic node processors
// of the same framework on their own np_* / sp_* ports (parallel
// total-sum and trellis processors, D = NPD ports, and a delayed spread
// update processor); they share only the clock and reset with the decoder.
// Follows the source method's vertical-shuffle architecture (serial node
// processors, straight spread update on the check side, network between f
// and the check-side sums); the QC code, word widths, sign path, init pass,
// syndrome stop and handshakes are this design's.
module vss_decoder
  import ldpc_pkg::*;
#(
  parameter int  Z    = 12,
  parameter int  MB   = 3,
  parameter int  NB   = 6,
  parameter int  IMAX = 20,
  parameter int  NPD  = 4,
  parameter bit  QVAR = 1'b0,
  localparam int RW   = $clog2(MAGMAX * NB + 1),
  localparam int RBW  = (MB > 1) ? $clog2(MB) : 1,
  localparam int CBW  = (NB > 1) ? $clog2(NB) : 1,
  localparam int SW   = (Z > 1) ? $clog2(Z) : 1,
  localparam int IW   = $clog2(IMAX + 1),
  localparam int VW   = QVAR ? 2 * MAGW + 3 : MAGW + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mode_exact,
  input  logic          in_valid,
  output logic          in_ready,
  input  llr_t          in_llr [Z],
  output logic          out_valid,
  input  logic          out_ready,
  output logic [Z-1:0]  out_bits,
  output logic          out_last,
  output logic [IW-1:0] out_iters,
  output logic          out_converged,
  // generic node processors, side by side with the decoder
  input  llr_t          np_e [NPD],
  output logic signed [W+$clog2(NPD):0] np_ts_s [NPD],
  output llr_t          np_tr_s [NPD],
  input  logic          sp_clr,
  input  logic          sp_in_valid,
  input  logic [$clog2(NPD)-1:0] sp_in_idx,
  input  llr_t          sp_in_e,
  input  logic [$clog2(NPD)-1:0] sp_rq_idx,
  output logic signed [W+$clog2(NPD):0] sp_rq_s,
  output logic          sp_swapped
);
  // controller
  logic           load_en, clr, rd_valid, rd_init, syn_clr, wr_valid, syn_zero;
  logic [CBW-1:0] load_col, rd_col, wr_col, out_col;
  logic [RBW-1:0] rd_row, wr_row;

  vss_controller #(.MB(MB), .NB(NB), .IMAX(IMAX)) u_ctrl (
    .clk, .rst_n, .mode_exact,
    .in_valid, .in_ready, .load_en, .load_col, .clr,
    .rd_valid, .rd_row, .rd_col, .rd_init, .syn_clr,
    .wr_valid, .wr_row, .wr_col, .syn_zero,
    .out_valid, .out_ready, .out_col, .out_last,
    .iters(out_iters), .converged(out_converged)
  );

  // shifts of the blocks being read and written
  logic [SW-1:0] rd_shift, wr_shift, rd_shift_inv;
  always_comb begin
    rd_shift     = SW'(qc_shift(int'(rd_row), int'(rd_col), Z));
    wr_shift     = SW'(qc_shift(int'(wr_row), int'(wr_col), Z));
    rd_shift_inv = (rd_shift == '0) ? '0 : SW'(Z - int'(rd_shift));
  end

  // check side -> pi^-1 -> variable side
  logic [RW:0]   c2v_chk [Z];
  logic [RW:0]   c2v_var [Z];
  // variable side -> pi -> check side: {sgn_old, q_old, hd, sgn, q}, the
  // old values only with QVAR = 1
  logic [VW-1:0]   v2c_var [Z];
  logic [VW-1:0]   v2c_chk [Z];
  logic            v_out_valid [Z];
  logic [Z-1:0]    syn_zero_l;

  barrel_shifter #(.Z(Z), .WD(RW + 1)) u_pi_inv (
    .in_data(c2v_chk), .shift(rd_shift_inv), .out_data(c2v_var)
  );
  barrel_shifter #(.Z(Z), .WD(VW)) u_pi (
    .in_data(v2c_var), .shift(wr_shift), .out_data(v2c_chk)
  );

  for (genvar l = 0; l < Z; l++) begin : g_lane
    logic [RW-1:0] rmn;
    logic          csgn;
    mag_t          vq, vqold;
    logic          vsgn, vhd, rd_hd, vsgnold;
    mag_t          cqold;
    logic          csgnold;

    if (QVAR) begin : g_old
      assign v2c_var[l] = {vsgnold, vqold, vhd, vsgn, vq};
      assign cqold      = v2c_chk[l][2*MAGW+1:MAGW+2];
      assign csgnold    = v2c_chk[l][2*MAGW+2];
    end else begin : g_no_old
      assign v2c_var[l] = {vhd, vsgn, vq};
      assign cqold      = '0;
      assign csgnold    = 1'b0;
    end

    check_processor #(.MB(MB), .NB(NB), .QVAR(QVAR)) u_chk (
      .clk, .rst_n, .clr, .syn_clr,
      .rd_row, .rd_col, .rd_rmn(rmn), .rd_sgn(csgn),
      .wr_en (wr_valid),
      .wr_row, .wr_col,
      .wr_q  (v2c_chk[l][MAGW-1:0]),
      .wr_sgn(v2c_chk[l][MAGW]),
      .wr_hd (v2c_chk[l][MAGW+1]),
      .wr_qold(cqold), .wr_sgnold(csgnold),
      .syn_zero(syn_zero_l[l])
    );
    assign c2v_chk[l] = {csgn, rmn};

    variable_processor #(.DV(MB), .NB(NB), .RW(RW), .QVAR(QVAR)) u_var (
      .clk, .rst_n, .clr,
      .load_en, .load_col, .load_llr(in_llr[l]),
      .in_valid(rd_valid), .in_col(rd_col), .in_init(rd_init),
      .in_rmn(c2v_var[l][RW-1:0]), .in_sgn(c2v_var[l][RW]),
      .out_valid(v_out_valid[l]), .out_q(vq), .out_sgn(vsgn), .out_hd(vhd),
      .out_qold(vqold), .out_sgnold(vsgnold),
      .rd_col(out_col), .rd_hd(rd_hd)
    );
    assign out_bits[l] = rd_hd;

    // The variable lanes must deliver exactly when the controller writes back.
    a_in_step: assert property (@(posedge clk) disable iff (!rst_n) v_out_valid[l] == wr_valid)
      else $error("lane %0d out of step", l);
  end

  assign syn_zero = &syn_zero_l;

  // Generic node processors of the framework that the decoder above does not
  // use: a parallel total-sum processor with the sum operator (a variable
  // node), a parallel trellis processor with the star operator (a check node
  // on LLRs), and a serial processor with delayed spread update.
  gnp_total_sum #(.D(NPD), .WI(W), .OP(OP_SUM)) u_np_ts (
    .clk, .rst_n, .e(np_e), .s(np_ts_s)
  );
  gnp_trellis #(.D(NPD), .WM(W), .OP(OP_STAR)) u_np_tr (
    .e(np_e), .s(np_tr_s)
  );
  gnp_spread #(.D(NPD), .WI(W), .MODE(1'b1)) u_np_sp (
    .clk, .rst_n, .clr(sp_clr), .in_valid(sp_in_valid), .in_idx(sp_in_idx), .in_e(sp_in_e),
    .rq_idx(sp_rq_idx), .rq_s(sp_rq_s), .swapped(sp_swapped)
  );
endmodule
