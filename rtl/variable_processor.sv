// variable_processor: one variable-node lane of the vertical-shuffle decoder.
//
// The lane owns NB variables (one per block column of the quasi-cyclic code):
// their intrinsic LLRs I_n and their hard decisions. For a variable of degree
// DV it receives, one per cycle, the DV check-side magnitudes R_mn (already
// rotated back by the inverse network) and the matching signs. Each is turned
// into a check-to-variable message E_mn = sign * f^-1(R_mn) (forced to 0 in
// the initialization pass), and the DV messages go through a serial total-sum
// node processor with the sum operator (grouped update). For each output
// T_nm = I_n + sum_m E_mn - E_mn; the lane then sends Q_nm = f(|T_nm|) and
// sign(T_nm) to the check side, and stores the decision sign(I_n + sum E).
// Timing: output k of a variable leaves DV cycles after input k when
// variables follow back to back; inputs of one variable must be consecutive
// and carry the same in_col. rd_col/rd_hd read decisions combinationally.
// With QVAR = 1 the lane also keeps Q_nm and sign(T_nm) of its NB*DV edges
// (edge address col*DV + k for the k-th edge of a variable): in_rmn/in_sgn
// then carry the check's whole R_m/S_m, the lane removes its own edge before
// f^-1, and each output brings the replaced values on out_qold/out_sgnold so
// that the check side can update R_m (both are 0 with QVAR = 0).
// Datapath (f^-1, sum, +I_n, f, sign split) follows the source method's
// vertical-shuffle datapath; word widths and saturation are this design's.
module variable_processor
  import ldpc_pkg::*;
#(
  parameter int  DV  = 3,
  parameter int  NB  = 6,
  parameter int  RW  = 8,
  parameter bit  QVAR = 1'b0,
  localparam int CBW = (NB > 1) ? $clog2(NB) : 1,
  localparam int DW  = (DV > 1) ? $clog2(DV) : 1,
  localparam int WO  = W + $clog2(DV) + 1,
  localparam int EW  = (NB * DV > 1) ? $clog2(NB * DV) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  // intrinsic LLR load
  input  logic           load_en,
  input  logic [CBW-1:0] load_col,
  input  llr_t           load_llr,
  // edge input from the inverse network
  input  logic           in_valid,
  input  logic [CBW-1:0] in_col,
  input  logic           in_init,
  input  logic [RW-1:0]  in_rmn,
  input  logic           in_sgn,
  // edge output towards the direct network
  output logic           out_valid,
  output mag_t           out_q,
  output logic           out_sgn,
  output logic           out_hd,
  output mag_t           out_qold,
  output logic           out_sgnold,
  // decision readout
  input  logic [CBW-1:0] rd_col,
  output logic           rd_hd
);
  llr_t imem [NB];
  logic hdmem [NB];

  // per-edge memories, used with QVAR = 1
  mag_t qmem [NB*DV];
  logic gmem [NB*DV];
  logic [DW-1:0] vcnt, ocnt;
  logic [CBW-1:0] col_o;
  logic [EW-1:0] ie, oe;

  // check-to-variable message
  logic [RW-1:0] rmn;
  logic          sgn;
  mag_t rmn_sat, e_mag;
  llr_t e_msg;
  always_comb begin
    ie = EW'(int'(in_col) * DV + int'(vcnt));
    oe = EW'(int'(col_o) * DV + int'(ocnt));
    if (QVAR) begin
      rmn = in_rmn - RW'(qmem[ie]);
      sgn = in_sgn ^ gmem[ie];
    end else begin
      rmn = in_rmn;
      sgn = in_sgn;
    end
    rmn_sat = (rmn > RW'(MAGMAX)) ? mag_t'(MAGMAX) : mag_t'(rmn);
    if (in_init)     e_msg = '0;
    else if (sgn)    e_msg = -llr_t'(e_mag);
    else             e_msg = llr_t'(e_mag);
  end
  f_lut u_finv (.x(rmn_sat), .y(e_mag));

  // serial generic processor, sum operator
  logic                 sp_valid, sp_first;
  logic signed [WO-1:0] sp_s, sp_total;
  gnp_total_sum_serial #(.D(DV), .WI(W)) u_sp (
    .clk, .rst_n, .clr,
    .in_valid (in_valid),
    .in_e     (e_msg),
    .out_valid(sp_valid),
    .out_first(sp_first),
    .out_last (),
    .out_s    (sp_s),
    .out_total(sp_total)
  );

  // group bookkeeping: I_n and column of the group in the output stage
  llr_t           i_o;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vcnt  <= '0;
      col_o <= '0;
      i_o   <= '0;
    end else if (clr) begin
      vcnt <= '0;
    end else if (in_valid) begin
      if (vcnt == DW'(DV - 1)) begin
        vcnt  <= '0;
        col_o <= in_col;
        i_o   <= imem[in_col];
      end else begin
        vcnt <= vcnt + 1'b1;
      end
    end
  end

  // variable-to-check message and decision
  logic signed [WO:0] t_nm, t_n;
  mag_t               t_mag;
  always_comb begin
    t_nm  = (WO+1)'(sp_s) + (WO+1)'(i_o);
    t_n   = (WO+1)'(sp_total) + (WO+1)'(i_o);
    t_mag = abs_sat(int'(t_nm));
  end
  f_lut u_f (.x(t_mag), .y(out_q));

  assign out_valid = sp_valid;
  assign out_sgn   = t_nm[WO];
  assign out_hd    = t_n[WO];
  assign out_qold   = QVAR ? qmem[oe] : '0;
  assign out_sgnold = QVAR ? gmem[oe] : 1'b0;

  // position of the current output within its group
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ocnt <= '0;
    else if (clr)               ocnt <= '0;
    else if (sp_valid)          ocnt <= (ocnt == DW'(DV - 1)) ? '0 : ocnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < NB * DV; e++) begin
        qmem[e] <= '0; gmem[e] <= 1'b0;
      end
    end else if (clr) begin
      for (int e = 0; e < NB * DV; e++) begin
        qmem[e] <= '0; gmem[e] <= 1'b0;
      end
    end else if (QVAR && sp_valid) begin
      qmem[oe] <= out_q;
      gmem[oe] <= out_sgn;
    end
  end

  // memories
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NB; c++) begin
        imem[c]  <= '0;
        hdmem[c] <= 1'b0;
      end
    end else begin
      if (load_en) imem[load_col] <= load_llr;
      if (sp_valid && sp_first) hdmem[col_o] <= out_hd;
    end
  end
  assign rd_hd = hdmem[rd_col];

  // The output counter must agree with the serial processor's group start.
  a_group: assert property (@(posedge clk) disable iff (!rst_n) (sp_valid && sp_first) |-> (ocnt == '0))
    else $error("output group out of step");
endmodule
