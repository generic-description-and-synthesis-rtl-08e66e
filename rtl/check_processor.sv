// check_processor: one check-node lane of the vertical-shuffle decoder,
// serial, with straight spread update.
//
// The lane owns MB checks (one per block row) and the MB*NB edges that reach
// them (edge address = col*MB + row). Per check it keeps the f-domain sum
// R_m = sum over its edges of Q_nm, the XOR S_m of the signs of its incoming
// variable-to-check messages, and one syndrome bit; per edge it keeps the
// last Q_nm = f(|T_nm|) and sign(T_nm).
// Read port (combinational): R_mn = R_m - Q_nm and sign(E_mn) = S_m ^ sign_nm,
// i.e. the check-to-variable message of edge (m,n) in the f domain, made of
// all other edges of the check.
// Write port (one per cycle, applied at the clock edge): straight spread
// update R_m <= R_m + Q_new - Q_old, S_m <= S_m ^ sign_old ^ sign_new, the
// edge memories take the new values, and the syndrome bit of the check is
// XORed with the variable's hard decision. Because the update is an
// increment made at write time, reads and writes of different edges of one
// check may interleave in any order without losing an update.
// clr zeroes everything (start of a codeword); syn_clr zeroes the syndrome
// bits (start of an iteration); syn_zero is high when all are zero.
// With QVAR = 1 the per-edge Q_nm and sign memories move to the variable
// lane: the read port then returns R_m and S_m of the row, the variable lane
// removes its own edge, and the write port brings the old values of the
// edge on wr_qold/wr_sgnold (ignored with QVAR = 0).
// The magnitude part follows the source method's check-side datapath; the
// sign part, which the method leaves undrawn, is this design's
// XOR equivalent of the same scheme, and the syndrome bits are an addition
// for the early-stop test.
module check_processor
  import ldpc_pkg::*;
#(
  parameter int  MB  = 3,
  parameter int  NB  = 6,
  parameter bit  QVAR = 1'b0,
  localparam int RW  = $clog2(MAGMAX * NB + 1),
  localparam int RBW = (MB > 1) ? $clog2(MB) : 1,
  localparam int CBW = (NB > 1) ? $clog2(NB) : 1,
  localparam int NE  = MB * NB
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           syn_clr,
  // read port
  input  logic [RBW-1:0] rd_row,
  input  logic [CBW-1:0] rd_col,
  output logic [RW-1:0]  rd_rmn,
  output logic           rd_sgn,
  // write port
  input  logic           wr_en,
  input  logic [RBW-1:0] wr_row,
  input  logic [CBW-1:0] wr_col,
  input  mag_t           wr_q,
  input  logic           wr_sgn,
  input  logic           wr_hd,
  input  mag_t           wr_qold,
  input  logic           wr_sgnold,
  // syndrome
  output logic           syn_zero
);
  logic [RW-1:0] rmem   [MB];
  logic          smem   [MB];
  logic          synmem [MB];
  mag_t          qmem   [NE];
  logic          gmem   [NE];

  localparam int EW = (NE > 1) ? $clog2(NE) : 1;
  logic [EW-1:0] rd_e, wr_e;
  mag_t          q_old;
  logic          g_old;
  always_comb begin
    rd_e = EW'(int'(rd_col) * MB + int'(rd_row));
    wr_e = EW'(int'(wr_col) * MB + int'(wr_row));
    if (QVAR) begin
      rd_rmn = rmem[rd_row];
      rd_sgn = smem[rd_row];
      q_old  = wr_qold;
      g_old  = wr_sgnold;
    end else begin
      rd_rmn = rmem[rd_row] - RW'(qmem[rd_e]);
      rd_sgn = smem[rd_row] ^ gmem[rd_e];
      q_old  = qmem[wr_e];
      g_old  = gmem[wr_e];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < MB; r++) begin
        rmem[r] <= '0; smem[r] <= 1'b0; synmem[r] <= 1'b0;
      end
      for (int e = 0; e < NE; e++) begin
        qmem[e] <= '0; gmem[e] <= 1'b0;
      end
    end else if (clr) begin
      for (int r = 0; r < MB; r++) begin
        rmem[r] <= '0; smem[r] <= 1'b0; synmem[r] <= 1'b0;
      end
      for (int e = 0; e < NE; e++) begin
        qmem[e] <= '0; gmem[e] <= 1'b0;
      end
    end else begin
      if (syn_clr) for (int r = 0; r < MB; r++) synmem[r] <= 1'b0;
      if (wr_en) begin
        rmem[wr_row] <= rmem[wr_row] + RW'(wr_q) - RW'(q_old);
        smem[wr_row] <= smem[wr_row] ^ g_old ^ wr_sgn;
        if (!QVAR) begin
          qmem[wr_e] <= wr_q;
          gmem[wr_e] <= wr_sgn;
        end
        if (!syn_clr) synmem[wr_row] <= synmem[wr_row] ^ wr_hd;
      end
    end
  end

  always_comb begin
    syn_zero = 1'b1;
    for (int r = 0; r < MB; r++) if (synmem[r]) syn_zero = 1'b0;
  end

  // R_m is the sum of the Q values of its edges, so it never falls below one of them.
  a_r_ge_q: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && !clr) |-> (rmem[wr_row] >= RW'(q_old)))
    else $error("R_m below Q_nm");
endmodule
