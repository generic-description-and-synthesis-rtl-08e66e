// vss_rate_harness: decodes NCW noisy all-zero codewords on one
// vss_decoder built for the code given by Z, MB and NB (and the Q memory
// placement QVAR), and compares every
// decision, the iteration count, the converged flag and the latency with a
// reference model of the schedule (the same model as in tb_vss_decoder,
// sized by the parameters). Columns modes alternate; one codeword in five
// has heavy noise. Starts when start rises, raises done when finished, and
// reports its check and failure counts and how often each mechanism (both
// modes, early stop, stop at IMAX, output stall, corrected codeword) occurred.
module vss_rate_harness #(
  parameter int Z = 11, MB = 4, NB = 6, NCW = 10,
  parameter bit QVAR = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cnt_overlap, cnt_exact, cnt_early, cnt_imax, cnt_stall, cnt_corrected
);
  import ldpc_pkg::*;
  import tb_ref_pkg::*;
  localparam int IMAX = 20, N = Z * NB;
  localparam int NP = 4, NPW = $clog2(NP);

  logic         mode_exact = 0, in_valid = 0, out_ready = 0;
  logic         in_ready, out_valid, out_last, out_converged;
  llr_t         in_llr [Z];
  logic [Z-1:0] out_bits;
  logic [4:0]   out_iters;
  llr_t         np_e [NP];
  logic signed [W+NPW:0] np_ts_s [NP], sp_rq_s;
  llr_t         np_tr_s [NP];
  logic         sp_swapped;

  vss_decoder #(.Z(Z), .MB(MB), .NB(NB), .IMAX(IMAX), .NPD(NP), .QVAR(QVAR)) dut (
    .clk, .rst_n, .mode_exact, .in_valid, .in_ready, .in_llr,
    .out_valid, .out_ready, .out_bits, .out_last, .out_iters, .out_converged,
    .np_e, .np_ts_s, .np_tr_s,
    .sp_clr(1'b0), .sp_in_valid(1'b0), .sp_in_idx('0), .sp_in_e('0), .sp_rq_idx('0),
    .sp_rq_s, .sp_swapped
  );

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference model ----------------
  int I [N];
  int Qm [MB][NB][Z];     // per (row, column, variable lane)
  int Sg [MB][NB][Z];
  int R [MB][Z];          // per (row, check lane)
  int S [MB][Z];
  int hd [N];
  int ref_iters, ref_conv;

  function automatic int shf(input int r, input int c);
    return (r * c) % Z;
  endfunction

  // pending write-back of one column
  int wq [MB][Z], ws [MB][Z];
  int wcol;

  function automatic void apply_col(input int c);
    for (int r = 0; r < MB; r++)
      for (int p = 0; p < Z; p++) begin
        int q = (p - shf(r, c) + Z) % Z;
        R[r][q] = R[r][q] + wq[r][p] - Qm[r][c][p];
        S[r][q] = S[r][q] ^ ws[r][p] ^ Sg[r][c][p];
        Qm[r][c][p] = wq[r][p];
        Sg[r][c][p] = ws[r][p];
      end
  endfunction

  // one pass over the columns; init = 1 forces all E to 0
  function automatic void ref_pass(input bit init, input bit exact);
    int e [MB][Z];
    int nq [MB][Z], ns [MB][Z];
    bit pend = 0;
    for (int c = 0; c < NB; c++) begin
      // reads
      for (int r = 0; r < MB; r++)
        for (int p = 0; p < Z; p++) begin
          int q = (p - shf(r, c) + Z) % Z;
          int rmn = R[r][q] - Qm[r][c][p];
          int sg = S[r][q] ^ Sg[r][c][p];
          int m = f_ref(rmn > 31 ? 31 : rmn);
          e[r][p] = init ? 0 : (sg ? -m : m);
        end
      if (pend) apply_col(wcol);
      // variable update
      for (int p = 0; p < Z; p++) begin
        int tot = 0;
        for (int r = 0; r < MB; r++) tot += e[r][p];
        hd[c * Z + p] = (I[c * Z + p] + tot) < 0;
        for (int r = 0; r < MB; r++) begin
          int t = I[c * Z + p] + tot - e[r][p];
          nq[r][p] = f_ref(sat31(t));
          ns[r][p] = t < 0;
        end
      end
      wq = nq; ws = ns; wcol = c;
      if (exact) begin apply_col(c); pend = 0; end
      else pend = 1;
    end
    if (pend) apply_col(wcol);
  endfunction

  function automatic bit syndrome_zero();
    for (int r = 0; r < MB; r++)
      for (int q = 0; q < Z; q++) begin
        int x = 0;
        for (int c = 0; c < NB; c++) x ^= hd[c * Z + (q + shf(r, c)) % Z];
        if (x != 0) return 0;
      end
    return 1;
  endfunction

  function automatic void ref_decode(input bit exact);
    for (int r = 0; r < MB; r++) for (int q = 0; q < Z; q++) begin R[r][q] = 0; S[r][q] = 0; end
    for (int r = 0; r < MB; r++) for (int c = 0; c < NB; c++) for (int p = 0; p < Z; p++) begin
      Qm[r][c][p] = 0; Sg[r][c][p] = 0;
    end
    ref_pass(1'b1, exact);
    ref_iters = 0;
    ref_conv = 0;
    do begin
      ref_pass(1'b0, exact);
      ref_iters++;
      ref_conv = syndrome_zero();
    end while (!ref_conv && ref_iters < IMAX);
  endfunction

  task automatic run_codeword(input int nerr, input bit exact, input bit expect_zero);
    int t_last, t_out, passes, period, col;
    bit any_err = 0;
    for (int n = 0; n < N; n++) begin
      I[n] = 8 + int'($urandom_range(8));               // +2.0 .. +4.0
    end
    for (int k = 0; k < nerr; k++) begin
      int n = int'($urandom_range(N - 1));
      I[n] = int'($urandom_range(14)) - 10;             // -2.5 .. +1.0
      if (I[n] < 0) any_err = 1;
    end
    ref_decode(exact);
    mode_exact = exact;
    for (int c = 0; c < NB; c++) begin
      @(negedge clk);
      in_valid = 1;
      for (int p = 0; p < Z; p++) in_llr[p] = llr_t'(I[c * Z + p]);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      t_last = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    // wait for the first output beat
    while (!out_valid) @(negedge clk);
    t_out = cyc;
    passes = ref_iters + 1;
    period = exact ? 2 * NB * MB + 1 : NB * MB + MB + 1;
    checks++;
    if (t_out - t_last != passes * period + 1) begin
      failures++;
      $display("latency %0d cycles, expected %0d", t_out - t_last, passes * period + 1);
    end
    col = 0;
    while (col < NB) begin
      out_ready = ($urandom_range(3) != 0);
      if (!out_ready) cnt_stall++;
      #1;
      if (out_valid && out_ready) begin
        for (int p = 0; p < Z; p++) begin
          checks++;
          if (int'(out_bits[p]) != hd[col * Z + p]) begin
            failures++; $display("bit %0d: %0d, reference %0d", col * Z + p, out_bits[p], hd[col * Z + p]);
          end
          if (expect_zero) begin
            checks++;
            if (out_bits[p] != 1'b0) begin failures++; $display("bit %0d not corrected", col * Z + p); end
          end
        end
        checks += 3;
        if (out_last != (col == NB - 1)) begin failures++; $display("out_last wrong"); end
        if (int'(out_iters) != ref_iters) begin failures++; $display("iterations %0d, reference %0d", out_iters, ref_iters); end
        if (int'(out_converged) != ref_conv) begin failures++; $display("converged %0d, reference %0d", out_converged, ref_conv); end
        col++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    if (exact) cnt_exact++; else cnt_overlap++;
    if (ref_conv && ref_iters < IMAX) cnt_early++;
    if (!ref_conv) cnt_imax++;
    if (expect_zero && any_err && ref_conv) cnt_corrected++;
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    cnt_overlap = 0; cnt_exact = 0; cnt_early = 0; cnt_imax = 0; cnt_stall = 0; cnt_corrected = 0;
    for (int p = 0; p < Z; p++) in_llr[p] = '0;
    for (int p = 0; p < NP; p++) np_e[p] = '0;
    wait (start && rst_n);
    for (int k = 0; k < NCW; k++) begin
      automatic bit exact = k[0];
      if (k % 5 == 4) run_codeword(N, exact, 1'b0);          // heavy noise
      else            run_codeword(1 + k % 3, exact, 1'b1);  // light noise
    end
    done = 1;
  end
endmodule
