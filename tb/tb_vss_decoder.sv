// tb_vss_decoder: end-to-end test of the vertical-shuffle decoder.
//
// Codewords: the all-zero codeword sent as LLRs of +LEV, with a number of
// positions flipped or weakened (random noise). Each codeword is decoded in
// one of the two column modes with random output back-pressure, and the
// result is compared with a reference model of the schedule written here:
//  - the decisions, the iteration count and the converged flag bit-exactly;
//  - the latency from the last input beat to the first output beat against
//    passes * (cycles per pass) + 1;
//  - with light noise, the decisions against the sent (all-zero) codeword.
// The reference follows the hardware algorithm: an initialization pass
// (Q = f(|I|), R = sum Q), then per iteration, per block column, every edge
// reads R_m - Q_nm and S_m ^ sign_nm, the variable forms T_nm = I_n + sum E
// - E_nm, and the check sums are updated. In the overlapped mode a column's
// reads do not yet see the previous column's updates; in the exact mode they
// do. Counts of mechanisms exercised: both modes, early stop on a zero
// syndrome, stop at IMAX, output back-pressure; each must occur.
// The generic node processors beside the decoder are checked concurrently:
// total-sum (sum) and trellis (star) outputs against the operator over the
// other inputs, and the delayed spread processor against the messages of
// the last completed round, including its memory swaps.
// Parameters default to the decoder's own (full size); the DUT is
// instantiated without a parameter list.
module tb_vss_decoder;
  import ldpc_pkg::*;
  import tb_ref_pkg::*;
  localparam int Z = 12, MB = 3, NB = 6, IMAX = 20, N = Z * NB;
  localparam int NCW = 40;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         mode_exact = 0, in_valid = 0, out_ready = 0;
  logic         in_ready, out_valid, out_last, out_converged;
  llr_t         in_llr [Z];
  logic [Z-1:0] out_bits;
  logic [4:0]   out_iters;

  // side-by-side generic node processors (NPD = 4 ports)
  llr_t              np_e [4];
  logic signed [8:0] np_ts_s [4], sp_rq_s;
  llr_t              np_tr_s [4];
  logic              sp_clr = 0, sp_in_valid = 0, sp_swapped;
  logic [1:0]        sp_in_idx = '0, sp_rq_idx = '0;
  llr_t              sp_in_e = '0;

  vss_decoder dut (.*);

  // The node processors run concurrently with the decoder traffic.
  int cnt_np = 0, cnt_swap = 0;
  bit np_done = 0;
  initial begin
    int cur [4], done [4];
    for (int k = 0; k < 4; k++) begin cur[k] = 0; done[k] = 0; np_e[k] = '0; end
    wait (rst_n);
    for (int round = 0; round < 50; round++) begin
      int perm [4];
      for (int k = 0; k < 4; k++) perm[k] = k;
      perm.shuffle();
      for (int k = 0; k < 4; k++) begin
        automatic int v = int'($urandom_range(62)) - 31;
        @(negedge clk);
        // parallel processors
        for (int i = 0; i < 4; i++) np_e[i] = llr_t'(int'($urandom_range(62)) - 31);
        // delayed spread processor: request before the write
        sp_rq_idx = 2'($urandom_range(3));
        #1;
        for (int j = 0; j < 4; j++) begin
          automatic int es = 0, l = 0, r = 0, st;
          automatic bit hl = 0, hr = 0;
          for (int i = 0; i < 4; i++) if (i != j) es += int'(np_e[i]);
          for (int i = 0; i < j; i++) begin l = hl ? star_ref(l, int'(np_e[i])) : int'(np_e[i]); hl = 1; end
          for (int i = 3; i > j; i--) begin r = hr ? star_ref(int'(np_e[i]), r) : int'(np_e[i]); hr = 1; end
          st = (hl && hr) ? star_ref(l, r) : (hl ? l : r);
          checks += 2;
          if (int'(np_ts_s[j]) != es) begin failures++; $display("total-sum node s[%0d] %0d exp %0d", j, np_ts_s[j], es); end
          if (int'(np_tr_s[j]) != st) begin failures++; $display("trellis node s[%0d] %0d exp %0d", j, np_tr_s[j], st); end
        end
        begin
          automatic int ed = 0;
          for (int i = 0; i < 4; i++) if (i != int'(sp_rq_idx)) ed += done[i];
          checks++;
          if (int'(sp_rq_s) != ed) begin failures++; $display("spread node %0d exp %0d", sp_rq_s, ed); end
        end
        cnt_np++;
        sp_in_valid = 1; sp_in_idx = 2'(perm[k]); sp_in_e = llr_t'(v);
        @(posedge clk);
        cur[perm[k]] = v;
        if (k == 3) done = cur;
        #1 sp_in_valid = 0;
        checks++;
        if (sp_swapped != (k == 3)) begin failures++; $display("spread swap pulse wrong"); end
        if (sp_swapped) cnt_swap++;
      end
    end
    np_done = 1;
  end

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

  // ---------------- stimulus ----------------
  int cnt_overlap = 0, cnt_exact = 0, cnt_early = 0, cnt_imax = 0, cnt_stall = 0;
  int cnt_corrected = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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
    for (int p = 0; p < Z; p++) in_llr[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NCW; k++) begin
      automatic bit exact = k[0];
      if (k % 5 == 4) run_codeword(60, exact, 1'b0);          // heavy noise
      else            run_codeword(1 + k % 4, exact, 1'b1);  // light noise
    end
    wait (np_done);
    $display("node processors: %0d cycles checked, %0d memory swaps", cnt_np, cnt_swap);
    checks += 2;
    if (cnt_np == 0)   begin failures++; $display("node processors never checked"); end
    if (cnt_swap == 0) begin failures++; $display("delayed spread never swapped"); end
    $display("codewords: overlapped %0d, exact %0d, early stop %0d, stopped at IMAX %0d, corrected %0d, stall cycles %0d",
             cnt_overlap, cnt_exact, cnt_early, cnt_imax, cnt_corrected, cnt_stall);
    checks += 6;
    if (cnt_overlap == 0) begin failures++; $display("overlapped mode never ran"); end
    if (cnt_exact == 0)   begin failures++; $display("exact mode never ran"); end
    if (cnt_early == 0)   begin failures++; $display("no early stop"); end
    if (cnt_imax == 0)    begin failures++; $display("IMAX never reached"); end
    if (cnt_stall == 0)   begin failures++; $display("no output stall"); end
    if (cnt_corrected == 0) begin failures++; $display("no error corrected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
