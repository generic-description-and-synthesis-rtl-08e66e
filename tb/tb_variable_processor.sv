// tb_variable_processor: loads NB random intrinsic LLRs into one variable
// lane, then feeds random groups of DV = 3 check-side messages (R_mn, sign),
// back to back and with gaps, some flagged as initialization. Every output
// (Q_nm, sign T_nm, decision) is compared with T_nm = I_n + sum E - E_nm,
// E = sign * f(min(R_mn, 31)), computed here; with back-to-back groups each
// output must arrive DV cycles after its input. The stored decisions are
// read back at the end. A second lane with the per-edge Q memory inside
// (QVAR = 1) gets the whole check sums R_m = R_mn + Q_old and S_m, must
// produce the same outputs as the first, and must return the replaced
// Q_nm and sign of each edge.
module tb_variable_processor;
  import ldpc_pkg::*;
  import tb_ref_pkg::*;
  localparam int DV = 3, NB = 6, RW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          clr = 0, load_en = 0, in_valid = 0, in_init = 0, in_sgn = 0;
  logic [2:0]    load_col = '0, in_col = '0, rd_col = '0;
  llr_t          load_llr = '0;
  logic [RW-1:0] in_rmn = '0;
  logic          out_valid, out_sgn, out_hd, rd_hd;
  mag_t          out_q;
  logic [RW-1:0] in_rmn_v = '0;
  logic          in_sgn_v = 0;
  logic          out_valid_v, out_sgn_v, out_hd_v, out_sgnold_v, rd_hd_v;
  mag_t          out_q_v, out_qold_v;

  variable_processor #(.DV(DV), .NB(NB), .RW(RW)) dut (
    .clk, .rst_n, .clr, .load_en, .load_col, .load_llr, .in_valid, .in_col, .in_init,
    .in_rmn, .in_sgn, .out_valid, .out_q, .out_sgn, .out_hd,
    .out_qold(), .out_sgnold(), .rd_col, .rd_hd
  );
  variable_processor #(.DV(DV), .NB(NB), .RW(RW), .QVAR(1'b1)) dutv (
    .clk, .rst_n, .clr, .load_en, .load_col, .load_llr, .in_valid, .in_col, .in_init,
    .in_rmn(in_rmn_v), .in_sgn(in_sgn_v), .out_valid(out_valid_v), .out_q(out_q_v),
    .out_sgn(out_sgn_v), .out_hd(out_hd_v), .out_qold(out_qold_v), .out_sgnold(out_sgnold_v),
    .rd_col, .rd_hd(rd_hd_v)
  );

  // per-edge values last sent, as the QVAR lane must hold them
  int qv [NB][DV], gv [NB][DV];
  int eqo [$], ego [$];

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid_v != out_valid || (out_valid &&
        (out_q_v != out_q || out_sgn_v != out_sgn || out_hd_v != out_hd))) begin
      failures++; $display("QVAR lane differs at %0d", cyc);
    end
    if (out_valid_v) begin
      if (eqo.size() == 0) begin failures++; $display("unexpected QVAR output"); end
      else begin
        int qo, go;
        qo = eqo.pop_front(); go = ego.pop_front();
        checks++;
        if (int'(out_qold_v) != qo || int'(out_sgnold_v) != go) begin
          failures++; $display("old Q %0d/%0d exp %0d/%0d", out_qold_v, out_sgnold_v, qo, go);
        end
      end
    end
  end

  int I [NB];
  int hd_exp [NB];
  int eq [$], es [$], eh [$], edue [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int q, s, h, d;
    if (eq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      q = eq.pop_front(); s = es.pop_front(); h = eh.pop_front(); d = edue.pop_front();
      checks += 3;
      if (int'(out_q) != q) begin failures++; $display("Q %0d exp %0d", out_q, q); end
      if (int'(out_sgn) != s || int'(out_hd) != h) begin failures++; $display("sign/decision wrong"); end
      if (d >= 0 && d != cyc) begin failures++; $display("output at %0d, due %0d", cyc, d); end
    end
  end

  task automatic group(input int col, input bit init, input bit b2b);
    int e [DV], rm [DV], sg [DV];
    int tot = 0;
    for (int k = 0; k < DV; k++) begin
      rm[k] = int'($urandom_range(60));
      sg[k] = int'($urandom_range(1));
      e[k]  = init ? 0 : (sg[k] ? -f_ref(rm[k] > 31 ? 31 : rm[k]) : f_ref(rm[k] > 31 ? 31 : rm[k]));
      tot  += e[k];
    end
    hd_exp[col] = (I[col] + tot) < 0;
    for (int k = 0; k < DV; k++) begin
      int t = I[col] + tot - e[k];
      @(negedge clk);
      in_valid = 1; in_col = 3'(col); in_init = init; in_rmn = RW'(rm[k]); in_sgn = sg[k][0];
      in_rmn_v = RW'(rm[k] + qv[col][k]); in_sgn_v = sg[k][0] ^ gv[col][k][0];
      eqo.push_back(qv[col][k]); ego.push_back(gv[col][k]);
      qv[col][k] = f_ref(sat31(t)); gv[col][k] = (t < 0);
      eq.push_back(f_ref(sat31(t))); es.push_back(t < 0); eh.push_back(hd_exp[col]);
      edue.push_back(b2b ? cyc + DV : -1);
    end
  endtask

  initial begin
    for (int c = 0; c < NB; c++) for (int k = 0; k < DV; k++) begin qv[c][k] = 0; gv[c][k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NB; c++) begin
      I[c] = int'($urandom_range(62)) - 31;
      @(negedge clk);
      load_en = 1; load_col = 3'(c); load_llr = llr_t'(I[c]);
    end
    @(negedge clk); load_en = 0;
    for (int rep = 0; rep < 30; rep++) begin
      for (int c = 0; c < NB; c++) group(c, (rep == 0), 1'b1);
    end
    @(negedge clk); in_valid = 0;
    repeat (DV + 2) @(negedge clk);
    for (int rep = 0; rep < 10; rep++) begin
      for (int c = 0; c < NB; c++) begin
        group(c, 1'b0, 1'b0);
        @(negedge clk); in_valid = 0;
        repeat ($urandom_range(2 * DV)) @(negedge clk);
      end
    end
    repeat (2 * DV + 2) @(negedge clk);
    for (int c = 0; c < NB; c++) begin
      rd_col = 3'(c);
      #1;
      checks++;
      if (int'(rd_hd) != hd_exp[c]) begin failures++; $display("stored decision %0d wrong", c); end
      checks++;
      if (rd_hd_v != rd_hd) begin failures++; $display("QVAR stored decision %0d wrong", c); end
    end
    checks++;
    if (eq.size() != 0) begin failures++; $display("%0d outputs missing", eq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
