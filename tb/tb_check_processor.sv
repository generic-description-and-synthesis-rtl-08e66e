// tb_check_processor: random writes to the edges of one check lane (MB = 3
// checks, NB = 6 columns) interleaved with reads, against a model that keeps
// only the per-edge values and recomputes R_m as the sum and S_m as the XOR
// over the check's edges at every read. The syndrome bit of each check is
// the XOR of the decisions written since the last syn_clr. A clear must
// return everything to zero. A second instance with the per-edge memories
// moved out (QVAR = 1) sees the same traffic, gets the old edge values from
// the model, and must return the whole R_m and S_m of the row.
module tb_check_processor;
  import ldpc_pkg::*;
  localparam int MB = 3, NB = 6, RW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          clr = 0, syn_clr = 0, wr_en = 0, wr_sgn = 0, wr_hd = 0;
  logic [1:0]    rd_row = '0, wr_row = '0;
  logic [2:0]    rd_col = '0, wr_col = '0;
  mag_t          wr_q = '0, wr_qold = '0;
  logic          wr_sgnold = 0;
  logic [RW-1:0] rd_rmn, rd_rmn_v;
  logic          rd_sgn, syn_zero, rd_sgn_v, syn_zero_v;

  check_processor #(.MB(MB), .NB(NB)) dut (.*);
  check_processor #(.MB(MB), .NB(NB), .QVAR(1'b1)) dutv (
    .clk, .rst_n, .clr, .syn_clr, .rd_row, .rd_col, .rd_rmn(rd_rmn_v), .rd_sgn(rd_sgn_v),
    .wr_en, .wr_row, .wr_col, .wr_q, .wr_sgn, .wr_hd, .wr_qold, .wr_sgnold, .syn_zero(syn_zero_v)
  );

  int mq [MB][NB], ms [MB][NB], msyn [MB];

  task automatic check_read(input int r, input int c);
    int rs = 0, ss = 0;
    for (int k = 0; k < NB; k++) begin rs += mq[r][k]; ss ^= ms[r][k]; end
    rd_row = 2'(r); rd_col = 3'(c);
    #1;
    checks += 2;
    if (int'(rd_rmn) != rs - mq[r][c]) begin failures++; $display("R_mn(%0d,%0d) %0d exp %0d", r, c, rd_rmn, rs - mq[r][c]); end
    if (int'(rd_sgn) != (ss ^ ms[r][c])) begin failures++; $display("sign(%0d,%0d) wrong", r, c); end
    checks += 2;
    if (int'(rd_rmn_v) != rs) begin failures++; $display("QVAR R_m(%0d) %0d exp %0d", r, rd_rmn_v, rs); end
    if (int'(rd_sgn_v) != ss) begin failures++; $display("QVAR S_m(%0d) wrong", r); end
  endtask

  task automatic check_syn();
    int z = 1;
    for (int r = 0; r < MB; r++) if (msyn[r]) z = 0;
    checks++;
    if (int'(syn_zero) != z) begin failures++; $display("syn_zero %0d exp %0d", syn_zero, z); end
    checks++;
    if (int'(syn_zero_v) != z) begin failures++; $display("QVAR syn_zero %0d exp %0d", syn_zero_v, z); end
  endtask

  initial begin
    for (int r = 0; r < MB; r++) begin msyn[r] = 0; for (int c = 0; c < NB; c++) begin mq[r][c] = 0; ms[r][c] = 0; end end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      automatic int r = int'($urandom_range(MB - 1)), c = int'($urandom_range(NB - 1));
      automatic int q = int'($urandom_range(31)), s = int'($urandom_range(1)), h = int'($urandom_range(1));
      automatic bit sc = ($urandom_range(40) == 0);
      @(negedge clk);
      check_read(int'($urandom_range(MB - 1)), int'($urandom_range(NB - 1)));
      check_syn();
      wr_en = 1; wr_row = 2'(r); wr_col = 3'(c); wr_q = mag_t'(q); wr_sgn = s[0]; wr_hd = h[0];
      wr_qold = mag_t'(mq[r][c]); wr_sgnold = ms[r][c][0];
      syn_clr = sc;
      @(posedge clk);
      mq[r][c] = q; ms[r][c] = s;
      if (sc) for (int k = 0; k < MB; k++) msyn[k] = 0;
      else msyn[r] ^= h;
      #1 wr_en = 0; syn_clr = 0;
    end
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    for (int r = 0; r < MB; r++) begin msyn[r] = 0; for (int c = 0; c < NB; c++) begin mq[r][c] = 0; ms[r][c] = 0; end end
    for (int r = 0; r < MB; r++) for (int c = 0; c < NB; c++) check_read(r, c);
    check_syn();
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
