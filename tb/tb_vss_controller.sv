// tb_vss_controller: drives the sequencer through codewords with a syndrome
// that becomes zero after a chosen number of iterations (or never), in both
// column modes. A monitor checks the read order (columns 0..NB-1, rows
// 0..MB-1 within a column), the gaps between columns (none, or MB cycles in
// exact mode), that every write-back repeats a read exactly MB cycles later,
// one syn_clr per pass on its first read, the init flag on the first pass
// only, the number of passes, the reported iteration count and converged
// flag, and the NB output beats.
module tb_vss_controller;
  localparam int MB = 3, NB = 6, IMAX = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       mode_exact = 0, in_valid = 0, syn_zero = 0, out_ready = 0;
  logic       in_ready, load_en, clr, rd_valid, rd_init, syn_clr, wr_valid, out_valid, out_last, converged;
  logic [2:0] load_col, rd_col, wr_col, out_col;
  logic [1:0] rd_row, wr_row;
  logic [4:0] iters;

  vss_controller #(.MB(MB), .NB(NB), .IMAX(IMAX)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // read log for the write-back check
  int rd_t [$], rd_r [$], rd_c [$];
  int passes = 0, reads_in_pass = 0, last_rd = -100, exp_col = 0, exp_row = 0;
  bit exact_cur = 0;
  always @(posedge clk) if (rst_n) begin
    if (rd_valid) begin
      if (syn_clr) begin
        passes++;
        reads_in_pass = 0; exp_col = 0; exp_row = 0;
        checks++;
        if (rd_init != (passes == 1)) begin failures++; $display("init flag wrong in pass %0d", passes); end
      end else begin
        checks++;
        if (reads_in_pass % MB == 0) begin
          if (cyc - last_rd != (exact_cur ? MB + 1 : 1)) begin failures++; $display("column gap %0d", cyc - last_rd - 1); end
        end else if (cyc - last_rd != 1) begin failures++; $display("rows not consecutive"); end
      end
      checks++;
      if (int'(rd_col) != exp_col || int'(rd_row) != exp_row) begin
        failures++; $display("read (%0d,%0d), expected (%0d,%0d)", rd_row, rd_col, exp_row, exp_col);
      end
      exp_row++;
      if (exp_row == MB) begin exp_row = 0; exp_col++; end
      reads_in_pass++;
      last_rd = cyc;
      rd_t.push_back(cyc); rd_r.push_back(int'(rd_row)); rd_c.push_back(int'(rd_col));
    end
    if (wr_valid) begin
      int t, r, c;
      checks++;
      if (rd_t.size() == 0) begin failures++; $display("write without read"); end
      else begin
        t = rd_t.pop_front(); r = rd_r.pop_front(); c = rd_c.pop_front();
        if (cyc - t != MB || int'(wr_row) != r || int'(wr_col) != c) begin
          failures++; $display("write (%0d,%0d) at +%0d", wr_row, wr_col, cyc - t);
        end
      end
    end
  end

  task automatic codeword(input bit exact, input int conv_after);
    int beats = 0;
    passes = 0;
    exact_cur = exact;
    mode_exact = exact;
    syn_zero = 0;
    for (int c = 0; c < NB; c++) begin
      @(negedge clk);
      in_valid = 1;
      #1;
      checks += 2;
      if (!in_ready || int'(load_col) != c) begin failures++; $display("load beat %0d refused", c); end
      if (clr != (c == 0)) begin failures++; $display("clr wrong at beat %0d", c); end
    end
    @(negedge clk); in_valid = 0;
    // the syndrome becomes zero once conv_after iterations (passes - 1) are done
    while (!out_valid) begin
      syn_zero = (conv_after > 0) && (passes - 1 >= conv_after);
      @(negedge clk);
    end
    checks += 4;
    if (passes != ((conv_after > 0) ? conv_after : IMAX) + 1) begin failures++; $display("%0d passes", passes); end
    if (int'(iters) != ((conv_after > 0) ? conv_after : IMAX)) begin failures++; $display("iters %0d", iters); end
    if (converged != (conv_after > 0)) begin failures++; $display("converged flag wrong"); end
    if (reads_in_pass != NB * MB) begin failures++; $display("%0d reads in last pass", reads_in_pass); end
    while (beats < NB) begin
      out_ready = $urandom_range(1);
      #1;
      if (out_valid && out_ready) begin
        checks += 2;
        if (int'(out_col) != beats) begin failures++; $display("output beat order"); end
        if (out_last != (beats == NB - 1)) begin failures++; $display("out_last wrong"); end
        beats++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    checks++;
    if (!in_ready || out_valid) begin failures++; $display("not back in load state"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    codeword(1'b0, 3);
    codeword(1'b1, 2);
    codeword(1'b0, 0);
    codeword(1'b1, 1);
    codeword(1'b1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
