// tb_gnp_total_sum_serial: groups of D = 3 random messages, first back to
// back, then with random gaps. Each output must equal the sum of the other
// inputs of its group, out_total the group sum, out_first/out_last must mark
// the group ends, and with back-to-back groups output k must come exactly D
// cycles after input k.
module tb_gnp_total_sum_serial;
  localparam int D = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              clr = 0, in_valid = 0;
  logic signed [5:0] in_e = '0;
  logic              out_valid, out_first, out_last;
  logic signed [8:0] out_s, out_total;

  gnp_total_sum_serial #(.D(D), .WI(6)) dut (.*);

  // expected outputs, in order, with the cycle they are due (back to back) or -1
  int exp_s [$], exp_tot [$], exp_idx [$], exp_due [$];
  int grp [D];
  int cyc = 0;
  int outs = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int es, et, ei, ed;
    if (exp_s.size() == 0) begin
      failures++; $display("unexpected output");
    end else begin
      es = exp_s.pop_front(); et = exp_tot.pop_front(); ei = exp_idx.pop_front(); ed = exp_due.pop_front();
      checks += 4;
      if (int'(out_s) != es)     begin failures++; $display("out_s %0d exp %0d", out_s, es); end
      if (int'(out_total) != et) begin failures++; $display("out_total %0d exp %0d", out_total, et); end
      if (out_first != (ei == 0) || out_last != (ei == D - 1)) begin failures++; $display("first/last flags wrong"); end
      if (ed >= 0 && ed != cyc)  begin failures++; $display("output at cycle %0d, due %0d", cyc, ed); end
      outs++;
    end
  end

  task automatic send_group(input bit b2b, input int gapmax);
    automatic int tot = 0;
    for (int k = 0; k < D; k++) begin
      grp[k] = int'($urandom_range(62)) - 31;
      tot += grp[k];
    end
    for (int k = 0; k < D; k++) begin
      @(negedge clk);
      in_valid = 1; in_e = 6'(grp[k]);
      exp_s.push_back(tot - grp[k]); exp_tot.push_back(tot); exp_idx.push_back(k);
      exp_due.push_back(b2b ? cyc + D : -1);
    end
    @(negedge clk);
    in_valid = 0;
    if (b2b) return;
    repeat ($urandom_range(gapmax)) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // back-to-back groups: keep in_valid high between groups
    for (int g = 0; g < 40; g++) begin
      automatic int tot = 0;
      for (int k = 0; k < D; k++) begin grp[k] = int'($urandom_range(62)) - 31; tot += grp[k]; end
      for (int k = 0; k < D; k++) begin
        @(negedge clk);
        in_valid = 1; in_e = 6'(grp[k]);
        exp_s.push_back(tot - grp[k]); exp_tot.push_back(tot); exp_idx.push_back(k);
        exp_due.push_back(cyc + D);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (2 * D + 2) @(negedge clk);
    // groups with gaps
    for (int g = 0; g < 40; g++) send_group(1'b0, 2 * D);
    repeat (2 * D + 2) @(negedge clk);
    checks++;
    if (exp_s.size() != 0 || outs != 80 * D) begin
      failures++; $display("%0d outputs missing", exp_s.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
