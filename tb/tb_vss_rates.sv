// tb_vss_rates: the decoder at the two other code rates of the memory
// comparison, run side by side: rate 1/3 as a (4,6) code with 11 x 11
// circulants (N = 66) and rate 9/10 as a (3,30) code with 31 x 31
// circulants (N = 930). Each instance is checked bit-exactly against the
// schedule's reference model (vss_rate_harness). Every mechanism (both
// column modes, early stop, stop at IMAX, output stall, corrected codeword)
// must occur in each instance. A third instance decodes the default (3,6)
// code, Z = 12, with the per-edge Q memory in the variable lanes and is held
// against the same model, which shows that both placements decode alike.
module tb_vss_rates;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic done_a, done_b, done_c;
  int cc, fc, cc_ov, cc_ex, cc_es, cc_im, cc_st, cc_co;
  int ca, fa, ca_ov, ca_ex, ca_es, ca_im, ca_st, ca_co;
  int cb, fb, cb_ov, cb_ex, cb_es, cb_im, cb_st, cb_co;

  vss_rate_harness #(.Z(11), .MB(4), .NB(6),  .NCW(10)) h13 (
    .clk, .rst_n, .start, .done(done_a), .checks(ca), .failures(fa),
    .cnt_overlap(ca_ov), .cnt_exact(ca_ex), .cnt_early(ca_es), .cnt_imax(ca_im), .cnt_stall(ca_st), .cnt_corrected(ca_co));
  vss_rate_harness #(.Z(31), .MB(3), .NB(30), .NCW(10)) h910 (
    .clk, .rst_n, .start, .done(done_b), .checks(cb), .failures(fb),
    .cnt_overlap(cb_ov), .cnt_exact(cb_ex), .cnt_early(cb_es), .cnt_imax(cb_im), .cnt_stall(cb_st), .cnt_corrected(cb_co));

  vss_rate_harness #(.Z(12), .MB(3), .NB(6), .NCW(20), .QVAR(1'b1)) hqv (
    .clk, .rst_n, .start, .done(done_c), .checks(cc), .failures(fc),
    .cnt_overlap(cc_ov), .cnt_exact(cc_ex), .cnt_early(cc_es), .cnt_imax(cc_im), .cnt_stall(cc_st), .cnt_corrected(cc_co));

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("%s never happened", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    start = 1;
    wait (done_a && done_b && done_c);
    $display("rate 1/3 : overlapped %0d exact %0d early %0d imax %0d stalls %0d corrected %0d", ca_ov, ca_ex, ca_es, ca_im, ca_st, ca_co);
    $display("rate 9/10: overlapped %0d exact %0d early %0d imax %0d stalls %0d corrected %0d", cb_ov, cb_ex, cb_es, cb_im, cb_st, cb_co);
    $display("Q in variable lanes: overlapped %0d exact %0d early %0d imax %0d stalls %0d corrected %0d", cc_ov, cc_ex, cc_es, cc_im, cc_st, cc_co);
    need("Q-var overlapped mode", cc_ov);     need("Q-var exact mode", cc_ex);
    need("Q-var early stop", cc_es);          need("Q-var stop at IMAX", cc_im);
    need("Q-var output stall", cc_st);        need("Q-var correction", cc_co);
    need("rate 1/3 overlapped mode", ca_ov);  need("rate 9/10 overlapped mode", cb_ov);
    need("rate 1/3 exact mode", ca_ex);       need("rate 9/10 exact mode", cb_ex);
    need("rate 1/3 early stop", ca_es);       need("rate 9/10 early stop", cb_es);
    need("rate 1/3 stop at IMAX", ca_im);     need("rate 9/10 stop at IMAX", cb_im);
    need("rate 1/3 output stall", ca_st);     need("rate 9/10 output stall", cb_st);
    need("rate 1/3 correction", ca_co);       need("rate 9/10 correction", cb_co);
    checks += ca + cb + cc;
    failures += fa + fb + fc;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
