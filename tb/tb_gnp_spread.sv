// tb_gnp_spread: a straight and a delayed spread-update processor (D = 6)
// receive the same random inputs, each port once per round in a random
// order, with random output requests in between. Expected answers: straight
// = sum of the latest messages of the other ports; delayed = sum over the
// other ports of the messages of the last completed round, switching only
// after the D-th input of a round (when swapped must pulse).
module tb_gnp_spread;
  localparam int D = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              clr = 0, in_valid = 0;
  logic [2:0]        in_idx = '0, rq_idx = '0;
  logic signed [5:0] in_e = '0;
  logic signed [9:0] s_st, s_dl;
  logic              sw_st, sw_dl;

  gnp_spread #(.D(D), .WI(6), .MODE(1'b0)) dut_st (.clk, .rst_n, .clr, .in_valid, .in_idx, .in_e, .rq_idx, .rq_s(s_st), .swapped(sw_st));
  gnp_spread #(.D(D), .WI(6), .MODE(1'b1)) dut_dl (.clk, .rst_n, .clr, .in_valid, .in_idx, .in_e, .rq_idx, .rq_s(s_dl), .swapped(sw_dl));

  int cur [D], done [D];
  int swaps = 0;

  task automatic ask();
    int es = 0, ed = 0;
    int j = int'($urandom_range(D - 1));
    for (int k = 0; k < D; k++) if (k != j) begin es += cur[k]; ed += done[k]; end
    rq_idx = 3'(j);
    #1;
    checks += 2;
    if (int'(s_st) != es) begin failures++; $display("straight s[%0d]=%0d exp %0d", j, s_st, es); end
    if (int'(s_dl) != ed) begin failures++; $display("delayed s[%0d]=%0d exp %0d", j, s_dl, ed); end
  endtask

  initial begin
    for (int k = 0; k < D; k++) begin cur[k] = 0; done[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 60; round++) begin
      int perm [D];
      for (int k = 0; k < D; k++) perm[k] = k;
      perm.shuffle();
      for (int k = 0; k < D; k++) begin
        int v = int'($urandom_range(62)) - 31;
        @(negedge clk);
        ask();
        in_valid = 1; in_idx = 3'(perm[k]); in_e = 6'(v);
        @(posedge clk);
        cur[perm[k]] = v;
        if (k == D - 1) done = cur;
        #1 in_valid = 0;
        checks++;
        if (sw_dl != (k == D - 1)) begin failures++; $display("swapped pulse wrong"); end
        if (sw_dl) swaps++;
        if (sw_st) begin failures++; $display("straight mode swapped"); end
        ask();
      end
    end
    checks++;
    if (swaps != 60) begin failures++; $display("%0d swaps", swaps); end
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
