// tb_gnp_total_sum: random inputs to a 6-port sum processor, a 6-port XOR
// processor and a pipelined 4-port sum processor; each output is compared
// with the operator applied directly to all inputs except its own, and the
// pipelined one is checked one cycle later.
module tb_gnp_total_sum;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [5:0] e6 [6];
  logic signed [9:0] s_sum [6];
  logic signed [5:0] s_xor [6];
  logic signed [5:0] e4 [4];
  logic signed [8:0] s_p [4];
  int exp_p [4];

  gnp_total_sum #(.D(6), .WI(6), .OP(OP_SUM)) dut_sum (.clk, .rst_n, .e(e6), .s(s_sum));
  gnp_total_sum #(.D(6), .WI(6), .OP(OP_XOR)) dut_xor (.clk, .rst_n, .e(e6), .s(s_xor));
  gnp_total_sum #(.D(4), .WI(6), .OP(OP_SUM), .PIPE(1'b1)) dut_p (.clk, .rst_n, .e(e4), .s(s_p));

  initial begin
    for (int i = 0; i < 6; i++) e6[i] = '0;
    for (int i = 0; i < 4; i++) e4[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int i = 0; i < 6; i++) e6[i] = 6'($urandom);
      for (int i = 0; i < 4; i++) e4[i] = 6'($urandom);
      for (int j = 0; j < 4; j++) begin
        exp_p[j] = 0;
        for (int i = 0; i < 4; i++) if (i != j) exp_p[j] += int'(e4[i]);
      end
      #1;
      for (int j = 0; j < 6; j++) begin
        automatic int es = 0;
        automatic logic [5:0] ex = '0;
        for (int i = 0; i < 6; i++) if (i != j) begin
          es += int'(e6[i]);
          ex ^= e6[i];
        end
        checks += 2;
        if (int'(s_sum[j]) != es) begin failures++; $display("sum s[%0d]=%0d exp %0d", j, s_sum[j], es); end
        if (s_xor[j] != ex)       begin failures++; $display("xor s[%0d] wrong", j); end
      end
      @(posedge clk); #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (int'(s_p[j]) != exp_p[j]) begin failures++; $display("pipe s[%0d]=%0d exp %0d", j, s_p[j], exp_p[j]); end
      end
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
