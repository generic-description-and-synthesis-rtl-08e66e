// tb_gnp_trellis: random inputs to 4-port trellis processors with the sum,
// XOR and star operators, and to a 6-port sum trellis. Sum and XOR outputs
// are compared with the operator over all other inputs; star outputs with a
// floating-point-derived star applied in the trellis order (left partial
// result of the inputs before j, right partial result of those after j).
module tb_gnp_trellis;
  import ldpc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic signed [5:0] e4 [4], e6 [6];
  logic signed [8:0] s_sum [4];
  logic signed [5:0] s_xor [4], s_star [4];
  logic signed [9:0] s6 [6];

  gnp_trellis #(.D(4), .WM(6), .OP(OP_SUM))  dut_sum  (.e(e4), .s(s_sum));
  gnp_trellis #(.D(4), .WM(6), .OP(OP_XOR))  dut_xor  (.e(e4), .s(s_xor));
  gnp_trellis #(.D(4), .WM(6), .OP(OP_STAR)) dut_star (.e(e4), .s(s_star));
  gnp_trellis #(.D(6), .WM(6), .OP(OP_SUM))  dut_six  (.e(e6), .s(s6));

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 4; i++) e4[i] = 6'(int'($urandom_range(62)) - 31);
      for (int i = 0; i < 6; i++) e6[i] = 6'($urandom);
      #1;
      for (int j = 0; j < 4; j++) begin
        automatic int es = 0, l = 0, r = 0, st;
        automatic logic [5:0] ex = '0;
        automatic bit hl = 0, hr = 0;
        for (int i = 0; i < 4; i++) if (i != j) begin es += int'(e4[i]); ex ^= e4[i]; end
        for (int i = 0; i < j; i++) begin l = hl ? star_ref(l, int'(e4[i])) : int'(e4[i]); hl = 1; end
        for (int i = 3; i > j; i--) begin r = hr ? star_ref(int'(e4[i]), r) : int'(e4[i]); hr = 1; end
        st = (hl && hr) ? star_ref(l, r) : (hl ? l : r);
        checks += 3;
        if (int'(s_sum[j]) != es)  begin failures++; $display("sum s[%0d]=%0d exp %0d", j, s_sum[j], es); end
        if (s_xor[j] != ex)        begin failures++; $display("xor s[%0d] wrong", j); end
        if (int'(s_star[j]) != st) begin failures++; $display("star s[%0d]=%0d exp %0d", j, s_star[j], st); end
      end
      for (int j = 0; j < 6; j++) begin
        automatic int es = 0;
        for (int i = 0; i < 6; i++) if (i != j) es += int'(e6[i]);
        checks++;
        if (int'(s6[j]) != es) begin failures++; $display("sum6 s[%0d]=%0d exp %0d", j, s6[j], es); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
