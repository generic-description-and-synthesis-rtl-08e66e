// tb_f_lut: exhaustive check of the f table against a floating-point
// evaluation of f(x) = -ln(tanh(x/2)), rounded to the same grid.
module tb_f_lut;
  import ldpc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  mag_t x, y;
  f_lut dut (.x(x), .y(y));
  initial begin
    for (int k = 0; k < 32; k++) begin
      x = mag_t'(k);
      #1;
      checks++;
      if (int'(y) != f_ref(k)) begin
        failures++;
        $display("f(%0d) = %0d, expected %0d", k, y, f_ref(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
