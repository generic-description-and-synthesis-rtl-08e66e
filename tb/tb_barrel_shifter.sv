// tb_barrel_shifter: every shift of a 12-lane and a 7-lane rotator with
// random data, compared with out[i] = in[(i + shift) mod Z].
module tb_barrel_shifter;
  int checks = 0, failures = 0;
  logic [7:0] a_in [12], a_out [12];
  logic [3:0] a_sh;
  logic [4:0] b_in [7], b_out [7];
  logic [2:0] b_sh;
  barrel_shifter #(.Z(12), .WD(8)) dut_a (.in_data(a_in), .shift(a_sh), .out_data(a_out));
  barrel_shifter #(.Z(7),  .WD(5)) dut_b (.in_data(b_in), .shift(b_sh), .out_data(b_out));
  initial begin
    a_sh = '0; b_sh = '0;
    for (int i = 0; i < 12; i++) a_in[i] = '0;
    for (int i = 0; i < 7; i++)  b_in[i] = '0;
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s < 12; s++) begin
        for (int i = 0; i < 12; i++) a_in[i] = 8'($urandom);
        for (int i = 0; i < 7; i++)  b_in[i] = 5'($urandom);
        a_sh = 4'(s);
        b_sh = 3'(s % 7);
        #1;
        for (int i = 0; i < 12; i++) begin
          checks++;
          if (a_out[i] != a_in[(i + s) % 12]) begin
            failures++; $display("Z=12 shift %0d lane %0d wrong", s, i);
          end
        end
        for (int i = 0; i < 7; i++) begin
          checks++;
          if (b_out[i] != b_in[(i + s % 7) % 7]) begin
            failures++; $display("Z=7 shift %0d lane %0d wrong", s % 7, i);
          end
        end
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
