// tb_barrel_shifter: exhaustive check of the arithmetic right shifter for
// 8-bit words and shift amounts 0..7 against integer floor division by 2^sh.
module tb_barrel_shifter;
  logic signed [7:0] d_in, d_out;
  logic [2:0] sh;
  int checks = 0, failures = 0;

  barrel_shifter #(.W(8), .SW(3)) dut (.*);

  initial begin
    for (int v = -128; v < 128; v++)
      for (int s = 0; s < 8; s++) begin
        int exp_v;
        d_in = 8'(v);
        sh   = 3'(s);
        #1;
        exp_v = v;
        for (int i = 0; i < s; i++) exp_v = (exp_v - ((exp_v % 2 + 2) % 2)) / 2;  // floor(v/2)
        checks++;
        if (int'(d_out) != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL %0d >> %0d: got %0d exp %0d", v, s, d_out, exp_v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
