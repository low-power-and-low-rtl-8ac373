// tb_ctrl_word_gen: exhaustive check of the control word for every 7-bit
// magnitude r (L = 8): t = 6 - (index of the leading one), t = 7 for r = 0,
// so that 2^(6-t) <= r < 2^(7-t) for r > 0.
module tb_ctrl_word_gen;
  logic [6:0] r;
  logic [2:0] t;
  logic r_zero;
  int checks = 0, failures = 0;

  ctrl_word_gen #(.L(8)) dut (.*);

  initial begin
    for (int v = 0; v < 128; v++) begin
      int exp_t;
      r = 7'(v);
      #1;
      if (v == 0) exp_t = 7;
      else begin
        exp_t = 6;
        while ((1 << (6 - exp_t + 1)) <= v) exp_t--;
      end
      checks += 2;
      if (int'(t) != exp_t) begin
        failures++;
        $display("FAIL r=%0d: t=%0d exp %0d", v, t, exp_t);
      end
      if (r_zero != (v == 0)) begin
        failures++;
        $display("FAIL r=%0d: r_zero=%0d", v, r_zero);
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
