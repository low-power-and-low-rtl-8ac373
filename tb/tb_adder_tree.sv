// tb_adder_tree: random and extreme inputs to two trees, 4 inputs with first-
// level carry-ins (+2) and 8 inputs without, compared with an integer sum.
module tb_adder_tree;
  logic signed [9:0]  a4 [4];
  logic signed [12:0] s4;
  logic signed [9:0]  a8 [8];
  logic signed [13:0] s8;
  int checks = 0, failures = 0;

  adder_tree #(.NIN(4), .WI(10), .WO(13), .CIN(1'b1)) dut4 (.d_in(a4), .d_out(s4));
  adder_tree #(.NIN(8), .WI(10), .WO(14), .CIN(1'b0)) dut8 (.d_in(a8), .d_out(s8));

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int e4, e8;
      e4 = 2;
      e8 = 0;
      for (int i = 0; i < 8; i++) begin
        int v;
        v = int'($signed(10'($urandom)));
        if (it == 0) v = -512;
        if (it == 1) v = 511;
        a8[i] = 10'(v);
        e8 += v;
        if (i < 4) begin a4[i] = 10'(v); e4 += v; end
      end
      #1;
      checks += 2;
      if (int'(s4) != e4) begin failures++; $display("FAIL tree4: %0d exp %0d", s4, e4); end
      if (int'(s8) != e8) begin failures++; $display("FAIL tree8: %0d exp %0d", s8, e8); end
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
