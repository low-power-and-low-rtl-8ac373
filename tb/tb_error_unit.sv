// tb_error_unit: random sum/carry words and desired responses (N = 32, so
// mu = 1/32) checked against y = sum + 2*carry, e = d - y saturated to
// +-127, sign and r = |e| >> 5. Large |y| values exercise both saturations;
// a second instance checks the final carry-in used by a single 4-point block.
module tb_error_unit;
  localparam int L = 8, IW = 16, YW = 14;
  logic signed [IW-1:0] sum_in, carry_in;
  logic signed [L-1:0]  d;
  logic signed [YW-1:0] y, y1;
  logic signed [L-1:0]  e, e1;
  logic                 sign, sign1;
  logic [L-2:0]         r, r1;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  error_unit #(.L(L), .IW(IW), .YW(YW), .MU_SHIFT(5), .FINAL_CIN(1'b0)) dut (.*);
  error_unit #(.L(L), .IW(IW), .YW(YW), .MU_SHIFT(2), .FINAL_CIN(1'b1)) dut1 (
    .sum_in(sum_in), .carry_in(carry_in), .d(d), .y(y1), .e(e1), .sign(sign1), .r(r1));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int yv, sv, cv, dv, ev, mv, ev1, mv1;
      yv = (it % 3 == 0) ? int'($urandom % 8192) - 4096 : int'($urandom % 400) - 200;
      cv = int'($urandom % 2048) - 1024;
      sv = yv - 2 * cv;
      dv = int'($signed(8'($urandom)));
      sum_in = IW'(sv); carry_in = IW'(cv); d = L'(dv);
      #1;
      ev = dv - yv;
      if (ev > 127) begin ev = 127; n_sat_hi++; end
      if (ev < -127) begin ev = -127; n_sat_lo++; end
      mv = ev < 0 ? -ev : ev;
      chk(int'(y) == yv, $sformatf("y %0d exp %0d", y, yv));
      chk(int'(e) == ev, $sformatf("e %0d exp %0d", e, ev));
      chk(sign == (ev < 0), "sign");
      chk(int'(r) == (mv >> 5), $sformatf("r %0d exp %0d", r, mv >> 5));
      ev1 = dv - (yv + 1);
      if (ev1 > 127) ev1 = 127;
      if (ev1 < -127) ev1 = -127;
      mv1 = ev1 < 0 ? -ev1 : ev1;
      chk(int'(y1) == yv + 1, "y with carry-in");
      chk(int'(r1) == (mv1 >> 2), "r with mu = 1/4");
    end
    chk(n_sat_hi > 0 && n_sat_lo > 0, "both saturations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
