// tb_weight_increment4: random update commands (sign, t, upd) and delayed
// samples; a reference weight set in the testbench is moved by
// +-floor(x / 2^(t+1)) when tick and upd are high, and wrapped to 8 bits.
// Checks the weights after every edge, including edges without tick.
module tb_weight_increment4;
  localparam int L = 8;
  logic clk = 0, rst_n = 0, tick = 0, upd = 0, sign = 0;
  logic [2:0] t = '0;
  logic signed [L-1:0] x_d [4];
  logic signed [L-1:0] w [4];
  int checks = 0, failures = 0;
  int wref [4] = '{0, 0, 0, 0};
  int n_add = 0, n_sub = 0;

  weight_increment4 #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  function automatic int wrap8(input int v);
    return int'($signed(8'(v)));
  endfunction

  initial begin
    for (int k = 0; k < 4; k++) x_d[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      tick = ($urandom % 4 != 0);
      upd  = ($urandom % 5 != 0);
      sign = $urandom % 2;
      t    = 3'($urandom);
      for (int k = 0; k < 4; k++) x_d[k] = L'($urandom);
      @(posedge clk);
      if (tick && upd) begin
        for (int k = 0; k < 4; k++) begin
          int inc;
          inc = int'(x_d[k]) >>> (int'(t) + 1);
          wref[k] = wrap8(sign ? wref[k] - inc : wref[k] + inc);
        end
        if (sign) n_sub++; else n_add++;
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(w[k]) != wref[k]) begin
          failures++;
          if (failures < 10) $display("FAIL it %0d w%0d=%0d exp %0d", it, k, w[k], wref[k]);
        end
      end
    end
    checks++;
    if (n_add == 0 || n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
