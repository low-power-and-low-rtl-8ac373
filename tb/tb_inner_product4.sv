// tb_inner_product4: one 4-point DA block sequenced by the bit-cycle
// controller. At every sample edge a random sample enters the DA table and a
// new random weight set is applied (extremes -128/127 included). Two sample
// edges later the held result must equal
//     floor(sum_k W_k * x(n-k) / 128)  (= sum_o + 2*carry_o + 1),
// computed in the testbench with integers. Checks the latency as well: the
// result of the sample taken at edge n is read just before edge n+2.
module tb_inner_product4;
  localparam int L = 8, NS = 400;
  logic clk = 0, rst_n = 0;
  logic [2:0] bit_idx;
  logic slice_first, slice_last, tick;
  logic signed [L-1:0] x_new = '0;
  logic signed [L-1:0] w [4];
  logic signed [L+1:0] sum_o, carry_o;
  int checks = 0, failures = 0;
  int xs [NS];
  int ws [NS][4];
  int exp_y [NS];
  int n = 0;

  da_controller #(.L(L)) u_ctrl (.*);
  inner_product4 #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < NS; i++) begin
      xs[i] = int'($signed(8'($urandom)));
      for (int k = 0; k < 4; k++) ws[i][k] = int'($signed(8'($urandom)));
      if (i % 13 == 5) begin xs[i] = -128; for (int k = 0; k < 4; k++) ws[i][k] = -128; end
      if (i % 13 == 6) for (int k = 0; k < 4; k++) ws[i][k] = 127;
    end
    for (int i = 0; i < NS; i++) begin
      int acc;
      acc = 0;
      for (int k = 0; k < 4; k++) if (i - k >= 0) acc += ws[i][k] * xs[i-k];
      exp_y[i] = acc >>> 7;
    end
  end

  initial begin
    for (int k = 0; k < 4; k++) w[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    x_new = L'(xs[0]);
  end

  // Sample edge n: the table takes xs[n]; weights of period n are applied.
  always @(posedge clk) begin
    if (rst_n && tick) begin
      if (n >= 2 && n - 2 < NS) begin
        int got;
        got = int'(sum_o) + 2 * int'(carry_o) + 1;
        checks++;
        if (got != exp_y[n-2]) begin
          failures++;
          $display("FAIL sample %0d: got %0d exp %0d", n - 2, got, exp_y[n-2]);
        end
      end
      if (n < NS) for (int k = 0; k < 4; k++) w[k] <= L'(ws[n][k]);
      if (n + 1 < NS) x_new <= L'(xs[n+1]);
      n <= n + 1;
      if (n == NS + 1) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat ((NS + 10) * L) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
