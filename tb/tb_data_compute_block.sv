// tb_data_compute_block: the 16-tap data computing block (P = 4) with its own
// bit-cycle controller. Each sample edge the testbench feeds every DA table a
// random sample, and random update commands (upd, sign, t) with random delayed
// samples move the weights. An integer model in the testbench follows the
// weights (w += -(x >> (t+1)) or +(x >> (t+1))) and the per-block histories,
// and checks
//   - the weight outputs against the model after every sample edge;
//   - sum_o + 2*carry_o = sum over the four blocks of
//     floor(sum_j W_{4b+j} * x_b(n-j) / 128), two sample edges after x(n).
module tb_data_compute_block;
  localparam int L = 8, P = 4, NS = 300, WO = 16;
  logic clk = 0, rst_n = 0;
  logic [2:0] bit_idx;
  logic slice_first, slice_last, tick;
  logic signed [L-1:0] x_new [P];
  logic signed [L-1:0] x_d [4*P];
  logic upd = 0, sign = 0;
  logic [2:0] t = '0;
  logic signed [WO-1:0] sum_o, carry_o;
  logic signed [L-1:0] w [4*P];
  int checks = 0, failures = 0;
  int wref [4*P];
  int xh [P][4];
  int exp_y [NS];
  int n = 0;
  int n_upd = 0;

  da_controller #(.L(L)) u_ctrl (.*);
  data_compute_block #(.L(L), .P(P), .WO(WO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < 4 * P; k++) begin wref[k] = 0; x_d[k] = '0; end
    for (int b = 0; b < P; b++) begin
      x_new[b] = '0;
      for (int j = 0; j < 4; j++) xh[b][j] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
  end

  always @(posedge clk) begin
    if (rst_n && tick) begin
      int acc, tot;
      // weights before this edge
      for (int k = 0; k < 4 * P; k++) begin
        checks++;
        if (int'(w[k]) != wref[k]) begin
          failures++;
          $display("FAIL edge %0d: w%0d=%0d exp %0d", n, k, w[k], wref[k]);
        end
      end
      // result of the sample taken two edges ago
      if (n >= 2 && n - 2 < NS) begin
        checks++;
        if (int'(sum_o) + 2 * int'(carry_o) != exp_y[n-2]) begin
          failures++;
          $display("FAIL sample %0d: got %0d exp %0d", n - 2,
                   int'(sum_o) + 2 * int'(carry_o), exp_y[n-2]);
        end
      end
      // model of this edge
      if (upd) begin
        n_upd++;
        for (int k = 0; k < 4 * P; k++) begin
          int inc;
          inc = int'(x_d[k]) >>> (int'(t) + 1);
          wref[k] = int'($signed(8'(sign ? wref[k] - inc : wref[k] + inc)));
        end
      end
      tot = 0;
      for (int b = 0; b < P; b++) begin
        for (int j = 3; j > 0; j--) xh[b][j] = xh[b][j-1];
        xh[b][0] = int'(x_new[b]);
        acc = 0;
        for (int j = 0; j < 4; j++) acc += wref[4*b+j] * xh[b][j];
        tot += acc >>> 7;
      end
      if (n < NS) exp_y[n] = tot;
      // stimulus for the next edge
      for (int b = 0; b < P; b++) x_new[b] <= L'($urandom);
      for (int k = 0; k < 4 * P; k++) x_d[k] <= L'($urandom);
      upd  <= ($urandom % 4 != 0);
      sign <= (n % 50 < 25) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      t    <= 3'($urandom % 4);
      n <= n + 1;
      if (n == NS + 1) begin
        checks++;
        if (n_upd == 0) failures++;
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
