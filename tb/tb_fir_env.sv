// tb_fir_env: drives one da_adaptive_fir of length N with a system-
// identification stimulus and checks it against an integer model of the
// delayed-LMS DA filter. The desired response is an unknown FIR "plant"
// applied to the input plus noise, with phases of forced large errors (error
// saturation) and of silence (zero error, no update).
// Model, for sample n (W(n) = weights used to filter sample n):
//   y(n)   = sum over 4-point blocks b of floor(sum_j W_{4b+j}(n) x(n-4b-j) / 128)
//   e(n)   = clamp(d(n) - y(n), -127, 127),  r = |e(n)| >> log2(N)
//   t      = 6 - (leading-one index of r), no update when r = 0
//   W_k(n+1) = W_k(n) +- floor(x(n-2-k) / 2^(t+1)) using e(n-2)  (n >= 2)
// Checked every sample edge: y_out, e_out, out_valid (latency: the output of
// x(n) is read before sample edge n+3) and all weights. Counts how often each
// mechanism occurred: additions, subtractions, skipped updates, positive and
// negative saturation, and control words; a mechanism that never happened is
// a failure. Reports through its output ports when done.
module tb_fir_env #(
  parameter int N  = 32,
  parameter int NS = 1500
) (
  output int  checks,
  output int  failures,
  output bit  done
);
  localparam int L = 8, YW = L + $clog2(N) + 1, MU = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic signed [L-1:0] x_in, d_in;
  logic sample_req, out_valid;
  logic signed [YW-1:0] y_out;
  logic signed [L-1:0] e_out;
  logic signed [L-1:0] w_out [N];

  if (N == 32) begin : g_full
    da_adaptive_fir dut (.*);                 // default parameters
  end else begin : g_small
    da_adaptive_fir #(.N(N)) dut (.*);
  end

  always #5 clk = ~clk;

  int xs [NS];
  int ds [NS];
  int ym [NS];
  int em [NS];
  int wm [NS+1][N];
  int n_add = 0, n_sub = 0, n_skip = 0, n_sat_p = 0, n_sat_n = 0;
  int t_seen [8];
  int err_first = 0, err_last = 0;

  function automatic int xat(input int i);
    return (i >= 0) ? xs[i] : 0;
  endfunction

  initial begin
    int h [8];
    int acc, ev, r, t;
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < 8; i++) t_seen[i] = 0;
    h = '{48, -30, 20, 0, 0, -12, 0, 8};
    for (int i = 0; i < NS; i++) begin
      xs[i] = int'($urandom % 160) - 80;
      acc = 0;
      for (int k = 0; k < 8; k++) acc += h[k] * xat(i - k * (N / 8 > 0 ? N / 8 : 1));
      ds[i] = (acc >>> 7) + int'($urandom % 5) - 2;
      if (i % 300 >= 100 && i % 300 < 110) ds[i] = 120;            // saturation +
      if (i % 300 >= 200 && i % 300 < 210) ds[i] = -120;           // saturation -
      if (ds[i] > 127) ds[i] = 127;
      if (ds[i] < -128) ds[i] = -128;
    end
    // reference model
    for (int k = 0; k < N; k++) begin wm[0][k] = 0; end
    for (int n = 0; n < NS; n++) begin
      acc = 0;
      for (int b = 0; b < N / 4; b++) begin
        int s;
        s = 0;
        for (int j = 0; j < 4; j++) s += wm[n][4*b+j] * xat(n - 4*b - j);
        acc += s >>> 7;
      end
      ym[n] = acc;
      ev = ds[n] - acc;
      if (ev > 127) begin ev = 127; n_sat_p++; end
      if (ev < -127) begin ev = -127; n_sat_n++; end
      em[n] = ev;
      if (n < NS / 4) err_first += (ev < 0 ? -ev : ev);
      if (n >= NS - NS / 4) err_last += (ev < 0 ? -ev : ev);
      for (int k = 0; k < N; k++) wm[n+1][k] = wm[n][k];
      if (n >= 2) begin
        ev = em[n-2];
        r = (ev < 0 ? -ev : ev) >> MU;
        if (r == 0) n_skip++;
        else begin
          t = 6;
          while ((1 << (7 - t)) <= r) t--;
          t_seen[t]++;
          if (ev < 0) n_sub++; else n_add++;
          for (int k = 0; k < N; k++) begin
            int inc;
            inc = xat(n - 2 - k) >>> (t + 1);
            wm[n+1][k] = int'($signed(8'(ev < 0 ? wm[n][k] - inc : wm[n][k] + inc)));
          end
        end
      end
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d %s", N, what);
    end
  endtask

  int edge_n = 0;

  initial begin
    x_in = '0; d_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    x_in = L'(xs[0]);
    d_in = L'(ds[0]);
    rst_n = 1;
  end

  always @(posedge clk) begin
    if (rst_n && sample_req && !done) begin
      // state before sample edge edge_n
      if (edge_n >= 1)
        for (int k = 0; k < N; k++)
          chk(int'(w_out[k]) == wm[edge_n-1][k],
              $sformatf("edge %0d w%0d=%0d exp %0d", edge_n, k, w_out[k], wm[edge_n-1][k]));
      chk(out_valid == (edge_n >= 3), $sformatf("edge %0d out_valid", edge_n));
      if (edge_n >= 3) begin
        chk(int'(y_out) == ym[edge_n-3],
            $sformatf("y(%0d)=%0d exp %0d", edge_n - 3, y_out, ym[edge_n-3]));
        chk(int'(e_out) == em[edge_n-3],
            $sformatf("e(%0d)=%0d exp %0d", edge_n - 3, e_out, em[edge_n-3]));
      end
      if (edge_n + 1 < NS) begin
        x_in <= L'(xs[edge_n+1]);
        d_in <= L'(ds[edge_n+1]);
      end
      edge_n <= edge_n + 1;
      if (edge_n == NS) begin
        int n_t;
        n_t = 0;
        for (int i = 0; i < 8; i++) if (t_seen[i] > 0) n_t++;
        $display("N=%0d: adds=%0d subs=%0d skipped=%0d sat+=%0d sat-=%0d control words used=%0d",
                 N, n_add, n_sub, n_skip, n_sat_p, n_sat_n, n_t);
        $display("N=%0d: mean |e| first quarter %0d/%0d, last quarter %0d/%0d",
                 N, err_first, NS / 4, err_last, NS / 4);
        chk(n_add > 0, "no weight addition happened");
        chk(n_sub > 0, "no weight subtraction happened");
        chk(n_skip > 0, "no zero-error skip happened");
        chk(n_sat_p > 0 && n_sat_n > 0, "error saturation not exercised");
        chk(n_t >= 2, "fewer than two control words used");
        done <= 1;
      end
    end
  end
endmodule
