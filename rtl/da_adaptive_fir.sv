// da_adaptive_fir: N-tap delayed-LMS adaptive FIR filter using distributed
// arithmetic (DA) with carry-save accumulation.
//
// Filtering: the taps are split into 4-point DA blocks. Each block keeps a
// 15-register table of all sums of its four current samples and reads it with
// one bit slice of its four weights per bit cycle; a carry-save accumulator
// adds the L table outputs of a sample period without carry propagation.
// Groups of P blocks (P = 4 for N >= 16, else N/4) form data computing
// blocks whose sum and carry words are added by adder trees; the words of the
// N/(4P) data computing blocks are added once more, and a final adder and a
// subtractor give y(n) and e(n) = d(n) - y(n).
// Adaptation: mu * e is reduced to a sign and a shift t (control word
// generator); every weight moves by +-(x >> (t+1)), barrel shifters and
// adder/subtractors replacing the LMS multipliers. mu = 2^-MU_I / N.
//
// Number formats: x(n), d(n) and y(n) are integers in the same units; x and d
// are L-bit, y is YW-bit. Weights are L-bit fractions w = W / 2^(L-1).
// y(n) = sum over 4-point blocks of floor(sum_k W_k x(n-k) / 2^(L-1)).
//
// Timing (one clock, the bit clock): a sample period is L cycles. In the
// cycle where sample_req is high, x_in and d_in are taken at the rising edge,
// and the weights for the coming period are loaded. The sample is filtered
// during the next L cycles; its carry-save result is held during the period
// after that, when the output path (trees, final adder, error, control word)
// has a whole period to settle; at the end of that period y(n), e(n), sign and
// t are registered. The weights are updated at the next sample edge, so
//     w(n+1) = w(n) + mu * e(n-2) * x(n-2)   (adaptation delay 2).
// y_out/e_out for sample n appear two sample edges after x(n) was taken, with
// out_valid high. Reset clears all state; samples before the first one are 0.
// The sample-rate logic runs on the bit clock with a clock enable (tick)
// instead of a second, slower clock.
// From the original paper: the block structure of the 4-, 16- and 32-tap filters, the
// mu = 1/N step, the control word table and the adaptation delay of two.
// This design's choices: number formats and widths, error saturation, the
// single clock with enable, the input delay line and the reset behaviour.
module da_adaptive_fir #(
  parameter int unsigned L    = da_fir_pkg::L_DEFAULT,
  parameter int unsigned N    = da_fir_pkg::N_DEFAULT,
  parameter int unsigned MU_I = 0,
  localparam int unsigned YW  = da_fir_pkg::y_width(L, N)
) (
  input  logic                 clk,         // bit clock
  input  logic                 rst_n,       // asynchronous, active low
  input  logic signed [L-1:0]  x_in,        // input sample x(n)
  input  logic signed [L-1:0]  d_in,        // desired response d(n)
  output logic                 sample_req,  // x_in/d_in taken at this edge
  output logic signed [YW-1:0] y_out,       // filter output y(n-2)
  output logic signed [L-1:0]  e_out,       // error e(n-2)
  output logic                 out_valid,
  output logic signed [L-1:0]  w_out [N]    // current weights
);

  localparam int unsigned NB       = N / da_fir_pkg::DA_POINTS;  // 4-point blocks
  localparam int unsigned P        = (NB >= 4) ? 4 : NB;
  localparam int unsigned NDCB     = N / (4 * P);
  localparam int unsigned IW       = da_fir_pkg::tree_width(L, N);
  localparam int unsigned SW       = $clog2(L);
  localparam int unsigned MU_SHIFT = $clog2(N) + MU_I;
  localparam int unsigned M        = da_fir_pkg::ADAPT_DELAY;

  if (N % 4 != 0 || (P != 1 && P != 2 && P != 4) || NDCB * 4 * P != N
      || (P == 1 && NDCB != 1) || (NDCB & (NDCB - 1)) != 0) begin : g_bad_n
    $error("N must be 4, 8 or a power-of-two multiple of 16");
  end

  // ---------------------------------------------------------------- timing
  logic [SW-1:0] bit_idx;
  logic          slice_first, slice_last, tick;

  da_controller #(.L(L)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .bit_idx     (bit_idx),
    .slice_first (slice_first),
    .slice_last  (slice_last),
    .tick        (tick)
  );

  assign sample_req = tick;

  // ----------------------------------------------------- sample delay lines
  // x_dl[j] holds x(n-j) during the period after x(n) was taken.
  logic signed [L-1:0] x_dl [N+M];
  logic signed [L-1:0] d_dl [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N + M; j++) x_dl[j] <= '0;
      for (int j = 0; j < M; j++)     d_dl[j] <= '0;
    end else if (tick) begin
      x_dl[0] <= x_in;
      for (int j = 1; j < N + M; j++) x_dl[j] <= x_dl[j-1];
      d_dl[0] <= d_in;
      for (int j = 1; j < M; j++)     d_dl[j] <= d_dl[j-1];
    end
  end

  // DA-table input of 4-point block b is the sample entering tap 4b; the
  // weight update of tap k uses x(n-M-k).
  logic signed [L-1:0] x_new [N/4];
  logic signed [L-1:0] x_d   [N];

  always_comb begin
    x_new[0] = x_in;
    for (int b = 1; b < N / 4; b++) x_new[b] = x_dl[4*b-1];
    for (int k = 0; k < N; k++)     x_d[k]   = x_dl[k+M];
  end

  // ---------------------------------------------- error-stage registers
  logic                sign_q, upd_q;
  logic [SW-1:0]       t_q;

  // ------------------------------------------------ data computing blocks
  logic signed [IW-1:0] dcb_sum   [NDCB];
  logic signed [IW-1:0] dcb_carry [NDCB];

  for (genvar g = 0; g < NDCB; g++) begin : g_dcb
    logic signed [L-1:0] xn [P];
    logic signed [L-1:0] xd [4*P];
    logic signed [L-1:0] wg [4*P];

    always_comb begin
      for (int b = 0; b < P; b++)     xn[b] = x_new[g*P+b];
      for (int k = 0; k < 4*P; k++) begin
        xd[k]             = x_d[g*4*P+k];
        w_out[g*4*P+k]    = wg[k];
      end
    end

    data_compute_block #(.L(L), .P(P), .WO(IW)) u_dcb (
      .clk         (clk),
      .rst_n       (rst_n),
      .tick        (tick),
      .bit_idx     (bit_idx),
      .slice_first (slice_first),
      .slice_last  (slice_last),
      .x_new       (xn),
      .x_d         (xd),
      .upd         (upd_q),
      .sign        (sign_q),
      .t           (t_q),
      .sum_o       (dcb_sum[g]),
      .carry_o     (dcb_carry[g]),
      .w           (wg)
    );
  end

  // Sum and carry words of the data computing blocks are added separately.
  logic signed [IW-1:0] tot_sum, tot_carry;

  adder_tree #(.NIN(NDCB), .WI(IW), .WO(IW), .CIN(1'b0)) u_sum_add (
    .d_in  (dcb_sum),
    .d_out (tot_sum)
  );

  adder_tree #(.NIN(NDCB), .WI(IW), .WO(IW), .CIN(1'b0)) u_carry_add (
    .d_in  (dcb_carry),
    .d_out (tot_carry)
  );

  // ------------------------------------- final adder, error, control word
  logic signed [YW-1:0] y_c;
  logic signed [L-1:0]  e_c;
  logic                 sign_c, r_zero_c;
  logic [L-2:0]         r_c;
  logic [SW-1:0]        t_c;

  error_unit #(.L(L), .IW(IW), .YW(YW), .MU_SHIFT(MU_SHIFT),
               .FINAL_CIN(P == 1)) u_err (
    .sum_in   (tot_sum),
    .carry_in (tot_carry),
    .d        (d_dl[M-1]),
    .y        (y_c),
    .e        (e_c),
    .sign     (sign_c),
    .r        (r_c)
  );

  ctrl_word_gen #(.L(L)) u_cwg (
    .r      (r_c),
    .t      (t_c),
    .r_zero (r_zero_c)
  );

  // The held result is valid from the M-th sample edge after reset on.
  logic [1:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      sign_q    <= 1'b0;
      upd_q     <= 1'b0;
      t_q       <= '0;
      y_out     <= '0;
      e_out     <= '0;
      out_valid <= 1'b0;
    end else if (tick) begin
      if (fill != 2'(M)) fill <= fill + 1'b1;
      sign_q    <= sign_c;
      t_q       <= t_c;
      upd_q     <= (fill == 2'(M)) && !r_zero_c;
      y_out     <= y_c;
      e_out     <= e_c;
      out_valid <= (fill == 2'(M));
    end
  end

  // Weights may only change at a sample edge.
  a_w_stable : assert property (@(posedge clk) disable iff (!rst_n)
                                !tick |=> $stable(w_out[0]))
    else $error("weight changed off a sample edge");

endmodule
