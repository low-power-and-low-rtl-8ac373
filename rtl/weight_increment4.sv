// weight_increment4: weight registers and LMS update of one 4-point block.
//
// Holds the four L-bit weights of a 4-point inner-product block and applies
// the delayed LMS update w_k <- w_k + mu * e(n-m) * x(n-m-k) once per sample.
// The product is approximated without multipliers: mu * e is replaced by its
// sign and by the largest power of two not above its magnitude, encoded as
// the control word t (see ctrl_word_gen). Each sample x(n-m-k) is shifted
// right by one fixed position (the weights have L-1 fractional bits, the
// samples none) and then by t in a barrel shifter; an adder/subtractor cell
// adds the result when the error sign is 0 and subtracts it when it is 1.
// When upd is low (zero error, or no valid error yet) the weights are kept.
// Weights wrap modulo 2^L like a plain adder/subtractor; the scaled increment
// is far below the weight range, so in normal operation they do not reach it.
// Timing: the weights load at a rising edge with tick high; sign, t, upd and
// x_d must be stable before that edge. Reset clears all weights.
// From the original paper: four barrel shifters and adder/subtractor cells steered by
// the error sign. This design's choice: the fixed one-bit alignment shift,
// wrap-around, and skipping the update for a zero r.
module weight_increment4 #(
  parameter int unsigned L = da_fir_pkg::L_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,      // sample-rate strobe
  input  logic                 upd,       // apply the increment
  input  logic                 sign,      // sign of e(n-m): 1 = subtract
  input  logic [$clog2(L)-1:0] t,         // barrel-shifter control word
  input  logic signed [L-1:0]  x_d [4],   // x(n-m-k), k = 0..3
  output logic signed [L-1:0]  w [4]
);

  logic signed [L-1:0] inc [4];

  for (genvar k = 0; k < 4; k++) begin : g_bs
    barrel_shifter #(.W(L), .SW($clog2(L))) u_bs (
      .d_in  (x_d[k] >>> 1),
      .sh    (t),
      .d_out (inc[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) w[k] <= '0;
    end else if (tick && upd) begin
      for (int k = 0; k < 4; k++)
        w[k] <= sign ? (w[k] - inc[k]) : (w[k] + inc[k]);
    end
  end

endmodule
