// error_unit: final adder, error subtractor and sign-magnitude separator.
//
// The final adder turns the filter's total sum and carry words into the
// output y = sum + 2*carry + cin (cin is 1 only when a single 4-point block
// is used; larger filters add their corrections in the carry adder tree).
// y is the integer part of sum_k w_k * x_k, in units of the input samples.
// The error e = d - y is saturated to L bits, symmetric (+-(2^(L-1)-1)), and
// split into its sign and (L-1)-bit magnitude. The magnitude is scaled by the
// step size mu = 2^-MU_SHIFT (mu = 1/N with MU_SHIFT = log2 N) to give
// r = |mu * e|, the input of the control word generator.
// Saturation and the symmetric range are choices of this design.
// Purely combinational; the filter allows it a whole sample period.
// From the original paper: final adder, d - y, sign-magnitude split, mu = 1/N.
module error_unit #(
  parameter int unsigned L        = da_fir_pkg::L_DEFAULT,
  parameter int unsigned IW       = da_fir_pkg::tree_width(da_fir_pkg::L_DEFAULT,
                                                           da_fir_pkg::N_DEFAULT),
  parameter int unsigned YW       = da_fir_pkg::y_width(da_fir_pkg::L_DEFAULT,
                                                        da_fir_pkg::N_DEFAULT),
  parameter int unsigned MU_SHIFT = $clog2(da_fir_pkg::N_DEFAULT),
  parameter bit          FINAL_CIN = 1'b0
) (
  input  logic signed [IW-1:0] sum_in,
  input  logic signed [IW-1:0] carry_in,
  input  logic signed [L-1:0]  d,        // desired response
  output logic signed [YW-1:0] y,        // filter output
  output logic signed [L-1:0]  e,        // saturated error
  output logic                 sign,     // 1 when e < 0
  output logic [L-2:0]         r         // |e| >> MU_SHIFT
);

  localparam logic signed [YW:0] EMAX = (YW+1)'((1 << (L - 1)) - 1);

  logic signed [YW:0]   e_full;
  logic [L-2:0]         mag;

  always_comb begin
    // The true output fits in YW bits, so the add can be done modulo 2^YW.
    y      = YW'(sum_in) + YW'(carry_in <<< 1) + (FINAL_CIN ? YW'(1) : YW'(0));
    e_full = (YW+1)'(d) - (YW+1)'(y);
    if (e_full > EMAX)       e = L'(EMAX);
    else if (e_full < -EMAX) e = L'(-EMAX);
    else                     e = L'(e_full);
    sign = e[L-1];
    mag  = sign ? (L-1)'(-e) : (L-1)'(e);
    r    = mag >> MU_SHIFT;
  end

endmodule
