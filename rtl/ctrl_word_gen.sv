// ctrl_word_gen: control word t for the barrel shifters.
//
// r is the magnitude of the scaled error, |mu * e(n-m)|, an (L-1)-bit word.
// t counts the leading zeros of r: t = 0 when r[L-2] is set, t = 1 when the
// first set bit is r[L-3], ..., t = L-2 when only r[0] is set, and t = L-1
// when r is zero (for L = 8: r6 -> 000, r5 -> 001, ..., r0 -> 110, none ->
// 111). r_zero flags the last case so that the caller can skip the update.
// 2^(L-2-t) is thus the largest power of two not above r, and shifting a
// sample right by t (plus a fixed offset) multiplies it by that power.
// Purely combinational priority encoder.
// The mapping for L = 8 is the original paper's table; the generalisation to other
// L and the r_zero flag are this design's.
module ctrl_word_gen #(
  parameter int unsigned L = da_fir_pkg::L_DEFAULT
) (
  input  logic [L-2:0]         r,
  output logic [$clog2(L)-1:0] t,
  output logic                 r_zero
);

  always_comb begin
    t      = $clog2(L)'(L - 1);
    r_zero = (r == '0);
    for (int i = 0; i < L - 1; i++)
      if (r[i]) t = $clog2(L)'(L - 2 - i);   // highest set bit wins
  end

endmodule
