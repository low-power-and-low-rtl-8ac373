// barrel_shifter: arithmetic right shift of a signed word by 0 .. 2^SW-1.
//
// Built as SW stages of 2:1 multiplexers; stage i shifts by 2^i when bit i of
// the control word is set, filling with the sign bit. In the weight increment
// block it scales an input sample by the power of two that stands in for
// mu * e(n-m), so the LMS update needs no multiplier. Purely combinational.
// The original paper names the barrel shifter and its 3-bit control word; the
// mux-stage structure is this design's choice.
module barrel_shifter #(
  parameter int unsigned W  = da_fir_pkg::L_DEFAULT,
  parameter int unsigned SW = $clog2(da_fir_pkg::L_DEFAULT)
) (
  input  logic signed [W-1:0] d_in,
  input  logic [SW-1:0]       sh,
  output logic signed [W-1:0] d_out
);

  logic signed [W-1:0] stage [SW+1];

  always_comb begin
    stage[0] = d_in;
    for (int i = 0; i < SW; i++)
      stage[i+1] = sh[i] ? (stage[i] >>> (1 << i)) : stage[i];
    d_out = stage[SW];
  end

endmodule
