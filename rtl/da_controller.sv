// da_controller: bit-clock sequencer of the two-rate DA filter.
//
// The carry-save accumulators run on the fast bit clock and need L cycles per
// input sample, one per bit slice of the weights, least significant slice
// first. Everything else (DA-table update, error, weight update) runs once per
// sample. This block counts bit cycles modulo L and derives:
//   bit_idx     weight bit slice used in the current cycle (0 = LSB);
//   slice_first first slice of a sample: accumulators restart, the previous
//               sample's carry-save result is latched;
//   slice_last  MSB (sign) slice: the accumulators take the one's complement
//               of the table output (sign control);
//   tick        slow-rate strobe, one bit cycle in L. All sample-rate
//               registers load at a rising edge where tick is high; new x/d
//               inputs are taken at that edge.
// The slow clock of the original paper is realised as this clock enable on the
// single bit clock (an implementation choice; a gated or divided clock would
// behave the same cycle for cycle). The asynchronous active-low reset returns
// the count to cycle 0.
// The original paper asks for a fast bit clock and a slow sample clock; this
// sequencer and the enable-based slow clock are this design's.
module da_controller #(
  parameter int unsigned L = da_fir_pkg::L_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [$clog2(L)-1:0] bit_idx,
  output logic                 slice_first,
  output logic                 slice_last,
  output logic                 tick
);

  logic [$clog2(L)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        cnt <= '0;
    else if (cnt == $clog2(L)'(L - 1)) cnt <= '0;
    else                               cnt <= cnt + 1'b1;
  end

  always_comb begin
    bit_idx     = cnt;
    slice_first = (cnt == '0);
    slice_last  = (cnt == $clog2(L)'(L - 1));
    tick        = slice_last;
  end

endmodule
