// csa_accumulator: conditional signed carry-save shift accumulator.
//
// Adds L partial inner products P_0 .. P_{L-1} (the DA table outputs for the
// weight bit slices, least significant slice first) into
//     V = sum_{i<L-1} P_i * 2^(i-(L-1))  -  P_{L-1}
// without carry propagation. Each bit cycle a row of full adders combines the
// sum word shifted right by one (arithmetic), the carry word, and the table
// output passed through XOR gates. The XORs are controlled by `neg`, which is
// high only for the MSB slice: they then form the one's complement, and the
// missing +1 of the two's complement is the carry-in of the final adder.
// The full-adder carry is kept unshifted, so the represented integer is
// sum + 2*carry; the bit shifted out of the sum word each cycle is a
// fractional bit of V and is dropped. With W = L+2 bit words the arithmetic is
// exact for any table value that fits in W bits: after the last slice,
//     floor(V) = sum + 2*carry + 1.
// Timing: `first` marks the first slice of a sample; the accumulation then
// restarts from zero and, at the same edge, the finished words of the previous
// sample are copied to sum_o/carry_o, where they stay for a whole sample
// period (L bit cycles) for the slower output logic.
// From the original paper: carry-save accumulation LSB slice first, XOR sign control
// on the MSB slice, L+2-bit words, carry-in of one at the final adder.
// This design's choice: the hold registers and the exact word alignment.
module csa_accumulator #(
  parameter int unsigned W = da_fir_pkg::csa_width(da_fir_pkg::L_DEFAULT)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                first,   // first (LSB) slice of a new sample
  input  logic                neg,     // sign control: MSB slice
  input  logic signed [W-1:0] p_in,    // DA table output for this slice
  output logic signed [W-1:0] sum_o,   // held result, sum word
  output logic signed [W-1:0] carry_o  // held result, carry word (weight 2)
);

  logic signed [W-1:0] s_q, c_q;
  logic signed [W-1:0] a, b, p, s_d, c_d;

  always_comb begin
    if (first) begin
      a = '0;
      b = '0;
    end else begin
      a = s_q >>> 1;   // arithmetic: the sign bit is replicated
      b = c_q;
    end
    p   = p_in ^ {W{neg}};
    s_d = a ^ b ^ p;
    c_d = (a & b) | (a & p) | (b & p);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q     <= '0;
      c_q     <= '0;
      sum_o   <= '0;
      carry_o <= '0;
    end else begin
      s_q <= s_d;
      c_q <= c_d;
      if (first) begin
        sum_o   <= s_q;
        carry_o <= c_q;
      end
    end
  end

endmodule
