// inner_product4: 4-point DA inner product y = sum_{k<4} w_k * x(n-k).
//
// A DA table (da_table) keeps the 15 non-zero sums of the four most recent
// samples. Each bit cycle, bit `bit_idx` of the four weights forms a 4-bit
// address {w3[b], w2[b], w1[b], w0[b]} for a 16:1 multiplexer that picks one
// table entry, and the carry-save accumulator (csa_accumulator) adds it in,
// least significant slice first, one's complemented for the sign slice.
// Weights are L-bit two's complement fractions (w = W / 2^(L-1)), samples are
// L-bit integers, so after the L slices of sample n the held words give
//     floor(sum_k W_k * x(n-k) / 2^(L-1)) = sum_o + 2*carry_o + 1.
// Timing: the table takes x_new on `tick` (end of a sample period); the
// weights must stay constant over the L bit cycles of a sample period; the
// result of the sample accumulated in one period is held at the outputs
// during the next period, from one cycle after its start.
// From the original paper: the block structure (table, 16:1 mux, accumulator) and the
// LSB-first slice order. This design's choice: the number formats.
module inner_product4 #(
  parameter int unsigned L = da_fir_pkg::L_DEFAULT,
  localparam int unsigned W = da_fir_pkg::csa_width(L)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,        // sample-rate strobe
  input  logic signed [L-1:0]  x_new,       // newest sample of this block
  input  logic signed [L-1:0]  w [4],       // weights w_0 .. w_3
  input  logic [$clog2(L)-1:0] bit_idx,     // weight bit slice, LSB first
  input  logic                 slice_first,
  input  logic                 slice_last,  // sign slice: complement
  output logic signed [W-1:0]  sum_o,
  output logic signed [W-1:0]  carry_o
);

  logic signed [W-1:0] c [16];
  logic [3:0]          addr;
  logic signed [W-1:0] lut_out;

  da_table #(.L(L)) u_table (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (tick),
    .x_new (x_new),
    .c     (c)
  );

  // 16:1 multiplexer addressed by the current weight bit slice.
  always_comb begin
    for (int j = 0; j < 4; j++) addr[j] = w[j][bit_idx];
    lut_out = c[addr];
  end

  csa_accumulator #(.W(W)) u_csa (
    .clk     (clk),
    .rst_n   (rst_n),
    .first   (slice_first),
    .neg     (slice_last),
    .p_in    (lut_out),
    .sum_o   (sum_o),
    .carry_o (carry_o)
  );

endmodule
