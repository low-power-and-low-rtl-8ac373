// da_table: DA look-up table of a 4-point inner product, held in registers.
//
// Entry k (1..15) holds C_k = sum_j x_j * k_j, the sum of those of the four
// most recent samples x_0 = x(n) .. x_3 = x(n-3) whose index bit j is set in k.
// Entry 0 is the constant zero, so only 15 registers are kept.
// When a new sample arrives (en high at a clock edge) the whole table is
// refreshed in one cycle. Because the sample vector shifts by one position,
// an even entry is the previous value of entry k/2, and an odd entry is the
// new sample plus the previous value of entry (k-1)/2. Odd entries 3..15 need
// one adder each: seven adders in parallel; entry 1 is the new sample itself.
// Entries are L+2 bits wide, enough for a sum of four L-bit samples.
// Reset clears the table (all samples zero).
// From the original paper: the 15-register table and the seven parallel adders.
// This design's choice: obtaining the even entries by moving old entries.
module da_table #(
  parameter int unsigned L = da_fir_pkg::L_DEFAULT,
  localparam int unsigned W = da_fir_pkg::csa_width(L)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,      // sample-rate load strobe
  input  logic signed [L-1:0] x_new,   // x(n), taken when en is high
  output logic signed [W-1:0] c [16]   // c[k] = C_k, c[0] = 0
);

  logic signed [W-1:0] tbl [1:15];
  logic signed [W-1:0] nxt [1:15];

  always_comb begin
    nxt[1] = W'(x_new);
    for (int k = 1; k < 8; k++) begin
      nxt[2*k]   = tbl[k];
      nxt[2*k+1] = W'(x_new) + tbl[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < 16; k++) tbl[k] <= '0;
    end else if (en) begin
      for (int k = 1; k < 16; k++) tbl[k] <= nxt[k];
    end
  end

  always_comb begin
    c[0] = '0;
    for (int k = 1; k < 16; k++) c[k] = tbl[k];
  end

endmodule
