// data_compute_block: 4P-tap slice of the filter (P 4-point DA blocks).
//
// Holds P four-point inner-product blocks (inner_product4) and their P weight
// increment blocks (weight_increment4); with the default P = 4 it covers 16
// taps. Block b handles taps 4b .. 4b+3 of the slice: its DA table is fed
// with x_new[b] (the sample entering tap 4b) and its weights are updated from
// x_d[4b .. 4b+3] (the samples m periods older). The sign, control word and
// update enable are shared by all weight increment blocks.
// The P held sum words are added by one binary adder tree and the P carry
// words by another. The carry tree's first-level adders get a carry-in of
// one each, P/2 in all, which at the doubled weight of carry words supplies
// the P "+1" corrections of the one's-complemented sign slices. So
//     sum_k w_k x_k (integer parts of the P blocks) = sum_o + 2*carry_o.
// With P = 1 there is no tree; the caller must then add the +1 itself.
// Timing: as inner_product4; sum_o/carry_o are combinational from the held
// carry-save results and are valid for the sample period after accumulation.
// From the original paper: grouping four 4-point blocks with shared sign and control
// word, and the adder trees. The wiring of the table inputs is this design's.
module data_compute_block #(
  parameter int unsigned L  = da_fir_pkg::L_DEFAULT,
  parameter int unsigned P  = 4,
  parameter int unsigned WO = da_fir_pkg::tree_width(da_fir_pkg::L_DEFAULT,
                                                     da_fir_pkg::N_DEFAULT),
  localparam int unsigned W = da_fir_pkg::csa_width(L)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,
  input  logic [$clog2(L)-1:0] bit_idx,
  input  logic                 slice_first,
  input  logic                 slice_last,
  input  logic signed [L-1:0]  x_new [P],     // DA-table inputs, one per block
  input  logic signed [L-1:0]  x_d [4*P],     // delayed samples for the update
  input  logic                 upd,
  input  logic                 sign,
  input  logic [$clog2(L)-1:0] t,
  output logic signed [WO-1:0] sum_o,
  output logic signed [WO-1:0] carry_o,
  output logic signed [L-1:0]  w [4*P]
);

  logic signed [W-1:0] blk_sum   [P];
  logic signed [W-1:0] blk_carry [P];

  for (genvar b = 0; b < P; b++) begin : g_blk
    logic signed [L-1:0] wb  [4];
    logic signed [L-1:0] xdb [4];

    always_comb
      for (int j = 0; j < 4; j++) begin
        xdb[j]     = x_d[4*b+j];
        w[4*b+j]   = wb[j];
      end

    weight_increment4 #(.L(L)) u_winc (
      .clk   (clk),
      .rst_n (rst_n),
      .tick  (tick),
      .upd   (upd),
      .sign  (sign),
      .t     (t),
      .x_d   (xdb),
      .w     (wb)
    );

    inner_product4 #(.L(L)) u_ip (
      .clk         (clk),
      .rst_n       (rst_n),
      .tick        (tick),
      .x_new       (x_new[b]),
      .w           (wb),
      .bit_idx     (bit_idx),
      .slice_first (slice_first),
      .slice_last  (slice_last),
      .sum_o       (blk_sum[b]),
      .carry_o     (blk_carry[b])
    );
  end

  adder_tree #(.NIN(P), .WI(W), .WO(WO), .CIN(1'b0)) u_sum_tree (
    .d_in  (blk_sum),
    .d_out (sum_o)
  );

  adder_tree #(.NIN(P), .WI(W), .WO(WO), .CIN(1'b1)) u_carry_tree (
    .d_in  (blk_carry),
    .d_out (carry_o)
  );

endmodule
