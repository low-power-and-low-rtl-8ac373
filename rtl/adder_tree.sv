// adder_tree: binary tree of two-input adders over NIN signed words.
//
// Sums NIN (a power of two) sign-extended inputs in log2(NIN) levels. When
// CIN is 1, every adder of the first level gets a carry-in of one, which adds
// NIN/2 to the total. The filter uses one tree for the sum words and one for
// the carry words of its 4-point blocks; the carry-ins of the carry tree supply
// the "+1" two's-complement corrections of all blocks at once, since carry
// words weigh twice as much as sum words. With NIN = 1 the input is passed
// on, sign-extended, and CIN is ignored. Purely combinational.
// From the original paper: separate trees for sum and carry words and the carry-ins
// at the first level of the carry tree. Widths are this design's choice.
module adder_tree #(
  parameter int unsigned NIN = 4,
  parameter int unsigned WI  = 10,
  parameter int unsigned WO  = 13,
  parameter bit          CIN = 1'b0
) (
  input  logic signed [WI-1:0] d_in [NIN],
  output logic signed [WO-1:0] d_out
);

  localparam int LEVELS = $clog2(NIN);

  logic signed [WO-1:0] lvl [LEVELS+1][NIN];

  always_comb begin
    for (int lv = 0; lv <= LEVELS; lv++)
      for (int i = 0; i < NIN; i++) lvl[lv][i] = '0;
    for (int i = 0; i < NIN; i++) lvl[0][i] = WO'(d_in[i]);
    for (int lv = 0; lv < LEVELS; lv++)
      for (int i = 0; i < (NIN >> (lv + 1)); i++)
        lvl[lv+1][i] = lvl[lv][2*i] + lvl[lv][2*i+1]
                     + ((lv == 0 && CIN) ? WO'(1) : WO'(0));
    d_out = lvl[LEVELS][0];
  end

endmodule
