// tb_csa_accumulator: drives L random signed partial products per sample
// (MSB slice complemented via neg) and checks the held carry-save words
// against the exact shift-accumulate result computed with integers:
//   floor((sum_{i<L-1} P_i 2^i - P_{L-1} 2^(L-1)) / 2^(L-1)) = sum + 2*carry + 1.
// Extreme table values (-2^(W-1), 2^(W-1)-1) are included. The result must
// appear one cycle after the sample's last slice and stay for L cycles.
module tb_csa_accumulator;
  localparam int L = 8;
  localparam int W = L + 2;
  logic clk = 0, rst_n = 0, first = 0, neg = 0;
  logic signed [W-1:0] p_in = '0, sum_o, carry_o;
  int checks = 0, failures = 0;

  csa_accumulator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int rand_p(input int mode);
    case (mode)
      0: return -(1 << (W - 1));
      1: return (1 << (W - 1)) - 1;
      default: return int'($signed(W'($urandom)));
    endcase
  endfunction

  initial begin
    int pv [L];
    longint acc, exp_prev, got;
    bit have_prev;
    have_prev = 0;
    exp_prev = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s <= 300; s++) begin
      for (int i = 0; i < L; i++) pv[i] = rand_p((s % 7 == 0) ? 0 : (s % 7 == 1) ? 1 :
                                                 ($urandom % 10 == 0) ? $urandom % 2 : 2);
      for (int i = 0; i < L; i++) begin
        @(negedge clk);
        // Held words belong to the previous sample from slice 1 on.
        if (have_prev && (i == 1 || i == L - 1)) begin
          got = longint'(sum_o) + 2 * longint'(carry_o) + 1;
          checks++;
          if (got != exp_prev) begin
            failures++;
            $display("FAIL sample %0d slice %0d: got %0d exp %0d (s=%0d c=%0d)", s - 1, i, got, exp_prev, sum_o, carry_o);
          end
        end
        first = (i == 0);
        neg   = (i == L - 1);
        p_in  = W'(pv[i]);
      end
      acc = 0;
      for (int i = 0; i < L - 1; i++) acc += longint'(pv[i]) <<< i;
      acc -= longint'(pv[L-1]) <<< (L - 1);
      exp_prev  = acc >>> (L - 1);
      have_prev = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
