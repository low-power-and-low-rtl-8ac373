// tb_da_table: feeds random samples into the DA table and compares every
// entry with the sum, recomputed from a sample history kept in the testbench,
// of the samples selected by the entry's index bits. Also checks that the
// table holds its contents while the load strobe is low.
module tb_da_table;
  localparam int L = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [L-1:0] x_new = '0;
  logic signed [L+1:0] c [16];
  int checks = 0, failures = 0;
  int hist [4] = '{0, 0, 0, 0};

  da_table #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_all(input int step);
    for (int k = 0; k < 16; k++) begin
      int exp_v = 0;
      for (int j = 0; j < 4; j++) if (k[j]) exp_v += hist[j];
      checks++;
      if (int'(c[k]) != exp_v) begin
        failures++;
        $display("FAIL step %0d entry %0d: got %0d exp %0d", step, k, c[k], exp_v);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all(-1);
    for (int s = 0; s < 200; s++) begin
      @(negedge clk);
      x_new = L'($urandom);
      if (s % 17 == 3) x_new = -128;
      if (s % 17 == 4) x_new = 127;
      en = (s % 5 != 2);
      @(posedge clk);
      #1;
      if (en) begin
        for (int j = 3; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = int'(x_new);
      end
      check_all(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
