// tb_da_controller: checks the bit-cycle sequencer over several sample periods.
// Expected values come from a free-running cycle counter in the testbench:
// bit_idx = cycle mod L, slice_first at 0, slice_last and tick at L-1, so the
// sample strobe recurs every L cycles.
module tb_da_controller;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  logic [2:0] bit_idx;
  logic slice_first, slice_last, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1;

  da_controller #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(posedge clk);
    for (cyc = 1; cyc < 5 * L + 3; cyc++) begin
      @(negedge clk);
      chk(bit_idx == 3'(cyc % L), "bit_idx");
      chk(slice_first == (cyc % L == 0), "slice_first");
      chk(slice_last == (cyc % L == L - 1), "slice_last");
      chk(tick == slice_last, "tick");
      if (tick) begin
        if (last_tick >= 0) chk(cyc - last_tick == L, "tick period");
        last_tick = cyc;
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
