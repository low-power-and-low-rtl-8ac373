// tb_da_adaptive_fir: end-to-end test of the adaptive filter. Runs the
// default 32-tap configuration (no parameter overrides) and the 4-, 8- and
// 16-tap configurations side by side, each in a tb_fir_env that compares
// every output, error and weight with an integer model of the algorithm.
module tb_da_adaptive_fir;
  int c32, f32, c16, f16, c8, f8, c4, f4;
  bit d32, d16, d8, d4;

  tb_fir_env #(.N(32)) env32 (.checks(c32), .failures(f32), .done(d32));
  tb_fir_env #(.N(16)) env16 (.checks(c16), .failures(f16), .done(d16));
  tb_fir_env #(.N(8))  env8  (.checks(c8),  .failures(f8),  .done(d8));
  tb_fir_env #(.N(4))  env4  (.checks(c4),  .failures(f4),  .done(d4));

  initial begin
    fork
      wait (d32 && d16 && d8 && d4);
      #2000000;
    join_any
    if (d32 && d16 && d8 && d4)
      $display("TB_RESULT checks=%0d failures=%0d", c32 + c16 + c8 + c4, f32 + f16 + f8 + f4);
    else
      $display("TB_RESULT checks=%0d failures=%0d", c32 + c16 + c8 + c4,
               f32 + f16 + f8 + f4 + 1);
    $finish;
  end
endmodule
