// da_fir_pkg: constants shared by the DA-based delayed-LMS adaptive FIR filter.
//
// The defaults are the design's main configuration: 8-bit samples and weights
// (L = 8), a 32-tap filter built from 4-point distributed-arithmetic (DA)
// blocks, four of them per data computing block, and an adaptation delay of
// two sample periods. The helper functions give the word widths the blocks
// derive from L and N, so that every module sizes its ports the same way.
package da_fir_pkg;

  // Word length of input samples, desired response and weights.
  parameter int unsigned L_DEFAULT = 8;
  // Filter length of the main configuration.
  parameter int unsigned N_DEFAULT = 32;
  // Points per DA block: each DA table holds sums of four samples.
  parameter int unsigned DA_POINTS = 4;
  // Adaptation delay m of the delayed LMS update, in sample periods.
  parameter int unsigned ADAPT_DELAY = 2;

  // Width of a DA table entry and of the carry-save words of one 4-point block.
  function automatic int unsigned csa_width(input int unsigned l);
    return l + 2;
  endfunction

  // Width used for adding sum and carry words of a whole N-tap filter.
  function automatic int unsigned tree_width(input int unsigned l, input int unsigned n);
    return l + $clog2(n) + 3;
  endfunction

  // Width of the filter output y (integer part of sum w_k * x_k).
  function automatic int unsigned y_width(input int unsigned l, input int unsigned n);
    return l + $clog2(n) + 1;
  endfunction

endpackage
