// mop_pkg: constants and helpers shared by the multioperand carry-save adders.
//
// All compressor trees here take Nop unsigned operands of N bits and return a
// carry-save pair (sum word, carry word) whose sum is the exact total. That
// total needs N + ceil(log2(Nop)) bits, so every internal bus is that wide;
// cs_width() gives the figure. The growth of the buses is this design's own
// choice (the figures draw N-bit buses throughout).
package mop_pkg;

  // Default operand width: the 16-bit case is the smaller of the two widths
  // for which speed-ups are quoted.
  localparam int unsigned DEFAULT_N = 16;

  // Width of a carry-save result that holds the exact sum of nop operands
  // of n bits each.
  function automatic int unsigned cs_width(input int unsigned n, input int unsigned nop);
    return n + $clog2(nop);
  endfunction

endpackage
