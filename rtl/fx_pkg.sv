// fx_pkg: word-length rules and default sizes shared by the fixed-point FIR.
//
// Formats are written (S/I/F): sign bits, integer bits, fraction bits. The
// filter takes (1/0/11) samples and coefficients. Because the most-negative
// number (MNN) is removed from every primary input, a signed product needs
// only WA+WB-1 bits, and each pairwise addition needs exactly one more
// integer bit, so an N-term balanced adder tree grows by log2(N) bits.
// These rules and the default sizes follow the filter example the design is
// built from; the helper functions are this design's own packaging of them.
package fx_pkg;

  // Default sizes: 8 taps, 12-bit (1/0/11) samples and coefficients.
  localparam int unsigned FIR_TAPS   = 8;
  localparam int unsigned FIR_W      = 12;

  // Product of two MNN-free two's-complement words: one sign bit suffices.
  function automatic int unsigned prod_width(input int unsigned wa, input int unsigned wb);
    return wa + wb - 1;
  endfunction

  // Balanced tree of pairwise adds over n terms (n a power of two).
  function automatic int unsigned tree_width(input int unsigned wi, input int unsigned n);
    return wi + $clog2(n);
  endfunction

endpackage
