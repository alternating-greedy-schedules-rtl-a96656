// ags_pkg: constants shared by the alternating-greedy-schedule (AGS) dot-product unit.
//
// The defaults describe the configuration the unit is built for: a SIMD multiplier
// that delivers 8 partial products per cycle, 5-bit signed weights, 7-bit signed
// (offset-shifted) activations and a 12-bit two's-complement accumulator. The
// partial-product width is the sum of the operand widths, so every single product
// is representable in the accumulator; the AGS engine relies on that (see
// ags_engine). MAX_K, the longest dot product the list buffers can hold, is this
// design's own choice: 4608 = 3x3x512, the longest dot product of ResNet-18.
package ags_pkg;
  localparam int unsigned LANES = 8;   // partial products per cycle
  localparam int unsigned W_W   = 5;   // weight width (signed)
  localparam int unsigned A_W   = 7;   // activation width (signed)
  localparam int unsigned PP_W  = W_W + A_W;  // partial-product width
  localparam int unsigned ACC_W = 12;  // accumulator width
  localparam int unsigned MAX_K = 4608; // longest dot product held by the lists

  // Largest and smallest value of a signed W-bit accumulator, as 32-bit ints.
  function automatic int acc_max(input int unsigned w);
    return (1 <<< (w - 1)) - 1;
  endfunction
  function automatic int acc_min(input int unsigned w);
    return -(1 <<< (w - 1));
  endfunction
endpackage
