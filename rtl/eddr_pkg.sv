// eddr_pkg: constants shared by the error-detection-and-data-recovery (EDDR)
// processing element.
//
// The design computes the sum of absolute differences (SAD) of an N x N
// macroblock of 8-bit luminance pixels and protects it with a
// residue-and-quotient (RQ) code of modulus M = 2^K - 1. The defaults follow
// the document: 8-bit pixels, a 4 x 4 block (16 pixels, 128-bit pixel buses),
// a 12-bit SAD adder/accumulator and 8-bit residue and quotient signals.
// K = 6 (M = 63) is the split point k = n/2 of the 12-bit SAD; it is the
// modulus that reproduces the residue/quotient values printed in the
// document's simulation waveform (SAD 2124 -> R 45, Q 33).
package eddr_pkg;
  localparam int unsigned PIX_W   = 8;                 // pixel width
  localparam int unsigned BLK_N   = 4;                 // block is BLK_N x BLK_N
  localparam int unsigned NPIX    = BLK_N * BLK_N;     // pixels per block
  localparam int unsigned BUS_W   = NPIX * PIX_W;      // 128-bit pixel bus
  localparam int unsigned SAD_W   = 12;                // SAD adder / accumulator
  localparam int unsigned RQ_K    = 6;                 // modulus exponent
  localparam int unsigned RQ_M    = (1 << RQ_K) - 1;   // modulus m = 63
  localparam int unsigned RQ_W    = 8;                 // width of R and Q signals

  // Floor division and non-negative residue of a signed value by m,
  // used by the testbenches as reference arithmetic.
  function automatic int floor_div(input int x, input int m);
    int q;
    q = x / m;
    if ((x % m) != 0 && x < 0) q = q - 1;
    return q;
  endfunction

  function automatic int pos_mod(input int x, input int m);
    int r;
    r = x % m;
    if (r < 0) r = r + m;
    return r;
  endfunction
endpackage
