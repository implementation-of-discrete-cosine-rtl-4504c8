// dct_pkg: sizes and constants shared by the 8x8 2-D DCT.
//
// The block is N x N = 8 x 8 pixels of PIX_W = 8 bits. Pixels enter the
// first 1-D DCT as 9-bit two's-complement numbers (zero-extended), results
// are stored as 19-bit signed words in the two result memories. The row pass
// grows a 9-bit input to at most 13 bits (largest gain of the eight-point
// flow graph is 10.06), which is the width kept in the transpose buffer.
//
// The four multiplier constants of the Arai flow graph are
//   m1 = cos(4pi/16), m2 = cos(6pi/16),
//   m3 = cos(2pi/16) - cos(6pi/16), m4 = cos(2pi/16) + cos(6pi/16)
// and are given here as reals; dct1d rounds them to its fixed-point format.
package dct_pkg;

  localparam int N      = 8;        // points per 1-D transform
  localparam int NN     = N * N;    // samples per block
  localparam int AW     = 6;        // address width of the 64-entry memories
  localparam int PIX_W  = 8;        // input pixel width
  localparam int IN_W   = PIX_W + 1;// signed input of the row transform
  localparam int TB_W   = IN_W + 4; // transpose buffer word (row-pass result)
  localparam int OUT_W  = 19;       // stored coefficient width
  localparam int CF     = 12;       // fractional bits of m1..m4

  localparam real M1 = 0.70710678118654752;  // cos(4pi/16)
  localparam real M2 = 0.38268343236508977;  // cos(6pi/16)
  localparam real M3 = 0.54119610014619698;  // cos(2pi/16) - cos(6pi/16)
  localparam real M4 = 1.30656296487637652;  // cos(2pi/16) + cos(6pi/16)

endpackage
