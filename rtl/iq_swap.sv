// iq_swap: real/imaginary swap unit used at the input and at the output of
// the processor so that the same forward-FFT datapath computes the IFFT.
//
// Swapping re and im of x, taking the forward DFT and swapping re and im of
// the result gives the DFT with conjugated twiddles, i.e. N times the inverse
// DFT. The datapath already divides by N (each radix-2 layer halves), so the
// swapped result is the inverse transform itself, apart from the block
// exponent. Combinational; ifft = 1 swaps all eight lanes.
module iq_swap
  import rmr_pkg::*;
(
  input  logic ifft,
  input  vec_t din,
  output vec_t dout
);
  always_comb dout = swap_iq(din, ifft);
endmodule
