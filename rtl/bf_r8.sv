// bf_r8: general radix-8 butterfly (R8_BF), one 8-point DIF DFT per clock.
//
// Three radix-2 layers of the 8-point decimation-in-frequency flow graph
// (lane spans 4, 2, 1) are cascaded without any true multiplier: the internal
// twiddles +-j, (1-j)/sqrt2 and -(1+j)/sqrt2 are swaps, sign changes and the
// shift-and-add 1/sqrt(2). Output lane p holds DFT bin bitrev3(p), as in the
// flow graph. Each layer halves its result, so dout = DFT8(din)/8; the
// halving is this design's way of keeping the word at 16 bits.
// Purely combinational; the pipeline register that follows it is in the top.
module bf_r8
  import rmr_pkg::*;
(
  input  vec_t din,
  output vec_t dout
);
  always_comb dout = dif_layer(dif_layer(dif_layer(din, 4), 2), 1);
endmodule
