// bf_rr: reconfigurable butterfly (RR_BF), the last butterfly stage.
//
// Same three radix-2 layers as bf_r8, with a bypass multiplexer in front of
// layer 2 (ENA) and one in front of layer 3 (ENB) that select either the
// previous layer or the butterfly input:
//   ena=0 enb=0  one radix-8 butterfly on lanes 0..7
//   ena=1 enb=0  two radix-4 butterflies on lanes 0..3 and 4..7
//   ena=x enb=1  four radix-2 butterflies on lanes (0,1) (2,3) (4,5) (6,7)
// Outputs are in bit-reversed order within each butterfly; every layer that
// is used halves the result. Combinational.
module bf_rr
  import rmr_pkg::*;
(
  input  logic ena,
  input  logic enb,
  input  vec_t din,
  output vec_t dout
);
  vec_t l1, m1, l2, m2;
  always_comb begin
    l1   = dif_layer(din, 4);
    m1   = ena ? din : l1;       // MUX A
    l2   = dif_layer(m1, 2);
    m2   = enb ? din : l2;       // MUX B
    dout = dif_layer(m2, 1);
  end
endmodule
