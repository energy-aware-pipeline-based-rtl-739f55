// mult_rom: MULT stage, twiddle multiplication after the first radix-8
// butterfly stage, using complex multipliers fed from ROMs.
//
// For an N-point (base N) radix-8 decomposition, butterfly m needs
// W_N^(m*bitrev3(k)) on data path k. Path 0 always multiplies by 1 and has no
// multiplier; paths 1..7 each own a tw_rom. The ROM address is the time slot
// m * 4096/N, so one counter serves every base from 128 to 4096 by changing
// its step. Products are formed at full precision, shifted back by the 14
// coefficient fraction bits (truncation) and saturated to 16 bits.
// Combinational: it sits between the butterfly pipeline register and the
// register bank.
module mult_rom
  import rmr_pkg::*;
(
  input  logic [3:0] lg_base,   // log2 of the twiddle base, 7..12
  input  logic [8:0] m,         // butterfly index within the block
  input  logic [5:0] bank_on,   // ROM bank enables, see tw_rom
  input  vec_t       din,
  output vec_t       dout
);
  logic [8:0] addr;
  cplx_t      w [1:LANES-1];

  always_comb addr = 9'(m << (4'd12 - lg_base));

  for (genvar k = 1; k < LANES; k++) begin : g_path
    tw_rom #(.PATH(k)) u_rom (.addr(addr), .bank_on(bank_on), .w(w[k]));
  end

  function automatic cplx_t cmul(cplx_t x, cplx_t c);
    logic signed [2*W:0] pr, pi;
    cplx_t r;
    pr   = (W+1+W)'(x.re * c.re) - (W+1+W)'(x.im * c.im);
    pi   = (W+1+W)'(x.re * c.im) + (W+1+W)'(x.im * c.re);
    r.re = sat((W+2)'(pr >>> TW_FRAC));
    r.im = sat((W+2)'(pi >>> TW_FRAC));
    return r;
  endfunction

  always_comb begin
    dout[0] = din[0];
    for (int k = 1; k < LANES; k++) dout[k] = cmul(din[k], w[k]);
  end
endmodule
