// cmult: CMULT stage, twiddle multiplication between the last two butterfly
// stages with hard-wired constant multipliers instead of a ROM.
//
// This stage needs W_base^(m*bitrev3(3'(k))) on data path k for base 16, 32 or
// 64, which are all powers of W_64: p = m*bitrev3(3'(k))*64/base mod 64. The unit
// circle is cut into eight octants; every W_64^p is one of nine region-A
// points (cos, sin of 2*pi*q/64, q = 0..8) with its two parts swapped and/or
// negated. q = 0 is the trivial (1, 0); the eight others are multiplied by
// shift-and-add networks whose terms are those of the constant table of the
// design (e.g. cos(2*pi/64) = 1 - 2^-8 - 2^-10 + 2^-14). With c = cos, s = sin
// of the region-A angle, W_64^p is, for octant o = p/8 (q = p%8 for even o,
// 8 - p%8 for odd o):
//   o=0 ( c,-s)  o=1 ( s,-c)  o=2 (-s,-c)  o=3 (-c,-s)
//   o=4 (-c, s)  o=5 (-s, c)  o=6 ( s, c)  o=7 ( c, s)
// which is the octant swap/sign table, traversed clockwise.
// Each lane forms x*c and x*s for its constant, combines them with the
// octant's swap and signs, truncates the 14 fraction bits and saturates.
// The design chooses per-lane selection of constant products in place of
// the shuffle network plus shared constant bank; the arithmetic is the same.
// Combinational, between the butterfly pipeline register and the register
// bank.
module cmult
  import rmr_pkg::*;
(
  input  logic [2:0] lg_base,   // log2 of the twiddle base: 4, 5 or 6
  input  logic [2:0] m,         // butterfly index within the block
  input  vec_t       din,
  output vec_t       dout
);
  localparam int PW = W + 16;
  typedef logic signed [PW-1:0] prod_t;

  // x times region-A constant q, as (x*cos, x*sin) scaled by 2^14.
  function automatic void cmul_q(word_t x, int unsigned q, output prod_t xc, output prod_t xs);
    prod_t v;
    v = PW'(x);
    unique case (q)
      0: begin xc = v <<< 14; xs = '0; end
      1: begin xc = (v <<< 14) - (v <<< 6) - (v <<< 4) + v; xs = (v <<< 10) + (v <<< 9) + (v <<< 6) + (v <<< 2) + v; end
      2: begin xc = (v <<< 14) - (v <<< 8) - (v <<< 6) + (v <<< 2) + v; xs = (v <<< 11) + (v <<< 10) + (v <<< 7) - (v <<< 2); end
      3: begin xc = (v <<< 14) - (v <<< 9) - (v <<< 7) - (v <<< 6) - (v <<< 1); xs = (v <<< 12) + (v <<< 9) + (v <<< 7) + (v <<< 4) + (v <<< 2); end
      4: begin xc = (v <<< 14) - (v <<< 10) - (v <<< 7) - (v <<< 6) - (v <<< 5); xs = (v <<< 13) - (v <<< 11) + (v <<< 7) - (v <<< 1); end
      5: begin xc = (v <<< 14) - (v <<< 11) + (v <<< 7) - (v <<< 4) + v; xs = (v <<< 13) - (v <<< 9) + (v <<< 5) + (v <<< 3) + (v <<< 2) - v; end
      6: begin xc = (v <<< 14) - (v <<< 11) - (v <<< 9) - (v <<< 8) + (v <<< 6) - (v <<< 3) - (v <<< 1); xs = (v <<< 13) + (v <<< 10) - (v <<< 7) + (v <<< 4) - (v <<< 1); end
      7: begin xc = (v <<< 14) - (v <<< 12) + (v <<< 8) + (v <<< 7) - (v <<< 3) + v; xs = (v <<< 13) + (v <<< 11) + (v <<< 7) + (v <<< 5) - (v <<< 3) + (v <<< 1); end
      8: begin xc = (v <<< 13) + (v <<< 11) + (v <<< 10) + (v <<< 8) + (v <<< 6) + v; xs = (v <<< 13) + (v <<< 11) + (v <<< 10) + (v <<< 8) + (v <<< 6) + v; end
      default: begin xc = '0; xs = '0; end
    endcase
  endfunction

  function automatic cplx_t twiddle(cplx_t x, int unsigned p);
    int unsigned o, q;
    prod_t rc, rs, ic, is;
    prod_t pr, pi;
    cplx_t y;
    o = p / 8;
    q = (o % 2 == 0) ? p % 8 : 8 - p % 8;
    cmul_q(x.re, q, rc, rs);
    cmul_q(x.im, q, ic, is);
    // (xr + j xi)(wr + j wi): re = xr*wr - xi*wi, im = xr*wi + xi*wr
    unique case (o)
      0: begin pr =  rc + is; pi = -rs + ic; end  // w = ( c,-s)
      1: begin pr =  rs + ic; pi = -rc + is; end  // w = ( s,-c)
      2: begin pr = -rs + ic; pi = -rc - is; end  // w = (-s,-c)
      3: begin pr = -rc + is; pi = -rs - ic; end  // w = (-c,-s)
      4: begin pr = -rc - is; pi =  rs - ic; end  // w = (-c, s)
      5: begin pr = -rs - ic; pi =  rc - is; end  // w = (-s, c)
      6: begin pr =  rs - ic; pi =  rc + is; end  // w = ( s, c)
      default: begin pr = rc - is; pi = rs + ic; end  // w = ( c, s)
    endcase
    y.re = sat((W+2)'(pr >>> TW_FRAC));
    y.im = sat((W+2)'(pi >>> TW_FRAC));
    return y;
  endfunction

  always_comb begin
    int unsigned p;
    for (int k = 0; k < LANES; k++) begin
      p       = ((int'(m) * bitrev3(3'(k))) << (6 - lg_base)) % 64;
      dout[k] = twiddle(din[k], p);
    end
  end
endmodule
