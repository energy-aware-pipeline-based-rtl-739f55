// rmr_pkg: types, sizes and butterfly arithmetic shared by the reconfigurable
// mixed-radix (RMR) FFT/IFFT processor.
//
// The processor moves eight complex words per clock. A word is a 16-bit
// signed real part and a 16-bit signed imaginary part (cplx_t); eight of them
// form one beat (vec_t, lane 0 in element 0). FFT sizes are 2^4 .. 2^12.
//
// The 8-point decimation-in-frequency butterfly is built from three radix-2
// layers (dif_layer): a layer with half-span h pairs lanes i and i+h inside
// groups of 2h lanes, writes (a+b)/2 to the upper lane and (a-b)/2 * W_2h^i
// to the lower one (halving rounds half up). The trivial twiddles W_8^1, W_4^1 = -j and W_8^3 need no
// multiplier: -j is a swap with a negation, and 1/sqrt(2) is the shift-and-add
// constant 2^-1+2^-3+2^-4+2^-6+2^-8+2^-14. Halving every layer is this
// design's choice: it keeps the internal word at 16 bits without overflow as
// long as the modulus of every complex word stays below 2^15, which the block
// floating point stages guarantee between stages.
// Lint note: a module that imports this package but not every constant of it
// makes verilator report the unused constants (UNUSEDPARAM) against this
// file. They are shared sizes and are used elsewhere in the design.
package rmr_pkg;

  parameter int W        = 16;  // real / imaginary word length
  parameter int LANES    = 8;   // parallel data paths
  parameter int TW_FRAC  = 14;  // fraction bits of twiddle coefficients
  parameter int LG_MIN   = 4;   // smallest FFT: 16 points
  parameter int LG_MAX   = 12;  // largest FFT: 4096 points
  parameter int EXP_W    = 6;   // width of an accumulated block exponent
  parameter int SF_W     = 4;   // width of one BFP scaling factor

  typedef logic signed [W-1:0] word_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  typedef cplx_t [LANES-1:0] vec_t;

  // Data-flow class chosen by the FFT size (Table 3.1 groups).
  typedef enum logic [1:0] {
    CLS_S = 2'd0,  // 16..64 points: two butterfly stages
    CLS_M = 2'd1,  // 128..512 points: three butterfly stages
    CLS_L = 2'd2   // 1024..4096 points: four butterfly stages
  } cls_t;

  // Static configuration of the datapath for one FFT size.
  typedef struct packed {
    logic [3:0] lg;          // log2 N
    logic       ifft;        // 1: inverse transform
    cls_t       cls;         // number of butterfly stages
    logic       ena, enb;    // reconfigurable butterfly mode (radix 4 / radix 2)
    logic [3:0] lg_rb4096;   // log2 capacity of RB_4096 (class L)
    logic [3:0] lg_rb512;    // log2 capacity of RB_512a/b (classes M, L)
    logic [3:0] lg_rb64;     // log2 capacity of RB_64a/b
    logic       dup512;      // RB_512b in use
    logic       dup64;       // RB_64b in use
    logic [5:0] bank_on;     // twiddle ROM banks A..F
  } mode_t;

  // Power-gating truth table of the modules (1 = on).
  typedef struct packed {
    logic       control;
    logic       r8_bf_a;     // first radix-8 butterfly (shared by stages 1, 2)
    logic       mult;
    logic [5:0] rom;         // banks A..F
    logic [2:0] rb4096;      // parts 1/4, 1/4, 1/2
    logic       bfp4096;
    logic [2:0] rb512a;
    logic [2:0] rb512b;
    logic       bfp512;
    logic       r8_bf_b;
    logic       cmult;
    logic [2:0] rb64a;
    logic [2:0] rb64b;
    logic       bfp64;
    logic       rr_bf;
  } pwr_t;

  function automatic int unsigned bitrev3(logic [2:0] k);
    return {29'd0, k[0], k[1], k[2]};
  endfunction

  function automatic word_t sat(logic signed [W+1:0] v);
    if (v > $signed({3'b000, {(W-1){1'b1}}}))       return {1'b0, {(W-1){1'b1}}};
    else if (v < $signed({3'b111, {(W-1){1'b0}}}))  return {1'b1, {(W-1){1'b0}}};
    else                                            return v[W-1:0];
  endfunction

  // v * 1/sqrt(2) by shift-and-add (Table 4.3, Const8), saturated to W bits.
  function automatic word_t mul_rsqrt2(logic signed [W:0] v);
    logic signed [W+15:0] x;
    logic signed [W+15:0] acc;
    x   = {{15{v[W]}}, v};
    acc = (x <<< 13) + (x <<< 11) + (x <<< 10) + (x <<< 8) + (x <<< 6) + x;
    return sat((W+2)'(acc >>> 14));
  endfunction

  // Multiply by W_8^q for q = 0..3 (1, (1-j)/sqrt2, -j, -(1+j)/sqrt2).
  function automatic cplx_t mul_w8(cplx_t a, int unsigned q);
    cplx_t r;
    logic signed [W:0] ar, ai;
    ar = {a.re[W-1], a.re};
    ai = {a.im[W-1], a.im};
    unique case (q)
      0: r = a;
      1: begin r.re = mul_rsqrt2(ar + ai); r.im = mul_rsqrt2(ai - ar); end
      2: begin r.re = a.im; r.im = sat(-{ar[W], ar}); end
      default: begin r.re = mul_rsqrt2(ai - ar); r.im = mul_rsqrt2(-ar - ai); end
    endcase
    return r;
  endfunction

  // Halved sum and difference of two words.
  function automatic word_t hadd(word_t a, word_t b);
    logic signed [W:0] s;
    s = {a[W-1], a} + {b[W-1], b};
    return W'((s + 1'b1) >>> 1);
  endfunction

  function automatic word_t hsub(word_t a, word_t b);
    logic signed [W:0] s;
    s = {a[W-1], a} - {b[W-1], b};
    return W'((s + 1'b1) >>> 1);
  endfunction

  // One radix-2 DIF layer of the 8-point butterfly, half-span h = 4, 2 or 1.
  function automatic vec_t dif_layer(vec_t x, int unsigned h);
    vec_t y;
    cplx_t d;
    for (int unsigned g = 0; g < LANES; g += 2 * h) begin
      for (int unsigned i = 0; i < h; i++) begin
        y[g+i].re = hadd(x[g+i].re, x[g+i+h].re);
        y[g+i].im = hadd(x[g+i].im, x[g+i+h].im);
        d.re      = hsub(x[g+i].re, x[g+i+h].re);
        d.im      = hsub(x[g+i].im, x[g+i+h].im);
        y[g+i+h]  = mul_w8(d, i * (4 / h));
      end
    end
    return y;
  endfunction

  // Swap real and imaginary parts of every lane when sw is set (IFFT).
  function automatic vec_t swap_iq(vec_t x, logic sw);
    vec_t y;
    for (int k = 0; k < LANES; k++) begin
      y[k].re = sw ? x[k].im : x[k].re;
      y[k].im = sw ? x[k].re : x[k].im;
    end
    return y;
  endfunction

endpackage
