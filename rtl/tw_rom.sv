// tw_rom: twiddle ROM of one data path of the MULT stage.
//
// Data path k of a radix-8 butterfly with index m needs W_N^(m*bitrev3(k)).
// All bases N = 128..4096 are served from one table written for N = 4096:
// entry t holds W_4096^(t*bitrev3(3'(PATH))), t = 0..511, and a smaller base uses
// the time slots t = m*4096/N only. The 512 entries are split into six banks
// by the trailing zeros of the address, so that a bank whose slots are never
// used in the current mode can be switched off:
//   A: t odd   B: t = 2 mod 4   C: t = 4 mod 8   D: t = 8 mod 16
//   E: t = 16 mod 32            F: t = 0 mod 32
// bank_on[0] enables A ... bank_on[5] enables F; a disabled bank reads 0.
// Coefficients are cos and -sin of 2*pi*p/4096 rounded to 14 fraction bits
// (1.0 = 16384), computed at elaboration. Asynchronous read.
module tw_rom
  import rmr_pkg::*;
#(
  parameter int unsigned PATH = 1
) (
  input  logic [8:0] addr,
  input  logic [5:0] bank_on,
  output cplx_t      w
);
  typedef logic [2*W-1:0] bank_t [256];  // {re, im}

  function automatic logic [2*W-1:0] tw4096(int unsigned p);
    real   a;
    word_t re, im;
    a  = 2.0 * 3.14159265358979323846 * real'(p % 4096) / 4096.0;
    re = W'($rtoi($floor($cos(a) * 16384.0 + 0.5)));
    im = W'($rtoi($floor(-$sin(a) * 16384.0 + 0.5)));
    return {re, im};
  endfunction

  // Bank b holds the slots t = (2*i+1) * 2^b for b < 5 and t = 32*i for b = 5.
  function automatic bank_t mk_bank(int unsigned b);
    bank_t r;
    int unsigned t;
    for (int unsigned i = 0; i < 256; i++) begin
      t    = (b == 5) ? 32 * i : (2 * i + 1) << b;
      r[i] = (t < 512) ? tw4096(t * bitrev3(3'(PATH))) : '0;
    end
    return r;
  endfunction

  localparam bank_t BANK_A = mk_bank(0);
  localparam bank_t BANK_B = mk_bank(1);
  localparam bank_t BANK_C = mk_bank(2);
  localparam bank_t BANK_D = mk_bank(3);
  localparam bank_t BANK_E = mk_bank(4);
  localparam bank_t BANK_F = mk_bank(5);

  always_comb begin
    w = '0;
    if (addr[0])                  w = bank_on[0] ? BANK_A[addr[8:1]]         : '0;
    else if (addr[1])             w = bank_on[1] ? BANK_B[{1'b0, addr[8:2]}] : '0;
    else if (addr[2])             w = bank_on[2] ? BANK_C[{2'b0, addr[8:3]}] : '0;
    else if (addr[3])             w = bank_on[3] ? BANK_D[{3'b0, addr[8:4]}] : '0;
    else if (addr[4])             w = bank_on[4] ? BANK_E[{4'b0, addr[8:5]}] : '0;
    else                          w = bank_on[5] ? BANK_F[{4'b0, addr[8:5]}] : '0;
  end
endmodule
