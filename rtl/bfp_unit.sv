// bfp_unit: block-floating-point detector and shifter of one register-bank
// stage ("input scaling").
//
// Detector: while a block is written into a register bank, every real and
// imaginary part is checked for its redundant sign bits (leading bits equal
// to the sign, minus one). The block minimum, less one guard bit, is the
// block's scaling factor: shifting the block left by it leaves every part
// below 2^14 in magnitude, so no complex word reaches modulus 2^15 and the
// next butterfly cannot overflow. det_clr marks the first beat of a block;
// factor is the factor of the block including the current beat
// (combinational), valid on the block's last beat.
// Shifter: when the block is read out of the bank, every part is shifted left
// by sh_k (the factor stored for that block); combinational.
// The guard bit is this design's choice; the detector/shifter split and the
// evaluate-on-write, shift-on-read timing are those of the architecture.
module bfp_unit
  import rmr_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            det_v,
  input  logic            det_clr,
  input  vec_t            det_d,
  output logic [SF_W-1:0] factor,
  input  logic [SF_W-1:0] sh_k,
  input  vec_t            sh_d,
  output vec_t            sh_q
);
  logic [SF_W-1:0] run_min, beat_min, base;

  // Redundant sign bits of one word, 0 .. W-1.
  function automatic logic [SF_W-1:0] rsb(word_t v);
    logic [SF_W-1:0] n;
    logic            run;
    n   = '0;
    run = 1'b1;
    for (int b = W - 2; b >= 0; b--) begin
      run = run && (v[b] == v[W-1]);
      if (run) n++;
    end
    return n;
  endfunction

  always_comb begin
    beat_min = SF_W'(W - 1);
    for (int k = 0; k < LANES; k++) begin
      if (rsb(det_d[k].re) < beat_min) beat_min = rsb(det_d[k].re);
      if (rsb(det_d[k].im) < beat_min) beat_min = rsb(det_d[k].im);
    end
    base   = det_clr ? SF_W'(W - 1) : run_min;
    factor = (det_v && beat_min < base) ? beat_min : base;
    factor = (factor == 0) ? '0 : factor - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     run_min <= SF_W'(W - 1);
    else if (det_v) run_min <= (beat_min < base) ? beat_min : base;
  end

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      sh_q[k].re = sh_d[k].re <<< sh_k;
      sh_q[k].im = sh_d[k].im <<< sh_k;
    end
  end
endmodule
