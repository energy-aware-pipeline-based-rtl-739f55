// tb_bf_rr: checks the reconfigurable butterfly in its three modes against
// double-precision DFTs: one 8-point DFT (ena=0, enb=0), two 4-point DFTs on
// lanes 0-3 and 4-7 (ena=1, enb=0) and four 2-point DFTs on lane pairs
// (enb=1, ena both ways). Outputs are bit-reversed within each butterfly and
// scaled by 1/radix; tolerance 2 LSB.
module tb_bf_rr;
  import rmr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic ena, enb;
  vec_t din, dout;
  int checks = 0, failures = 0;
  bf_rr dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int brev(int v, int bits);
    int r = 0;
    for (int b = 0; b < bits; b++) r |= ((v >> b) & 1) << (bits - 1 - b);
    return r;
  endfunction
  initial begin
    for (int t = 0; t < 600; t++) begin
      int r, bits;
      ena = t[0];
      enb = t[1] & t[2];
      bits = enb ? 1 : ena ? 2 : 3;
      r = 1 << bits;
      for (int k = 0; k < LANES; k++) begin
        din[k].re = word_t'($signed($urandom_range(0, 44000)) - 22000);
        din[k].im = word_t'($signed($urandom_range(0, 44000)) - 22000);
      end
      #1;
      for (int p = 0; p < LANES; p++) begin
        automatic int g = p / r, f = brev(p % r, bits);
        automatic real er = 0.0, ei = 0.0, a;
        for (int n = 0; n < r; n++) begin
          a  = -2.0 * PI * real'(n * f) / real'(r);
          er += real'(din[g*r+n].re) * $cos(a) - real'(din[g*r+n].im) * $sin(a);
          ei += real'(din[g*r+n].re) * $sin(a) + real'(din[g*r+n].im) * $cos(a);
        end
        er /= real'(r); ei /= real'(r);
        checks++;
        if ((er - real'(dout[p].re)) ** 2 > 2.0 ** 2 || (ei - real'(dout[p].im)) ** 2 > 2.0 ** 2) begin
          failures++;
          $display("FAIL radix %0d lane %0d: got (%0d,%0d) want (%0.1f,%0.1f)", r, p, dout[p].re, dout[p].im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
