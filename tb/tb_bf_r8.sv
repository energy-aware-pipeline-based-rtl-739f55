// tb_bf_r8: compares the radix-8 butterfly with an 8-point DFT computed in
// double precision: output lane p must equal DFT8(x)[bitrev3(p)] / 8 within
// 2 LSB, for random inputs whose modulus stays below 2^15 and for impulses.
module tb_bf_r8;
  import rmr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  vec_t din, dout;
  int checks = 0, failures = 0;
  bf_r8 dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < LANES; k++) begin
        if (t < 8) begin
          din[k].re = (k == t) ? 16'sd20000 : 16'sd0;
          din[k].im = (k == t) ? -16'sd9000 : 16'sd0;
        end else begin
          din[k].re = word_t'($signed($urandom_range(0, 46000)) - 23000);
          din[k].im = word_t'($signed($urandom_range(0, 46000)) - 23000);
          if (real'(din[k].re) ** 2 + real'(din[k].im) ** 2 > 32000.0 ** 2) din[k].im = '0;
        end
      end
      #1;
      for (int p = 0; p < LANES; p++) begin
        automatic real er = 0.0, ei = 0.0, a;
        automatic int  f = bitrev3(3'(p));
        for (int n = 0; n < 8; n++) begin
          a  = -2.0 * PI * real'(n * f) / 8.0;
          er += real'(din[n].re) * $cos(a) - real'(din[n].im) * $sin(a);
          ei += real'(din[n].re) * $sin(a) + real'(din[n].im) * $cos(a);
        end
        er /= 8.0; ei /= 8.0;
        checks++;
        if ((er - real'(dout[p].re)) ** 2 > 2.0 ** 2 || (ei - real'(dout[p].im)) ** 2 > 2.0 ** 2) begin
          failures++;
          $display("FAIL t=%0d lane %0d: got (%0d,%0d) want (%0.1f,%0.1f)", t, p, dout[p].re, dout[p].im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
