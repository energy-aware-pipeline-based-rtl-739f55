// tb_cmult: drives the constant-multiplier stage with random data for bases
// 16, 32 and 64 and every butterfly index, and compares each lane with
// x * W_base^(m*bitrev3(k)) in double precision (within 4 LSB, the shift-add
// constants are accurate to about 2^-14).
module tb_cmult;
  import rmr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic [2:0] lg_base, m;
  vec_t din, dout;
  int checks = 0, failures = 0;
  cmult dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int lg = 4; lg <= 6; lg++) begin
        lg_base = 3'(lg);
        for (int mm = 0; mm < (1 << (lg - 3)); mm++) begin
          m = 3'(mm);
          for (int k = 0; k < LANES; k++) begin
            din[k].re = word_t'($signed($urandom_range(0, 44000)) - 22000);
            din[k].im = word_t'($signed($urandom_range(0, 44000)) - 22000);
          end
          #1;
          for (int k = 0; k < LANES; k++) begin
            automatic real a = -2.0 * PI * real'((mm * bitrev3(3'(k))) % (1 << lg)) / real'(1 << lg);
            automatic real er = real'(din[k].re) * $cos(a) - real'(din[k].im) * $sin(a);
            automatic real ei = real'(din[k].re) * $sin(a) + real'(din[k].im) * $cos(a);
            checks++;
            if ((er - real'(dout[k].re)) ** 2 > 4.0 ** 2 || (ei - real'(dout[k].im)) ** 2 > 4.0 ** 2) begin
              failures++;
              $display("FAIL base %0d m %0d lane %0d: (%0d,%0d) want (%0.1f,%0.1f)", 1 << lg, mm, k, dout[k].re, dout[k].im, er, ei);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
