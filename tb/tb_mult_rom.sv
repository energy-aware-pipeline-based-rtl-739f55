// tb_mult_rom: drives the MULT stage with random data for every base from
// 128 to 4096 and every butterfly index m, and compares each lane with
// x * W_base^(m*bitrev3(k)) computed in double precision (within 3 LSB).
// Lane 0 must pass unchanged.
module tb_mult_rom;
  import rmr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic [3:0] lg_base;
  logic [8:0] m;
  logic [5:0] bank_on = 6'h3f;
  vec_t din, dout;
  int checks = 0, failures = 0;
  mult_rom dut (.*);
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int lg = 7; lg <= 12; lg++) begin
      lg_base = 4'(lg);
      for (int mm = 0; mm < (1 << (lg - 3)); mm += (lg == 12 ? 3 : 1)) begin
        m = 9'(mm);
        for (int k = 0; k < LANES; k++) begin
          din[k].re = word_t'($signed($urandom_range(0, 40000)) - 20000);
          din[k].im = word_t'($signed($urandom_range(0, 40000)) - 20000);
        end
        #1;
        for (int k = 0; k < LANES; k++) begin
          automatic real a = -2.0 * PI * real'((mm * bitrev3(3'(k))) % (1 << lg)) / real'(1 << lg);
          automatic real er = real'(din[k].re) * $cos(a) - real'(din[k].im) * $sin(a);
          automatic real ei = real'(din[k].re) * $sin(a) + real'(din[k].im) * $cos(a);
          checks++;
          if ((er - real'(dout[k].re)) ** 2 > 3.0 ** 2 || (ei - real'(dout[k].im)) ** 2 > 3.0 ** 2) begin
            failures++;
            $display("FAIL base %0d m %0d lane %0d: (%0d,%0d) want (%0.1f,%0.1f)", 1 << lg, mm, k, dout[k].re, dout[k].im, er, ei);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
