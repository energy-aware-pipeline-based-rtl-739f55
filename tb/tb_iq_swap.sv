// tb_iq_swap: checks that the swap unit exchanges real and imaginary parts
// of all eight lanes when ifft = 1 and passes them unchanged when ifft = 0.
module tb_iq_swap;
  import rmr_pkg::*;
  logic ifft;
  vec_t din, dout;
  int checks = 0, failures = 0;
  iq_swap dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 200; t++) begin
      ifft = t[0];
      for (int k = 0; k < LANES; k++) begin
        din[k].re = word_t'($urandom);
        din[k].im = word_t'($urandom);
      end
      #1;
      for (int k = 0; k < LANES; k++) begin
        checks++;
        if (ifft ? (dout[k].re !== din[k].im || dout[k].im !== din[k].re)
                 : (dout[k] !== din[k])) begin
          failures++;
          $display("FAIL lane %0d ifft=%0d", k, ifft);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
