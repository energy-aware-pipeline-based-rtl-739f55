// tb_bfp_unit: sends blocks of random length whose largest part has a known
// number of redundant sign bits and checks the factor reported on the last
// beat (that number less one guard bit, never below 0, 14 for an all-zero
// block), then checks that the shifter multiplies every part by 2^sh_k.
module tb_bfp_unit;
  import rmr_pkg::*;
  logic            clk = 1'b0, rst_n = 1'b0;
  logic            det_v, det_clr;
  vec_t            det_d, sh_d, sh_q;
  logic [SF_W-1:0] factor, sh_k;
  int checks = 0, failures = 0;
  bfp_unit dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    det_v = 1'b0; det_clr = 1'b0; det_d = '0; sh_d = '0; sh_k = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      automatic int len = $urandom_range(1, 12);
      automatic int mag = $urandom_range(0, 15);     // largest part is below 2^mag
      automatic int hit = $urandom_range(0, len - 1);
      int want;
      for (int i = 0; i < len; i++) begin
        det_v   <= 1'b1;
        det_clr <= (i == 0);
        for (int k = 0; k < LANES; k++) begin
          automatic int lim = (mag == 0) ? 0 : (1 << (mag - 1)) - 1;
          det_d[k].re <= word_t'($signed($urandom_range(0, 2 * lim)) - lim);
          det_d[k].im <= word_t'($signed($urandom_range(0, 2 * lim)) - lim);
        end
        if (i == hit && mag > 0) det_d[$urandom_range(0, 7)].im <= ($urandom_range(0, 1) == 1) ? word_t'(1 << (mag - 1)) : -word_t'((1 << (mag - 1)) + 1);
        if (i == hit && mag == 15) det_d[0].re <= -16'sd32768;
        #1;
        if (i == len - 1) begin
          // parts lie in [-2^(mag-1)-1, 2^(mag-1)]: W-1-mag redundant sign bits
          want = (mag == 0) ? 14 : (15 - mag - 1 < 0 ? 0 : 15 - mag - 1);
          if (mag == 15) want = 0;
          checks++;
          if (factor != SF_W'(want)) begin
            failures++;
            $display("FAIL block %0d (mag %0d): factor %0d want %0d", t, mag, factor, want);
          end
        end
        @(posedge clk);
      end
      det_v <= 1'b0;
      // shifter
      sh_k <= SF_W'($urandom_range(0, 14));
      for (int k = 0; k < LANES; k++) begin
        sh_d[k].re <= word_t'($signed($urandom_range(0, 6)) - 3);
        sh_d[k].im <= word_t'($urandom_range(0, 1));
      end
      #1;
      for (int k = 0; k < LANES; k++) begin
        checks++;
        if (sh_q[k].re != word_t'(int'(sh_d[k].re) * (1 << sh_k)) || sh_q[k].im != word_t'(int'(sh_d[k].im) * (1 << sh_k))) begin
          failures++;
          $display("FAIL shift by %0d lane %0d", sh_k, k);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
