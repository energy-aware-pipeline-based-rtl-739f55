// tb_rb_a: fills the RB_64-type bank with blocks of 16, 32 and 64 words,
// word index i + (M/8)k on lane k at input beat i, then reads M/8 beats and
// checks that lane k of output beat j carries index 8j + k. Words carry their
// index and a per-block tag so stale data is caught.
module tb_rb_a;
  import rmr_pkg::*;
  logic       clk = 1'b0;
  logic [2:0] lg_m;
  logic       phase, en;
  vec_t       din, dout;
  int checks = 0, failures = 0;
  rb_a dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    en = 1'b0; phase = 1'b1; din = '0; lg_m = 3'd4;
    @(posedge clk);
    for (int rep = 0; rep < 4; rep++) begin
      for (int lg = 4; lg <= 6; lg++) begin
        automatic int L = 1 << (lg - 3);
        lg_m <= 3'(lg);
        phase <= 1'b1;
        for (int i = 0; i < L; i++) begin
          en <= 1'b1;
          for (int k = 0; k < LANES; k++) begin
            din[k].re <= word_t'(i + L * k);
            din[k].im <= word_t'(rep * 16 + lg);
          end
          @(posedge clk);
        end
        // idle cycle: nothing may move
        en <= 1'b0;
        din <= '1;
        @(posedge clk);
        phase <= 1'b0;
        for (int j = 0; j < L; j++) begin
          en <= 1'b1;
          #1;
          for (int k = 0; k < LANES; k++) begin
            checks++;
            if (dout[k].re != word_t'(8 * j + k) || dout[k].im != word_t'(rep * 16 + lg)) begin
              failures++;
              $display("FAIL M=%0d beat %0d lane %0d: got %0d/%0d", 8 * L, j, k, $signed(dout[k].re), $signed(dout[k].im));;
            end
          end
          @(posedge clk);
        end
        en <= 1'b0;
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
