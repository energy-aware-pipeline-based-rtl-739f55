// tb_in_buf: feeds the input buffer a serial stream of frames of random
// sizes 16..4096, with and without random gaps in in_valid, and checks that
// each frame leaves as N/8 beats carrying sample i + (N/8)k on lane k of
// beat i, that out_last marks the last beat, that the first beat appears on
// the cycle after sample 7N/8 was taken, and that frames can follow each
// other without a gap. Samples carry the frame number and the sample index.
module tb_in_buf;
  import rmr_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [3:0] lg;
  logic       in_valid, out_valid, out_last;
  cplx_t      in_data;
  vec_t       out_data;
  int checks = 0, failures = 0;
  in_buf dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int frame_lg [64];
  int of = 0, ob = 0;        // frame and beat being checked
  longint cyc = 0, trig = -1;
  always @(posedge clk) cyc <= cyc + 1;

  // sample 7N/8 of the frame being checked marks when beat 0 is due
  int in_f = 0, in_i = 0;
  always @(posedge clk) if (rst_n && in_valid) begin
    if (in_i == 7 * (1 << (frame_lg[in_f] - 3))) trig = cyc;
    if (in_i == (1 << frame_lg[in_f]) - 1) begin in_i = 0; in_f++; end
    else in_i++;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int C = 1 << (frame_lg[of] - 3);
    if (ob == 0) begin
      checks++;
      if (cyc != trig + 1) begin
        failures++;
        $display("FAIL frame %0d: first beat %0d cycles after sample 7N/8", of, cyc - trig);
      end
    end
    for (int k = 0; k < LANES; k++) begin
      checks++;
      if (out_data[k].re != word_t'(ob + C * k) || out_data[k].im != word_t'(of)) begin
        failures++;
        if (failures < 20) $display("FAIL frame %0d (N=%0d) beat %0d lane %0d: got %0d/%0d", of, 8 * C, ob, k,
                                    $signed(out_data[k].re), $signed(out_data[k].im));
      end
    end
    checks++;
    if (out_last != (ob == C - 1)) begin failures++; $display("FAIL frame %0d beat %0d: out_last %0d", of, ob, out_last); end
    if (ob == C - 1) begin ob = 0; of++; end
    else ob++;
  end

  initial begin
    in_valid = 1'b0; in_data = '0; lg = 4'd4;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < 40; f++) begin
      automatic int l = (f < 9) ? 4 + f : $urandom_range(4, 12);
      automatic bit gaps = (f >= 20);
      automatic int n = 1 << l;
      frame_lg[f] = l;
      for (int i = 0; i < n; i++) begin
        if (gaps && $urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          in_data  <= '1;
          @(posedge clk);
        end
        in_valid   <= 1'b1;
        lg         <= (i == 0) ? 4'(l) : 4'($urandom_range(4, 12));
        in_data.re <= word_t'(i);
        in_data.im <= word_t'(f);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    @(posedge clk);
    @(posedge clk);
    checks++;
    if (of != 40 || ob != 0) begin failures++; $display("FAIL: %0d frames and %0d beats came out", of, ob); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
