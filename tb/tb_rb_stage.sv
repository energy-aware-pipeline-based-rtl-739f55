// tb_rb_stage: streams blocks through an RB_64-type stage with duplicate
// banks (dup_en = 1, blocks back to back, no gaps) and with a single bank
// (dup_en = 0, waiting for out_last between blocks), for capacities 16, 32
// and 64. Every output word must come back in the order 8j + k, shifted left
// by the block's BFP factor (computed here from the block's largest part),
// with out_exp = in_exp + factor, out_last on the block's last beat, the
// first beat on the cycle after the last write, and both banks used in turn.
module tb_rb_stage;
  import rmr_pkg::*;
  logic             clk = 1'b0, rst_n = 1'b0;
  logic [3:0]       lg_m;
  logic             dup_en, in_v, out_v, out_last;
  vec_t             din, dout;
  logic [EXP_W-1:0] in_exp, out_exp;
  int checks = 0, failures = 0;
  rb_stage dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected BFP factor for a block whose parts lie in [-mx-1, mx].
  function automatic int want_factor(int mx);
    int n = 0;
    while ((1 << n) <= mx) n++;          // parts need n magnitude bits
    return (15 - n - 1 < 0) ? 0 : 15 - n - 1;
  endfunction

  int blk_scale [64];
  int blk_exp   [64];
  int n_out_blk, n_out_beat, b_used;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && dut.wr[1]) b_used++;

  // Records the cycle of the last write beat of every block.
  longint last_wr_of [64];
  int n_in_blk, n_in_beat;
  always @(posedge clk) if (rst_n && in_v) begin
    if (n_in_beat == L - 1) begin
      last_wr_of[n_in_blk] = cyc;
      n_in_beat = 0;
      n_in_blk++;
    end else n_in_beat++;
  end

  // Checker: block number n_out_blk, beat n_out_beat.
  int L;
  always @(posedge clk) if (rst_n && out_v) begin
    automatic int f = want_factor(blk_scale[n_out_blk] * (8 * L - 1));
    if (n_out_beat == 0) begin
      checks++;
      if (cyc != last_wr_of[n_out_blk] + 1) begin
        failures++;
        $display("FAIL block %0d: output started %0d cycles after its last write", n_out_blk, cyc - last_wr_of[n_out_blk]);
      end
    end
    for (int k = 0; k < LANES; k++) begin
      checks++;
      if (dout[k].re != word_t'(blk_scale[n_out_blk] * (8 * n_out_beat + k) * (1 << f)) ||
          dout[k].im != word_t'(-blk_scale[n_out_blk] * (1 << f))) begin
        failures++;
        if (failures < 20) $display("FAIL block %0d beat %0d lane %0d: %0d want %0d", n_out_blk, n_out_beat, k,
                                    $signed(dout[k].re), blk_scale[n_out_blk] * (8 * n_out_beat + k) * (1 << f));
      end
    end
    checks++;
    if (out_exp != EXP_W'(blk_exp[n_out_blk] + f) || out_last != (n_out_beat == L - 1)) begin
      failures++;
      $display("FAIL block %0d beat %0d: exp %0d want %0d, last %0d", n_out_blk, n_out_beat, out_exp, blk_exp[n_out_blk] + f, out_last);
      $display("  mode lg=%0d dup=%0d", lg_m, dup_en);
    end
    if (n_out_beat == L - 1) begin n_out_beat = 0; n_out_blk++; end
    else n_out_beat++;
  end

  task automatic send_block(int n);
    for (int i = 0; i < L; i++) begin
      in_v <= 1'b1;
      in_exp <= EXP_W'(blk_exp[n]);
      for (int k = 0; k < LANES; k++) begin
        din[k].re <= word_t'(blk_scale[n] * (i + L * k));
        din[k].im <= word_t'(-blk_scale[n]);
      end
      @(posedge clk);
    end
  endtask

  initial begin
    in_v = 1'b0; din = '0; in_exp = '0; dup_en = 1'b1; lg_m = 4'd4;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int mode = 0; mode < 6; mode++) begin
      automatic int nb = 6;
      lg_m   <= 4'(4 + mode % 3);
      dup_en <= (mode < 3);
      L = 1 << (1 + mode % 3);
      n_out_blk = 0; n_out_beat = 0; n_in_blk = 0; n_in_beat = 0;
      for (int n = 0; n < nb; n++) begin
        blk_scale[n] = 1 << $urandom_range(0, 7);
        blk_exp[n]   = $urandom_range(0, 20);
      end
      @(posedge clk);
      for (int n = 0; n < nb; n++) begin
        send_block(n);
        // with one bank, or now and then with two, leave a gap
        if (mode >= 3 || $urandom_range(0, 2) == 0) begin
          in_v <= 1'b0;
          @(posedge clk);
          if (mode >= 3) while (!(out_v && out_last)) @(posedge clk);
          else repeat ($urandom_range(0, 3)) @(posedge clk);
        end
      end
      in_v <= 1'b0;
      while (n_out_blk < nb) @(posedge clk);
      repeat (2) @(posedge clk);
    end
    checks++;
    if (b_used == 0) begin failures++; $display("FAIL: duplicate bank never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
