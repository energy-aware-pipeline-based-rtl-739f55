// tb_rmr_ctrl: checks the mode decode of the control block for all nine
// sizes against the radix plan (last butterfly radix 2/4/8 for sizes 2^4,
// 2^5, 2^6 times 8^s), the bank capacities N, N/8, N/64, the ROM banks and a
// few rows of the power-gating table; then checks the input gating: N/8
// beats are taken, in_ready stays low until the first bank's last output
// beat, and a size change is only taken while no frame is in flight.
module tb_rmr_ctrl;
  import rmr_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [3:0] cfg_lg;
  logic       cfg_ifft, in_valid, in_ready, first_last, frame_done, idle;
  mode_t      mode;
  pwr_t       pwr;
  int checks = 0, failures = 0;
  rmr_ctrl dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic expect_(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    cfg_lg = 4'd4; cfg_ifft = 1'b0; in_valid = 1'b0; first_last = 1'b0; frame_done = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int lg = 4; lg <= 12; lg++) begin
      automatic int stages = (lg <= 6) ? 2 : (lg <= 9) ? 3 : 4;
      automatic int rl = lg - 3 * (stages - 1);
      cfg_lg <= 4'(lg);
      cfg_ifft <= lg[0];
      repeat (3) @(posedge clk);
      expect_(mode.lg == 4'(lg) && mode.ifft == lg[0], $sformatf("N=%0d: configuration not taken", 1 << lg));
      expect_(mode.cls == cls_t'(stages - 2), $sformatf("N=%0d: stage count %0d ena %0d enb %0d", 1 << lg, mode.cls, mode.ena, mode.enb));
      expect_(mode.ena == (rl == 2) && mode.enb == (rl == 1), $sformatf("N=%0d: ENA/ENB", 1 << lg));
      expect_(int'(mode.lg_rb64) == lg - 3 * (stages - 2), $sformatf("N=%0d: RB_64 capacity", 1 << lg));
      if (stages >= 3) expect_(int'(mode.lg_rb512) == lg - 3 * (stages - 3), $sformatf("N=%0d: RB_512 capacity", 1 << lg));
      expect_(mode.dup64 == (stages > 2) && mode.dup512 == (stages > 3), $sformatf("N=%0d: duplicate banks", 1 << lg));
      expect_(pwr.r8_bf_a == (stages > 2) && pwr.mult == (stages > 2) && pwr.bfp4096 == (stages > 3),
              $sformatf("N=%0d: power table", 1 << lg));
      expect_($countones(pwr.rom) == ((stages == 2) ? 0 : lg - 6), $sformatf("N=%0d: ROM banks %b", 1 << lg, pwr.rom));
      expect_(pwr.rb64a == ((lg % 3 == 1) ? 3'b001 : (lg % 3 == 2) ? 3'b011 : 3'b111), $sformatf("N=%0d: RB_64a parts", 1 << lg));
      // input gating for one frame
      in_valid <= 1'b1;
      for (int i = 0; i < (1 << (lg - 3)); i++) begin
        #1;
        expect_(in_ready, $sformatf("N=%0d: beat %0d refused", 1 << lg, i));
        @(posedge clk);
      end
      repeat (4) begin
        #1;
        expect_(!in_ready, $sformatf("N=%0d: beat taken while first bank is full", 1 << lg));
        @(posedge clk);
      end
      // a size change must wait for the frame to leave
      cfg_lg <= 4'((lg == 12) ? 4 : lg + 1);
      first_last <= 1'b1;
      @(posedge clk);
      first_last <= 1'b0;
      in_valid <= 1'b0;
      repeat (3) @(posedge clk);
      expect_(mode.lg == 4'(lg) && !idle, $sformatf("N=%0d: size changed with a frame in flight", 1 << lg));
      frame_done <= 1'b1;
      @(posedge clk);
      frame_done <= 1'b0;
      cfg_lg <= 4'(lg);
      @(posedge clk);
      #1 expect_(idle, "idle after the frame left");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
