// tb_rb_b: fills RB_512-type (MAXW = 8) and RB_4096-type (MAXW = 64) banks
// with every capacity they support, index i + (M/8)k on lane k at input beat
// i, pulsing the zone-1 clock every M/64 beats as the stage controller does,
// then reads M/8 beats and checks that lane k of output beat j carries
// index b*M/8 + j%(M/64) + (M/64)k with b = j/(M/64).
module tb_rb_b;
  import rmr_pkg::*;
  logic       clk = 1'b0;
  logic [3:0] lg_m;
  logic       phase, en, z1_en;
  vec_t       din, dout_s, dout_l;
  int checks = 0, failures = 0;
  rb_b               u_s (.clk(clk), .lg_m(lg_m), .phase(phase), .en(en), .z1_en(z1_en), .din(din), .dout(dout_s));
  rb_b #(.MAXW(64))  u_l (.clk(clk), .lg_m(lg_m), .phase(phase), .en(en), .z1_en(z1_en), .din(din), .dout(dout_l));
  always #5 clk = !clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    en = 1'b0; z1_en = 1'b0; phase = 1'b1; din = '0; lg_m = 4'd7;
    @(posedge clk);
    for (int lg = 7; lg <= 12; lg++) begin
      automatic int B = 1 << (lg - 3), Z = 1 << (lg - 6);
      lg_m <= 4'(lg);
      phase <= 1'b1;
      for (int i = 0; i < B; i++) begin
        en <= 1'b1;
        z1_en <= (i != 0) && (i % Z == 0);
        for (int k = 0; k < LANES; k++) begin
          din[k].re <= word_t'(i + B * k);
          din[k].im <= word_t'(lg);
        end
        @(posedge clk);
      end
      en <= 1'b0; z1_en <= 1'b0;
      @(posedge clk);
      phase <= 1'b0;
      for (int j = 0; j < B; j++) begin
        en <= 1'b1; z1_en <= 1'b1;
        #1;
        for (int k = 0; k < LANES; k++) begin
          automatic int want = (j / Z) * B + j % Z + Z * k;
          automatic cplx_t got = (lg <= 9) ? dout_s[k] : dout_l[k];
          checks++;
          if (got.re != word_t'(want) || got.im != word_t'(lg)) begin
            failures++;
            if (failures < 20) $display("FAIL M=%0d beat %0d lane %0d: got %0d want %0d", 8 * B, j, k, $signed(got.re), want);
          end
        end
        @(posedge clk);
      end
      en <= 1'b0; z1_en <= 1'b0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
