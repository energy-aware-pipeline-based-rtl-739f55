// tb_rmr_fft: end-to-end test of the RMR FFT/IFFT processor.
//
// For every FFT size from 16 to 4096 points it sends random frames, forward
// and inverse, single and back to back, rebuilds the natural-order spectrum
// from the bit-reversed output and the block exponent, and compares it with
// a double-precision DFT computed here: the signal-to-error ratio of each
// frame must reach SNR_MIN dB (SNR_SMALL for low-level frames). It also checks the execution cycles of a lone
// frame against N/8+N/8+2, N/8+N/8+N/64+3 and N/8+N/8+N/64+N/512+4, the
// spacing of back-to-back frames (N/4 cycles, one more for 1024..4096), and
// counts how often each mechanism occurred: all three data flows, the second
// pass through the shared butterfly, duplicate-bank alternation in both bank
// stages, input stalls, non-zero BFP shifts, the radix-2/4/8 modes of the
// last butterfly, size changes, inverse transforms and frames fed one
// sample per clock through the serial input buffer (run at 32 points, at
// 512 points as IFFT and at the largest size). Each must happen.
// +MAXLG=n stops at 2^n points (default 12, the full size).
module tb_rmr_fft;
  import rmr_pkg::*;

  localparam real   SNR_MIN   = 55.0;  // full-scale frames
  localparam real   SNR_SMALL = 42.0;  // frames at 1/32 of full scale
  localparam real   PI      = 3.14159265358979323846;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [3:0]       cfg_lg = 4'd4;
  logic             cfg_ifft = 1'b0;
  logic             in_valid = 1'b0;
  logic             in_ready;
  vec_t             in_data = '0;
  logic             ser_mode = 1'b0;
  logic             ser_valid = 1'b0;
  cplx_t            ser_data = '0;
  logic             out_valid, out_last, idle;
  vec_t             out_data;
  logic [EXP_W-1:0] out_sbit;
  pwr_t             pwr;

  rmr_fft dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_serial, n_cls[3], n_pass2, n_dup512, n_dup64, n_stall, n_bfp, n_ena, n_enb, n_r8, n_swap, n_sizechg;
  logic [3:0] last_lg = 4'd4;
  always @(posedge clk) if (rst_n) begin
    if (dut.take) n_cls[dut.mode.cls]++;
    if (dut.a_p2) n_pass2++;
    if (dut.u_rb512.wr[1]) n_dup512++;
    if (dut.u_rb64.wr[1]) n_dup64++;
    if (in_valid && !in_ready) n_stall++;
    if (dut.out_valid && out_sbit != 0) n_bfp++;
    if (dut.s64_v && dut.mode.ena) n_ena++;
    if (dut.s64_v && dut.mode.enb) n_enb++;
    if (dut.s64_v && !dut.mode.ena && !dut.mode.enb) n_r8++;
    if (dut.take && dut.mode.ifft) n_swap++;
    if (dut.take && ser_mode) n_serial++;
    if (dut.mode.lg != last_lg) begin n_sizechg++; last_lg <= dut.mode.lg; end
  end

  // ---------------- stimulus and reference ----------------
  localparam int NMAX = 4096;
  localparam int FMAX = 3;
  real xr [FMAX][NMAX], xi [FMAX][NMAX];
  real yr [FMAX][NMAX], yi [FMAX][NMAX];
  longint t_first_in [FMAX], t_last_out [FMAX];
  int     in_frame, out_frame, out_beat;

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int b = 0; b < bits; b++) r |= ((v >> b) & 1) << (bits - 1 - b);
    return r;
  endfunction

  // Output collector: beat j lane k holds bin bitrev(8j+k).
  int cur_lg; bit cur_ifft;
  always @(posedge clk) if (out_valid) begin
    for (int k = 0; k < LANES; k++) begin
      int bin;
      real sc;
      bin = bitrev(8 * out_beat + k, cur_lg);
      sc  = cur_ifft ? 2.0 ** (-real'(out_sbit)) : 2.0 ** (real'(cur_lg) - real'(out_sbit));
      yr[out_frame][bin] = real'(out_data[k].re) * sc;
      yi[out_frame][bin] = real'(out_data[k].im) * sc;
    end
    out_beat++;
    if (out_last) begin
      checks++;
      if (out_beat != (1 << cur_lg) / 8) begin
        failures++;
        $display("FAIL: frame %0d had %0d output beats", out_frame, out_beat);
      end
      t_last_out[out_frame] = cyc;
      out_beat = 0;
      out_frame++;
    end
  end

  task automatic gen_frame(int f, int n, int kind);
    for (int i = 0; i < n; i++) begin
      real a, r;
      case (kind)
        0: begin  // random, modulus up to 2^14.5
          xr[f][i] = real'($signed($urandom_range(0, 32000)) - 16000);
          xi[f][i] = real'($signed($urandom_range(0, 32000)) - 16000);
        end
        1: begin  // small random values: forces large BFP shifts
          xr[f][i] = real'($signed($urandom_range(0, 2000)) - 1000);
          xi[f][i] = real'($signed($urandom_range(0, 2000)) - 1000);
        end
        default: begin  // two tones
          a = 2.0 * PI * real'(i) * 3.0 / real'(n);
          r = 2.0 * PI * real'(i) * real'(n / 4 + 1) / real'(n);
          xr[f][i] = $floor(9000.0 * $cos(a) + 4000.0 * $cos(r));
          xi[f][i] = $floor(9000.0 * $sin(a) - 4000.0 * $sin(r));
        end
      endcase
    end
  endtask

  task automatic check_frame(int f, int lg, bit inv, real lim);
    int n = 1 << lg;
    real es = 0.0, ee = 0.0, snr;
    for (int k = 0; k < n; k++) begin
      automatic real rr = 0.0, ri = 0.0;
      for (int t = 0; t < n; t++) begin
        real c, s;
        automatic int  p = (t * k) % n;
        c = $cos(2.0 * PI * real'(p) / real'(n));
        s = inv ? $sin(2.0 * PI * real'(p) / real'(n)) : -$sin(2.0 * PI * real'(p) / real'(n));
        rr += xr[f][t] * c - xi[f][t] * s;
        ri += xr[f][t] * s + xi[f][t] * c;
      end
      if (inv) begin rr /= real'(n); ri /= real'(n); end
      es += rr * rr + ri * ri;
      ee += (rr - yr[f][k]) ** 2 + (ri - yi[f][k]) ** 2;
    end
    snr = (ee == 0.0) ? 200.0 : 10.0 * $log10(es / ee);
    checks++;
    if (snr < lim) begin
      failures++;
      $display("FAIL: N=%0d ifft=%0d frame %0d SNR %0.1f dB", n, inv, f, snr);
    end else
      $display("  N=%0d ifft=%0d frame %0d SNR %0.1f dB", n, inv, f, snr);
  endtask

  // Sends nf frames back to back (in_valid held) and checks them.
  task automatic run(int lg, bit inv, int nf, int kind);
    int n = 1 << lg;
    int beats = n / 8;
    cfg_lg   = 4'(lg);
    cfg_ifft = inv;
    cur_lg   = lg;
    cur_ifft = inv;
    out_frame = 0; out_beat = 0;
    for (int f = 0; f < nf; f++) gen_frame(f, n, (kind < 0) ? f % 3 : kind);
    for (int f = 0; f < nf; f++) begin
      for (int i = 0; i < beats; i++) begin
        in_valid <= 1'b1;
        for (int k = 0; k < LANES; k++) begin
          in_data[k].re <= word_t'($rtoi(xr[f][i + beats * k]));
          in_data[k].im <= word_t'($rtoi(xi[f][i + beats * k]));
        end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (i == 0) t_first_in[f] = cyc;
      end
    end
    in_valid <= 1'b0;
    while (out_frame < nf) @(posedge clk);
    for (int f = 0; f < nf; f++) check_frame(f, lg, inv, (((kind < 0) ? f % 3 : kind) == 1) ? SNR_SMALL : SNR_MIN);
    // latency of the first frame (Table of execution cycles)
    begin
      int exp_cyc;
      exp_cyc = (lg <= 6) ? beats + beats + 2 :
                (lg <= 9) ? beats + beats + n / 64 + 3 : beats + beats + n / 64 + n / 512 + 4;
      checks++;
      if (t_last_out[0] - t_first_in[0] + 1 != exp_cyc) begin
        failures++;
        $display("FAIL: N=%0d execution cycles %0d, expected %0d", n, t_last_out[0] - t_first_in[0] + 1, exp_cyc);
      end else $display("  N=%0d execution cycles %0d", n, exp_cyc);
      if (nf > 1) begin
        checks++;
        if (t_first_in[1] - t_first_in[0] != n / 4 + (lg >= 10 ? 1 : 0)) begin
          failures++;
          $display("FAIL: N=%0d frame spacing %0d", n, t_first_in[1] - t_first_in[0]);
        end
      end
    end
    repeat (3) @(posedge clk);
  endtask

  // Sends nf frames one sample per clock through the serial input buffer,
  // with no gap between frames, and checks them.
  task automatic run_serial(int lg, bit inv, int nf);
    int n = 1 << lg;
    while (!idle) @(posedge clk);
    cfg_lg   = 4'(lg);
    cfg_ifft = inv;
    cur_lg   = lg;
    cur_ifft = inv;
    ser_mode = 1'b1;
    out_frame = 0; out_beat = 0;
    for (int f = 0; f < nf; f++) gen_frame(f, n, f % 3);
    for (int f = 0; f < nf; f++) begin
      for (int i = 0; i < n; i++) begin
        ser_valid   <= 1'b1;
        ser_data.re <= word_t'($rtoi(xr[f][i]));
        ser_data.im <= word_t'($rtoi(xi[f][i]));
        @(posedge clk);
      end
    end
    ser_valid <= 1'b0;
    while (out_frame < nf) @(posedge clk);
    for (int f = 0; f < nf; f++) check_frame(f, lg, inv, (f % 3 == 1) ? SNR_SMALL : SNR_MIN);
    while (!idle) @(posedge clk);
    ser_mode = 1'b0;
    repeat (3) @(posedge clk);
  endtask

  int max_lg;
  initial begin
    if (!$value$plusargs("MAXLG=%d", max_lg)) max_lg = 12;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int lg = 4; lg <= max_lg; lg++) begin
      run(lg, 1'b0, (lg <= 10) ? 3 : 2, -1);
      run(lg, 1'b1, 1, 0);
    end
    // serial front end: one small, one medium and one large size
    run_serial(5, 1'b0, 3);
    run_serial((max_lg < 9) ? max_lg : 9, 1'b1, 2);
    run_serial(max_lg, 1'b0, 2);
    // all mechanisms must have been exercised
    checks++;
    if (n_cls[0] == 0 || n_cls[1] == 0 || n_cls[2] == 0 || n_pass2 == 0 || n_dup512 == 0 ||
        n_dup64 == 0 || n_stall == 0 || n_bfp == 0 || n_ena == 0 || n_enb == 0 || n_r8 == 0 ||
        n_swap == 0 || n_sizechg == 0 || n_serial == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("mechanisms: flow16-64=%0d flow128-512=%0d flow1024-4096=%0d second_pass=%0d dup512b=%0d dup64b=%0d stalls=%0d bfp=%0d radix4=%0d radix2=%0d radix8=%0d ifft=%0d size_changes=%0d serial=%0d",
             n_cls[0], n_cls[1], n_cls[2], n_pass2, n_dup512, n_dup64, n_stall, n_bfp, n_ena, n_enb, n_r8, n_swap, n_sizechg, n_serial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
