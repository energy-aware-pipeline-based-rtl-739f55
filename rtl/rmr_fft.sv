// rmr_fft: reconfigurable mixed-radix FFT/IFFT processor, 16 to 4096 points,
// eight complex samples per clock, 16-bit words with block floating point.
//
// Datapath (eight lanes throughout):
//   in -> iq_swap -> [R8_BF a -> reg -> MULT/ROM] -> RB_4096 --+
//             ^                                                |
//             +---------- (second pass, 1024..4096 only) ------+
//   [MULT/ROM] -> RB_512a/b -> R8_BF b -> reg -> CMULT -> RB_64a/b
//   -> RR_BF -> reg -> iq_swap -> out
// 16..64 points enter at R8_BF b (two butterfly stages, RB_64a only);
// 128..512 points use R8_BF a once and RB_512a as the first bank;
// 1024..4096 points use R8_BF a twice: the first pass fills RB_4096, the
// second pass reads it back through the same butterfly and multiplier (now
// with base N/8 twiddles) into RB_512a/b. Every bank stage scales its blocks
// by block floating point and the exponents add up along the way.
//
// Interface. cfg_lg (log2 N, 4..12) and cfg_ifft are taken while idle. A
// frame is N/8 input beats (in_valid & in_ready); beat i, lane k carries
// sample x[i + (N/8)k]. The output is N/8 beats with out_valid; beat j,
// lane k carries bin X[bitrev_N(8j + k)] (bit-reversed order). out_sbit is
// the block exponent S of the beat; out_last marks the last beat of a frame.
// Scaling: each radix-2 layer halves, each BFP stage multiplies by 2^factor,
// so FFT: X = out * 2^(log2 N - S), IFFT: x = out * 2^(-S) (the 1/N of the
// inverse transform is already applied). Inputs must keep every complex
// sample's modulus below 2^15.
// Serial input: with ser_mode = 1 the core is fed from the input buffer
// (in_buf) instead of in_data: one sample per clock on ser_valid/ser_data in
// natural order, cfg_lg sampled with a frame's first sample. The buffer has no
// back-pressure, so in serial mode the source must wait for idle before the
// first sample of a frame of a new size or direction; frames of the same
// size are always accepted (N cycles apart, the core needs N/4 + 1).
// ser_mode must only change while idle.
// Timing: first input beat to last output beat takes N/8 + N/8 + 2 cycles
// (16..64), N/8 + N/8 + N/64 + 3 (128..512) and N/8 + N/8 + N/64 + N/512 + 4
// (1024..4096); back-to-back frames sustain four samples per clock.
// pwr is the power-gating table of the modules for an external power
// manager; unused register-bank parts are also left unclocked inside.
// Following the document: the module chain, the radix plan per size, the
// sharing of R8_BF a between stages 1 and 2 for 1024..4096 points, the bank
// sizes, the two twiddle schemes, BFP between stages, the I/Q swap for the
// IFFT and the execution cycle counts. This design's choices: the halving in
// every radix-2 layer, rounding, the valid/ready handshake, one extra cycle
// between back-to-back frames of 1024..4096 points (the shared butterfly
// needs it to switch passes) and the out_sbit exponent output.
// Lint note: verilator reports rst_n as used both asynchronously and
// synchronously (SYNCASYNCNET); the synchronous use is only the disable
// condition of an assertion in rb_stage, no flip-flop is reset synchronously.
module rmr_fft
  import rmr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       cfg_lg,
  input  logic             cfg_ifft,
  input  logic             in_valid,
  output logic             in_ready,
  input  vec_t             in_data,
  input  logic             ser_mode,
  input  logic             ser_valid,
  input  cplx_t            ser_data,
  output logic             out_valid,
  output vec_t             out_data,
  output logic [EXP_W-1:0] out_sbit,
  output logic             out_last,
  output pwr_t             pwr,
  output logic             idle
);
  mode_t mode;
  logic  take, first_last, frame_done;
  vec_t  x_in;
  logic  x_valid, ib_v, ib_last;
  vec_t  x_data, ib_d;

  // ---------------- optional serial front end ----------------
  in_buf u_in_buf (
    .clk(clk), .rst_n(rst_n), .lg(cfg_lg), .in_valid(ser_mode && ser_valid), .in_data(ser_data),
    .out_valid(ib_v), .out_data(ib_d), .out_last(ib_last));

  always_comb begin
    x_valid = ser_mode ? ib_v : in_valid;
    x_data  = ser_mode ? ib_d : in_data;
  end

  // The input buffer cannot wait: every beat it delivers must be accepted.
  a_serial_taken: assert property (@(posedge clk) disable iff (!rst_n) ser_mode && ib_v |-> in_ready);
  a_serial_last:  assert property (@(posedge clk) disable iff (!rst_n) ib_last |-> ib_v);

  // ---------------- control ----------------
  rmr_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .cfg_lg(cfg_lg), .cfg_ifft(cfg_ifft),
    .in_valid(x_valid), .in_ready(in_ready), .first_last(first_last),
    .frame_done(frame_done), .mode(mode), .pwr(pwr), .idle(idle));

  assign take = x_valid && in_ready;

  iq_swap u_swap_in (.ifft(mode.ifft), .din(x_data), .dout(x_in));

  // ---------------- stage 1/2: R8_BF a, MULT, ROM ----------------
  logic             s4k_v, s4k_last;
  vec_t             s4k_d;
  logic [EXP_W-1:0] s4k_exp;
  vec_t             a_in, a_out;
  logic             a_v, a_p2;
  logic [EXP_W-1:0] a_exp;
  logic             pa_v, pa_p2;
  vec_t             pa_d, ma_d;
  logic [EXP_W-1:0] pa_exp;
  logic [8:0]       m1, m2;

  always_comb begin
    a_p2  = (mode.cls == CLS_L) && s4k_v;        // bypass mux: bank read-back
    a_in  = a_p2 ? s4k_d : x_in;
    a_exp = a_p2 ? s4k_exp : '0;
    a_v   = (mode.cls != CLS_S) && (a_p2 || take);
  end

  bf_r8 u_bf_a (.din(a_in), .dout(a_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pa_v <= 1'b0; pa_p2 <= 1'b0; pa_exp <= '0; m1 <= '0; m2 <= '0;
    end else begin
      pa_v   <= a_v;
      pa_p2  <= a_p2;
      pa_exp <= a_exp;
      if (pa_v && !pa_p2) m1 <= (m1 == 9'((1 << (int'(mode.lg) - 3)) - 1)) ? '0 : m1 + 1'b1;
      if (pa_v &&  pa_p2) m2 <= (m2 == 9'((1 << (int'(mode.lg) - 6)) - 1)) ? '0 : m2 + 1'b1;
    end
  end

  always_ff @(posedge clk) if (a_v) pa_d <= a_out;

  mult_rom u_mult (
    .lg_base(pa_p2 ? mode.lg - 4'd3 : mode.lg), .m(pa_p2 ? m2 : m1),
    .bank_on(mode.bank_on), .din(pa_d), .dout(ma_d));

  rb_stage #(.TYPE_B(1'b1), .MAXW(64), .DUP(1'b0)) u_rb4096 (
    .clk(clk), .rst_n(rst_n), .lg_m(mode.lg_rb4096), .dup_en(1'b0),
    .in_v(pa_v && !pa_p2 && mode.cls == CLS_L), .din(ma_d), .in_exp(pa_exp),
    .out_v(s4k_v), .dout(s4k_d), .out_exp(s4k_exp), .out_last(s4k_last));

  logic             s512_v, s512_last;
  vec_t             s512_d;
  logic [EXP_W-1:0] s512_exp;

  rb_stage #(.TYPE_B(1'b1), .MAXW(8), .DUP(1'b1)) u_rb512 (
    .clk(clk), .rst_n(rst_n), .lg_m(mode.lg_rb512), .dup_en(mode.dup512),
    .in_v(pa_v && (mode.cls == CLS_M || pa_p2)), .din(ma_d), .in_exp(pa_exp),
    .out_v(s512_v), .dout(s512_d), .out_exp(s512_exp), .out_last(s512_last));

  // ---------------- stage 3: R8_BF b, CMULT ----------------
  vec_t             b_in, b_out, pb_d, cm_d;
  logic             b_v, pb_v;
  logic [EXP_W-1:0] b_exp, pb_exp;
  logic [2:0]       mc;

  always_comb begin
    b_in  = (mode.cls == CLS_S) ? x_in : s512_d;   // bypass mux for 16..64
    b_v   = (mode.cls == CLS_S) ? take : s512_v;
    b_exp = (mode.cls == CLS_S) ? '0 : s512_exp;
  end

  bf_r8 u_bf_b (.din(b_in), .dout(b_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pb_v <= 1'b0; pb_exp <= '0; mc <= '0;
    end else begin
      pb_v   <= b_v;
      pb_exp <= b_exp;
      if (pb_v) mc <= (mc == 3'((1 << (int'(mode.lg_rb64) - 3)) - 1)) ? '0 : mc + 1'b1;
    end
  end

  always_ff @(posedge clk) if (b_v) pb_d <= b_out;

  cmult u_cmult (.lg_base(mode.lg_rb64[2:0]), .m(mc), .din(pb_d), .dout(cm_d));

  logic             s64_v, s64_last;
  vec_t             s64_d;
  logic [EXP_W-1:0] s64_exp;

  rb_stage #(.TYPE_B(1'b0), .MAXW(8), .DUP(1'b1)) u_rb64 (
    .clk(clk), .rst_n(rst_n), .lg_m(mode.lg_rb64), .dup_en(mode.dup64),
    .in_v(pb_v), .din(cm_d), .in_exp(pb_exp),
    .out_v(s64_v), .dout(s64_d), .out_exp(s64_exp), .out_last(s64_last));

  // ---------------- stage 4: RR_BF ----------------
  vec_t             c_out, pc_d;
  logic             pc_v;
  logic [EXP_W-1:0] pc_exp;
  logic [9:0]       ocnt;

  bf_rr u_bf_rr (.ena(mode.ena), .enb(mode.enb), .din(s64_d), .dout(c_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_v <= 1'b0; pc_exp <= '0; ocnt <= '0;
    end else begin
      pc_v   <= s64_v;
      pc_exp <= s64_exp;
      if (pc_v) ocnt <= out_last ? '0 : ocnt + 1'b1;
    end
  end

  always_ff @(posedge clk) if (s64_v) pc_d <= c_out;

  iq_swap u_swap_out (.ifft(mode.ifft), .din(pc_d), .dout(out_data));

  always_comb begin
    out_valid  = pc_v;
    out_sbit   = pc_exp;
    out_last   = pc_v && (ocnt == 10'((1 << (int'(mode.lg) - 3)) - 1));
    frame_done = out_last;
    unique case (mode.cls)
      CLS_S:   first_last = s64_last;
      CLS_M:   first_last = s512_last;
      default: first_last = s4k_last;
    endcase
  end
endmodule
