// rmr_ctrl: CONTROL block of the processor.
//
// Mode decode. The FFT size N = 2^lg picks one of three data flows: 16..64
// points use two butterfly stages (radix-8, then the reconfigurable one),
// 128..512 three and 1024..4096 four (the first two share one radix-8 unit).
// Every stage but the last is radix-8; the last one is radix 2, 4 or 8
// (ENB / ENA of the reconfigurable butterfly). From this follow the register
// bank capacities (N, N/8, N/64 for the first, second, third bank stage),
// whether the duplicate banks are used (all but the first bank stage), the
// twiddle ROM banks needed and the power-gating table of the modules.
// Size and direction (cfg_lg, clamped to 4..12, and cfg_ifft) are taken over
// while no frame is in flight; a different setting waits until the pipeline
// is empty.
// Input gating. A frame is N/8 beats of eight samples. After them the first
// register bank is full and cannot take data until it has emptied: in_ready
// falls and rises again on the last beat the bank delivers (for 16..512
// points) or one cycle later (for 1024..4096 points, where the input
// butterfly is busy with the bank's output). This halves the sustained input
// rate to four samples per clock.
// in_ready does not depend on in_valid; a beat moves when both are 1.
module rmr_ctrl
  import rmr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] cfg_lg,      // log2 N, 4..12
  input  logic       cfg_ifft,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       first_last,  // last output beat of the first bank stage
  input  logic       frame_done,  // last output beat of a frame
  output mode_t      mode,
  output pwr_t       pwr,
  output logic       idle         // no frame in flight
);
  typedef enum logic { S_IN, S_WAIT } st_t;
  st_t        st;
  logic [9:0] in_cnt;
  logic [9:0] frames;
  logic [3:0] lg;
  logic       ifft;
  logic       match, take, start;
  logic [3:0] cfg_cl;

  function automatic mode_t decode(logic [3:0] l, logic inv);
    mode_t m;
    int    rlast;
    m           = '0;
    m.lg        = l;
    m.ifft      = inv;
    m.cls       = (l <= 4'd6) ? CLS_S : (l <= 4'd9) ? CLS_M : CLS_L;
    rlast       = (m.cls == CLS_S) ? int'(l) - 3 : (m.cls == CLS_M) ? int'(l) - 6 : int'(l) - 9;
    m.ena       = (rlast == 2);
    m.enb       = (rlast == 1);
    m.lg_rb4096 = l;
    m.lg_rb512  = (m.cls == CLS_L) ? l - 4'd3 : l;
    m.lg_rb64   = (m.cls == CLS_S) ? l : (m.cls == CLS_M) ? l - 4'd3 : l - 4'd6;
    m.dup512    = (m.cls == CLS_L);
    m.dup64     = (m.cls != CLS_S);
    for (int j = 0; j < 5; j++) m.bank_on[j] = (m.cls != CLS_S) && (j >= 12 - int'(l));
    m.bank_on[5] = (m.cls != CLS_S);
    return m;
  endfunction

  // Parts of a bank switched on for capacity 2^c out of 2^cmax.
  function automatic logic [2:0] parts(logic on, logic [3:0] c, int cmax);
    return on ? {int'(c) >= cmax, int'(c) >= cmax - 1, 1'b1} : 3'b000;
  endfunction

  always_comb begin
    mode        = decode(lg, ifft);
    pwr         = '0;
    pwr.control = 1'b1;
    pwr.r8_bf_a = (mode.cls != CLS_S);
    pwr.mult    = (mode.cls != CLS_S);
    pwr.rom     = mode.bank_on;
    pwr.rb4096  = parts(mode.cls == CLS_L, mode.lg_rb4096, 12);
    pwr.bfp4096 = (mode.cls == CLS_L);
    pwr.rb512a  = parts(mode.cls != CLS_S, mode.lg_rb512, 9);
    pwr.rb512b  = parts(mode.dup512, mode.lg_rb512, 9);
    pwr.bfp512  = (mode.cls != CLS_S);
    pwr.r8_bf_b = 1'b1;
    pwr.cmult   = 1'b1;
    pwr.rb64a   = parts(1'b1, mode.lg_rb64, 6);
    pwr.rb64b   = parts(mode.dup64, mode.lg_rb64, 6);
    pwr.bfp64   = 1'b1;
    pwr.rr_bf   = 1'b1;
  end

  always_comb begin
    idle     = (frames == 0);
    cfg_cl   = (cfg_lg < 4'(LG_MIN)) ? 4'(LG_MIN) : (cfg_lg > 4'(LG_MAX)) ? 4'(LG_MAX) : cfg_lg;
    match    = (cfg_cl == lg) && (cfg_ifft == ifft);
    // A new frame may only start with the configuration in force.
    start    = (in_cnt == 0);
    in_ready = (!start || match) &&
               ((st == S_IN) || (st == S_WAIT && first_last && mode.cls != CLS_L));
    take     = in_valid && in_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IN;
      in_cnt <= '0;
      frames <= '0;
      lg     <= 4'd4;
      ifft   <= 1'b0;
    end else begin
      if (st == S_IN && in_cnt == 0 && idle && !match) begin
        lg   <= cfg_cl;
        ifft <= cfg_ifft;
      end
      if (take) begin
        if (in_cnt == 10'((1 << (int'(lg) - 3)) - 1)) begin
          in_cnt <= '0;
          st     <= S_WAIT;
        end else begin
          in_cnt <= in_cnt + 1'b1;
          st     <= S_IN;
        end
      end else if (st == S_WAIT && first_last) begin
        st <= S_IN;
      end
      frames <= frames + 10'(take && start) - 10'(frame_done);
    end
  end
endmodule
