// rb_stage: one register-bank stage between two computation stages: one
// register bank, or two identical ones used in turn, with their PHASE and
// zone clocks, one shared block-floating-point unit and the scaling table.
//
// A bank fills for M/8 beats (input phase), then empties for M/8 beats
// (output phase) starting on the cycle after its last write, one beat per
// cycle without stalls. A single bank cannot take data while it empties, so
// with dup_en = 1 the second bank takes the next block meanwhile and the two
// alternate; with dup_en = 0 (the first register-bank stage of the current
// size) only bank a is used and the upstream must wait for out_last. Only
// one bank writes and only one bank reads at any time, so one detector and
// one shifter serve both banks.
// Scaling table: on the last write beat of a block the bank stores the block's
// BFP factor and its exponent in_exp + factor; the exponent is the sum of the
// factors of every block that supplied the data, and travels with the block
// as out_exp. dout is the bank output shifted by the stored factor.
// TYPE_B = 0 builds rb_a banks (RB_64 type), TYPE_B = 1 rb_b banks with
// MAXW columns per basic block (RB_512: 8, RB_4096: 64). DUP = 0 leaves out
// the second bank.
// Lint note: verilator reports rst_n as used both asynchronously and
// synchronously (SYNCASYNCNET) in designs that include this stage. The
// synchronous use is only the disable condition of the assertion at the end;
// no flip-flop is reset synchronously.
module rb_stage
  import rmr_pkg::*;
#(
  parameter bit TYPE_B = 1'b0,
  parameter int MAXW   = 8,
  parameter bit DUP    = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       lg_m,      // log2 of the block size M
  input  logic             dup_en,
  input  logic             in_v,
  input  vec_t             din,
  input  logic [EXP_W-1:0] in_exp,
  output logic             out_v,
  output vec_t             dout,
  output logic [EXP_W-1:0] out_exp,
  output logic             out_last
);
  localparam int NB = DUP ? 2 : 1;

  logic [9:0]       beats;            // M/8 - 1
  logic [NB-1:0]    phase;            // 1: input phase
  logic [9:0]       cnt   [NB];
  logic [SF_W-1:0]  sf    [NB];
  logic [EXP_W-1:0] xp    [NB];
  logic             wsel, rsel;       // bank being written / read
  logic             wsel_q, rsel_q;   // bank of the next write / read block
  logic [NB-1:0]    wr, rd, en;
  vec_t             q     [NB];
  logic [SF_W-1:0]  factor;
  vec_t             raw;

  always_comb begin
    beats = 10'((1 << (int'(lg_m) - 3)) - 1);
  end

  // Bank selection: blocks go to a, b, a, b, ... and leave in the same
  // order; each pointer moves on after the last beat of a block.
  always_comb begin
    wsel = (NB == 2) && dup_en && wsel_q;
    rsel = (NB == 2) && dup_en && rsel_q;
    out_v = 1'b0;
    for (int x = 0; x < NB; x++) begin
      wr[x] = in_v && (wsel == x[0]) && phase[x];
      rd[x] = !phase[x];
      if (rd[x]) out_v = 1'b1;
      en[x] = wr[x] || rd[x];
    end
    out_last = out_v && cnt[rsel] == beats;
    out_exp  = xp[rsel];
    raw      = q[rsel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int x = 0; x < NB; x++) begin
        phase[x] <= 1'b1;
        cnt[x]   <= '0;
        sf[x]    <= '0;
        xp[x]    <= '0;
      end
      wsel_q <= 1'b0;
      rsel_q <= 1'b0;
    end else begin
      if (wr[wsel] && cnt[wsel] == beats && dup_en) wsel_q <= !wsel_q;
      if (rd[rsel] && cnt[rsel] == beats && dup_en) rsel_q <= !rsel_q;
      for (int x = 0; x < NB; x++) begin
        if (en[x]) begin
          cnt[x] <= (cnt[x] == beats) ? '0 : cnt[x] + 1'b1;
          if (cnt[x] == beats) phase[x] <= !phase[x];
          if (wr[x] && cnt[x] == beats) begin
            sf[x] <= factor;
            xp[x] <= in_exp + EXP_W'(factor);
          end
        end
      end
    end
  end

  bfp_unit u_bfp (
    .clk(clk), .rst_n(rst_n),
    .det_v(in_v), .det_clr(cnt[wsel] == 0), .det_d(din), .factor(factor),
    .sh_k(sf[rsel]), .sh_d(raw), .sh_q(dout)
  );

  for (genvar x = 0; x < NB; x++) begin : g_bank
    if (TYPE_B) begin : g_b
      // zone 1 (upper rows) moves every M/64 input beats and on every output beat
      logic [9:0] zone;                 // M/64 - 1 (zone-1 period)
      logic       z1;
      always_comb begin
        zone = (lg_m >= 4'd6) ? 10'((1 << (int'(lg_m) - 6)) - 1) : '0;
        z1   = rd[x] || (wr[x] && cnt[x] != 0 && (cnt[x] & zone) == 0);
      end
      rb_b #(.MAXW(MAXW)) u_rb (
        .clk(clk), .lg_m(lg_m), .phase(phase[x]), .en(en[x]), .z1_en(z1),
        .din(din), .dout(q[x]));
    end else begin : g_a
      rb_a u_rb (
        .clk(clk), .lg_m(lg_m[2:0]), .phase(phase[x]), .en(en[x]),
        .din(din), .dout(q[x]));
    end
  end


  // A bank never receives data in its output phase.
  property p_no_write_while_full;
    @(posedge clk) disable iff (!rst_n) in_v |-> phase[wsel];
  endproperty
  a_no_write_while_full: assert property (p_no_write_while_full);
endmodule
