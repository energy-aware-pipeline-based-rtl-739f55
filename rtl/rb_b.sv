// rb_b: reconfigurable register bank of the RB_512 / RB_4096 type.
//
// Eight basic blocks (one per input lane) of 8 rows x MAXW two-input
// registers are chained one after another. For capacity M only the right-
// most M/64 columns of each block are used (M/64 = MAXW, MAXW/2, MAXW/4).
// Input phase (phase = 1), M/8 beats: lane b enters the bottom row of block b
// at its leftmost used column and the bottom row shifts right on every beat
// (zone 2, clock en); every M/64 beats the upper rows shift up one row
// (zone 1, clock z1_en), so a block ends up holding its M/8 words row by row,
// the first row on top. Output phase (phase = 0), M/8 beats: all rows of all
// blocks shift right (zone 1 is clocked with zone 2), the used column next to
// the left edge takes the right column of the next block, and the right
// column of block 0 is the output: lane k gets row 7-k. So output beat j
// carries block index b*M/8 + j%(M/64) + (M/64)k with b = j/(M/64), the order
// the following radix-8 stage needs. Columns left of the used ones are never
// clocked (power partitions: right quarter, next quarter, left half).
module rb_b
  import rmr_pkg::*;
#(
  parameter int MAXW = 8        // columns per basic block: 8 (RB_512), 64 (RB_4096)
) (
  input  logic       clk,
  input  logic [3:0] lg_m,      // log2 capacity, log2(16*MAXW) .. log2(64*MAXW)
  input  logic       phase,     // 1: input phase, 0: output phase
  input  logic       en,        // zone-2 clock enable (every beat)
  input  logic       z1_en,     // zone-1 clock enable
  input  vec_t       din,
  output vec_t       dout
);
  cplx_t blk [8][8][MAXW];      // [basic block][row, 0 = bottom][column]
  int    s;                     // leftmost used column

  always_comb s = MAXW - (1 << (int'(lg_m) - 6));

  for (genvar b = 0; b < 8; b++) begin : g_blk
    for (genvar h = 0; h < 8; h++) begin : g_row
      for (genvar c = 0; c < MAXW; c++) begin : g_col
        // One two-input register: input-phase source and output-phase source.
        cplx_t from_in, from_out;
        logic  clk_en;
        always_comb begin
          if (h == 0) from_in = (c == s) ? din[b] : blk[b][h][(c > 0) ? c - 1 : 0];
          else        from_in = blk[b][(h > 0) ? h - 1 : 0][c];
          if (c == s) from_out = (b < 7) ? blk[(b < 7) ? b + 1 : 7][h][MAXW-1] : '0;
          else        from_out = blk[b][h][(c > 0) ? c - 1 : 0];
          clk_en = (c >= s) && (phase ? ((h == 0) ? en : z1_en) : en);
        end
        always_ff @(posedge clk) if (clk_en) blk[b][h][c] <= phase ? from_in : from_out;
      end
    end
  end

  always_comb for (int k = 0; k < LANES; k++) dout[k] = blk[0][7-k][MAXW-1];
endmodule
