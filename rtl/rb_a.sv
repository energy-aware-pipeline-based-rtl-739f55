// rb_a: reconfigurable register bank of the RB_64 type (16, 32 or 64 words).
//
// An 8 x 8 array of two-input registers sits between the last radix-8 stage
// and the reconfigurable butterfly. A block of M words arrives in M/8 beats;
// on beat i lane k carries block index i + (M/8)k. The next butterfly wants
// index 8j + k on lane k at output beat j. With L = M/8, lane k owns a
// segment of L registers in row 7 - (k*L)/8, columns (k*L)%8 .. +L-1: during
// the input phase (phase = 1) the segment shifts towards its low column and
// takes din[k] at its high column, so after L beats row 7-j holds indices
// 8j..8j+7. During the output phase (phase = 0) every row moves one row
// down and row 7 is the output. The single PHASE signal is the input select
// of every two-input register; the multiplexers that steer din[k] to the
// segment ends are the cost of reconfiguration. Only rows 8-L..7 are
// clocked, the rest stay idle (power partitions: rows 6-7, rows 4-5,
// rows 0-3). en is the clock enable of one beat (clock gating modelled as an
// enable). dout is row 7, valid in the output phase.
module rb_a
  import rmr_pkg::*;
(
  input  logic       clk,
  input  logic [2:0] lg_m,    // log2 capacity: 4, 5 or 6
  input  logic       phase,   // 1: input phase, 0: output phase
  input  logic       en,
  input  vec_t       din,
  output vec_t       dout
);
  cplx_t g [8][8];   // [row][column]
  int unsigned L;

  always_comb L = 1 << (lg_m - 3);

  always_ff @(posedge clk) begin
    if (en) begin
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) begin
          if (r >= 8 - int'(L)) begin
            if (phase) begin
              if (c % int'(L) == int'(L) - 1) g[r][c] <= din[(7 - r) * (8 / int'(L)) + c / int'(L)];
              else                            g[r][c] <= g[r][c+1];
            end else if (r > 0) begin
              g[r][c] <= g[r-1][c];
            end
          end
        end
      end
    end
  end

  always_comb for (int k = 0; k < LANES; k++) dout[k] = g[7][k];
endmodule
