// in_buf: reconfigurable input buffer. It turns a serial stream of complex
// samples, one per clock, into the 8-lane beats the FFT core expects: output
// beat i of an N-point frame carries sample i + (N/8)k on lane k.
//
// Structure: seven rows of MAXC two-input registers plus one input register,
// 7N/8 + 1 words for the largest N. For N points only the rightmost C = N/8
// columns of each row are clocked. A frame is eight blocks of C samples.
// Blocks 0..6 enter the bottom row (row 0) at its leftmost used column, and
// the row shifts right once per sample. When a new block starts, the upper
// rows shift up by one row at the same time, taking the finished block with
// them. After block 6, row h holds block 6-h, first sample in the rightmost
// column. Block 7 is never stored. While its C samples arrive, all seven
// rows shift right once per sample. Lane k < 7 of the output is the rightmost
// cell of row 6-k, and lane 7 is the sample itself. So the frame leaves as C
// beats during its last C samples, and the buffer is empty again when the
// next frame starts. Frames can follow each other without a gap.
//
// Interface and timing: in_data is taken when in_valid is high (gaps are
// allowed and freeze the buffer). lg (4..12) is sampled with the first sample
// of each frame. The input register adds one cycle: output beat i appears,
// with out_valid high, on the cycle after sample 7C + i was taken. out_last
// marks the last beat of a frame. There is no back-pressure, so the consumer
// must take every beat.
//
// The arrangement (upper rows shift up every C samples, shift right to
// deliver, 7N/8 + 1 words) follows the document's description. The row
// orientation, the direct path for the last block and the enable scheme are
// this design's choices. rmr_fft instantiates the buffer as its optional
// serial input (ser_mode); its parallel input takes 8-lane beats directly.
module in_buf
  import rmr_pkg::*;
#(
  parameter int MAXC = 512             // columns per row: N/8 for the largest N, 4096
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] lg,               // log2 N, sampled with a frame's first sample
  input  logic       in_valid,
  input  cplx_t      in_data,
  output logic       out_valid,
  output vec_t       out_data,
  output logic       out_last
);
  cplx_t      row [7][MAXC];           // [row, 0 = bottom][column]
  cplx_t      din_q;                   // the "+1" input register
  logic       v_q;
  logic [3:0] lg_in_q, lg_q, lg_e;
  logic [11:0] n;                      // sample index inside the frame
  logic [11:0] t;                      // index inside the block
  logic [2:0]  blk;                    // block 0..7
  int          s;                      // leftmost used column
  logic        fill, drain, up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q     <= 1'b0;
      din_q   <= '0;
      lg_in_q <= 4'd4;
      lg_q    <= 4'd4;
      n       <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        din_q   <= in_data;
        lg_in_q <= (lg < 4'(LG_MIN)) ? 4'(LG_MIN) : (lg > 4'(LG_MAX)) ? 4'(LG_MAX) : lg;
      end
      if (v_q) begin
        if (n == 0) lg_q <= lg_in_q;
        n <= (n == 12'((1 << int'(lg_e)) - 1)) ? '0 : n + 1'b1;
      end
    end
  end

  always_comb begin
    lg_e  = (n == 0) ? lg_in_q : lg_q;
    t     = n & 12'((1 << (int'(lg_e) - 3)) - 1);
    blk   = 3'(n >> (int'(lg_e) - 3));
    s     = MAXC - (1 << (int'(lg_e) - 3));
    fill  = v_q && blk != 3'd7;
    drain = v_q && blk == 3'd7;
    up    = fill && t == 0 && blk != 3'd0;
  end

  for (genvar h = 0; h < 7; h++) begin : g_row
    for (genvar c = 0; c < MAXC; c++) begin : g_col
      cplx_t nxt;
      logic  clk_en;
      always_comb begin
        if (h == 0) begin
          nxt    = (c == s) ? din_q : row[0][(c > 0) ? c - 1 : 0];
          clk_en = (fill || drain) && c >= s;
        end else begin
          nxt    = up ? row[(h > 0) ? h - 1 : 0][c] : ((c == s) ? '0 : row[h][(c > 0) ? c - 1 : 0]);
          clk_en = (up || drain) && c >= s;
        end
      end
      always_ff @(posedge clk) if (clk_en) row[h][c] <= nxt;
    end
  end

  always_comb begin
    out_valid = drain;
    out_last  = drain && t == 12'((1 << (int'(lg_e) - 3)) - 1);
    for (int k = 0; k < 7; k++) out_data[k] = row[6-k][MAXC-1];
    out_data[7] = din_q;
  end
endmodule
