// sad_tree: SAD Tree Block (STB).
//
// Turns the 32x32 absolute differences of one search position into the 165
// partition SADs of a 32x32 CTU (every CU from 32x32 down to 8x8 with its
// square, symmetric and asymmetric partitions; order in ime_pkg).
//
// How it works: a ten-stage pipeline of pairwise additions.  Each stage adds
// neighbouring pairs of rows or of columns of the previous stage's grid,
// halving its height or width, and partition SADs are taken from the grid
// where their shape first appears.  Finished SADs ride along in a
// 165-entry result vector, registered with every stage, so that all 165
// leave together.  Grid sizes are written rows x columns of blocks, each
// block w x h pixels:
//   1: 16x32 of 1x2      2: 16x16 of 2x2      3: 8x16 of 2x4
//   4: 8x8 of 4x4
//   5: 8x4 of 8x4 (8x8 2NxN)   and 4x8 of 4x8 (8x8 Nx2N)
//   6: 4x4 of 8x8 (8x8 2Nx2N, 16x16 NxN), 8x2 of 16x4, 2x8 of 4x16
//   7: 4x2 of 16x8 (16x16 2NxN), 2x4 of 8x16 (16x16 Nx2N),
//      16x16 AMP parts from the 16x4 and 4x16 strips (one or three strips)
//   8: 2x2 of 16x16 (16x16 2Nx2N, 32x32 NxN), 4x1 of 32x8, 1x4 of 8x32
//   9: 2x1 of 32x16 (32x32 2NxN), 1x2 of 16x32 (32x32 Nx2N),
//      32x32 AMP parts from the 32x8 and 8x32 strips
//  10: 1x1 of 32x32 (32x32 2Nx2N)
// The stage list and the count of ten stages follow the design's
// aggregation diagram; forming each AMP part as the sum of one or three
// strips, and the order of the additions within a stage, are this design's.
//
// All 165 results share the type sad_t (18 bits, enough for 32x32
// pixels); for the small partitions the upper bits are constant zero (the
// 8x4 and 4x8 SADs, for instance, need only 13), and synthesis removes them.
//
// Interface/timing: ad_i[row][col] with valid_i in; sad_o with valid_o
// exactly 10 cycles later.  Fully pipelined, one position per cycle.  The
// valid pipeline is reset; data registers are not.
module sad_tree
  import ime_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid_i,
  input  pix_t ad_i  [CTU][CTU],   // [row][column]
  output logic valid_o,
  output sad_t sad_o [NUM_SADS]
);
  localparam int unsigned LAT = 10;

  typedef logic [PIX_W:0]   w1_t;  // 2 pixels
  typedef logic [PIX_W+1:0] w2_t;  // 4 pixels
  typedef logic [PIX_W+2:0] w3_t;  // 8 pixels
  typedef logic [PIX_W+3:0] w4_t;  // 16 pixels

  // Stage grids.
  w1_t  a1 [16][32];
  w2_t  a2 [16][16];
  w3_t  a3 [8][16];
  w4_t  a4 [8][8];
  sad_t h8 [8][4], v8 [4][8];
  sad_t s8 [4][4], h16q [8][2], v16q [2][8];
  sad_t h16 [4][2], v16 [2][4];
  sad_t s16 [2][2], h32q [4], v32q [4];
  sad_t h32 [2];
  // Result vectors carried with stages 5 to 10.
  sad_t res5 [NUM_SADS], res6 [NUM_SADS], res7 [NUM_SADS];
  sad_t res8 [NUM_SADS], res9 [NUM_SADS], res10 [NUM_SADS];

  logic [LAT-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], valid_i};
  end
  assign valid_o = vld[LAT-1];

  // Stages 1 to 4: reduce to the 8x8 grid of 4x4 block SADs.
  always_ff @(posedge clk) begin
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 32; c++)
        a1[r][c] <= w1_t'(ad_i[2*r][c]) + w1_t'(ad_i[2*r+1][c]);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        a2[r][c] <= w2_t'(a1[r][2*c]) + w2_t'(a1[r][2*c+1]);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 16; c++)
        a3[r][c] <= w3_t'(a2[2*r][c]) + w3_t'(a2[2*r+1][c]);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        a4[r][c] <= w4_t'(a3[r][2*c]) + w4_t'(a3[r][2*c+1]);
  end

  // Stage 5: 8x4 and 4x8 pixel blocks, the 8x8 2NxN and Nx2N SADs.
  always_ff @(posedge clk) begin
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 4; c++)
        h8[r][c] <= sad_t'(a4[r][2*c]) + sad_t'(a4[r][2*c+1]);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 8; c++)
        v8[r][c] <= sad_t'(a4[2*r][c]) + sad_t'(a4[2*r+1][c]);
    for (int i = 0; i < NUM_SADS; i++) res5[i] <= '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        for (int p = 0; p < 2; p++) begin
          res5[IDX_8_2NXN + 2*(4*r+c) + p] <= sad_t'(a4[2*r+p][2*c]) + sad_t'(a4[2*r+p][2*c+1]);
          res5[IDX_8_NX2N + 2*(4*r+c) + p] <= sad_t'(a4[2*r][2*c+p]) + sad_t'(a4[2*r+1][2*c+p]);
        end
  end

  // Stage 6: 8x8 blocks and the 16x4 / 4x16 strips.
  always_ff @(posedge clk) begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        s8[r][c] <= h8[2*r][c] + h8[2*r+1][c];
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 2; c++)
        h16q[r][c] <= h8[r][2*c] + h8[r][2*c+1];
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 8; c++)
        v16q[r][c] <= v8[2*r][c] + v8[2*r+1][c];
    res6 <= res5;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        res6[IDX_8_2NX2N + 4*r + c] <= h8[2*r][c] + h8[2*r+1][c];
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++)
        for (int i = 0; i < 2; i++)
          for (int j = 0; j < 2; j++)
            res6[IDX_16_NXN + 4*(2*r+c) + 2*i + j] <= h8[2*(2*r+i)][2*c+j] + h8[2*(2*r+i)+1][2*c+j];
  end

  // Stage 7: 16x8 and 8x16 blocks, 16x16 asymmetric partitions.
  always_ff @(posedge clk) begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 2; c++)
        h16[r][c] <= s8[r][2*c] + s8[r][2*c+1];
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 4; c++)
        v16[r][c] <= s8[2*r][c] + s8[2*r+1][c];
    res7 <= res6;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        for (int p = 0; p < 2; p++) begin
          res7[IDX_16_2NXN + 2*(2*r+c) + p] <= s8[2*r+p][2*c] + s8[2*r+p][2*c+1];
          res7[IDX_16_NX2N + 2*(2*r+c) + p] <= s8[2*r][2*c+p] + s8[2*r+1][2*c+p];
        end
        res7[IDX_16_2NXNU + 2*(2*r+c)]     <= h16q[4*r][c];
        res7[IDX_16_2NXNU + 2*(2*r+c) + 1] <= h16q[4*r+1][c] + h16q[4*r+2][c] + h16q[4*r+3][c];
        res7[IDX_16_2NXND + 2*(2*r+c)]     <= h16q[4*r][c] + h16q[4*r+1][c] + h16q[4*r+2][c];
        res7[IDX_16_2NXND + 2*(2*r+c) + 1] <= h16q[4*r+3][c];
        res7[IDX_16_NLX2N + 2*(2*r+c)]     <= v16q[r][4*c];
        res7[IDX_16_NLX2N + 2*(2*r+c) + 1] <= v16q[r][4*c+1] + v16q[r][4*c+2] + v16q[r][4*c+3];
        res7[IDX_16_NRX2N + 2*(2*r+c)]     <= v16q[r][4*c] + v16q[r][4*c+1] + v16q[r][4*c+2];
        res7[IDX_16_NRX2N + 2*(2*r+c) + 1] <= v16q[r][4*c+3];
      end
  end

  // Stage 8: 16x16 blocks and the 32x8 / 8x32 strips.
  always_ff @(posedge clk) begin
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++)
        s16[r][c] <= h16[2*r][c] + h16[2*r+1][c];
    for (int r = 0; r < 4; r++)
      h32q[r] <= h16[r][0] + h16[r][1];
    for (int c = 0; c < 4; c++)
      v32q[c] <= v16[0][c] + v16[1][c];
    res8 <= res7;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        res8[IDX_16_2NX2N + 2*r + c] <= h16[2*r][c] + h16[2*r+1][c];
        res8[IDX_32_NXN   + 2*r + c] <= h16[2*r][c] + h16[2*r+1][c];
      end
  end

  // Stage 9: 32x16 and 16x32 blocks, 32x32 asymmetric partitions.
  always_ff @(posedge clk) begin
    for (int r = 0; r < 2; r++)
      h32[r] <= s16[r][0] + s16[r][1];
    res9 <= res8;
    for (int p = 0; p < 2; p++) begin
      res9[IDX_32_2NXN + p] <= s16[p][0] + s16[p][1];
      res9[IDX_32_NX2N + p] <= s16[0][p] + s16[1][p];
    end
    res9[IDX_32_2NXNU]     <= h32q[0];
    res9[IDX_32_2NXNU + 1] <= h32q[1] + h32q[2] + h32q[3];
    res9[IDX_32_2NXND]     <= h32q[0] + h32q[1] + h32q[2];
    res9[IDX_32_2NXND + 1] <= h32q[3];
    res9[IDX_32_NLX2N]     <= v32q[0];
    res9[IDX_32_NLX2N + 1] <= v32q[1] + v32q[2] + v32q[3];
    res9[IDX_32_NRX2N]     <= v32q[0] + v32q[1] + v32q[2];
    res9[IDX_32_NRX2N + 1] <= v32q[3];
  end

  // Stage 10: the whole 32x32 block.
  always_ff @(posedge clk) begin
    res10 <= res9;
    res10[IDX_32_2NX2N] <= h32[0] + h32[1];
  end

  assign sad_o = res10;

endmodule
