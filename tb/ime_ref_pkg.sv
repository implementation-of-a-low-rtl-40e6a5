// ime_ref_pkg: reference model shared by the motion-estimator testbenches.
//
// part_rect() gives the rectangle, inside the 32x32 CTU, of each of the 165
// results, built from the HEVC partition shapes and the documented result
// order (32x32 CU: 2Nx2N, 2NxN, Nx2N, NxN, nLx2N, nRx2N, 2NxnU, 2NxnD;
// 16x16 CUs: the same eight; 8x8 CUs: 2Nx2N, 2NxN, Nx2N; CUs in raster
// order, parts top before bottom and left before right).  rect_sad() sums
// absolute differences over a rectangle directly from pixels, and
// full_search() runs the whole search in snake order with the
// first-found-wins tie rule.  Nothing here reuses the adder-tree structure.
package ime_ref_pkg;

  localparam int N = 32;
  localparam int NS = 165;

  // Part p of mode m for a CU of size s, relative to the CU.
  function automatic void mode_part(input int m, input int p, input int s,
                                    output int x, output int y, output int w, output int h);
    int q = s / 4;
    int hlf = s / 2;
    x = 0; y = 0; w = s; h = s;
    case (m)
      0: ;                                                          // 2Nx2N
      1: begin h = hlf; y = p * hlf; end                            // 2NxN
      2: begin w = hlf; x = p * hlf; end                            // Nx2N
      3: begin w = hlf; h = hlf; x = (p % 2) * hlf; y = (p / 2) * hlf; end  // NxN
      4: begin w = (p == 0) ? q : s - q;  x = (p == 0) ? 0 : q; end          // nLx2N
      5: begin w = (p == 0) ? s - q : q;  x = (p == 0) ? 0 : s - q; end      // nRx2N
      6: begin h = (p == 0) ? q : s - q;  y = (p == 0) ? 0 : q; end          // 2NxnU
      default: begin h = (p == 0) ? s - q : q; y = (p == 0) ? 0 : s - q; end // 2NxnD
    endcase
  endfunction

  function automatic int mode_parts(input int m);
    case (m)
      0: return 1;
      3: return 4;
      default: return 2;
    endcase
  endfunction

  function automatic void part_rect(input int idx,
                                    output int x, output int y, output int w, output int h);
    int k = 0;
    x = 0; y = 0; w = 0; h = 0;
    for (int lvl = 0; lvl < 3; lvl++) begin
      int s = 32 >> lvl;
      int nm = (lvl == 2) ? 3 : 8;
      int ncu = N / s;
      for (int m = 0; m < nm; m++)
        for (int cu = 0; cu < ncu * ncu; cu++)
          for (int p = 0; p < mode_parts(m); p++) begin
            if (k == idx) begin
              int px, py, pw, ph;
              mode_part(m, p, s, px, py, pw, ph);
              x = (cu % ncu) * s + px;
              y = (cu / ncu) * s + py;
              w = pw;
              h = ph;
            end
            k++;
          end
    end
  endfunction

  // Position k of the snake scan over an sr x sr search area.
  function automatic void snake_pos(input int k, input int sr, output int x, output int y);
    x = k / sr;
    y = (x % 2 == 0) ? (k % sr) : (sr - 1 - (k % sr));
  endfunction

  // Full search over a reference area of (sr+31)^2 pixels, row-major in refa.
  function automatic void full_search(input int cur [N][N], input int refa [], input int sr,
                                      output int best [NS], output int bx [NS], output int by [NS]);
    int rw = sr + N - 1;
    int px [NS], py [NS], pw [NS], ph [NS];
    for (int i = 0; i < NS; i++) part_rect(i, px[i], py[i], pw[i], ph[i]);
    for (int k = 0; k < sr * sr; k++) begin
      int x, y;
      int ii [N+1][N+1];   // integral image of |cur - ref|
      snake_pos(k, sr, x, y);
      for (int r = 0; r <= N; r++) begin ii[r][0] = 0; ii[0][r] = 0; end
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          int d = cur[r][c] - refa[(y + r) * rw + x + c];
          if (d < 0) d = -d;
          ii[r+1][c+1] = d + ii[r][c+1] + ii[r+1][c] - ii[r][c];
        end
      for (int i = 0; i < NS; i++) begin
        int s = ii[py[i]+ph[i]][px[i]+pw[i]] - ii[py[i]][px[i]+pw[i]]
              - ii[py[i]+ph[i]][px[i]] + ii[py[i]][px[i]];
        if (k == 0 || s < best[i]) begin
          best[i] = s; bx[i] = x; by[i] = y;
        end
      end
    end
  endfunction

endpackage
