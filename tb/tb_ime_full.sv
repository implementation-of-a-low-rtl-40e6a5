// tb_ime_full: one complete search with the motion estimator at its default
// size, a 64x64 search area in a 95x95 reference area.
//
// The current CTU is the reference block at (41,22) plus noise of +-2.  All
// 165 minimum SADs and their positions are compared with an independent
// full search (ime_ref_pkg), the 32x32 vector must be (41,22), and done must
// rise exactly 4140 cycles after start is sampled (edges counted inclusive).
module tb_ime_full;
  import ime_pkg::*;
  import ime_ref_pkg::*;

  localparam int SR = 64;
  localparam int RW = SR + CTU - 1;
  localparam int AW = $clog2(RW);
  localparam int PW = $clog2(SR);
  localparam int PX = 41, PY = 22;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   cur_wr_en = 1'b0;
  logic [$clog2(CTU)-1:0] cur_wr_row = '0;
  pix_t                   cur_wr_data [CTU];
  logic                   ref_wr_en = 1'b0;
  logic [AW-1:0]          ref_wr_x = '0, ref_wr_y = '0;
  pix_t                   ref_wr_pix = '0;
  logic                   start = 1'b0, busy, done;
  sad_t                   min_sad [NUM_SADS];
  logic [PW-1:0]          best_x [NUM_SADS], best_y [NUM_SADS];

  ime_top dut (
    .clk, .rst_n,
    .cur_wr_en, .cur_wr_row, .cur_wr_data,
    .ref_wr_en, .ref_wr_x, .ref_wr_y, .ref_wr_pix,
    .start, .busy_o(busy), .done_o(done),
    .min_sad_o(min_sad), .best_x_o(best_x), .best_y_o(best_y)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int cur [N][N];
  int refa [];
  int best [NS], bx [NS], by [NS];
  int lat;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    refa = new[RW*RW];
    for (int c = 0; c < N; c++) cur_wr_data[c] = '0;
    for (int i = 0; i < RW*RW; i++) refa[i] = $urandom_range(255);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int v;
        v = refa[(PY + r)*RW + PX + c] + int'($urandom_range(4)) - 2;
        cur[r][c] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < N; r++) begin
      @(negedge clk);
      cur_wr_en = 1'b1;
      cur_wr_row = r[$clog2(CTU)-1:0];
      for (int c = 0; c < N; c++) cur_wr_data[c] = pix_t'(cur[r][c]);
    end
    @(negedge clk) cur_wr_en = 1'b0;
    for (int y = 0; y < RW; y++)
      for (int x = 0; x < RW; x++) begin
        @(negedge clk);
        ref_wr_en = 1'b1;
        ref_wr_x = AW'(x);
        ref_wr_y = AW'(y);
        ref_wr_pix = pix_t'(refa[y*RW + x]);
      end
    @(negedge clk) ref_wr_en = 1'b0;
    full_search(cur, refa, SR, best, bx, by);

    @(negedge clk) start = 1'b1;
    @(posedge clk);
    lat = 1;
    @(negedge clk) start = 1'b0;
    forever begin
      @(posedge clk);
      lat++;
      #1;
      if (done) break;
    end
    $display("search latency %0d cycles", lat);
    check(lat == 4140, $sformatf("latency %0d, expected 4140", lat));
    for (int i = 0; i < NS; i++) begin
      check(int'(min_sad[i]) == best[i],
            $sformatf("partition %0d SAD %0d, expected %0d", i, min_sad[i], best[i]));
      check(int'(best_x[i]) == bx[i] && int'(best_y[i]) == by[i],
            $sformatf("partition %0d at (%0d,%0d), expected (%0d,%0d)", i,
                      best_x[i], best_y[i], bx[i], by[i]));
    end
    check(best_x[IDX_32_2NX2N] == PW'(PX) && best_y[IDX_32_2NX2N] == PW'(PY), "32x32 vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
