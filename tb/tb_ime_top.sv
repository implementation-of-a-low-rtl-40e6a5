// tb_ime_top: end-to-end test of the motion estimator at a reduced search
// area (SR = 8, reference area 39x39).
//
// Three searches run back to back on the same instance:
//   1. the current CTU is a copy of the reference block at (5,3) plus small
//      noise, so every partition has a clear best position;
//   2. fully random pixels;
//   3. a flat reference area equal to the CTU, so every position ties and
//      the first position in scan order (0,0) must win everywhere.
// For each, all 165 minimum SADs and positions are compared with an
// independent full search (ime_ref_pkg), and the latency from the edge that
// samples start to the edge that raises done is checked to be SR*SR + 44.
// It also counts how often each mechanism ran: downward, upward and
// rightward moves of the propagation registers, the 32-row preload,
// minimum replacements in the comparator and ties kept.
module tb_ime_top;
  import ime_pkg::*;
  import ime_ref_pkg::*;

  localparam int SR  = 8;
  localparam int RW  = SR + CTU - 1;
  localparam int AW  = $clog2(RW);
  localparam int PW  = $clog2(SR);

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

  ime_top #(.SR(SR)) dut (
    .clk, .rst_n,
    .cur_wr_en, .cur_wr_row, .cur_wr_data,
    .ref_wr_en, .ref_wr_x, .ref_wr_y, .ref_wr_pix,
    .start, .busy_o(busy), .done_o(done),
    .min_sad_o(min_sad), .best_x_o(best_x), .best_y_o(best_y)
  );

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_down = 0, n_up = 0, n_right = 0, n_replace = 0, n_tie = 0, n_preload = 0;
  always @(posedge clk) begin
    case (dut.shift)
      SHIFT_DOWN:  n_down++;
      SHIFT_UP:    n_up++;
      SHIFT_RIGHT: n_right++;
      default: ;
    endcase
    if (dut.u_ctrl.state == 2'd1 && dut.u_ctrl.ld_cnt == 5'd31) n_preload++;
    if (dut.u_cmp.valid_i && !dut.u_cmp.first_i)
      for (int i = 0; i < NUM_SADS; i++) begin
        if (dut.u_cmp.sad_i[i] < dut.u_cmp.min_sad_o[i]) n_replace++;
        else if (dut.u_cmp.sad_i[i] == dut.u_cmp.min_sad_o[i]) n_tie++;
      end
  end

  int cur [N][N];
  int refa [];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic load_and_run();
    int best [NS], bx [NS], by [NS];
    int lat;
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
    // Count edges from the one that samples start to the one that raises
    // done, both included.
    @(negedge clk) start = 1'b1;
    @(posedge clk);
    lat = 1;
    @(negedge clk) start = 1'b0;
    check(busy == 1'b1, "busy after start");
    forever begin
      @(posedge clk);
      lat++;
      #1;
      if (done) break;
    end
    check(lat == SR*SR + 44, $sformatf("latency %0d, expected %0d", lat, SR*SR + 44));
    @(negedge clk);
    check(busy == 1'b0, "idle after done");
    for (int i = 0; i < NS; i++) begin
      check(int'(min_sad[i]) == best[i],
            $sformatf("partition %0d SAD %0d, expected %0d", i, min_sad[i], best[i]));
      check(int'(best_x[i]) == bx[i] && int'(best_y[i]) == by[i],
            $sformatf("partition %0d at (%0d,%0d), expected (%0d,%0d)", i,
                      best_x[i], best_y[i], bx[i], by[i]));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    refa = new[RW*RW];
    for (int c = 0; c < N; c++) cur_wr_data[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1: CTU taken from the reference at (5,3) with noise.
    for (int i = 0; i < RW*RW; i++) refa[i] = $urandom_range(255);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int v;
        v = refa[(3 + r)*RW + 5 + c] + int'($urandom_range(4)) - 2;
        cur[r][c] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    load_and_run();
    $display("32x32 best at (%0d,%0d) SAD %0d", best_x[IDX_32_2NX2N], best_y[IDX_32_2NX2N], min_sad[IDX_32_2NX2N]);
    check(best_x[IDX_32_2NX2N] == PW'(5) && best_y[IDX_32_2NX2N] == PW'(3), "32x32 vector is (5,3)");

    // 2: random.
    for (int i = 0; i < RW*RW; i++) refa[i] = $urandom_range(255);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) cur[r][c] = $urandom_range(255);
    load_and_run();

    // 3: flat: all positions tie.
    for (int i = 0; i < RW*RW; i++) refa[i] = 77;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) cur[r][c] = 70 + (r + c) % 3;
    load_and_run();

    $display("mechanisms: preload=%0d down=%0d up=%0d right=%0d replace=%0d tie=%0d",
             n_preload, n_down, n_up, n_right, n_replace, n_tie);
    check(n_preload == 3, "preload ran once per search");
    check(n_down  > 0, "downward moves happened");
    check(n_up    > 0, "upward moves happened");
    check(n_right == 3 * (SR - 1), "one rightward move per column change");
    check(n_replace > 0, "comparator replaced a minimum");
    check(n_tie > 0, "comparator kept a tie");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
