// tb_sad_tree: SAD tree block.  A stream of 60 difference arrays (random,
// all-maximum, single hot pixels and sparse patterns) is fed one per cycle,
// with gaps.  Every output is compared with SADs summed directly over each
// partition's rectangle (ime_ref_pkg), and each result must leave exactly
// ten cycles after its input.
module tb_sad_tree;
  import ime_pkg::*;
  import ime_ref_pkg::*;

  localparam int NV = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic valid_i = 1'b0, valid_o;
  pix_t ad [CTU][CTU];
  sad_t sad [NUM_SADS];

  sad_tree dut (.clk, .rst_n, .valid_i, .ad_i(ad), .valid_o, .sad_o(sad));

  int checks = 0, failures = 0;
  int px [NS], py [NS], pw [NS], ph [NS];
  int expv [NV][NS];
  int sendt [NV];
  int cycle = 0, nout = 0, nin = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker.
  always @(negedge clk) begin
    if (rst_n && valid_o) begin
      checks++;
      if (nout >= nin) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        if (cycle - sendt[nout] != 10) begin
          failures++;
          $display("FAIL: latency %0d", cycle - sendt[nout]);
        end
        for (int i = 0; i < NS; i++) begin
          checks++;
          if (int'(sad[i]) != expv[nout][i]) begin
            failures++;
            if (failures < 10) $display("FAIL: out %0d partition %0d got %0d exp %0d", nout, i, sad[i], expv[nout][i]);
          end
        end
      end
      nout++;
    end
  end

  initial begin
    for (int i = 0; i < NS; i++) part_rect(i, px[i], py[i], pw[i], ph[i]);
    for (int r = 0; r < CTU; r++) for (int c = 0; c < CTU; c++) ad[r][c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NV; v++) begin
      @(negedge clk);
      for (int r = 0; r < CTU; r++)
        for (int c = 0; c < CTU; c++) begin
          int val;
          case (v % 4)
            0: val = $urandom_range(255);
            1: val = (v == 1) ? 255 : ($urandom_range(15) == 0 ? $urandom_range(255) : 0);
            2: val = (r == v % CTU && c == (v * 7) % CTU) ? 200 : 0;
            default: val = $urandom_range(3);
          endcase
          ad[r][c] = pix_t'(val);
        end
      for (int i = 0; i < NS; i++) begin
        expv[v][i] = 0;
        for (int r = py[i]; r < py[i] + ph[i]; r++)
          for (int c = px[i]; c < px[i] + pw[i]; c++) expv[v][i] += int'(ad[r][c]);
      end
      sendt[v] = cycle;
      nin = v + 1;
      valid_i = 1'b1;
      if (v % 7 == 6) begin
        @(negedge clk) valid_i = 1'b0;
      end
    end
    @(negedge clk) valid_i = 1'b0;
    repeat (15) @(negedge clk);
    checks++;
    if (nout != NV) begin
      failures++;
      $display("FAIL: %0d outputs, expected %0d", nout, NV);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
