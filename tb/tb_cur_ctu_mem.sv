// tb_cur_ctu_mem: current-CTU memory bank.  All 32 rows are written with
// random pixels, in shuffled order and with some rows written twice; after
// each write the whole array is compared with a model, and a cycle with
// write enable low must leave the contents unchanged.
module tb_cur_ctu_mem;
  import ime_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                   wr_en = 1'b0;
  logic [$clog2(CTU)-1:0] wr_row = '0;
  pix_t                   wr_data [CTU];
  pix_t                   cur [CTU][CTU];
  int                     model [CTU][CTU];
  int checks = 0, failures = 0;

  cur_ctu_mem dut (.clk, .wr_en, .wr_row, .wr_data, .cur_o(cur));

  task automatic compare(input string when);
    int bad;
    bad = 0;
    for (int r = 0; r < CTU; r++)
      for (int c = 0; c < CTU; c++)
        if (int'(cur[r][c]) != model[r][c]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL: %0d pixels differ %s", bad, when);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Initial fill, rows in order, so that every pixel is defined.
    for (int r = 0; r < CTU; r++) begin
      @(negedge clk);
      wr_en = 1'b1;
      wr_row = r[$clog2(CTU)-1:0];
      for (int c = 0; c < CTU; c++) begin
        model[r][c] = $urandom_range(255);
        wr_data[c] = pix_t'(model[r][c]);
      end
    end
    @(negedge clk) wr_en = 1'b0;
    compare("after fill");
    for (int t = 0; t < 100; t++) begin
      int r;
      r = $urandom_range(CTU - 1);
      @(negedge clk);
      wr_en = 1'($urandom_range(1));
      wr_row = r[$clog2(CTU)-1:0];
      for (int c = 0; c < CTU; c++) wr_data[c] = pix_t'($urandom_range(255));
      if (wr_en)
        for (int c = 0; c < CTU; c++) model[r][c] = int'(wr_data[c]);
      @(negedge clk) wr_en = 1'b0;
      compare($sformatf("at step %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
