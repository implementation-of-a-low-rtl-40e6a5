// tb_search_area_mem: reference search-area memory at a reduced size
// (SR = 8, 39x39 pixels).  The area is written pixel by pixel with random
// values, then random row and column segment reads, including the last
// valid offsets, are checked one cycle after each request.  A cycle
// without a request must hold the previous segment.
module tb_search_area_mem;
  import ime_pkg::*;

  localparam int SR = 8;
  localparam int RW = SR + CTU - 1;
  localparam int AW = $clog2(RW);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en = 1'b0, rd_row_en = 1'b0, rd_col_en = 1'b0;
  logic [AW-1:0] wr_x = '0, wr_y = '0, rd_row_y = '0, rd_row_x = '0, rd_col_x = '0, rd_col_y = '0;
  pix_t          wr_pix = '0;
  pix_t          row_o [CTU], col_o [CTU];
  int            model [RW][RW];
  int checks = 0, failures = 0;

  search_area_mem #(.SR(SR)) dut (
    .clk, .wr_en, .wr_x, .wr_y, .wr_pix,
    .rd_row_en, .rd_row_y, .rd_row_x, .row_o,
    .rd_col_en, .rd_col_x, .rd_col_y, .col_o);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < RW; y++)
      for (int x = 0; x < RW; x++) begin
        @(negedge clk);
        wr_en = 1'b1;
        wr_x = AW'(x);
        wr_y = AW'(y);
        model[y][x] = $urandom_range(255);
        wr_pix = pix_t'(model[y][x]);
      end
    @(negedge clk) wr_en = 1'b0;
    for (int t = 0; t < 300; t++) begin
      int ry, rx, cx, cy, bad;
      ry = (t == 0) ? RW - 1 : $urandom_range(RW - 1);
      rx = (t == 0) ? SR - 1 : $urandom_range(SR - 1);
      cx = (t == 0) ? RW - 1 : $urandom_range(RW - 1);
      cy = (t == 0) ? SR - 1 : $urandom_range(SR - 1);
      rd_row_en = 1'b1; rd_row_y = AW'(ry); rd_row_x = AW'(rx);
      rd_col_en = 1'b1; rd_col_x = AW'(cx); rd_col_y = AW'(cy);
      @(negedge clk);
      rd_row_en = 1'b0; rd_col_en = 1'b0;
      rd_row_y = '0; rd_row_x = '0; rd_col_x = '0; rd_col_y = '0;
      if (t % 2 == 1) @(negedge clk);   // held output
      bad = 0;
      for (int i = 0; i < CTU; i++) begin
        if (int'(row_o[i]) != model[ry][rx + i]) bad++;
        if (int'(col_o[i]) != model[cy + i][cx]) bad++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        if (failures < 10) $display("FAIL: read %0d: %0d pixels wrong", t, bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
