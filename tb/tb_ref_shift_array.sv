// tb_ref_shift_array: the propagation registers.  32 downward shifts fill
// the array; then 400 random commands (down, up, right, hold) with random
// new rows and columns are applied, and after each the whole 32x32 window
// is compared with a model that moves the window explicitly.
module tb_ref_shift_array;
  import ime_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  shift_e shift = SHIFT_HOLD;
  pix_t   row_i [CTU], col_i [CTU];
  pix_t   win [CTU][CTU];
  int     model [CTU][CTU], nxt [CTU][CTU];
  int     nmode [4];
  int checks = 0, failures = 0;

  ref_shift_array dut (.clk, .shift_i(shift), .row_i, .col_i, .win_o(win));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input shift_e m);
    for (int i = 0; i < CTU; i++) begin
      row_i[i] = pix_t'($urandom_range(255));
      col_i[i] = pix_t'($urandom_range(255));
    end
    shift = m;
    for (int r = 0; r < CTU; r++)
      for (int c = 0; c < CTU; c++) begin
        case (m)
          SHIFT_DOWN:  nxt[r][c] = (r == CTU-1) ? int'(row_i[c]) : model[r+1][c];
          SHIFT_UP:    nxt[r][c] = (r == 0) ? int'(row_i[c]) : model[r-1][c];
          SHIFT_RIGHT: nxt[r][c] = (c == CTU-1) ? int'(col_i[r]) : model[r][c+1];
          default:     nxt[r][c] = model[r][c];
        endcase
      end
    model = nxt;
    nmode[int'(m)]++;
    @(negedge clk);
    shift = SHIFT_HOLD;
  endtask

  initial begin
    @(negedge clk);
    for (int r = 0; r < CTU; r++) apply(SHIFT_DOWN);
    for (int t = 0; t < 400; t++) begin
      int bad;
      apply(shift_e'($urandom_range(3)));
      bad = 0;
      for (int r = 0; r < CTU; r++)
        for (int c = 0; c < CTU; c++)
          if (int'(win[r][c]) != model[r][c]) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        if (failures < 10) $display("FAIL: step %0d: %0d pixels wrong", t, bad);
      end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (nmode[m] == 0) begin failures++; $display("FAIL: mode %0d never used", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
