// scan_check: one scan_ctrl instance with its checker, used by
// tb_scan_ctrl.  Holds the window as pixel coordinates and checks every
// tagged position (see tb_scan_ctrl).  done rises after the last position
// of a search has been checked.
module scan_check
  import ime_pkg::*;
  import ime_ref_pkg::snake_pos;
#(
  parameter int SR = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done
);
  localparam int RW = SR + CTU - 1;
  localparam int AW = $clog2(RW);
  localparam int PW = (SR > 1) ? $clog2(SR) : 1;

  logic          busy, rd_row_en, rd_col_en;
  logic [AW-1:0] rd_row_y, rd_row_x, rd_col_x, rd_col_y;
  shift_e        shift;
  logic          tv, tf, tl;
  logic [PW-1:0] tx, ty;

  scan_ctrl #(.SR(SR)) dut (
    .clk, .rst_n, .start_i(start), .busy_o(busy),
    .rd_row_en_o(rd_row_en), .rd_row_y_o(rd_row_y), .rd_row_x_o(rd_row_x),
    .rd_col_en_o(rd_col_en), .rd_col_x_o(rd_col_x), .rd_col_y_o(rd_col_y),
    .shift_o(shift), .tag_valid_o(tv), .tag_x_o(tx), .tag_y_o(ty),
    .tag_first_o(tf), .tag_last_o(tl));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (SR=%0d): %s", SR, what);
    end
  endtask

  // Memory model output: coordinates (y*RW + x) of the segment read.
  int rowq [CTU], colq [CTU];
  // Window of coordinates.
  int win [CTU][CTU];
  int k = 0, edges = 0;
  logic pend_v = 1'b0;
  int pend_x, pend_y;
  logic pend_l;
  bit seen [SR*SR];

  always @(posedge clk) begin
    // Propagation registers, using last cycle's memory output.
    case (shift)
      SHIFT_DOWN: begin
        for (int r = 0; r < CTU-1; r++) win[r] = win[r+1];
        for (int c = 0; c < CTU; c++) win[CTU-1][c] = rowq[c];
      end
      SHIFT_UP: begin
        for (int r = CTU-1; r > 0; r--) win[r] = win[r-1];
        for (int c = 0; c < CTU; c++) win[0][c] = rowq[c];
      end
      SHIFT_RIGHT:
        for (int r = 0; r < CTU; r++) begin
          for (int c = 0; c < CTU-1; c++) win[r][c] = win[r][c+1];
          win[r][CTU-1] = colq[r];
        end
      default: ;
    endcase
    // Memory, synchronous read.
    if (rd_row_en) for (int i = 0; i < CTU; i++) rowq[i] = int'(rd_row_y) * RW + int'(rd_row_x) + i;
    if (rd_col_en) for (int i = 0; i < CTU; i++) colq[i] = (int'(rd_col_y) + i) * RW + int'(rd_col_x);
    check(!(rd_row_en && rd_col_en), "one read per cycle");
  end

  always @(negedge clk) begin
    if (!rst_n) begin
      done <= 1'b0;
    end else begin
      if (start && !busy) begin
        k = 0;
        edges = -1;   // becomes 1 at the negedge after the edge sampling start
        done <= 1'b0;
        for (int i = 0; i < SR*SR; i++) seen[i] = 1'b0;
      end
      edges++;
      // Window content for the tag of the previous cycle.
      if (pend_v) begin
        int bad;
        bad = 0;
        for (int r = 0; r < CTU; r++)
          for (int c = 0; c < CTU; c++)
            if (win[r][c] != (pend_y + r) * RW + pend_x + c) bad++;
        check(bad == 0, $sformatf("window at (%0d,%0d) has %0d wrong pixels", pend_x, pend_y, bad));
        if (pend_l) begin
          check(!busy, "busy low after the last position");
          done <= 1'b1;
        end
      end
      pend_v = tv;
      if (tv) begin
        int ex, ey;
        snake_pos(k, SR, ex, ey);
        check(int'(tx) == ex && int'(ty) == ey,
              $sformatf("tag %0d at (%0d,%0d), expected (%0d,%0d)", k, tx, ty, ex, ey));
        check(tf == (k == 0), "first flag");
        check(tl == (k == SR*SR - 1), "last flag");
        check(!seen[int'(ty)*SR + int'(tx)], "position visited twice");
        seen[int'(ty)*SR + int'(tx)] = 1'b1;
        if (tl) check(edges == SR*SR + 31,
                      $sformatf("last tag after %0d edges, expected %0d", edges, SR*SR + 31));
        pend_x = int'(tx);
        pend_y = int'(ty);
        pend_l = tl;
        k++;
      end
    end
  end
endmodule
