// cur_ctu_mem: memory bank for the current CTU.
//
// Stores the 32x32 pixels of the CTU being motion-estimated.  All 1024
// pixels are presented at once, so each of the 32 processing units gets its
// 32-pixel column every cycle throughout the search.  It is written one row
// of 32 pixels per cycle (wr_en, wr_row, wr_data) before a search starts and
// is read-only during the search.  The bank itself is part of the design;
// the row-wide write port is this design's choice.
// Timing: a write is visible on cur_o after the edge that performs it.
module cur_ctu_mem
  import ime_pkg::*;
(
  input  logic                   clk,
  input  logic                   wr_en,
  input  logic [$clog2(CTU)-1:0] wr_row,
  input  pix_t                   wr_data [CTU],
  output pix_t                   cur_o   [CTU][CTU]  // [row][column]
);
  pix_t mem [CTU][CTU];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
  end

  assign cur_o = mem;

endmodule
