// search_area_mem: reference search-area memory.
//
// Holds the REF x REF reference pixels (REF = SR + CTU - 1 = 95 for a 64x64
// search area and a 32x32 CTU) from which every candidate block is taken.
// Each cycle it delivers one 32-pixel segment to the propagation
// registers: a row segment (row y, columns x..x+31) while the scan moves
// up or down, or a column segment (column x, rows y..y+31) when the scan
// steps one column to the right.  To serve both shapes in one cycle the
// pixels are kept twice, in a row-organised and a column-organised array;
// each array has one wide word per row (or column) and a pixel-wide write
// enable, which maps onto block RAM with byte writes.  Keeping reference
// pixels in block RAM and feeding one 32-pixel row per cycle follows the
// design description; the second, transposed copy and the pixel-at-a-time
// write port are this design's choices.
//
// Timing: synchronous read.  The word addressed by rd_row_en/rd_row_y (or
// rd_col_en/rd_col_x) is registered on the clock edge; the segment select
// by the registered offset is combinational after it, so row_o/col_o are
// valid in the cycle after the request and hold until the next request.
// Writes (wr_en, wr_x, wr_y, wr_pix) take one pixel per cycle and must not
// overlap a search.
module search_area_mem
  import ime_pkg::*;
#(
  parameter int unsigned SR  = 64,            // search positions per axis
  parameter int unsigned REF = SR + CTU - 1,  // stored pixels per axis
  parameter int unsigned AW  = $clog2(REF)
) (
  input  logic          clk,
  // pixel write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_x,
  input  logic [AW-1:0] wr_y,
  input  pix_t          wr_pix,
  // row-segment read: row rd_row_y, columns rd_row_x .. rd_row_x+CTU-1
  input  logic          rd_row_en,
  input  logic [AW-1:0] rd_row_y,
  input  logic [AW-1:0] rd_row_x,
  output pix_t          row_o [CTU],
  // column-segment read: column rd_col_x, rows rd_col_y .. rd_col_y+CTU-1
  input  logic          rd_col_en,
  input  logic [AW-1:0] rd_col_x,
  input  logic [AW-1:0] rd_col_y,
  output pix_t          col_o [CTU]
);
  typedef logic [REF*PIX_W-1:0] word_t;

  word_t rowmem [REF];   // word y holds row y, pixel x at bits x*PIX_W
  word_t colmem [REF];   // word x holds column x, pixel y at bits y*PIX_W

  word_t         row_q, col_q;
  logic [AW-1:0] row_off, col_off;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      rowmem[wr_y][wr_x*PIX_W +: PIX_W] <= wr_pix;
      colmem[wr_x][wr_y*PIX_W +: PIX_W] <= wr_pix;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_row_en) begin
      row_q   <= rowmem[rd_row_y];
      row_off <= rd_row_x;
    end
    if (rd_col_en) begin
      col_q   <= colmem[rd_col_x];
      col_off <= rd_col_y;
    end
  end

  // Segment select from the registered word.
  always_comb begin
    for (int i = 0; i < CTU; i++) begin
      row_o[i] = row_q[(32'(row_off) + i)*PIX_W +: PIX_W];
      col_o[i] = col_q[(32'(col_off) + i)*PIX_W +: PIX_W];
    end
  end

endmodule
