// ref_shift_array: the 32 propagation registers.
//
// Holds the 32x32 reference candidate currently being matched, as 32 rows
// of 32 pixels.  The data path is reconfigurable: on each edge the array
// either holds, or moves the candidate window by one pixel, taking the new
// pixels from the search-area memory:
//   SHIFT_DOWN  rows move up by one, row_i enters as the bottom row
//               (window steps one row down, scan step A);
//   SHIFT_UP    rows move down by one, row_i enters as the top row
//               (window steps one row up, scan step C);
//   SHIFT_RIGHT every row moves left by one pixel, col_i[r] enters at the
//               right of row r (window steps one column right, step B).
// Reusing 31 of the 32 rows (or columns) on each move is the data-reuse
// scheme of the design; the encoding of the shift command is this design's.
// Timing: win_o is the register contents; it changes one edge after the
// shift command.  No reset: the first 32 loads define every pixel.
module ref_shift_array
  import ime_pkg::*;
(
  input  logic   clk,
  input  shift_e shift_i,
  input  pix_t   row_i [CTU],
  input  pix_t   col_i [CTU],
  output pix_t   win_o [CTU][CTU]   // [row][column]
);
  // Flat storage: row r occupies bits [r*RB +: RB], pixel c of a row bits
  // [c*PIX_W +: PIX_W].  Every move is then one word-level shift.
  localparam int unsigned RB = CTU * PIX_W;

  logic [CTU*RB-1:0] win;
  logic [RB-1:0]     row_flat;
  logic [CTU*RB-1:0] right_nxt;

  for (genvar c = 0; c < CTU; c++) begin : g_row_in
    assign row_flat[c*PIX_W +: PIX_W] = row_i[c];
  end

  for (genvar r = 0; r < CTU; r++) begin : g_right
    assign right_nxt[r*RB +: RB] = {col_i[r], win[r*RB + PIX_W +: RB - PIX_W]};
  end

  always_ff @(posedge clk) begin
    unique case (shift_i)
      SHIFT_DOWN:  win <= {row_flat, win[CTU*RB-1:RB]};
      SHIFT_UP:    win <= {win[(CTU-1)*RB-1:0], row_flat};
      SHIFT_RIGHT: win <= right_nxt;
      default:     ;
    endcase
  end

  for (genvar r = 0; r < CTU; r++) begin : g_out_r
    for (genvar c = 0; c < CTU; c++) begin : g_out_c
      assign win_o[r][c] = win[r*RB + c*PIX_W +: PIX_W];
    end
  end

endmodule
