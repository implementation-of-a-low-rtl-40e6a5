// ime_top: full-search integer motion estimator for one 32x32 CTU.
//
// The current CTU (32x32 pixels) is matched against every position of an
// SR x SR search area (64x64 by default) in a reference area of
// (SR+31) x (SR+31) pixels.  For each of the 165 HEVC inter partitions of
// the CTU (all CUs from 32x32 to 8x8 with their square, symmetric and
// asymmetric partitions) the best SAD and its position are returned.
//
// Data path, one search position per clock cycle:
//   scan_ctrl        snake-scan controller; one memory read per cycle
//   search_area_mem  reference pixels; one 32-pixel row or column per read
//   ref_shift_array  32 propagation registers holding the candidate block
//   cur_ctu_mem      current CTU pixels, all visible at once
//   32 x pu          one column each, 32 pe each: 1024 |cur - ref| per cycle
//   sad_tree         ten-stage adder tree producing the 165 SADs
//   sad_comparator   running minimum SAD and position per partition
// The structure, the block counts, the snake scan and the stage latencies
// (one cycle memory read and shift, one cycle PU, ten cycles SAD tree, one
// cycle comparison) follow the design description.  The memory write ports
// and the tag pipeline that carries each position alongside its data are
// this design's.
//
// Interface: load the current CTU through cur_wr_* (one 32-pixel row per
// cycle) and the reference area through ref_wr_* (one pixel per cycle),
// then pulse start.  busy_o is high while the controller scans.  done_o
// pulses once when min_sad_o/best_x_o/best_y_o hold the final result, which
// stays until the next start.  Positions are top-left offsets of the
// candidate in the reference area, 0..SR-1.
//
// Timing: done_o rises SR*SR + 44 cycles after start is sampled, 4140
// cycles for SR = 64: 32 row loads (the first after a one-cycle memory
// read), SR*SR-1 further moves, then 1 (PU) + 10 (SAD tree) + 1
// (comparator).  Counted inclusively from the edge that samples start to
// the edge that raises done_o.  Memories must not be written during a
// search.
module ime_top
  import ime_pkg::*;
#(
  parameter int unsigned SR  = 64,
  parameter int unsigned REF = SR + CTU - 1,
  parameter int unsigned AW  = $clog2(REF),
  parameter int unsigned PW  = (SR > 1) ? $clog2(SR) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // current CTU load
  input  logic                   cur_wr_en,
  input  logic [$clog2(CTU)-1:0] cur_wr_row,
  input  pix_t                   cur_wr_data [CTU],
  // reference area load
  input  logic                   ref_wr_en,
  input  logic [AW-1:0]          ref_wr_x,
  input  logic [AW-1:0]          ref_wr_y,
  input  pix_t                   ref_wr_pix,
  // control
  input  logic                   start,
  output logic                   busy_o,
  output logic                   done_o,
  // results
  output sad_t                   min_sad_o [NUM_SADS],
  output logic [PW-1:0]          best_x_o  [NUM_SADS],
  output logic [PW-1:0]          best_y_o  [NUM_SADS]
);
  // Latency from a controller tag to the comparator input:
  // 1 (memory read and shift) + 1 (PU) + 10 (SAD tree).
  localparam int unsigned TAG_DLY = 12;

  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic [PW-1:0] x;
    logic [PW-1:0] y;
  } tag_t;

  // Controller <-> memory.
  logic          rd_row_en, rd_col_en;
  logic [AW-1:0] rd_row_y, rd_row_x, rd_col_x, rd_col_y;
  pix_t          row_seg [CTU], col_seg [CTU];
  shift_e        shift;
  tag_t          tag_c;

  scan_ctrl #(.SR(SR), .REF(REF), .AW(AW), .PW(PW)) u_ctrl (
    .clk, .rst_n,
    .start_i     (start),
    .busy_o,
    .rd_row_en_o (rd_row_en),
    .rd_row_y_o  (rd_row_y),
    .rd_row_x_o  (rd_row_x),
    .rd_col_en_o (rd_col_en),
    .rd_col_x_o  (rd_col_x),
    .rd_col_y_o  (rd_col_y),
    .shift_o     (shift),
    .tag_valid_o (tag_c.valid),
    .tag_x_o     (tag_c.x),
    .tag_y_o     (tag_c.y),
    .tag_first_o (tag_c.first),
    .tag_last_o  (tag_c.last)
  );

  search_area_mem #(.SR(SR), .REF(REF), .AW(AW)) u_sa_mem (
    .clk,
    .wr_en     (ref_wr_en),
    .wr_x      (ref_wr_x),
    .wr_y      (ref_wr_y),
    .wr_pix    (ref_wr_pix),
    .rd_row_en (rd_row_en),
    .rd_row_y  (rd_row_y),
    .rd_row_x  (rd_row_x),
    .row_o     (row_seg),
    .rd_col_en (rd_col_en),
    .rd_col_x  (rd_col_x),
    .rd_col_y  (rd_col_y),
    .col_o     (col_seg)
  );

  pix_t win [CTU][CTU];

  ref_shift_array u_prop (
    .clk,
    .shift_i (shift),
    .row_i   (row_seg),
    .col_i   (col_seg),
    .win_o   (win)
  );

  pix_t cur [CTU][CTU];

  cur_ctu_mem u_cur (
    .clk,
    .wr_en   (cur_wr_en),
    .wr_row  (cur_wr_row),
    .wr_data (cur_wr_data),
    .cur_o   (cur)
  );

  // Tag pipeline: tag_d[k] is the controller tag delayed by k+1 cycles.
  tag_t tag_d [TAG_DLY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAG_DLY; k++) tag_d[k] <= '0;
    end else begin
      tag_d[0] <= tag_c;
      for (int k = 1; k < TAG_DLY; k++) tag_d[k] <= tag_d[k-1];
    end
  end

  // 32 processing units, PU j takes column j.
  pix_t cur_col [CTU][CTU], ref_col [CTU][CTU], ad_col [CTU][CTU];
  pix_t ad [CTU][CTU];
  logic [CTU-1:0] pu_valid;

  for (genvar r = 0; r < CTU; r++) begin : g_tr_r
    for (genvar c = 0; c < CTU; c++) begin : g_tr_c
      assign cur_col[c][r] = cur[r][c];
      assign ref_col[c][r] = win[r][c];
      assign ad[r][c]      = ad_col[c][r];
    end
  end

  for (genvar j = 0; j < CTU; j++) begin : g_pu
    pu u_pu (
      .clk, .rst_n,
      .valid_i (tag_d[0].valid),
      .cur_i   (cur_col[j]),
      .ref_i   (ref_col[j]),
      .valid_o (pu_valid[j]),
      .ad_o    (ad_col[j])
    );
  end

  logic stb_valid;
  sad_t sads [NUM_SADS];

  sad_tree u_stb (
    .clk, .rst_n,
    .valid_i (pu_valid[0]),
    .ad_i    (ad),
    .valid_o (stb_valid),
    .sad_o   (sads)
  );

  sad_comparator #(.PW(PW)) u_cmp (
    .clk, .rst_n,
    .valid_i   (stb_valid),
    .first_i   (tag_d[TAG_DLY-1].first),
    .last_i    (tag_d[TAG_DLY-1].last),
    .x_i       (tag_d[TAG_DLY-1].x),
    .y_i       (tag_d[TAG_DLY-1].y),
    .sad_i     (sads),
    .min_sad_o,
    .best_x_o,
    .best_y_o,
    .done_o
  );

  // All PUs share one valid; the data-path valid and the tag pipeline run
  // in lock step.
  a_pu_valid_same: assert property (@(posedge clk) disable iff (!rst_n)
                                    (pu_valid == '0) || (pu_valid == '1));
  a_valid_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                    stb_valid == tag_d[TAG_DLY-1].valid);

endmodule
