// scan_ctrl: memory controller of the search, walking the snake scan.
//
// After start it first preloads the propagation registers with rows 0..31
// of the reference area, then visits every one of the SR x SR candidate
// positions once, one per cycle, in snake order: down the first column of
// positions (step A), one position right (step B), up the next column
// (step C), right again, and so on.  Each cycle it issues exactly one read
// to the search-area memory (a row segment for a vertical move, a column
// segment for a horizontal one) and a matching shift command that the
// propagation registers apply one edge later, when the read data arrives.
//
// Alongside each command it emits a tag describing the candidate window
// that the propagation registers will hold after applying it: tag_valid_o,
// the window's top-left position (tag_x_o, tag_y_o, in pixels from the
// top-left of the reference area) and whether it is the first or the last
// position of the search.  The snake order, the preload of the first 32
// rows and one position per cycle follow the design description; the
// encodings and the tag interface are this design's.
//
// Timing: the memory read request is combinational (from the state and
// start), so the read of row 0 happens on the edge that samples start.
// shift_o and the tag are registered on that same edge.  SR*SR-1 moves
// follow the CTU row loads without a gap; start is ignored while busy_o.
module scan_ctrl
  import ime_pkg::*;
#(
  parameter int unsigned SR  = 64,
  parameter int unsigned REF = SR + CTU - 1,
  parameter int unsigned AW  = $clog2(REF),
  parameter int unsigned PW  = (SR > 1) ? $clog2(SR) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  output logic          busy_o,
  // search-area memory read requests
  output logic          rd_row_en_o,
  output logic [AW-1:0] rd_row_y_o,
  output logic [AW-1:0] rd_row_x_o,
  output logic          rd_col_en_o,
  output logic [AW-1:0] rd_col_x_o,
  output logic [AW-1:0] rd_col_y_o,
  // propagation-register command, registered
  output shift_e        shift_o,
  // description of the window held after shift_o is applied, registered
  output logic          tag_valid_o,
  output logic [PW-1:0] tag_x_o,
  output logic [PW-1:0] tag_y_o,
  output logic          tag_first_o,
  output logic          tag_last_o
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_SCAN} state_e;

  localparam logic [PW-1:0] LASTPOS = PW'(SR - 1);

  state_e                   state;
  logic [$clog2(CTU)-1:0]   ld_cnt;
  logic [PW-1:0]            x, y;     // position of the window last tagged
  logic                     up;       // current column is scanned upwards

  // Next position of the scan from (x, y, up).
  logic          mv_vert, mv_up;
  logic [PW-1:0] nx, ny;
  logic          nup, nlast;

  always_comb begin
    mv_vert = 1'b0;
    mv_up   = 1'b0;
    nx      = x;
    ny      = y;
    nup     = up;
    if (!up && y != LASTPOS) begin
      mv_vert = 1'b1;
      ny      = y + 1'b1;
    end else if (up && y != '0) begin
      mv_vert = 1'b1;
      mv_up   = 1'b1;
      ny      = y - 1'b1;
    end else begin
      nx  = x + 1'b1;
      nup = !up;
    end
    // The scan ends at the last column, at its bottom when it runs
    // downwards and at its top when it runs upwards.
    nlast = (nx == LASTPOS) && (nup ? (ny == '0) : (ny == LASTPOS));
  end

  // Read requests (combinational).
  always_comb begin
    rd_row_en_o = 1'b0;
    rd_row_y_o  = '0;
    rd_row_x_o  = '0;
    rd_col_en_o = 1'b0;
    rd_col_x_o  = '0;
    rd_col_y_o  = '0;
    unique case (state)
      S_IDLE: begin
        rd_row_en_o = start_i;
      end
      S_LOAD: begin
        rd_row_en_o = 1'b1;
        rd_row_y_o  = AW'(ld_cnt);
      end
      S_SCAN: begin
        if (mv_vert) begin
          rd_row_en_o = 1'b1;
          rd_row_y_o  = mv_up ? AW'(ny) : AW'(ny) + AW'(CTU - 1);
          rd_row_x_o  = AW'(x);
        end else begin
          rd_col_en_o = 1'b1;
          rd_col_x_o  = AW'(nx) + AW'(CTU - 1);
          rd_col_y_o  = AW'(y);
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      ld_cnt      <= '0;
      x           <= '0;
      y           <= '0;
      up          <= 1'b0;
      shift_o     <= SHIFT_HOLD;
      tag_valid_o <= 1'b0;
      tag_x_o     <= '0;
      tag_y_o     <= '0;
      tag_first_o <= 1'b0;
      tag_last_o  <= 1'b0;
    end else begin
      shift_o     <= SHIFT_HOLD;
      tag_valid_o <= 1'b0;
      tag_first_o <= 1'b0;
      tag_last_o  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_i) begin
            state   <= S_LOAD;
            ld_cnt  <= 1;
            shift_o <= SHIFT_DOWN;
          end
        end
        S_LOAD: begin
          shift_o <= SHIFT_DOWN;
          ld_cnt  <= ld_cnt + 1'b1;
          if (ld_cnt == $clog2(CTU)'(CTU - 1)) begin
            // The 32nd row completes the first candidate, position (0,0).
            tag_valid_o <= 1'b1;
            tag_x_o     <= '0;
            tag_y_o     <= '0;
            tag_first_o <= 1'b1;
            tag_last_o  <= (SR == 1);
            x           <= '0;
            y           <= '0;
            up          <= 1'b0;
            state       <= (SR == 1) ? S_IDLE : S_SCAN;
          end
        end
        S_SCAN: begin
          shift_o     <= mv_vert ? (mv_up ? SHIFT_UP : SHIFT_DOWN) : SHIFT_RIGHT;
          tag_valid_o <= 1'b1;
          tag_x_o     <= nx;
          tag_y_o     <= ny;
          tag_last_o  <= nlast;
          x           <= nx;
          y           <= ny;
          up          <= nup;
          if (nlast) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE);

endmodule
