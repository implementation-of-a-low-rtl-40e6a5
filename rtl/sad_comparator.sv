// sad_comparator: comparison block.
//
// Keeps, for each of the 165 partitions, the smallest SAD seen so far in
// the current search and the candidate position (motion vector) where it
// was found.  Every valid input cycle carries the 165 SADs of one search
// position; each is compared with the stored minimum of its partition and
// replaces it when strictly smaller, so among equal SADs the position met
// first in scan order is kept.  The first position of a search (first_i)
// loads the minima unconditionally.  Keeping minimum SADs and their motion
// vectors per partition follows the design description; the strict
// comparison (tie rule) and the first/last framing are this design's.
//
// Timing: one clock cycle.  The minima are updated on the edge that
// samples valid_i; on the edge that samples the last position (last_i) the
// final results are written and done_o is raised for one cycle.  min_sad_o,
// best_x_o and best_y_o then hold until the next search starts.
module sad_comparator
  import ime_pkg::*;
#(
  parameter int unsigned PW = 6   // motion-vector component width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_i,
  input  logic          first_i,
  input  logic          last_i,
  input  logic [PW-1:0] x_i,
  input  logic [PW-1:0] y_i,
  input  sad_t          sad_i     [NUM_SADS],
  output sad_t          min_sad_o [NUM_SADS],
  output logic [PW-1:0] best_x_o  [NUM_SADS],
  output logic [PW-1:0] best_y_o  [NUM_SADS],
  output logic          done_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SADS; i++) begin
        min_sad_o[i] <= '0;
        best_x_o[i]  <= '0;
        best_y_o[i]  <= '0;
      end
      done_o <= 1'b0;
    end else begin
      done_o <= valid_i && last_i;
      if (valid_i) begin
        for (int i = 0; i < NUM_SADS; i++) begin
          if (first_i || sad_i[i] < min_sad_o[i]) begin
            min_sad_o[i] <= sad_i[i];
            best_x_o[i]  <= x_i;
            best_y_o[i]  <= y_i;
          end
        end
      end
    end
  end
endmodule
