// pu: processing unit.  A column of CTU (32) processing elements that, in
// one clock cycle, computes the 32 absolute differences of one 32-pixel
// column of the current CTU against the same column of the reference
// candidate.  Thirty-two PUs side by side cover the whole 32x32 block, so
// the distortions of a complete candidate are produced every cycle.
// Timing: the differences are registered; ad_o and valid_o appear one cycle
// after cur_i/ref_i/valid_i.  No reset on the data path; valid_o is reset.
module pu
  import ime_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid_i,
  input  pix_t cur_i [CTU],   // current CTU column, element = row
  input  pix_t ref_i [CTU],   // reference candidate column
  output logic valid_o,
  output pix_t ad_o  [CTU]    // registered |cur - ref| per row
);
  pix_t ad_c [CTU];

  for (genvar r = 0; r < CTU; r++) begin : g_pe
    pe u_pe (.cur_i(cur_i[r]), .ref_i(ref_i[r]), .ad_o(ad_c[r]));
  end

  always_ff @(posedge clk) begin
    ad_o <= ad_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= valid_i;
  end
endmodule
