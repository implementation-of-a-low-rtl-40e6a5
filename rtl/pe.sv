// pe: processing element.  Computes the distortion of one pixel pair, the
// absolute difference |cur - ref|.  Purely combinational; the register that
// closes the PE stage sits in the enclosing processing unit (pu).
// Interface: two unsigned pixels in, one unsigned difference of the same
// width out.  The distortion measure (absolute difference, for a SAD) is the
// one the design is built around; the comparison-based form is this
// design's choice.
module pe
  import ime_pkg::*;
(
  input  pix_t cur_i,
  input  pix_t ref_i,
  output pix_t ad_o
);
  always_comb begin
    if (cur_i >= ref_i) ad_o = cur_i - ref_i;
    else                ad_o = ref_i - cur_i;
  end
endmodule
