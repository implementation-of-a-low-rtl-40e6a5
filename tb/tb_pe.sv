// tb_pe: exhaustive test of the processing element.  Every pair of 8-bit
// pixels is applied and the output compared with the absolute difference
// computed in integer arithmetic.
module tb_pe;
  import ime_pkg::*;

  pix_t cur, rf, ad;
  int checks = 0, failures = 0;

  pe dut (.cur_i(cur), .ref_i(rf), .ad_o(ad));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        int e;
        cur = pix_t'(a);
        rf  = pix_t'(b);
        #1;
        e = (a > b) ? a - b : b - a;
        checks++;
        if (int'(ad) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: |%0d-%0d| gave %0d", a, b, ad);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
