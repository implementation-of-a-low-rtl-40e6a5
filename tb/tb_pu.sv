// tb_pu: processing unit.  Random current and reference columns (plus the
// extremes 0/255) are applied every cycle with a random valid; one cycle
// later the 32 registered differences and valid must match a model.
module tb_pu;
  import ime_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic valid_i = 1'b0, valid_o;
  pix_t cur [CTU], rf [CTU], ad [CTU];
  int   exp_ad [CTU];
  logic exp_v;
  int checks = 0, failures = 0;

  pu dut (.clk, .rst_n, .valid_i, .cur_i(cur), .ref_i(rf), .valid_o, .ad_o(ad));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < CTU; r++) begin cur[r] = '0; rf[r] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      valid_i = 1'($urandom_range(1));
      for (int r = 0; r < CTU; r++) begin
        int a, b;
        a = (t == 0) ? 255 * (r % 2) : $urandom_range(255);
        b = (t == 0) ? 255 * ((r + 1) % 2) : $urandom_range(255);
        cur[r] = pix_t'(a);
        rf[r]  = pix_t'(b);
        exp_ad[r] = (a > b) ? a - b : b - a;
      end
      exp_v = valid_i;
      @(negedge clk);
      checks++;
      if (valid_o !== exp_v) begin failures++; $display("FAIL: valid at t=%0d", t); end
      for (int r = 0; r < CTU; r++) begin
        checks++;
        if (int'(ad[r]) != exp_ad[r]) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d row %0d got %0d exp %0d", t, r, ad[r], exp_ad[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
