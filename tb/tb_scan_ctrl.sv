// tb_scan_ctrl: snake-scan controller at reduced search sizes (SR = 5 and
// SR = 8 instances side by side, so both an odd and an even number of
// columns are covered).
//
// The testbench plays the memory and the propagation registers itself: it
// answers each read request with the pixel coordinates it names and applies
// each shift command to a window of coordinates.  Whenever a tag is valid,
// the window one cycle later must hold exactly the 32x32 block at the
// tagged position.  It also checks that the tags follow the snake order
// (down, right, up, right, ...), that every position is visited once, that
// first and last are flagged, that busy falls after the last position and
// that the last tag comes SR*SR + 31 cycles after the edge sampling start.
module tb_scan_ctrl;
  import ime_pkg::*;
  import ime_ref_pkg::snake_pos;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic start = 1'b0;
  logic done5, done8;

  scan_check #(.SR(5)) u5 (.clk, .rst_n, .start, .done(done5));
  scan_check #(.SR(8)) u8 (.clk, .rst_n, .start, .done(done8));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      wait (done5 && done8);
      repeat (3) @(negedge clk);
    end
    checks  += u5.checks + u8.checks;
    failures += u5.failures + u8.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
