// tb_sad_comparator: comparison block.  Three searches of random length
// stream SAD vectors with positions; values are drawn from a narrow range
// so that ties are common.  After each search the minima and their
// positions must match a model in which the first of equal SADs wins, and
// done must pulse exactly once, one cycle after the last input.
module tb_sad_comparator;
  import ime_pkg::*;

  localparam int PW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          valid_i = 1'b0, first_i = 1'b0, last_i = 1'b0, done;
  logic [PW-1:0] x_i = '0, y_i = '0;
  sad_t          sad_i [NUM_SADS];
  sad_t          min_sad [NUM_SADS];
  logic [PW-1:0] bx [NUM_SADS], by [NUM_SADS];

  sad_comparator #(.PW(PW)) dut (
    .clk, .rst_n, .valid_i, .first_i, .last_i, .x_i, .y_i, .sad_i,
    .min_sad_o(min_sad), .best_x_o(bx), .best_y_o(by), .done_o(done));

  int checks = 0, failures = 0, ndone = 0;
  int m [NUM_SADS], mx [NUM_SADS], my [NUM_SADS];

  always @(posedge clk) if (rst_n && done) ndone++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NUM_SADS; i++) sad_i[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      int len;
      len = 20 + $urandom_range(200);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        // Idle cycles inside the stream must change nothing.
        if ($urandom_range(4) == 0) begin
          valid_i = 1'b0;
          for (int i = 0; i < NUM_SADS; i++) sad_i[i] = '0;
          @(negedge clk);
        end
        valid_i = 1'b1;
        first_i = (k == 0);
        last_i  = (k == len - 1);
        x_i = PW'($urandom_range(63));
        y_i = PW'($urandom_range(63));
        for (int i = 0; i < NUM_SADS; i++) begin
          int v;
          v = (s == 2) ? 1000 + $urandom_range(3) : ((i * 37 + k * 11) % 500) + $urandom_range(40);
          if (k == 0 && s == 1) v = 262143;   // largest SAD value first
          sad_i[i] = sad_t'(v);
          if (k == 0 || v < m[i]) begin
            m[i] = v; mx[i] = int'(x_i); my[i] = int'(y_i);
          end
        end
        if (k == len - 1) begin
          @(negedge clk);
          valid_i = 1'b0;
          first_i = 1'b0;
          last_i  = 1'b0;
          checks++;
          if (!done) begin failures++; $display("FAIL: done missing in search %0d", s); end
          for (int i = 0; i < NUM_SADS; i++) begin
            checks++;
            if (int'(min_sad[i]) != m[i] || int'(bx[i]) != mx[i] || int'(by[i]) != my[i]) begin
              failures++;
              if (failures < 10)
                $display("FAIL: search %0d partition %0d got %0d@(%0d,%0d) exp %0d@(%0d,%0d)",
                         s, i, min_sad[i], bx[i], by[i], m[i], mx[i], my[i]);
            end
          end
          @(negedge clk);
          checks++;
          if (done) begin failures++; $display("FAIL: done longer than one cycle"); end
        end
      end
    end
    checks++;
    if (ndone != 3) begin failures++; $display("FAIL: %0d done pulses", ndone); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
