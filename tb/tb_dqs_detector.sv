// tb_dqs_detector: checks that a strobe inside the window is reported, one
// outside it is not, and that the verdict comes exactly `window` cycles
// after arming.
`timescale 1ns/1ps
module tb_dqs_detector;
  import orgr_pkg::*;
  logic clk = 0, rst_n = 0, arm = 0, dqs = 0;
  logic [TIM_W-1:0] window;
  logic valid, seen;
  int checks = 0, failures = 0;

  dqs_detector dut (.clk, .rst_n, .arm, .window, .dqs, .valid, .seen);
  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // arm, optionally pulse DQS `at` cycles later for `len` cycles (at < 0: never)
  task automatic trial(input int win, input int at, input int len);
    int c, got_at;
    bit expect_seen;
    @(negedge clk);
    window = TIM_W'(win); arm = 1;
    @(negedge clk);
    arm = 0;
    c = 1; got_at = -1;
    while (c < win + 6) begin
      dqs = (at >= 0 && c >= at && c < at + len);
      @(negedge clk);
      if (valid && got_at < 0) begin
        got_at = c;
        expect_seen = (at >= 0) && (at <= win);
        checks++;
        if (seen !== expect_seen) begin
          failures++;
          $display("FAIL win=%0d at=%0d: seen=%0d", win, at, seen);
        end
      end
      c++;
    end
    dqs = 0;
    checks++;
    if (got_at != win) begin
      failures++;
      $display("FAIL win=%0d: verdict after %0d cycles", win, got_at);
    end
  endtask

  initial begin
    window = 8;
    repeat (2) @(negedge clk);
    rst_n = 1;
    trial(8, -1, 0);
    trial(8, 3, 2);
    trial(8, 8, 1);
    trial(8, 9, 2);
    trial(12, 7, 4);
    trial(1, 1, 1);
    for (int i = 0; i < 40; i++) begin
      automatic int w = 1 + $urandom_range(0, 20);
      trial(w, int'($urandom_range(0, 25)) - 2, 1 + $urandom_range(0, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
