// tb_refresh_timer: checks the refresh request period (one every t_REFI
// cycles), the pending count when refreshes wait, the row pointer walking in
// steps of r and wrapping after R/r refreshes, and the overflow flag.
`timescale 1ns/1ps
module tb_refresh_timer;
  import orgr_pkg::*;
  localparam int ROWS = 64;
  logic clk = 0, rst_n = 0, enable = 0, ack = 0;
  logic [REFI_W-1:0] trefi;
  logic [4:0] rows_per_ref;
  logic req, wrap, overflow;
  logic [ROW_W-1:0] base_row;
  logic [3:0] pending;
  int checks = 0, failures = 0;

  refresh_timer #(.ROWS(ROWS), .MAX_PENDING(8)) dut (
    .clk, .rst_n, .enable, .trefi, .rows_per_ref, .ack,
    .req, .base_row, .pending, .wrap, .overflow);

  always #1 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // cycles from now until req rises
  task automatic time_to_req(output int n);
    n = 0;
    while (!req) begin @(negedge clk); n++; end
  endtask

  task automatic do_ack();
    ack = 1; @(negedge clk); ack = 0;
  endtask

  initial begin
    int n, expect_row, wraps;
    trefi = 10; rows_per_ref = 4;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!req && pending == 0, "request before enable");
    enable = 1;
    time_to_req(n);
    check(n == 10, $sformatf("first request after %0d cycles, want 10", n));
    // serve the first request at once, then every following one
    expect_row = 0; wraps = 0;
    for (int i = 0; i < 20; i++) begin
      check(int'(base_row) == expect_row, $sformatf("refresh %0d: base row %0d, want %0d",
                                                    i, base_row, expect_row));
      do_ack();
      if (wrap) wraps++;
      expect_row = (expect_row + 4) % ROWS;
      check(!req, "request still pending after ack");
      time_to_req(n);
      check(n == 9, $sformatf("request period %0d, want 10", n + 1));
    end
    check(wraps == 1, $sformatf("%0d wraps in 20 refreshes of 64 rows / 4", wraps));
    // let refreshes wait: pending counts up to 8, the 9th sets overflow
    repeat (10*4 - 1) @(negedge clk);
    check(pending == 4 && !overflow, $sformatf("pending %0d, want 4", pending));
    repeat (10*6) @(negedge clk);
    check(pending == 8 && overflow, $sformatf("pending %0d overflow %0d", pending, overflow));
    while (req) do_ack();
    check(pending == 0, "pending not drained");
    // new interval
    trefi = 25;
    time_to_req(n);
    check(n <= 25 && n > 0, "no request after t_REFI change");
    do_ack();
    time_to_req(n);
    check(n == 24, $sformatf("period after change %0d, want 25", n + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
