// tb_refresh_timing_regs: checks the reset values (DDR3 at 533 MHz), the
// derivation of the reduced set (t_RAS* = t_RAS^min + guard capped at the
// JEDEC t_RAS, t_FAW* = 4 t_RRD*), the RGR/ORGR selection and the register
// writes.
`timescale 1ns/1ps
module tb_refresh_timing_regs;
  import orgr_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0, cal_done = 0, cal_found = 0;
  cfg_addr_e cfg_addr;
  logic [REFI_W-1:0] cfg_wdata;
  logic [TIM_W-1:0] cal_tras_min, tras_star, rd_window;
  timing_t jedec_tim, ref_tim;
  logic orgr_mode;
  logic [REFI_W-1:0] trefi;
  logic [4:0] rows_per_ref;
  logic [ROW_W:0] row_limit;
  int checks = 0, failures = 0;

  refresh_timing_regs dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cal_done, .cal_found,
    .cal_tras_min, .jedec_tim, .ref_tim, .orgr_mode, .tras_star, .trefi,
    .rows_per_ref, .row_limit, .rd_window);

  always #1 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input cfg_addr_e a, input int v);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = REFI_W'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic cal(input bit f, input int v);
    @(negedge clk); cal_done = 1; cal_found = f; cal_tras_min = TIM_W'(v);
    @(negedge clk); cal_done = 0;
  endtask

  function automatic bit tim_is(timing_t t, int a, int p, int r, int f);
    return int'(t.tras) == a && int'(t.trp) == p && int'(t.trrd) == r && int'(t.tfaw) == f;
  endfunction

  initial begin
    cfg_addr = REG_MODE; cfg_wdata = 0; cal_tras_min = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(tim_is(jedec_tim, 19, 7, 4, 16), "JEDEC reset values");
    check(orgr_mode, "ORGR not the reset mode");
    check(int'(trefi) == 4160 && int'(rows_per_ref) == 4 && int'(row_limit) == 32768,
          "refresh reset values");
    // before calibration: t_RAS* falls back to JEDEC
    check(tim_is(ref_tim, 19, 5, 2, 8), "ORGR set before calibration");
    cal(1, 10);                         // 18.75 ns at 533 MHz
    check(int'(tras_star) == 11, "t_RAS* != 11 (20.625 ns)");
    check(tim_is(ref_tim, 11, 5, 2, 8), "ORGR set after calibration");
    wr(REG_TRAS_GRD, 3);
    check(tim_is(ref_tim, 13, 5, 2, 8), "guard of 3");
    cal(1, 18);                         // cap at JEDEC t_RAS
    check(int'(tras_star) == 19, "t_RAS* not capped at JEDEC");
    cal(0, 5);                          // failed calibration
    check(int'(tras_star) == 19, "failed calibration used");
    cal(1, 10);
    wr(REG_R_TRRD, 3);
    wr(REG_R_TRP, 6);
    check(tim_is(ref_tim, 13, 6, 3, 12), "reprogrammed reduced set");
    wr(REG_MODE, 0);
    check(!orgr_mode && tim_is(ref_tim, 19, 7, 4, 16), "RGR uses the JEDEC set");
    wr(REG_J_TRAS, 25); wr(REG_J_TRP, 8); wr(REG_J_TRRD, 5); wr(REG_J_TFAW, 27);
    check(tim_is(ref_tim, 25, 8, 5, 27) && tim_is(jedec_tim, 25, 8, 5, 27), "JEDEC writes");
    wr(REG_MODE, 1);
    check(tim_is(ref_tim, 13, 6, 3, 12), "back to ORGR");
    wr(REG_TREFI, 65000); wr(REG_ROWS_REF, 16); wr(REG_ROW_LIMIT, 16384); wr(REG_RD_WIN, 20);
    check(int'(trefi) == 65000 && int'(rows_per_ref) == 16 && int'(row_limit) == 16384 &&
          int'(rd_window) == 20, "refresh configuration writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
