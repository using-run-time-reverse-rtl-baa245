// tb_orgr_controller: end-to-end test of the refresh controller at its
// default parameters (DDR3, 533 MHz, 8 banks x 32768 rows, r = 4,
// t_REFI = 4160 cycles) against a DRAM model whose internal t_RAS^min is
// 10 cycles (18.75 ns) and whose true minimum t_RP, t_RRD and t_FAW are the
// reduced 5, 2 and 8 cycles.
//
// Sequence: start-up calibration; host traffic with ORGR refreshes at the
// default t_REFI; refreshes in RGR mode (JEDEC t_RAS raised to 25 cycles to
// reproduce the 292.5 ns schedule); a full refresh window with the refresh
// interval shortened and only the lower half of the rows refreshed; a
// recalibration after the device's t_RAS^min has grown to 12 cycles.
// Checked: calibration results, every refresh's t_RFC against the
// closed-form value for its timing set and row count, host commands reach the
// bus unchanged one cycle after acceptance, no device timing is violated,
// every refreshed row is refreshed once per window and the skipped half not
// at all. Each mechanism (calibration, recalibration, PREA before refresh,
// host stall, ORGR and RGR refresh, skipped refresh, window wrap, postponed
// refresh) must occur at least once.
`timescale 1ns/1ps
module tb_orgr_controller;
  import orgr_pkg::*;

  localparam int B = 8;
  localparam int R = 32768;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  cfg_addr_e cfg_addr = REG_MODE;
  logic [REFI_W-1:0] cfg_wdata = '0;
  logic recal_req = 0;
  logic host_valid = 0, host_ready;
  dram_cmd_t host_cmd = NOP_CMD;
  logic [B-1:0] open_banks;
  timing_t host_tim;
  dram_cmd_t dram_cmd;
  logic dram_dqs;
  logic init_done, cal_busy, ref_busy, cal_found, ref_wrap, ref_overflow, orgr_mode;
  logic [TIM_W-1:0] tras_min, tras_star;
  logic [15:0] last_trfc;
  logic [31:0] ref_count;
  logic [3:0] ref_pending;
  logic [TIM_W:0] cal_trials;
  int dev_tras_min = 10;

  orgr_controller dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .recal_req,
    .host_valid, .host_ready, .host_cmd, .open_banks, .host_tim,
    .dram_cmd, .dram_dqs,
    .init_done, .cal_busy, .ref_busy, .cal_found, .tras_min, .tras_star,
    .last_trfc, .ref_count, .ref_pending, .ref_wrap, .ref_overflow,
    .orgr_mode, .cal_trials);

  ddr3_model #(.BANKS(B), .ROWS(R), .CL(7), .TRP_DEV(5), .TRRD_DEV(2), .TFAW_DEV(8)) dram (
    .clk, .cmd(dram_cmd), .tras_min_dev(dev_tras_min), .dqs(dram_dqs));

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cal = 0, n_recal = 0, n_stall = 0, n_orgr = 0, n_rgr = 0, n_skip = 0;
  int n_wrap = 0, n_postponed = 0, n_host = 0;
  longint cyc = 0;
  always @(negedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  task automatic finish_tb();
    $display("mechanisms: cal=%0d recal=%0d prea=%0d stall=%0d orgr=%0d rgr=%0d skip=%0d wrap=%0d postponed=%0d host=%0d",
             n_cal, n_recal, dram.preas, n_stall, n_orgr, n_rgr, n_skip, n_wrap, n_postponed, n_host);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  function automatic int pos(input int v);
    return v > 0 ? v : 0;
  endfunction
  function automatic int eq4(input int r, input int tras, input int trp,
                             input int trrd, input int tfaw);
    int twait;
    if (r == 0) return 0;
    twait = pos(tfaw - 4*trrd);
    return (r*B - 1)*trrd + tras + trp + (r*B/4 - 1)*twait
           + (r - 1)*pos(tras + trp - (B*trrd + twait));
  endfunction

  // ---- expected refresh behaviour, tracked independently -----------------
  int exp_base = 0;          // first row of the next refresh
  int limit = R;             // rows at or above are skipped
  int e_tras = 11, e_trp = 5, e_trrd = 2, e_tfaw = 8;   // timing set in use
  bit rgr = 0;

  always @(negedge clk) if (rst_n) begin
    if (ref_pending > 1) n_postponed++;
    if (ref_wrap) n_wrap++;
  end

  // a refresh ends: ref_count steps and last_trfc is valid
  logic [31:0] prev_count = 0;
  always @(negedge clk) if (rst_n && ref_count != prev_count) begin
    automatic int r_eff = (exp_base >= limit) ? 0 : ((limit - exp_base) < 4 ? limit - exp_base : 4);
    automatic int want = eq4(r_eff, e_tras, e_trp, e_trrd, e_tfaw);
    prev_count = ref_count;
    check(int'(last_trfc) == want, $sformatf("refresh at row %0d: t_RFC %0d, want %0d",
                                             exp_base, last_trfc, want));
    if (r_eff == 0) n_skip++;
    else if (rgr) n_rgr++;
    else n_orgr++;
    exp_base = (exp_base + 4) % R;
  end

  // device timing must never be violated
  int last_viol = 0;
  always @(negedge clk) if (dram.violations != last_viol) begin
    last_viol = dram.violations;
    check(0, "device timing violated");
  end

  // ---- host ----------------------------------------------------------------
  task automatic host_issue(input dram_op_e op, input int bank, input int row);
    dram_cmd_t c;
    c = '{op: op, bank: BANK_W'(bank), row: ROW_W'(row)};
    host_valid = 1; host_cmd = c;
    while (!host_ready) begin n_stall++; @(negedge clk); end
    @(negedge clk);
    host_valid = 0; host_cmd = NOP_CMD;
    check(dram_cmd == c, "host command not on the bus one cycle after acceptance");
    n_host++;
  endtask

  bit host_run = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (host_run) begin
        automatic int b = $urandom_range(0, B-1);
        automatic int row = $urandom_range(0, R/2 - 1);
        if (!open_banks[b]) begin
          host_issue(CMD_ACT, b, row);
          repeat (int'(host_tim.tras)) @(negedge clk);
        end
        if (open_banks[b]) begin
          host_issue(CMD_RD, b, 0);
          repeat (20) @(negedge clk);
        end
        // leave some banks open so that a refresh must close them
        if (open_banks[b] && $urandom_range(0, 3) != 0) begin
          host_issue(CMD_PRE, b, 0);
          repeat (int'(host_tim.trp)) @(negedge clk);
        end
        repeat ($urandom_range(0, 40)) @(negedge clk);
      end
    end
  end

  task automatic wr(input cfg_addr_e a, input int v);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = REFI_W'(v);
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic wait_refreshes(input int n);
    automatic int target = int'(ref_count) + n;
    while (int'(ref_count) < target) @(negedge clk);
  endtask

  initial begin
    longint t0, window;
    int cal_start_cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. start-up calibration
    cal_start_cyc = int'(cyc);
    @(negedge clk);
    while (!init_done) @(negedge clk);
    n_cal++;
    check(cal_found, "calibration found nothing");
    check(int'(tras_min) == 10, $sformatf("t_RAS^min %0d, want 10", tras_min));
    check(int'(tras_star) == 11, $sformatf("t_RAS* %0d, want 11 (20.625 ns)", tras_star));
    check(int'(cal_trials) == 19 - 10 + 2, $sformatf("%0d calibration trials", cal_trials));
    check(orgr_mode, "not in ORGR mode");
    check(dram.reads_answered == 1 && dram.reads_ignored == 10, "calibration read pattern");

    // 2. host traffic with ORGR at the default refresh interval
    host_run = 1;
    t0 = cyc;
    wait_refreshes(4);
    window = cyc - t0;
    check(window >= 3*4160 && window <= 4*4160 + 200,
          $sformatf("4 refreshes took %0d cycles at t_REFI 4160", window));

    // 3. RGR with the JEDEC set, t_RAS = 25 (46.875 ns), as measured
    host_run = 0;
    repeat (100) @(negedge clk);
    wr(REG_J_TRAS, 25);
    wr(REG_MODE, 0);
    e_tras = 25; e_trp = 7; e_trrd = 4; e_tfaw = 16; rgr = 1;
    host_run = 1;
    wait_refreshes(3);
    host_run = 0;
    repeat (100) @(negedge clk);
    wr(REG_MODE, 1);
    wr(REG_J_TRAS, 19);
    e_tras = 11; e_trp = 5; e_trrd = 2; e_tfaw = 8; rgr = 0;

    // 4. selective refresh of the lower half, short interval, full window
    wr(REG_ROW_LIMIT, R/2);
    limit = R/2;
    wr(REG_TREFI, 200);
    host_run = 1;
    while (!ref_wrap) @(negedge clk);
    @(negedge clk);
    t0 = dram.now;
    begin : window_check
      longint upper_ref [B];
      for (int b = 0; b < B; b++) upper_ref[b] = dram.last_ref[b][R/2 + 123];
      while (!ref_wrap) @(negedge clk);
      @(negedge clk);
      window = dram.now - t0;
      check(window >= (R/4)*200 - 200 && window <= (R/4)*200 + 400,
            $sformatf("refresh window %0d cycles", window));
      check(dram.max_age(R/2) <= window + 1000,
            $sformatf("a refreshed row aged %0d cycles", dram.max_age(R/2)));
      for (int b = 0; b < B; b++)
        check(dram.last_ref[b][R/2 + 123] == upper_ref[b], "skipped row was refreshed");
    end

    // 5. recalibration after the device's t_RAS^min has grown
    dev_tras_min = 12;
    recal_req = 1; @(negedge clk); recal_req = 0;
    while (!cal_busy) @(negedge clk);
    while (cal_busy) @(negedge clk);
    n_recal++;
    @(negedge clk);
    check(int'(tras_min) == 12 && int'(tras_star) == 13, "recalibration result");
    e_tras = 13;
    // refreshes that waited during the recalibration now run back to back
    wait_refreshes(8);
    host_run = 0;
    repeat (200) @(negedge clk);

    check(!ref_overflow, "refresh overflow");
    check(n_cal > 0, "no calibration");
    check(n_recal > 0, "no recalibration");
    check(dram.preas > 0, "no PREA before refresh");
    check(n_stall > 0, "host never stalled");
    check(n_orgr > 0, "no ORGR refresh");
    check(n_rgr > 0, "no RGR refresh");
    check(n_skip > 0, "no skipped refresh");
    check(n_wrap > 0, "no refresh window completed");
    check(n_postponed > 0, "no postponed refresh");
    check(n_host > 0, "no host command");
    finish_tb();
  end
endmodule
