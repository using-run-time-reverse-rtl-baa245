// tb_retention_trefi: the refresh timing of a retention experiment, where
// ORGR refreshes the whole device once per stretched refresh window t_REF.
// With 8192 refreshes per window, t_REF = 1 s and 100 s at 533 MHz need
//   t_REFI = 1 s / 8192 / 1.875 ns  =    65104 cycles (rounded up)
//   t_REFI = 100 s / 8192 / 1.875 ns = 6510417 cycles (rounded up)
// The controller runs at its default parameters. The test programs each
// interval and measures the spacing of consecutive refreshes on the DRAM
// command bus (first ACT to first ACT), each refresh's t_RFC (78 cycles) and
// the row pointer (4 rows further per refresh).
`timescale 1ns/1ps
module tb_retention_trefi;
  import orgr_pkg::*;
  localparam int B = 8;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  cfg_addr_e cfg_addr = REG_MODE;
  logic [REFI_W-1:0] cfg_wdata = '0;
  logic host_ready, dram_dqs;
  logic [B-1:0] open_banks;
  timing_t host_tim;
  dram_cmd_t dram_cmd;
  logic init_done, cal_busy, ref_busy, cal_found, ref_wrap, ref_overflow, orgr_mode;
  logic [TIM_W-1:0] tras_min, tras_star;
  logic [15:0] last_trfc;
  logic [31:0] ref_count;
  logic [3:0] ref_pending;
  logic [TIM_W:0] cal_trials;
  int dev_tras_min = 10;
  int checks = 0, failures = 0;
  longint cyc = 0;

  orgr_controller dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .recal_req(1'b0),
    .host_valid(1'b0), .host_ready, .host_cmd(NOP_CMD), .open_banks, .host_tim,
    .dram_cmd, .dram_dqs,
    .init_done, .cal_busy, .ref_busy, .cal_found, .tras_min, .tras_star,
    .last_trfc, .ref_count, .ref_pending, .ref_wrap, .ref_overflow,
    .orgr_mode, .cal_trials);

  ddr3_model #(.BANKS(B), .ROWS(64)) dram (
    .clk, .cmd(dram_cmd), .tras_min_dev(dev_tras_min), .dqs(dram_dqs));

  always #1 clk = ~clk;
  always @(negedge clk) cyc++;

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // first ACT of each refresh, seen on the bus
  longint ref_start[$];
  int ref_row[$];
  always @(negedge clk)
    if (dram_cmd.op == CMD_ACT && dram_cmd.bank == '0 && ref_busy &&
        (ref_start.size() == 0 || cyc - ref_start[$] > 200)) begin
      ref_start.push_back(cyc);
      ref_row.push_back(int'(dram_cmd.row));
    end

  task automatic run_window(input int trefi, input int n);
    int first;
    @(negedge clk); cfg_we = 1; cfg_addr = REG_TREFI; cfg_wdata = REFI_W'(trefi);
    @(negedge clk); cfg_we = 0;
    // let one refresh at the new interval pass, then measure n more
    first = ref_start.size() + 1;
    while (ref_start.size() < first + n + 1) @(negedge clk);
    for (int i = first + 1; i <= first + n; i++) begin
      check(ref_start[i] - ref_start[i-1] == trefi,
            $sformatf("t_REFI %0d: refresh spacing %0d", trefi, ref_start[i] - ref_start[i-1]));
      check(ref_row[i] == (ref_row[i-1] + 4) % 32768, "row pointer step");
    end
    while (ref_busy) @(negedge clk);
    check(int'(last_trfc) == 78, $sformatf("t_RFC %0d, want 78", last_trfc));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!init_done) @(negedge clk);
    check(int'(tras_star) == 11, "t_RAS* after calibration");
    run_window(65104, 3);       // t_REF = 1 s
    run_window(6510417, 1);     // t_REF = 100 s
    check(dram.violations == 0, "device timing violated");
    check(!ref_overflow, "refresh overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
