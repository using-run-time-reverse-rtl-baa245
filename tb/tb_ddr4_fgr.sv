// tb_ddr4_fgr: the refresh schedules of a 16 Gb DDR4 x16 device (8 banks,
// 2^17 rows per bank) in the three fine-granularity refresh modes, with the
// JEDEC (RGR) and the reduced (ORGR) timing sets. The engine runs in 0.1 ns
// ticks so that the timings are exact:
//   RGR  t_RAS 28.3, t_RP 15,   t_RRD 6.7, t_FAW 30.8 ns
//   ORGR t_RAS 18.3, t_RP 12.5, t_RRD 1.7, t_FAW 6.6 ns
// 1X/2X/4X refresh r = 16/8/4 rows per bank every 7.8/3.9/1.95 us. The
// expected t_RFC values are
//   RGR  1018.2 / 525.4 / 279.0 ns,   ORGR  504.7 / 258.3 / 135.1 ns.
// A refresh of a row group above the selective-refresh limit (half the
// rows) must issue nothing. A monitor checks every command against the
// timing set in use.
`timescale 1ns/1ps
module tb_ddr4_fgr;
  import orgr_pkg::*;
  localparam int B = 8;
  localparam int R = 131072;

  logic clk = 0, rst_n = 0, start = 0;
  timing_t tim;
  logic [ROW_W-1:0] base_row;
  logic [4:0] rows;
  logic [ROW_W:0] row_limit;
  logic busy, done;
  dram_cmd_t cmd;
  logic [15:0] trfc;
  int checks = 0, failures = 0;
  int cyc = 0;

  rgr_engine dut (.clk, .rst_n, .start, .tim, .base_row, .rows, .row_limit,
                  .busy, .done, .cmd_o(cmd), .trfc_o(trfc));

  always #1 clk = ~clk;
  always @(negedge clk) cyc++;

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic refresh(input int tras, input int trp, input int trrd, input int tfaw,
                         input int base, input int r, input int limit,
                         output int measured, output int n_act);
    int last_act[B], last_pre[B];
    int hist[$];
    int first;
    foreach (last_act[b]) begin last_act[b] = -100000; last_pre[b] = -100000; end
    first = -1; n_act = 0;
    @(negedge clk);
    tim = '{tras: TIM_W'(tras), trp: TIM_W'(trp), trrd: TIM_W'(trrd), tfaw: TIM_W'(tfaw)};
    base_row = ROW_W'(base); rows = 5'(r); row_limit = (ROW_W+1)'(limit);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      if (cmd.op == CMD_ACT) begin
        automatic int b = int'(cmd.bank);
        check(cyc - last_pre[b] >= trp, "t_RP");
        if (hist.size() > 0) check(cyc - hist[$] >= trrd, "t_RRD");
        if (hist.size() >= 4) check(cyc - hist[hist.size()-4] >= tfaw, "t_FAW");
        hist.push_back(cyc); last_act[b] = cyc; n_act++;
        if (first < 0) first = cyc;
      end else if (cmd.op == CMD_PRE) begin
        check(cyc - last_act[int'(cmd.bank)] >= tras, "t_RAS");
        last_pre[int'(cmd.bank)] = cyc;
      end
      @(negedge clk);
    end
    measured = int'(trfc);
    check(first < 0 ? measured == 0 : measured == cyc - 1 - first, "reported t_RFC");
  endtask

  initial begin
    int m, n;
    int r_of [3] = '{16, 8, 4};
    int rgr_want [3] = '{10182, 5254, 2790};
    int orgr_want [3] = '{5047, 2583, 1351};
    string mode [3] = '{"1X", "2X", "4X"};
    tim = '0; base_row = '0; rows = 5'd4; row_limit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      refresh(283, 150, 67, 308, 0, r_of[i], R, m, n);
      check(m == rgr_want[i] && n == r_of[i]*B,
            $sformatf("RGR %s: t_RFC %0d.%0d ns, want %0d.%0d", mode[i], m/10, m%10,
                      rgr_want[i]/10, rgr_want[i]%10));
      refresh(183, 125, 17, 66, 0, r_of[i], R, m, n);
      check(m == orgr_want[i] && n == r_of[i]*B,
            $sformatf("ORGR %s: t_RFC %0d.%0d ns, want %0d.%0d", mode[i], m/10, m%10,
                      orgr_want[i]/10, orgr_want[i]%10));
      // selective refresh of the lower half: a group in the upper half is skipped
      refresh(183, 125, 17, 66, R/2 + 64, r_of[i], R/2, m, n);
      check(m == 0 && n == 0, $sformatf("selective ORGR %s refreshed the upper half", mode[i]));
      refresh(183, 125, 17, 66, R/2 - r_of[i], r_of[i], R/2, m, n);
      check(m == orgr_want[i] && n == r_of[i]*B, "selective ORGR: lower-half group");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
