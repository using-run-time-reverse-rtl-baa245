// tb_rgr_engine: self-checking test of one row-granular refresh.
//
// Runs the engine with the refresh timing sets the design is built around
// and compares the measured refresh time with the closed-form t_RFC
// (computed here, independently of the engine):
//   ORGR at 533 MHz, r = 4, B = 8 (11/5/2/8 cycles)   -> 78 cycles (146.25 ns)
//   RGR  at 533 MHz, r = 4, B = 8 (25/7/4/16 cycles)  -> 156 cycles (292.5 ns)
//   (at 400 MHz both timing sets round to the same cycle counts: 195/390 ns)
//   2 Gb example, r = 2, B = 8, 0.5 ns ticks          -> 316 ticks (158 ns)
// plus selective refreshes and random timing sets. A protocol monitor checks
// every command against t_RAS, t_RP, t_RRD and t_FAW and checks that each
// (bank, row) of the refresh is activated exactly once and closed again.
`timescale 1ns/1ps
module tb_rgr_engine;
  import orgr_pkg::*;

  localparam int B = 8;

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

  rgr_engine #(.BANKS(B), .MAX_ROWS_PER_REF(16)) dut (
    .clk, .rst_n, .start, .tim, .base_row, .rows, .row_limit,
    .busy, .done, .cmd_o(cmd), .trfc_o(trfc));

  always #1 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic int pos(input int v);
    return v > 0 ? v : 0;
  endfunction

  function automatic int eq4(input int r, input int tras, input int trp,
                             input int trrd, input int tfaw);
    int twait;
    twait = pos(tfaw - 4*trrd);
    return (r*B - 1)*trrd + tras + trp + (r*B/4 - 1)*twait
           + (r - 1)*pos(tras + trp - (B*trrd + twait));
  endfunction

  // Runs one refresh, monitors it and returns the measured t_RFC.
  task automatic run(input int tras, input int trp, input int trrd, input int tfaw,
                     input int base, input int r, input int limit,
                     output int measured, output int n_cmds);
    int last_act[B], last_pre[B], acts_in_bank[B];
    bit open[B];
    int act_hist[$];
    int first_act, n_act, r_eff;
    r_eff = (base >= limit) ? 0 : ((limit - base) < r ? (limit - base) : r);
    foreach (open[b]) begin
      open[b] = 0; last_act[b] = -100000; last_pre[b] = -100000; acts_in_bank[b] = 0;
    end
    first_act = -1; n_act = 0; n_cmds = 0; measured = -1;
    @(negedge clk);
    tim = '{tras: TIM_W'(tras), trp: TIM_W'(trp), trrd: TIM_W'(trrd), tfaw: TIM_W'(tfaw)};
    base_row = ROW_W'(base); rows = 5'(r); row_limit = (ROW_W+1)'(limit);
    start = 1;
    @(negedge clk);
    start = 0;
    forever begin
      // cmd is the command decided in this cycle
      if (cmd.op != CMD_NOP) n_cmds++;
      if (cmd.op == CMD_ACT) begin
        int b = int'(cmd.bank);
        check(!open[b], "ACT to an open bank");
        check(cyc - last_pre[b] >= trp, "t_RP violated");
        if (act_hist.size() > 0) check(cyc - act_hist[$] >= trrd, "t_RRD violated");
        if (act_hist.size() >= 4) check(cyc - act_hist[act_hist.size()-4] >= tfaw, "t_FAW violated");
        check(int'(cmd.row) == base + acts_in_bank[b], "wrong row activated");
        check(acts_in_bank[b] < r_eff, "too many ACTs to one bank");
        acts_in_bank[b]++;
        open[b] = 1; last_act[b] = cyc; act_hist.push_back(cyc); n_act++;
        if (first_act < 0) first_act = cyc;
      end else if (cmd.op == CMD_PRE) begin
        int b = int'(cmd.bank);
        check(open[b], "PRE to a closed bank");
        check(cyc - last_act[b] >= tras, "t_RAS violated");
        open[b] = 0; last_pre[b] = cyc;
      end
      @(negedge clk);
      if (done) break;
    end
    foreach (open[b]) check(!open[b], "bank left open");
    check(n_act == r_eff*B, "number of ACTs");
    measured = (first_act < 0) ? 0 : (cyc - 1 - first_act);
    check(int'(trfc) == measured, "reported t_RFC differs from observed");
  endtask

  always @(negedge clk) cyc++;

  initial begin
    int m, n;
    tim = '0; base_row = '0; rows = 5'd4; row_limit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ORGR, 533 MHz
    run(11, 5, 2, 8, 0, 4, 1 << 15, m, n);
    check(m == eq4(4, 11, 5, 2, 8) && m == 78, $sformatf("ORGR t_RFC %0d != 78", m));
    // the same cycle set is 27.5/12.5/5 ns at 400 MHz: 146.25 ns and 195 ns
    check(m * 1875 == 146250 && m * 2500 == 195000, "ORGR t_RFC in ns");
    // RGR, 533 MHz
    run(25, 7, 4, 16, 100, 4, 1 << 15, m, n);
    check(m == eq4(4, 25, 7, 4, 16) && m == 156, $sformatf("RGR t_RFC %0d != 156", m));
    // 62.5/17.5/10 ns at 400 MHz is the same cycle set: 292.5 ns and 390 ns
    check(m * 1875 == 292500 && m * 2500 == 390000, "RGR t_RFC in ns");
    // 2 Gb example in 0.5 ns ticks: 37.5/12.5/6/30 ns
    run(75, 25, 12, 60, 2, 2, 1 << 14, m, n);
    check(m == eq4(2, 75, 25, 12, 60) && m == 316, $sformatf("2Gb RGR t_RFC %0d != 316", m));
    // selective: only 2 of the 4 rows lie below the limit
    run(11, 5, 2, 8, 8, 4, 10, m, n);
    check(m == eq4(2, 11, 5, 2, 8), $sformatf("selective t_RFC %0d", m));
    // selective: whole refresh skipped
    run(11, 5, 2, 8, 12, 4, 10, m, n);
    check(m == 0 && n == 0, "skipped refresh issued commands");
    // random timing sets, even t_RRD and t_FAW - 4 t_RRD, odd t_RAS and t_RP:
    // every ACT falls on an even cycle and every PRE on an odd one
    for (int i = 0; i < 30; i++) begin
      automatic int trrd = 2*(1 + $urandom_range(0, 2));
      automatic int tras = 2*trrd*$urandom_range(1, 4) + 1;
      automatic int trp  = 2*$urandom_range(0, 5) + 1;
      automatic int tfaw = 4*trrd + 2*trrd*$urandom_range(0, 2);
      automatic int r    = 1 + $urandom_range(0, 7);
      run(tras, trp, trrd, tfaw, 4*i, r, 1 << 15, m, n);
      check(m == eq4(r, tras, trp, trrd, tfaw),
            $sformatf("random set %0d/%0d/%0d/%0d r=%0d: t_RFC %0d != %0d",
                      tras, trp, trrd, tfaw, r, m, eq4(r, tras, trp, trrd, tfaw)));
    end
    // fully random sets: protocol only
    for (int i = 0; i < 20; i++) begin
      run(1 + $urandom_range(0, 30), 1 + $urandom_range(0, 9), 1 + $urandom_range(0, 5),
          $urandom_range(0, 30), 0, 1 + $urandom_range(0, 15), 1 << 15, m, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
