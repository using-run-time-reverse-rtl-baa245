// ddr3_model: behavioural model of the command-level behaviour of a DDR3
// device, as far as the refresh controller can observe it. Not synthesizable
// logic; used by the testbenches only.
//
// It keeps the open/closed state of every bank and models the internal
// minimum-restore timer: a PRE that arrives less than tras_min_dev cycles
// after the bank's ACT is ignored, and the row stays open. A RD to an open
// bank answers with a DQS burst (high, low, ...) starting CL cycles later; a
// RD to a closed bank is ignored and DQS stays low. Every ACT counts as a
// refresh of its row; the time of the last refresh of each (bank, row) is
// kept for rows below ROWS, and max_age() returns the oldest one. Commands
// that break the device's own minimum timings (trp_dev, trrd_dev, tfaw_dev,
// ACT to an open bank) are counted in violations. It reads the command bus
// at each rising clock edge.
`timescale 1ns/1ps
module ddr3_model
  import orgr_pkg::*;
#(
  parameter int BANKS    = 8,
  parameter int ROWS     = 64,
  parameter int CL       = 7,
  parameter int BURST    = 4,
  parameter int TRP_DEV  = 5,
  parameter int TRRD_DEV = 2,
  parameter int TFAW_DEV = 8
) (
  input  logic       clk,
  input  dram_cmd_t  cmd,
  input  int         tras_min_dev,
  output logic       dqs
);
  longint now = 0;
  bit     open_b   [BANKS];
  longint act_t    [BANKS];
  longint pre_t    [BANKS];
  longint last_ref [BANKS][ROWS];
  longint act_hist [$];
  longint dqs_until = -1, dqs_from = -1;

  int violations = 0, acts = 0, pres_taken = 0, pres_ignored = 0;
  int reads_answered = 0, reads_ignored = 0, preas = 0;

  initial begin
    foreach (open_b[b]) begin
      open_b[b] = 0; act_t[b] = -1000; pre_t[b] = -1000;
      foreach (last_ref[b][r]) last_ref[b][r] = 0;
    end
    dqs = 0;
  end

  function automatic void do_pre(input int b);
    if (!open_b[b]) return;
    if (now - act_t[b] < tras_min_dev) begin
      pres_ignored++;
    end else begin
      open_b[b] = 0; pre_t[b] = now; pres_taken++;
    end
  endfunction

  function automatic longint max_age(input int limit);
    longint m = 0;
    foreach (last_ref[b, r])
      if (r < limit && now - last_ref[b][r] > m) m = now - last_ref[b][r];
    return m;
  endfunction

  always @(posedge clk) begin
    now++;
    case (cmd.op)
      CMD_ACT: begin
        automatic int b = int'(cmd.bank);
        if (open_b[b]) violations++;
        if (now - pre_t[b] < TRP_DEV) violations++;
        if (act_hist.size() > 0 && now - act_hist[$] < TRRD_DEV) violations++;
        if (act_hist.size() >= 4 && now - act_hist[act_hist.size()-4] < TFAW_DEV) violations++;
        act_hist.push_back(now);
        if (act_hist.size() > 8) void'(act_hist.pop_front());
        open_b[b] = 1; act_t[b] = now; acts++;
        if (int'(cmd.row) < ROWS) last_ref[b][int'(cmd.row)] = now;
      end
      CMD_PRE:  do_pre(int'(cmd.bank));
      CMD_PREA: begin
        preas++;
        for (int b = 0; b < BANKS; b++) do_pre(b);
      end
      CMD_RD, CMD_WR: begin
        if (open_b[int'(cmd.bank)]) begin
          if (cmd.op == CMD_RD) begin
            reads_answered++;
            dqs_from  = now + CL;
            dqs_until = now + CL + 2*BURST;
          end
        end else if (cmd.op == CMD_RD) reads_ignored++;
      end
      default: ;
    endcase
    dqs <= (now >= dqs_from && now < dqs_until) ? ((now - dqs_from) % 2 == 0) : 1'b0;
  end
endmodule
