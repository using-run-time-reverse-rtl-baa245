// rgr_engine: one row-granular refresh, issued as explicit ACT/PRE commands.
//
// A refresh covers r consecutive rows (base_row .. base_row+r-1) in each of
// the BANKS banks. The engine activates them in row-major order (row j in
// bank 0, 1, .., B-1, then row j+1) and precharges every bank as soon as its
// t_RAS has elapsed, so up to B rows are being restored at once. An ACT waits
// for t_RRD after the previous ACT, for the four-activate window t_FAW, and
// for t_RP after the previous PRE of its bank. With these rules the refresh
// takes exactly
//   t_RFC = (rB-1) t_RRD + t_RAS + t_RP + (rB/4 - 1) t_wait
//           + (r-1) [t_RAS + t_RP - (B t_RRD + t_wait)]>=0,
//   t_wait = [t_FAW - 4 t_RRD]>=0,
// whenever PREs and ACTs do not compete for the same cycle. The same engine
// performs plain RGR (JEDEC timing set) and ORGR (reduced timing set, with
// t_FAW* = 4 t_RRD*); the caller chooses the set.
//
// Selective refresh: rows at or above row_limit are skipped, so a refresh
// refreshes min(r, row_limit - base_row) rows per bank, or none.
//
// Interface: pulse start for one cycle while idle; timing, base_row, rows and
// row_limit are sampled then. cmd_o carries the command decided in the
// current cycle (the caller registers it onto the DRAM bus). done pulses in
// the cycle the last PRE's t_RP has elapsed; trfc_o then holds the number of
// cycles from the first ACT to that point (0 when every row was skipped).
// Choices of this design: one command per cycle on the bus, and a PRE wins
// over an ACT that is ready in the same cycle (the PRE bounds the
// bank's next ACT, the ACT only its own PRE).
module rgr_engine
  import orgr_pkg::*;
#(
  parameter int unsigned BANKS            = 8,
  parameter int unsigned MAX_ROWS_PER_REF = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  timing_t              tim,
  input  logic [ROW_W-1:0]     base_row,
  input  logic [4:0]           rows,       // r, 1..MAX_ROWS_PER_REF
  input  logic [ROW_W:0]       row_limit,
  output logic                 busy,
  output logic                 done,
  output dram_cmd_t            cmd_o,
  output logic [15:0]          trfc_o
);

  localparam int unsigned BW = (BANKS > 1) ? $clog2(BANKS) : 1;

  timing_t              tim_q;
  logic [ROW_W-1:0]     base_q;
  logic [4:0]           r_eff_q;     // rows to refresh in this operation
  logic [4:0]           row_idx;     // next row to activate (0..r_eff-1)
  logic [BW-1:0]        bank_idx;    // next bank to activate
  logic                 acts_left;   // some ACT still to issue

  logic [BANKS-1:0]     open_q;
  logic [TIM_W-1:0]     ras_cnt [BANKS];
  logic [TIM_W-1:0]     rp_cnt  [BANKS];
  logic [TIM_W-1:0]     rrd_cnt;

  // Four-activate window: time stamps of the last four ACTs.
  logic [15:0]          now_q;
  logic [15:0]          act_ts [4];
  logic [1:0]           ts_ptr;      // oldest entry once four ACTs were issued
  logic [2:0]           n_acts;      // saturates at 4
  logic                 started_q;   // first ACT issued
  logic [15:0]          t0_q;        // time of the first ACT

  // ---- row count of this operation (selective refresh) -------------------
  function automatic logic [4:0] rows_to_do(input logic [ROW_W-1:0] base,
                                            input logic [4:0] r,
                                            input logic [ROW_W:0] limit);
    logic [ROW_W:0] avail;
    if ({1'b0, base} >= limit) return '0;
    avail = limit - {1'b0, base};
    return (avail < {{(ROW_W-4){1'b0}}, r}) ? avail[4:0] : r;
  endfunction

  // ---- command decision ---------------------------------------------------
  logic              pre_ok;
  logic [BW-1:0]     pre_bank;
  logic              act_ok;
  logic              faw_ok;
  logic              all_quiet;

  always_comb begin
    pre_ok   = 1'b0;
    pre_bank = '0;
    for (int b = BANKS-1; b >= 0; b--) begin
      if (open_q[b] && ras_cnt[b] == '0) begin
        pre_ok   = 1'b1;
        pre_bank = BW'(b);
      end
    end
    faw_ok = (n_acts < 3'd4) || ((now_q - act_ts[ts_ptr]) >= 16'(tim_q.tfaw));
    act_ok = busy && acts_left && !pre_ok && rrd_cnt == '0 && faw_ok &&
             !open_q[bank_idx] && rp_cnt[bank_idx] == '0;
    all_quiet = 1'b1;
    for (int b = 0; b < BANKS; b++)
      if (open_q[b] || rp_cnt[b] != '0) all_quiet = 1'b0;
  end

  wire issue_pre = busy && pre_ok;
  wire issue_act = act_ok;
  wire finish    = busy && !acts_left && all_quiet;

  always_comb begin
    cmd_o = NOP_CMD;
    if (issue_pre) begin
      cmd_o.op   = CMD_PRE;
      cmd_o.bank = BANK_W'(pre_bank);
    end else if (issue_act) begin
      cmd_o.op   = CMD_ACT;
      cmd_o.bank = BANK_W'(bank_idx);
      cmd_o.row  = base_q + ROW_W'(row_idx);
    end
  end

  // ---- state --------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      tim_q     <= '0;
      base_q    <= '0;
      r_eff_q   <= '0;
      row_idx   <= '0;
      bank_idx  <= '0;
      acts_left <= 1'b0;
      open_q    <= '0;
      rrd_cnt   <= '0;
      now_q     <= '0;
      ts_ptr    <= '0;
      n_acts    <= '0;
      started_q <= 1'b0;
      t0_q      <= '0;
      trfc_o    <= '0;
      for (int b = 0; b < BANKS; b++) begin
        ras_cnt[b] <= '0;
        rp_cnt[b]  <= '0;
      end
      for (int i = 0; i < 4; i++) act_ts[i] <= '0;
    end else begin
      done  <= 1'b0;
      now_q <= now_q + 16'd1;

      // per-bank and global counters run down every cycle
      for (int b = 0; b < BANKS; b++) begin
        if (ras_cnt[b] != '0) ras_cnt[b] <= ras_cnt[b] - 1'b1;
        if (rp_cnt[b]  != '0) rp_cnt[b]  <= rp_cnt[b]  - 1'b1;
      end
      if (rrd_cnt != '0) rrd_cnt <= rrd_cnt - 1'b1;

      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          tim_q     <= tim;
          base_q    <= base_row;
          r_eff_q   <= rows_to_do(base_row, rows, row_limit);
          acts_left <= (rows_to_do(base_row, rows, row_limit) != '0);
          row_idx   <= '0;
          bank_idx  <= '0;
          n_acts    <= '0;
          ts_ptr    <= '0;
          started_q <= 1'b0;
          trfc_o    <= '0;
        end
      end else begin
        if (issue_pre) begin
          open_q[pre_bank] <= 1'b0;
          rp_cnt[pre_bank] <= tim_q.trp - 1'b1;
        end else if (issue_act) begin
          open_q[bank_idx]  <= 1'b1;
          ras_cnt[bank_idx] <= tim_q.tras - 1'b1;
          rrd_cnt           <= tim_q.trrd - 1'b1;
          act_ts[ts_ptr]    <= now_q;
          ts_ptr            <= ts_ptr + 2'd1;
          if (n_acts != 3'd4) n_acts <= n_acts + 3'd1;
          if (!started_q) begin
            started_q <= 1'b1;
            t0_q      <= now_q;
          end
          if (32'(bank_idx) == BANKS-1) begin
            bank_idx <= '0;
            row_idx  <= row_idx + 5'd1;
            if (row_idx + 5'd1 == r_eff_q) acts_left <= 1'b0;
          end else begin
            bank_idx <= bank_idx + 1'b1;
          end
        end
        if (finish) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          trfc_o <= started_q ? (now_q - t0_q) : '0;
        end
      end
    end
  end

  // A refresh must be started with usable timings.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && !busy) |-> (tim.tras != '0 && tim.trp != '0 && tim.trrd != '0))
    else $error("rgr_engine: zero timing value at start");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && !busy) |-> (rows != '0 && 32'(rows) <= MAX_ROWS_PER_REF))
    else $error("rgr_engine: rows per refresh out of range");

endmodule
