// orgr_controller: refresh path of a DRAM memory controller that refreshes
// row by row with timings reverse-engineered from the device at start-up
// (Optimized Row Granular Refresh, ORGR).
//
// After reset the controller first measures the device's internal minimum
// row-active time t_RAS^min (tras_calibrator). From then on the refresh timer
// asks for a refresh every t_REFI; the controller stops taking host commands,
// waits until the last host command's JEDEC timing has run out, closes any
// open bank with PREA, waits t_RP, and lets rgr_engine refresh r rows in every
// bank with explicit ACT/PRE commands. In ORGR mode the engine runs on the
// reduced timing set (t_RAS* from the calibration, t_RP*, t_RRD*,
// t_FAW* = 4 t_RRD*); in RGR mode on the JEDEC set. Rows at or above the
// programmed row limit are skipped (selective refresh). A pulse on recal_req
// repeats the calibration at the next idle point, for example alongside a ZQ
// calibration. Host traffic always runs on JEDEC timings, which the host side
// (the normal access scheduler, outside this block) is responsible for.
//
// Interface: host_valid/host_ready/host_cmd is a valid-ready command port;
// an accepted command appears on dram_cmd one cycle later. dram_cmd is the
// registered DRAM command bus, one command per cycle; dram_dqs is the
// sampled DQS line from the PHY. open_banks tells the host which banks are
// open (a refresh closes them all); host_tim is the JEDEC timing set the
// host side must keep to. Configuration writes go to
// refresh_timing_regs. Status: init_done, cal_busy, ref_busy, the calibrated
// t_RAS^min and t_RAS* with the number of calibration trials, the refresh
// mode, the t_RFC of the last refresh, the refresh count, the number of
// waiting refreshes, a pulse at the end of each refresh window and the
// refresh timer's overflow flag.
// This design's choices: the drain rule (RW2PRE cycles after the last
// RD/WR, t_RAS after the last ACT, t_RP after the last PRE) and the
// open-bank tracking.
module orgr_controller
  import orgr_pkg::*;
#(
  parameter int unsigned BANKS            = 8,
  parameter int unsigned ROWS             = 32768,
  parameter int unsigned MAX_ROWS_PER_REF = 16,
  parameter int unsigned ROWS_PER_REF     = 4,
  parameter int unsigned TREFI            = 4160,
  parameter int unsigned J_TRAS           = 19,
  parameter int unsigned J_TRP            = 7,
  parameter int unsigned J_TRRD           = 4,
  parameter int unsigned J_TFAW           = 16,
  parameter int unsigned R_TRRD           = 2,
  parameter int unsigned R_TRP            = 5,
  parameter int unsigned TRAS_GUARD       = 1,
  parameter int unsigned RD_WINDOW        = 14,
  parameter int unsigned RW2PRE           = 18,
  parameter int unsigned CAL_BANK         = 7,
  parameter bit          ORGR_MODE        = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic               cfg_we,
  input  cfg_addr_e          cfg_addr,
  input  logic [REFI_W-1:0]  cfg_wdata,
  input  logic               recal_req,
  // host command port
  input  logic               host_valid,
  output logic               host_ready,
  input  dram_cmd_t          host_cmd,
  output logic [BANKS-1:0]   open_banks,
  output timing_t            host_tim,
  // DRAM side
  output dram_cmd_t          dram_cmd,
  input  logic               dram_dqs,
  // status
  output logic               init_done,
  output logic               cal_busy,
  output logic               ref_busy,
  output logic               cal_found,
  output logic [TIM_W-1:0]   tras_min,
  output logic [TIM_W-1:0]   tras_star,
  output logic [15:0]        last_trfc,
  output logic [31:0]        ref_count,
  output logic [3:0]         ref_pending,
  output logic               ref_wrap,
  output logic               ref_overflow,
  output logic               orgr_mode,
  output logic [TIM_W:0]     cal_trials
);

  typedef enum logic [2:0] {
    S_CAL_START, S_CAL, S_IDLE, S_DRAIN, S_PREA_WAIT, S_REF_START, S_REF
  } state_e;

  state_e state;

  // ---- configuration ------------------------------------------------------
  timing_t             jedec_tim, ref_tim;
  logic [REFI_W-1:0]   trefi;
  logic [4:0]          rows_per_ref;
  logic [ROW_W:0]      row_limit;
  logic [TIM_W-1:0]    rd_window;
  logic                cal_done;

  refresh_timing_regs #(
    .J_TRAS(J_TRAS), .J_TRP(J_TRP), .J_TRRD(J_TRRD), .J_TFAW(J_TFAW),
    .R_TRRD(R_TRRD), .R_TRP(R_TRP), .TRAS_GUARD(TRAS_GUARD), .TREFI(TREFI),
    .ROWS_PER_REF(ROWS_PER_REF), .ROWS(ROWS), .RD_WINDOW(RD_WINDOW),
    .ORGR_MODE(ORGR_MODE)
  ) u_regs (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .cal_done, .cal_found, .cal_tras_min(tras_min),
    .jedec_tim, .ref_tim, .orgr_mode, .tras_star, .trefi, .rows_per_ref,
    .row_limit, .rd_window);

  // ---- refresh timer ------------------------------------------------------
  logic              ref_req, ref_ack;
  logic [ROW_W-1:0]  base_row;

  refresh_timer #(.ROWS(ROWS), .MAX_PENDING(8)) u_timer (
    .clk, .rst_n, .enable(init_done), .trefi, .rows_per_ref, .ack(ref_ack),
    .req(ref_req), .base_row, .pending(ref_pending), .wrap(ref_wrap),
    .overflow(ref_overflow));

  // ---- calibrator ---------------------------------------------------------
  dram_cmd_t cal_cmd;
  logic      cal_start;

  tras_calibrator #(.CAL_BANK(CAL_BANK), .CAL_ROW(0)) u_cal (
    .clk, .rst_n, .start(cal_start), .tras_jedec(jedec_tim.tras),
    .trp_jedec(jedec_tim.trp), .rd_window, .dqs(dram_dqs), .cmd_o(cal_cmd),
    .busy(cal_busy), .done(cal_done), .found(cal_found), .tras_min,
    .trials(cal_trials));

  // ---- refresh engine -----------------------------------------------------
  dram_cmd_t eng_cmd;
  logic      eng_start, eng_done;

  rgr_engine #(.BANKS(BANKS), .MAX_ROWS_PER_REF(MAX_ROWS_PER_REF)) u_eng (
    .clk, .rst_n, .start(eng_start), .tim(ref_tim), .base_row,
    .rows(rows_per_ref), .row_limit, .busy(ref_busy), .done(eng_done),
    .cmd_o(eng_cmd), .trfc_o(last_trfc));

  // ---- drain counters: cycles since the last ACT, RD/WR and PRE ----------
  dram_cmd_t   next_cmd;
  logic [TIM_W-1:0] since_act, since_rw, since_pre;
  logic [TIM_W-1:0] wait_cnt;
  logic        recal_pend;

  wire quiet = (since_act >= jedec_tim.tras) && (since_rw >= TIM_W'(RW2PRE)) &&
               (since_pre >= jedec_tim.trp);

  assign host_tim   = jedec_tim;
  assign host_ready = (state == S_IDLE) && !ref_req && !recal_pend;
  assign cal_start  = (state == S_CAL_START);
  assign eng_start  = (state == S_REF_START);
  assign ref_ack    = eng_done;

  // ---- command selection --------------------------------------------------
  always_comb begin
    next_cmd = NOP_CMD;
    unique case (state)
      S_CAL:   next_cmd = cal_cmd;
      S_REF:   next_cmd = eng_cmd;
      S_IDLE:  if (host_valid && host_ready) next_cmd = host_cmd;
      S_DRAIN: if (quiet && open_banks != '0) next_cmd.op = CMD_PREA;
      default: next_cmd = NOP_CMD;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_CAL_START;
      dram_cmd   <= NOP_CMD;
      init_done  <= 1'b0;
      open_banks <= '0;
      since_act  <= '1;
      since_rw   <= '1;
      since_pre  <= '1;
      wait_cnt   <= '0;
      recal_pend <= 1'b0;
      ref_count  <= '0;
    end else begin
      dram_cmd <= next_cmd;

      // time since the last command of each kind, saturating
      since_act <= (next_cmd.op == CMD_ACT) ? TIM_W'(1) : ((since_act == '1) ? since_act : since_act + 1'b1);
      since_rw  <= (next_cmd.op == CMD_RD || next_cmd.op == CMD_WR) ? TIM_W'(1) :
                   ((since_rw == '1) ? since_rw : since_rw + 1'b1);
      since_pre <= (next_cmd.op == CMD_PRE || next_cmd.op == CMD_PREA) ? TIM_W'(1) :
                   ((since_pre == '1) ? since_pre : since_pre + 1'b1);

      // open banks as left by the host (refresh and calibration close theirs)
      if (state == S_IDLE && host_valid && host_ready) begin
        unique case (host_cmd.op)
          CMD_ACT:  open_banks[host_cmd.bank[$clog2(BANKS)-1:0]] <= 1'b1;
          CMD_PRE:  open_banks[host_cmd.bank[$clog2(BANKS)-1:0]] <= 1'b0;
          CMD_PREA: open_banks <= '0;
          default: ;
        endcase
      end
      if (next_cmd.op == CMD_PREA && state == S_DRAIN) open_banks <= '0;

      if (recal_req) recal_pend <= 1'b1;
      if (eng_done) ref_count <= ref_count + 32'd1;

      unique case (state)
        S_CAL_START: state <= S_CAL;
        S_CAL: if (cal_done) begin
          init_done <= 1'b1;
          state     <= S_IDLE;
        end
        S_IDLE: if (ref_req || recal_pend) state <= S_DRAIN;
        S_DRAIN: if (quiet) begin
          if (open_banks != '0) begin        // PREA issued now
            wait_cnt <= jedec_tim.trp - 1'b1;
            state    <= S_PREA_WAIT;
          end else if (ref_req) begin
            state <= S_REF_START;
          end else begin
            recal_pend <= 1'b0;
            state      <= S_CAL_START;
          end
        end
        S_PREA_WAIT: begin
          if (wait_cnt == '0) begin
            if (ref_req) state <= S_REF_START;
            else begin
              recal_pend <= 1'b0;
              state      <= S_CAL_START;
            end
          end else wait_cnt <= wait_cnt - 1'b1;
        end
        S_REF_START: state <= S_REF;
        S_REF: if (eng_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Only one source may drive the bus in a cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state != S_REF) |-> (eng_cmd.op == CMD_NOP))
    else $error("orgr_controller: refresh engine issued a command outside a refresh");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state != S_CAL) |-> (cal_cmd.op == CMD_NOP))
    else $error("orgr_controller: calibrator issued a command outside calibration");

endmodule
