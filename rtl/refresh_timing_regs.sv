// refresh_timing_regs: the controller's two timing sets and the refresh
// configuration.
//
// Normal traffic always uses the JEDEC timing set. Refresh uses either the
// same JEDEC set (RGR, mode bit 0) or the reduced set (ORGR, mode bit 1):
//   t_RRD* and t_RP*   programmed values,
//   t_FAW*             = 4 t_RRD*, which removes the four-activate wait,
//   t_RAS*             = t_RAS^min + guard, from the start-up calibration,
//                        capped at the JEDEC t_RAS; the JEDEC t_RAS as long
//                        as no calibration has found t_RAS^min.
// Defaults are DDR3 at 533 MHz (tCK = 1.875 ns): JEDEC 35 ns / 12.5 ns /
// 6 ns / 30 ns give t_RAS 19, t_RP 7, t_RRD 4, t_FAW 16 cycles; the reduced
// 3.75 ns / 9.375 ns give t_RRD* 2 and t_RP* 5; a guard of one cycle turns
// the measured 18.75 ns (10 cycles) into the 20.625 ns (11 cycles) t_RAS*.
// The guard, the register map and the write port are this design's choices.
//
// Interface: one write port (cfg_we, cfg_addr, cfg_wdata), applied on the
// next clock edge; cal_done with cal_found/cal_tras_min loads the result of
// a calibration. All outputs are registered values or simple functions of
// them, valid every cycle.
module refresh_timing_regs
  import orgr_pkg::*;
#(
  parameter int unsigned J_TRAS       = 19,
  parameter int unsigned J_TRP        = 7,
  parameter int unsigned J_TRRD       = 4,
  parameter int unsigned J_TFAW       = 16,
  parameter int unsigned R_TRRD       = 2,
  parameter int unsigned R_TRP        = 5,
  parameter int unsigned TRAS_GUARD   = 1,
  parameter int unsigned TREFI        = 4160,
  parameter int unsigned ROWS_PER_REF = 4,
  parameter int unsigned ROWS         = 32768,
  parameter int unsigned RD_WINDOW    = 14,
  parameter bit          ORGR_MODE    = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  cfg_addr_e          cfg_addr,
  input  logic [REFI_W-1:0]  cfg_wdata,
  input  logic               cal_done,
  input  logic               cal_found,
  input  logic [TIM_W-1:0]   cal_tras_min,
  output timing_t            jedec_tim,
  output timing_t            ref_tim,
  output logic               orgr_mode,
  output logic [TIM_W-1:0]   tras_star,
  output logic [REFI_W-1:0]  trefi,
  output logic [4:0]         rows_per_ref,
  output logic [ROW_W:0]     row_limit,
  output logic [TIM_W-1:0]   rd_window
);

  timing_t           j_q;
  logic [TIM_W-1:0]  r_trrd_q, r_trp_q, guard_q, tras_min_q;
  logic              cal_valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      orgr_mode    <= ORGR_MODE;
      j_q          <= '{tras: TIM_W'(J_TRAS), trp: TIM_W'(J_TRP),
                        trrd: TIM_W'(J_TRRD), tfaw: TIM_W'(J_TFAW)};
      r_trrd_q     <= TIM_W'(R_TRRD);
      r_trp_q      <= TIM_W'(R_TRP);
      guard_q      <= TIM_W'(TRAS_GUARD);
      trefi        <= REFI_W'(TREFI);
      rows_per_ref <= 5'(ROWS_PER_REF);
      row_limit    <= (ROW_W+1)'(ROWS);
      rd_window    <= TIM_W'(RD_WINDOW);
      tras_min_q   <= '0;
      cal_valid_q  <= 1'b0;
    end else begin
      if (cfg_we) begin
        unique case (cfg_addr)
          REG_MODE:      orgr_mode    <= cfg_wdata[0];
          REG_J_TRAS:    j_q.tras     <= cfg_wdata[TIM_W-1:0];
          REG_J_TRP:     j_q.trp      <= cfg_wdata[TIM_W-1:0];
          REG_J_TRRD:    j_q.trrd     <= cfg_wdata[TIM_W-1:0];
          REG_J_TFAW:    j_q.tfaw     <= cfg_wdata[TIM_W-1:0];
          REG_R_TRRD:    r_trrd_q     <= cfg_wdata[TIM_W-1:0];
          REG_R_TRP:     r_trp_q      <= cfg_wdata[TIM_W-1:0];
          REG_TRAS_GRD:  guard_q      <= cfg_wdata[TIM_W-1:0];
          REG_TREFI:     trefi        <= cfg_wdata;
          REG_ROWS_REF:  rows_per_ref <= cfg_wdata[4:0];
          REG_ROW_LIMIT: row_limit    <= cfg_wdata[ROW_W:0];
          REG_RD_WIN:    rd_window    <= cfg_wdata[TIM_W-1:0];
          default: ;
        endcase
      end
      if (cal_done) begin
        cal_valid_q <= cal_found;
        tras_min_q  <= cal_tras_min;
      end
    end
  end

  // t_RAS* = min(t_RAS^min + guard, JEDEC t_RAS), computed one bit wider.
  logic [TIM_W:0] tras_sum;
  always_comb begin
    tras_sum  = {1'b0, tras_min_q} + {1'b0, guard_q};
    tras_star = j_q.tras;
    if (cal_valid_q && tras_sum < {1'b0, j_q.tras} && tras_sum != '0)
      tras_star = tras_sum[TIM_W-1:0];
  end

  logic [TIM_W-1:0] trrd_star, trp_star;
  assign trrd_star = (r_trrd_q == '0) ? TIM_W'(1) : r_trrd_q;
  assign trp_star  = (r_trp_q  == '0) ? TIM_W'(1) : r_trp_q;

  assign jedec_tim = j_q;
  always_comb begin
    if (orgr_mode)
      ref_tim = '{tras: tras_star, trp: trp_star, trrd: trrd_star,
                  tfaw: TIM_W'({trrd_star, 2'b00})};
    else
      ref_tim = j_q;
  end

endmodule
