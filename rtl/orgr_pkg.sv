// orgr_pkg: types and constants shared by the row-granular refresh controller.
//
// The controller talks to the DRAM through a one-command-per-clock command
// bus. A command is the struct dram_cmd_t: an opcode, a bank and a row. All
// timing values are counted in DRAM clock cycles (tCK). The default clock is
// 533 MHz (tCK = 1.875 ns), the faster of the two DDR3 operating points the
// design was measured at; at that clock the measured ORGR timings
// (t_RRD* = 3.75 ns, t_RAS* = 20.625 ns, t_RP* = 9.375 ns) are exactly
// 2, 11 and 5 cycles. Field widths are sized for the largest organisation
// the controller is meant for (16 banks, 2^17 rows per bank); ten bits per
// timing value leave room for timing sets given in sub-nanosecond ticks.
package orgr_pkg;

  localparam int unsigned BANK_W = 4;   // up to 16 banks
  localparam int unsigned ROW_W  = 17;  // up to 128 Ki rows per bank
  localparam int unsigned TIM_W  = 10;  // one timing value, in tCK (up to 1023)
  localparam int unsigned REFI_W = 24;  // refresh interval, in tCK

  // DRAM command opcodes as seen on the command bus.
  typedef enum logic [2:0] {
    CMD_NOP  = 3'd0,
    CMD_ACT  = 3'd1,
    CMD_PRE  = 3'd2,
    CMD_PREA = 3'd3,
    CMD_RD   = 3'd4,
    CMD_WR   = 3'd5,
    CMD_REF  = 3'd6
  } dram_op_e;

  typedef struct packed {
    dram_op_e            op;
    logic [BANK_W-1:0]   bank;
    logic [ROW_W-1:0]    row;
  } dram_cmd_t;

  // Inter-command timing set used to schedule a refresh.
  typedef struct packed {
    logic [TIM_W-1:0] tras;  // ACT -> PRE, same bank
    logic [TIM_W-1:0] trp;   // PRE -> ACT, same bank
    logic [TIM_W-1:0] trrd;  // ACT -> ACT, any two banks
    logic [TIM_W-1:0] tfaw;  // window holding at most four ACTs
  } timing_t;

  // Configuration register map of refresh_timing_regs.
  typedef enum logic [3:0] {
    REG_MODE      = 4'd0,   // bit 0: 1 = ORGR (reduced timings), 0 = RGR (JEDEC)
    REG_J_TRAS    = 4'd1,
    REG_J_TRP     = 4'd2,
    REG_J_TRRD    = 4'd3,
    REG_J_TFAW    = 4'd4,
    REG_R_TRRD    = 4'd5,   // t_RRD*
    REG_R_TRP     = 4'd6,   // t_RP*
    REG_TRAS_GRD  = 4'd7,   // guard added to t_RAS^min to give t_RAS*
    REG_TREFI     = 4'd8,
    REG_ROWS_REF  = 4'd9,   // r, rows refreshed per bank per refresh
    REG_ROW_LIMIT = 4'd10,  // rows at or above this address are not refreshed
    REG_RD_WIN    = 4'd11   // cycles after a calibration RD in which DQS is looked for
  } cfg_addr_e;

  localparam dram_cmd_t NOP_CMD = '{op: CMD_NOP, bank: '0, row: '0};

endpackage
