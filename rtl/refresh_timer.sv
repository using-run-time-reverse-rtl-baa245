// refresh_timer: when to refresh, and which rows.
//
// Every t_REFI cycles the timer adds one refresh to its pending count and
// holds req high while the count is non-zero. Each ack (a refresh finished)
// takes one away and moves the refresh pointer on by r rows, so that
// N = R / r refreshes walk once through all R rows of every bank in one
// refresh window t_REF = N * t_REFI. base_row is the first row of the next
// refresh; wrap pulses when the pointer returns to row 0 (one refresh
// window complete). t_REFI and r are run-time inputs, so a longer refresh
// window (for retention experiments) or a finer refresh granularity only
// needs new register values.
// This design's choices: up to MAX_PENDING refreshes may wait (DDR3 lets a
// controller postpone up to eight); a tick that finds the count full is
// dropped and sets the sticky overflow flag.
module refresh_timer
  import orgr_pkg::*;
#(
  parameter int unsigned ROWS        = 32768,
  parameter int unsigned MAX_PENDING = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic [REFI_W-1:0]  trefi,
  input  logic [4:0]         rows_per_ref,
  input  logic               ack,
  output logic               req,
  output logic [ROW_W-1:0]   base_row,
  output logic [3:0]         pending,
  output logic               wrap,
  output logic               overflow
);

  logic [REFI_W-1:0] cnt;
  logic              tick;

  assign tick = enable && (cnt >= trefi - REFI_W'(1));
  assign req  = (pending != '0);

  logic [ROW_W:0] next_row;
  assign next_row = {1'b0, base_row} + {{(ROW_W-4){1'b0}}, rows_per_ref};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      pending  <= '0;
      base_row <= '0;
      wrap     <= 1'b0;
      overflow <= 1'b0;
    end else begin
      wrap <= 1'b0;
      if (!enable)   cnt <= '0;
      else if (tick) cnt <= '0;
      else           cnt <= cnt + 1'b1;

      unique case ({tick, ack && req})
        2'b10: if (32'(pending) < MAX_PENDING) pending <= pending + 1'b1;
               else overflow <= 1'b1;
        2'b01: pending <= pending - 1'b1;
        default: ;   // both or neither: count unchanged
      endcase

      if (ack && req) begin
        if (next_row >= (ROW_W+1)'(ROWS)) begin
          base_row <= '0;
          wrap     <= 1'b1;
        end else begin
          base_row <= next_row[ROW_W-1:0];
        end
      end
    end
  end

endmodule
