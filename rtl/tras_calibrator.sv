// tras_calibrator: finds the DRAM's internal minimum row-active time
// t_RAS^min by probing it from outside.
//
// A DRAM ignores a PRE that arrives before its internal t_RAS^min timer has
// expired, so the row stays open. The calibrator exploits this: it opens a
// row (ACT), issues PRE after a candidate t_RAS, and issues RD t_RP later. If
// the PRE was taken the bank is closed, the RD is ignored and no DQS comes
// back; if the PRE was ignored the bank is still open and the RD returns
// data with DQS. Starting from the JEDEC t_RAS, the candidate is shortened
// by one cycle per trial until DQS appears; t_RAS^min is then the candidate
// of the previous trial (the shortest one the DRAM still accepted). The
// still-open row is closed with a PRE and, t_RP later, done pulses. If no
// candidate down to one cycle brings DQS back, found stays 0 and tras_min
// reports the JEDEC value.
//
// Interface: start (one cycle, while idle) samples the JEDEC t_RAS and t_RP
// and the DQS window. cmd_o is the command decided in the current cycle; the
// caller must put it on the DRAM bus one cycle later, as every command source
// of the controller does, and the DQS window is counted from the decision.
// One trial takes cand + t_RP + window + 2 cycles.
// From the probing method: ACT / PRE after t_RAS / RD after t_RP, DQS as the
// verdict, the probed bank (bank 7). This design's choices: row 0, one-cycle
// steps, and closing the row with a PRE right after the DQS window.
module tras_calibrator
  import orgr_pkg::*;
#(
  parameter int unsigned CAL_BANK = 7,
  parameter int unsigned CAL_ROW  = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [TIM_W-1:0]  tras_jedec,
  input  logic [TIM_W-1:0]  trp_jedec,
  input  logic [TIM_W-1:0]  rd_window,
  input  logic              dqs,
  output dram_cmd_t         cmd_o,
  output logic              busy,
  output logic              done,
  output logic              found,
  output logic [TIM_W-1:0]  tras_min,
  output logic [TIM_W:0]    trials
);

  typedef enum logic [2:0] {
    S_IDLE, S_ACT, S_RAS, S_RP, S_DQS, S_CLOSE, S_END
  } state_e;

  state_e            state;
  logic [TIM_W-1:0]  cand, cnt, tras_j_q, trp_q, win_q;
  logic              det_valid, det_seen;
  logic              arm;

  assign busy = (state != S_IDLE);
  assign arm  = (state == S_RP) && (cnt == '0);

  dqs_detector u_det (
    .clk, .rst_n, .arm, .window(win_q), .dqs, .valid(det_valid), .seen(det_seen));

  always_comb begin
    cmd_o      = NOP_CMD;
    cmd_o.bank = BANK_W'(CAL_BANK);
    cmd_o.row  = ROW_W'(CAL_ROW);
    unique case (state)
      S_ACT:   cmd_o.op = CMD_ACT;
      S_RAS:   if (cnt == '0) cmd_o.op = CMD_PRE;
      S_RP:    if (cnt == '0) cmd_o.op = CMD_RD;
      S_CLOSE: cmd_o.op = CMD_PRE;
      default: cmd_o.op = CMD_NOP;
    endcase
    if (cmd_o.op == CMD_NOP) begin
      cmd_o.bank = '0;
      cmd_o.row  = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cand     <= '0;
      cnt      <= '0;
      tras_j_q <= '0;
      trp_q    <= '0;
      win_q    <= TIM_W'(1);
      done     <= 1'b0;
      found    <= 1'b0;
      tras_min <= '0;
      trials   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cand     <= tras_jedec;
          tras_j_q <= tras_jedec;
          trp_q    <= trp_jedec;
          win_q    <= rd_window;
          found    <= 1'b0;
          trials   <= '0;
          state    <= S_ACT;
        end
        S_ACT: begin                         // ACT issued now
          cnt    <= cand - 1'b1;
          trials <= trials + 1'b1;
          state  <= S_RAS;
        end
        S_RAS: begin
          if (cnt == '0) begin               // PRE issued now
            cnt   <= trp_q - 1'b1;
            state <= S_RP;
          end else cnt <= cnt - 1'b1;
        end
        S_RP: begin
          if (cnt == '0) state <= S_DQS;     // RD issued now, detector armed
          else cnt <= cnt - 1'b1;
        end
        S_DQS: if (det_valid) begin
          if (det_seen) begin                // PRE was ignored: row still open
            found    <= 1'b1;
            tras_min <= cand + 1'b1;
            state    <= S_CLOSE;
          end else if (cand <= TIM_W'(1)) begin
            tras_min <= tras_j_q;            // nothing found: keep JEDEC t_RAS
            state    <= S_IDLE;
            done     <= 1'b1;
          end else begin
            cand  <= cand - 1'b1;
            state <= S_ACT;
          end
        end
        S_CLOSE: begin                       // closing PRE issued now
          cnt   <= trp_q - 1'b1;
          state <= S_END;
        end
        S_END: begin
          if (cnt == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else cnt <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && state == S_IDLE) |-> (tras_jedec != '0 && trp_jedec != '0))
    else $error("tras_calibrator: zero JEDEC timing");

endmodule
