// dqs_detector: tells whether the DRAM answered a read with a data strobe.
//
// The t_RAS^min calibration issues a RD to a bank that is either open (the
// preceding PRE was ignored by the DRAM) or closed (the PRE was taken). Only
// an open bank drives DQS back. This block is armed when the RD is issued
// and then watches the sampled DQS line for `window` cycles; it reports in
// one cycle, with valid, whether any strobe edge (a high sample) was seen.
// A new arm restarts the window. The window length is run-time programmable
// because it depends on the read latency and on the PHY's sampling delay,
// which are this design's assumptions, not fixed by the refresh scheme.
module dqs_detector
  import orgr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              arm,
  input  logic [TIM_W-1:0]  window,   // cycles to watch, >= 1
  input  logic              dqs,      // DQS as sampled by the PHY
  output logic              valid,    // one-cycle pulse at the end of a window
  output logic              seen      // a strobe was seen in that window
);

  logic              active;
  logic [TIM_W-1:0]  cnt;
  logic              hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      hit    <= 1'b0;
      valid  <= 1'b0;
      seen   <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (arm) begin
        active <= 1'b1;
        cnt    <= (window == '0) ? TIM_W'(1) : window;
        hit    <= 1'b0;
      end else if (active) begin
        if (cnt == TIM_W'(1)) begin
          active <= 1'b0;
          valid  <= 1'b1;
          seen   <= hit | dqs;
        end
        cnt <= cnt - 1'b1;
        if (dqs) hit <= 1'b1;
      end
    end
  end

endmodule
