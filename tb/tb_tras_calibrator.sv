// tb_tras_calibrator: the calibrator probes a DRAM model whose internal
// t_RAS^min is set per run. Checks: the reported t_RAS^min equals the
// model's, the number of trials equals JEDEC t_RAS - t_RAS^min + 2, on the
// bus each PRE follows its ACT by the candidate t_RAS (one cycle shorter per
// trial) and each RD follows its PRE by t_RP, the probed row is closed at the
// end, and a device whose timer never fires leaves found = 0 with the JEDEC
// value.
`timescale 1ns/1ps
module tb_tras_calibrator;
  import orgr_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [TIM_W-1:0] tras_jedec, trp_jedec, rd_window;
  dram_cmd_t cmd, bus;
  logic busy, done, found, dqs;
  logic [TIM_W-1:0] tras_min;
  logic [TIM_W:0] trials;
  int dev_tras_min = 10;
  int checks = 0, failures = 0;
  int cyc = 0;

  tras_calibrator #(.CAL_BANK(7), .CAL_ROW(0)) dut (
    .clk, .rst_n, .start, .tras_jedec, .trp_jedec, .rd_window, .dqs,
    .cmd_o(cmd), .busy, .done, .found, .tras_min, .trials);

  ddr3_model #(.BANKS(8), .ROWS(4), .CL(7)) dram (
    .clk, .cmd(bus), .tras_min_dev(dev_tras_min), .dqs);

  always_ff @(posedge clk) bus <= rst_n ? cmd : NOP_CMD;
  always #1 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bus monitor: ACT->PRE and PRE->RD distances of each trial
  int t_act = -1, t_pre = -1, expect_cand = 0, n_trial = 0;
  always @(posedge clk) if (busy || bus.op != CMD_NOP) begin
    case (bus.op)
      CMD_ACT: begin t_act = cyc; n_trial++; end
      CMD_PRE: if (t_pre < t_act) begin
        t_pre = cyc;
        check(cyc - t_act == expect_cand, $sformatf("trial %0d: ACT->PRE %0d, want %0d",
                                                    n_trial, cyc - t_act, expect_cand));
      end
      CMD_RD: begin
        check(cyc - t_pre == int'(trp_jedec), "PRE->RD is not t_RP");
        check(bus.bank == 4'd7, "probe not on bank 7");
        expect_cand--;
      end
      default: ;
    endcase
  end

  task automatic calibrate(input int jedec, input int dev);
    dev_tras_min = dev;
    expect_cand = jedec; n_trial = 0; t_act = -1; t_pre = -1;
    @(negedge clk);
    tras_jedec = TIM_W'(jedec); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    if (dev > 1 && dev <= jedec) begin
      check(found, $sformatf("dev %0d: not found", dev));
      check(int'(tras_min) == dev, $sformatf("dev %0d: found %0d", dev, tras_min));
      check(int'(trials) == jedec - dev + 2, $sformatf("dev %0d: %0d trials", dev, trials));
    end else begin
      check(!found, "found on a device without a timer");
      check(int'(tras_min) == jedec, "fallback is not the JEDEC t_RAS");
    end
    check(!dram.open_b[7], "probed bank left open");
    check(dram.violations == 0, "device timing violated");
  endtask

  initial begin
    tras_jedec = 19; trp_jedec = 7; rd_window = 14;
    repeat (3) @(negedge clk);
    rst_n = 1;
    calibrate(19, 10);     // vendor X at 533 MHz: 18.75 ns
    calibrate(19, 11);
    calibrate(19, 13);     // 24.375 ns
    calibrate(25, 8);
    calibrate(19, 19);
    calibrate(12, 0);      // timer never fires
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
