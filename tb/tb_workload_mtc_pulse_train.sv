// Workload test of the MTC card at full size, following the two bench tests
// of the time-stamper:
//  1. one pulse train of fixed period and duty cycle fed to all 16 inputs:
//     every event must carry the flag 16'hFFFF and consecutive timestamps
//     must be exactly one period apart (periods of 8, 13 and 100 clocks);
//  2. a single detector in the dark: random pulses on one channel at a mean
//     rate of 56 counts/s (one per 1.43 million clocks at 80 MHz), checking
//     that the sparse events are paired and stamped correctly over a long
//     stretch of the 32-bit counter.
// A host model drains the three FIFOs continuously.
module tb_workload_mtc_pulse_train;
  timeunit 1ns; timeprecision 1ps;
  import pcs_pkg::*;
  localparam int N  = NUM_CH;
  localparam int CW = $clog2(FIFO_DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [N-1:0] din = '0;
  logic [2:0] dma_rd_en, dma_empty;
  logic [2:0][31:0] dma_rd_data;
  logic [2:0][CW-1:0] dma_count;
  logic [31:0] time_now, dropped;
  logic overflow;
  int checks = 0, failures = 0;

  mtc_fpga dut (.clk, .rst_n, .run, .din, .dma_rd_en, .dma_rd_data, .dma_empty, .dma_count,
                .time_now, .overflow, .dropped);

  always #6.25 clk = ~clk;

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // host: pop all three FIFOs together whenever all hold a word
  logic [31:0] ts [$];
  logic [N-1:0] fl [$];
  always @(negedge clk) dma_rd_en = {3{rst_n && (dma_empty == 3'b000)}};
  always @(posedge clk) if (dma_rd_en[0]) begin
    ts.push_back(dma_rd_data[0]); fl.push_back(dma_rd_data[2][15:0]);
    ts.push_back(dma_rd_data[1]); fl.push_back(dma_rd_data[2][31:16]);
  end

  // expected stamps recorded from the driven lines (see tb_mtc_fpga)
  logic [31:0] exp_ts [$];
  logic [N-1:0] exp_fl [$], prev = '0;
  always @(negedge clk) if (rst_n) begin
    if (run && |(din & ~prev)) begin exp_ts.push_back(time_now + 3); exp_fl.push_back(din & ~prev); end
    prev = din;
  end

  task automatic train(int period, int high, int pulses);
    int start;
    start = ts.size();
    for (int p = 0; p < pulses; p++) begin
      @(posedge clk); #1 din = '1;
      repeat (high) @(posedge clk);
      #1 din = '0;
      repeat (period - high - 1) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    for (int k = start + 1; k < ts.size(); k++) begin
      check(fl[k] == 16'hFFFF, $sformatf("flag %h", fl[k]));
      check(ts[k] - ts[k-1] == period, $sformatf("period %0d: spacing %0d", period, ts[k] - ts[k-1]));
    end
    check(ts.size() - start == pulses, $sformatf("period %0d: %0d of %0d pulses stamped", period, ts.size() - start, pulses));
  endtask

  initial begin
    int gap;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1; run = 1'b1;
    train(8, 4, 400);       // 10 MHz train, 50 % duty cycle
    train(13, 3, 200);
    train(100, 20, 50);
    // dark counts on channel 7: exponential gaps, mean 80e6/56 clocks
    for (int k = 0; k < 6; k++) begin
      gap = int'(-$ln(1.0 - real'($urandom % 100000) / 100000.0) * (80.0e6 / 56.0)) + 10;
      repeat (gap) @(posedge clk);
      #1 din[7] = 1'b1;
      repeat (2) @(posedge clk);
      #1 din[7] = 1'b0;
    end
    repeat (20) @(posedge clk);
    check(ts.size() == exp_ts.size(), $sformatf("%0d stamps read, %0d expected", ts.size(), exp_ts.size()));
    for (int k = 0; k < ts.size() && k < exp_ts.size(); k++)
      check(ts[k] == exp_ts[k] && fl[k] == exp_fl[k], $sformatf("stamp %0d", k));
    check(!overflow, "no overflow");
    $display("stamps=%0d last timestamp=%0d (%.3f s)", ts.size(), ts[ts.size()-1], real'(ts[ts.size()-1]) * 12.5e-9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
