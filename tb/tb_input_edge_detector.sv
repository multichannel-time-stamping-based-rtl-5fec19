// Self-checking test of input_edge_detector: random activity on 16 lines is
// compared with a reference that delays the sampled lines by SYNC_STAGES
// clocks and marks 0->1 transitions. Also checks that a line high at reset is
// not reported and that every rise is a single-clock pulse.
module tb_input_edge_detector;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 16;
  localparam int S = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] din, rise;
  int checks = 0, failures = 0, rises_seen = 0;

  input_edge_detector dut (.clk, .rst_n, .din, .rise);

  always #6.25 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] hist [$];  // samples taken at each edge
  logic [N-1:0] exp_rise;

  initial begin
    din = 16'h0001;          // channel 0 high during reset
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < S + 2; i++) hist.push_back(16'hFFFF);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(posedge clk);
      hist.push_back(din);
      #1;
      // rise visible now = sample taken S edges before last, vs the one before
      exp_rise = hist[hist.size()-1-S] & ~hist[hist.size()-2-S];
      checks++;
      if (rise !== exp_rise) begin
        failures++;
        $display("FAIL cyc %0d: rise %h exp %h", cyc, rise, exp_rise);
      end
      rises_seen += $countones(rise);
      #3 din = (cyc < 10) ? 16'h0001 : 16'($urandom);
    end
    checks++;
    if (rises_seen < 1000) begin failures++; $display("FAIL: too few rises %0d", rises_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
