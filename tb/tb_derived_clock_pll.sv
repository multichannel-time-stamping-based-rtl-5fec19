// Test of the derived_clock_pll behavioural model: a 40 MHz input must give
// `locked` after a few input cycles and then an 80 MHz output, checked by
// counting output edges per input period and measuring the output period.
// Reset must stop the output and drop `locked`.
module tb_derived_clock_pll;
  timeunit 1ns; timeprecision 1ps;

  logic clk40 = 1'b0, rst = 1'b1, clk80, locked;
  int checks = 0, failures = 0;
  realtime t0, t1;
  int n80;

  derived_clock_pll dut (.clk_in(clk40), .rst, .clk_out(clk80), .locked);

  always #12.5 clk40 = ~clk40;   // 40 MHz

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #60 rst = 1'b0;
    check(!locked, "not locked right after reset");
    repeat (10) @(posedge clk40);
    check(locked, "locked after 10 input cycles");
    @(posedge clk80) t0 = $realtime;
    repeat (80) @(posedge clk80);
    t1 = $realtime;
    check((t1 - t0) > 999.0 && (t1 - t0) < 1001.0,
          $sformatf("80 output periods took %0.3f ns, expected 1000", t1 - t0));
    @(posedge clk40);
    #3 n80 = 0;
    fork
      begin #500; end
      forever @(posedge clk80) n80++;
    join_any
    disable fork;
    check(n80 == 40, $sformatf("%0d output edges in 20 input periods (500 ns)", n80));
    rst = 1'b1;
    #30;
    check(!locked, "reset drops lock");
    n80 = 0;
    fork
      begin #200; end
      forever @(posedge clk80) n80++;
    join_any
    disable fork;
    check(n80 == 0, "no output while in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
