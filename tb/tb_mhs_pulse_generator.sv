// Self-checking test of mhs_pulse_generator: random fire/flag patterns are
// compared clock by clock with a model in which a fire on a channel makes the
// output high for the next PULSE_CLKS (3) clocks, restarting on a repeat.
// Also measures that an isolated pulse is exactly three clocks wide.
module tb_mhs_pulse_generator;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 16;
  localparam int P = 3;

  logic clk = 1'b0, rst_n = 1'b0, fire = 1'b0;
  logic [N-1:0] fire_flags = '0, dout;
  int checks = 0, failures = 0;
  int remain [N];
  logic [N-1:0] exp_out;
  int width = 0, widths_ok = 0;

  mhs_pulse_generator dut (.clk, .rst_n, .fire, .fire_flags, .dout);

  always #6.25 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (remain[c]) remain[c] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      if (cyc < 100) begin                 // isolated pulses on channel 5
        fire = (cyc % 10 == 0);
        fire_flags = 16'h0020;
      end else begin
        fire = ($urandom % 3) == 0;
        fire_flags = N'($urandom);
      end
      @(posedge clk);
      for (int c = 0; c < N; c++) begin
        if (fire && fire_flags[c]) remain[c] = P;
        else if (remain[c] > 0) remain[c]--;
        exp_out[c] = remain[c] > 0;
      end
      #1;
      checks++;
      if (dout !== exp_out) begin
        failures++;
        if (failures < 20) $display("FAIL cyc %0d: dout %h exp %h", cyc, dout, exp_out);
      end
      if (cyc < 100) begin
        if (dout[5]) width++;
        else if (width > 0) begin
          checks++;
          if (width != P) begin failures++; $display("FAIL: width %0d", width); end
          else widths_ok++;
          width = 0;
        end
      end
      fire = 1'b0;
    end
    checks++;
    if (widths_ok < 5) begin failures++; $display("FAIL: few isolated pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
