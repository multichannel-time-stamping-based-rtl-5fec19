// Self-checking test of timestamp_counter: counts one per clock while `run`
// is high, holds while it is low, clears on reset and wraps at 2**WIDTH
// (checked with an 8-bit counter and with the default 32-bit one).
module tb_timestamp_counter;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [7:0]  cnt8;
  logic [31:0] cnt32;
  int checks = 0, failures = 0;

  timestamp_counter #(.WIDTH(8)) dut8 (.clk, .rst_n, .run, .count(cnt8));
  timestamp_counter              dut32 (.clk, .rst_n, .run, .count(cnt32));

  always #6.25 clk = ~clk;  // 80 MHz

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned model;
  initial begin
    repeat (3) @(posedge clk);
    #1 check(cnt8 == 0 && cnt32 == 0, "reset value");
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(cnt8 == 0, "holds while run low");
    run = 1'b1;
    model = 0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk);
      model++;
      #1;
      check(cnt8 == 8'(model), $sformatf("8-bit count %0d exp %0d", cnt8, model & 255));
      check(cnt32 == model, $sformatf("32-bit count %0d exp %0d", cnt32, model));
      if (i == 300) begin
        run = 1'b0;
        repeat (5) @(posedge clk);
        #1 check(cnt32 == model, "hold during pause");
        run = 1'b1;
      end
    end
    rst_n = 1'b0;
    #1 check(cnt8 == 0 && cnt32 == 0, "asynchronous clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
