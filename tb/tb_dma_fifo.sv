// Self-checking test of dma_fifo at its full size (32 x 1023): fills it to
// full, checks that `full` rises at exactly 1023 words, drains it, then runs
// random simultaneous pushes and pops against a queue model, checking the
// head word, `count`, `full` and `empty` every clock.
module tb_dma_fifo;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 32;
  localparam int D = 1023;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  int full_seen = 0;
  logic [W-1:0] model [$];

  dma_fifo dut (.clk, .rst_n, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty, .count);

  always #6.25 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic compare();
    check(count == model.size(), $sformatf("count %0d exp %0d", count, model.size()));
    check(full == (model.size() == D), "full flag");
    check(empty == (model.size() == 0), "empty flag");
    if (model.size() > 0) check(rd_data == model[0], $sformatf("head %h exp %h", rd_data, model[0]));
  endtask

  // drive one clock with the given request; model follows the FIFO rules
  task automatic step(bit w, bit r, logic [W-1:0] d);
    bit dw, dr;
    dw = w && (model.size() < D);
    dr = r && (model.size() > 0);
    wr_en = dw; rd_en = dr; wr_data = d;
    @(posedge clk);
    #1;
    if (dr) void'(model.pop_front());
    if (dw) model.push_back(d);
    wr_en = 1'b0; rd_en = 1'b0;
    compare();
    if (full) full_seen++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();
    for (int i = 0; i < D; i++) step(1'b1, 1'b0, W'($urandom));
    check(full && count == D, "full after 1023 writes");
    for (int i = 0; i < D; i++) step(1'b0, 1'b1, '0);
    check(empty && count == 0, "empty after draining");
    for (int i = 0; i < 20000; i++) begin
      // bias towards the full region in the middle of the run
      step(($urandom % 100) < ((i > 6000 && i < 12000) ? 70 : 50),
           ($urandom % 100) < ((i > 6000 && i < 12000) ? 30 : 50), W'($urandom));
    end
    check(full_seen > 1, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
