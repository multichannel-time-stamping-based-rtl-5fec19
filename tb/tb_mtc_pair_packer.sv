// Self-checking test of mtc_pair_packer: random event flags (including events
// on consecutive clocks) with a running timestamp; every written pair is
// compared with a model that pairs events in arrival order. The FIFO-full
// input is forced for a stretch to check dropping, `overflow` and `dropped`.
module tb_mtc_pair_packer;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [N-1:0] flags = '0;
  logic [31:0] timestamp = '0;
  logic [2:0] fifo_full = '0;
  logic fifo_wr, pending, overflow;
  logic [31:0] ts_old_word, ts_new_word, dropped;
  logic [2*N-1:0] flag_word;
  int checks = 0, failures = 0, pairs = 0, exp_dropped = 0;

  mtc_pair_packer dut (.clk, .rst_n, .run, .flags, .timestamp, .fifo_full, .fifo_wr,
                       .ts_old_word, .ts_new_word, .flag_word, .pending, .overflow, .dropped);

  always #6.25 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  bit          have_old = 0;
  logic [31:0] m_ts;
  logic [N-1:0] m_flag;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1; run = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // drive this cycle's inputs
      timestamp = 32'd1000 + cyc;
      if (cyc < 40) flags = N'($urandom) | 1;              // back-to-back events
      else flags = (($urandom % 4) == 0) ? N'($urandom) : '0;
      fifo_full = (cyc >= 3000 && cyc < 3200) ? 3'(1 << ($urandom % 3)) : 3'b000;
      #1;
      // combinational outputs against the model
      if (|flags) begin
        if (have_old) begin
          check(fifo_wr == !(|fifo_full), $sformatf("cyc %0d write enable", cyc));
          if (!(|fifo_full)) begin
            check(ts_old_word == m_ts && ts_new_word == timestamp &&
                  flag_word == {flags, m_flag}, $sformatf("cyc %0d pair contents", cyc));
            pairs++;
          end else exp_dropped++;
          have_old = 0;
        end else begin
          check(!fifo_wr, "no write on first event");
          m_ts = timestamp; m_flag = flags; have_old = 1;
        end
      end else check(!fifo_wr, "no write without event");
      @(posedge clk);
      #1;
      check(pending == have_old, "pending flag");
      check(dropped == exp_dropped, $sformatf("dropped %0d exp %0d", dropped, exp_dropped));
      check(overflow == (exp_dropped > 0), "overflow flag");
    end
    // run low: events are ignored
    run = 1'b0; flags = '1; #1;
    check(!fifo_wr, "ignored while stopped");
    @(posedge clk); #1 check(pending == have_old, "pending unchanged while stopped");
    check(pairs > 500 && exp_dropped > 0, "pairs written and drops exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
