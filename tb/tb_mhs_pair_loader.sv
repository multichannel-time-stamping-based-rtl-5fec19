// Self-checking test of mhs_pair_loader with behavioural FIFO heads: a list
// of random, strictly increasing event times (gaps of 1 to 6 clocks, so
// pairs follow back-to-back) is fed as pairs; each `fire` must occur exactly
// when the counter equals the event's timestamp and carry its flag, and the
// FIFOs must be popped once per pair. A stretch with empty FIFOs checks that
// the loader waits.
module tb_mhs_pair_loader;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 16;
  localparam int NEV = 2000;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [31:0] count = '0;
  logic [2:0] fifo_empty;
  logic [31:0] ts_old_word, ts_new_word;
  logic [2*N-1:0] flag_word;
  logic fifo_rd, fire, busy;
  logic [N-1:0] fire_flags;
  int checks = 0, failures = 0;

  mhs_pair_loader dut (.clk, .rst_n, .run, .count, .fifo_empty, .ts_old_word, .ts_new_word,
                       .flag_word, .fifo_rd, .fire, .fire_flags, .busy);

  always #6.25 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [31:0]  ev_ts   [NEV];
  logic [N-1:0] ev_flag [NEV];
  int head = 0;      // next pair to offer (pair index)
  int next_ev = 0;   // next event expected to fire
  int fires = 0;
  int hold_until;

  // FIFO heads: pair `head` while available; an outage between events 800 and 900
  always_comb begin
    fifo_empty  = (head >= NEV/2 || (count >= hold_until - 60 && count < hold_until)) ? 3'b111 : 3'b000;
    ts_old_word = (head < NEV/2) ? ev_ts[2*head]     : '0;
    ts_new_word = (head < NEV/2) ? ev_ts[2*head + 1] : '0;
    flag_word   = (head < NEV/2) ? {ev_flag[2*head + 1], ev_flag[2*head]} : '0;
  end

  always_ff @(posedge clk) if (rst_n && run) count <= count + 1;
  always_ff @(posedge clk) if (fifo_rd) head <= head + 1;

  initial begin
    int t;
    t = 20;
    for (int i = 0; i < NEV; i++) begin
      t += (i == 800) ? 100 : 1 + ($urandom % 6);
      ev_ts[i] = t;
      ev_flag[i] = N'($urandom) | N'(1 << (i % N));
    end
    hold_until = ev_ts[800] - 5;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1; run = 1'b1;
    while (next_ev < NEV && count < ev_ts[NEV-1] + 10) begin
      @(negedge clk);
      // expected behaviour this cycle
      if (next_ev < NEV && count == ev_ts[next_ev]) begin
        check(fire && fire_flags == ev_flag[next_ev],
              $sformatf("event %0d at %0d not fired correctly", next_ev, count));
        next_ev++;
      end else begin
        check(!fire, $sformatf("spurious fire at count %0d", count));
      end
      if (fire) fires++;
      @(posedge clk);
    end
    check(next_ev == NEV, $sformatf("all events fired (%0d of %0d)", next_ev, NEV));
    check(fires == NEV, "fire count");
    check(head == NEV/2, "one pop per pair");
    @(negedge clk) check(!busy, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
