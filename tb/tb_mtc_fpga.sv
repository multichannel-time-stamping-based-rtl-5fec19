// Self-checking test of the MTC card logic at its full size (16 channels,
// 32-bit timestamps, three FIFOs of 1023 words).
//
// Random pulse trains drive the 16 inputs. The testbench records every
// 0->1 transition it drives, stamps it with the counter value the design
// must attach (the count during the clock before the sampling edge plus
// SYNC_STAGES+1 = 3), groups same-clock rises into one flag word and pairs
// events in order. A host model reads the three FIFOs independently, with
// random stalls, and rebuilds the pairs, which must match. Phases:
//  1. moderate random traffic with a slow host;
//  2. events on every clock (two lines alternating) to check the 80 M
//     events/s input rate;
//  3. a long burst while the host is stalled, so the FIFOs fill, pairs are
//     dropped and `overflow` / `dropped` must account for each lost pair.
module tb_mtc_fpga;
  timeunit 1ns; timeprecision 1ps;
  localparam int N  = 16;
  localparam int D  = 1023;
  localparam int CW = $clog2(D + 1);

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [N-1:0] din = '0;
  logic [2:0] dma_rd_en;
  logic [2:0][31:0] dma_rd_data;
  logic [2:0] dma_empty;
  logic [2:0][CW-1:0] dma_count;
  logic [31:0] time_now, dropped;
  logic overflow;
  int checks = 0, failures = 0;

  mtc_fpga dut (.clk, .rst_n, .run, .din, .dma_rd_en, .dma_rd_data, .dma_empty, .dma_count,
                .time_now, .overflow, .dropped);

  always #6.25 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  typedef struct packed {logic [31:0] t0, t1; logic [N-1:0] f1, f0;} pair_t;

  pair_t       exp_q [$];
  logic [31:0] q0 [$], q1 [$], q2 [$];
  bit          have_old = 0;
  logic [31:0] old_t;
  logic [N-1:0] old_f, prev_din = '0;
  int phase = 0;
  bit host_stall = 1'b0;
  int consec = 0, max_consec = 0, events = 0;

  // Reference: watch the lines at each negedge (they change just after posedge).
  always @(negedge clk) if (rst_n) begin
    logic [N-1:0] r;
    r = din & ~prev_din;
    prev_din = din;
    if (run && |r) begin
      events++;
      consec++;
      if (consec > max_consec) max_consec = consec;
      if (have_old) begin
        exp_q.push_back('{t0: old_t, t1: time_now + 3, f1: r, f0: old_f});
        have_old = 0;
      end else begin
        old_t = time_now + 3; old_f = r; have_old = 1;
      end
    end else consec = 0;
  end

  // Host / DMA model: each channel reads on its own when it has data.
  always @(negedge clk) begin
    for (int i = 0; i < 3; i++)
      dma_rd_en[i] = rst_n && !dma_empty[i] && !host_stall && (($urandom % 100) < (phase == 1 ? 30 : 90));
  end
  always @(posedge clk) begin
    if (dma_rd_en[0]) q0.push_back(dma_rd_data[0]);
    if (dma_rd_en[1]) q1.push_back(dma_rd_data[1]);
    if (dma_rd_en[2]) q2.push_back(dma_rd_data[2]);
  end

  // Pulse stimulus, applied just after the rising edge.
  int width [N];
  task automatic drive(int p_start);
    @(posedge clk);
    #1;
    for (int c = 0; c < N; c++) begin
      if (din[c]) begin
        if (width[c] > 1) width[c]--; else din[c] = 1'b0;
      end else if (($urandom % 1000) < p_start) begin
        din[c] = 1'b1; width[c] = 1 + ($urandom % 3);
      end
    end
  endtask

  int skipped = 0, matched = 0;
  task automatic compare_pairs();
    pair_t got, e;
    while (q0.size() > 0 && q1.size() > 0 && q2.size() > 0) begin
      got = '{t0: q0.pop_front(), t1: q1.pop_front(), f1: q2[0][31:16], f0: q2[0][15:0]};
      void'(q2.pop_front());
      forever begin
        if (exp_q.size() == 0) begin check(0, "unexpected pair"); break; end
        e = exp_q.pop_front();
        if (e == got) begin matched++; checks++; break; end
        skipped++;
      end
    end
  endtask

  initial begin
    foreach (width[c]) width[c] = 0;
    dma_rd_en = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1 run = 1'b1;
    phase = 1;
    for (int i = 0; i < 6000; i++) begin drive(15); compare_pairs(); end
    // phase 2: an event on every clock for 200 clocks
    phase = 2;
    @(posedge clk); #1 din = '0;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1 din = (i % 2 == 0) ? 16'h0001 : 16'h0002;
      compare_pairs();
    end
    @(posedge clk); #1 din = '0;
    repeat (20) begin @(posedge clk); compare_pairs(); end
    check(max_consec >= 200, $sformatf("events on consecutive clocks: %0d", max_consec));
    check(skipped == 0 && !overflow, "no loss before the overflow phase");
    // phase 3: host stalled, 3000 back-to-back events
    phase = 3;
    host_stall = 1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk); #1 din = (i % 2 == 0) ? 16'h8000 : 16'h4000;
    end
    @(posedge clk); #1 din = '0;
    check(overflow, "overflow flagged");
    check(dma_count[0] == CW'(D), "FIFO full at 1023 words");
    host_stall = 0;
    repeat (4000) begin @(posedge clk); compare_pairs(); end
    // one more event completes or opens a pair; finish a possible open pair
    if (have_old) begin
      @(posedge clk); #1 din = 16'h0100;
      @(posedge clk); #1 din = '0;
      repeat (50) begin @(posedge clk); compare_pairs(); end
    end
    check(exp_q.size() == 0, $sformatf("%0d expected pairs never arrived", exp_q.size()));
    check(skipped == int'(dropped), $sformatf("lost %0d pairs, design reports %0d", skipped, dropped));
    check(dropped > 0, "pairs were dropped in overflow phase");
    check(matched > 1500, $sformatf("matched pairs %0d", matched));
    $display("events=%0d matched pairs=%0d dropped=%0d", events, matched, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
