// End-to-end test of the complete system at its default size: the MHS card
// replays a stream of photon events, its 16 outputs are wired to the 16
// inputs of the MTC card, and the MTC's recovered stream must equal the
// original one up to a single constant time offset.
//
// Each card gets its own 40 MHz board clock (the MHS one shifted by 7 ns);
// the built-in multipliers make the 80 MHz logic clocks, and each card's
// logic leaves reset a few clocks after its multiplier has locked. A host model writes
// 1500 event pairs (3000 events) into the MHS FIFOs, preloading more than a
// FIFO holds so that `full` back-pressure occurs, and another host model
// drains the MTC FIFOs, pausing for a while so that a burst of pairs
// accumulates in them. Events are 1 to 12 clocks apart and may hit several
// channels at once; a channel is not reused within 5 clocks so its three-clock
// pulses stay separate. The test counts how often each mechanism happened
// (clock lock, multi-channel events, MHS FIFO full, MTC FIFO backlog, pulses
// on every channel, pairs recovered) and counts a failure for any that never
// did.
module tb_mtc_mhs_system;
  timeunit 1ns; timeprecision 1ps;
  import pcs_pkg::*;
  localparam int N    = NUM_CH;
  localparam int D    = FIFO_DEPTH;
  localparam int CW   = $clog2(D + 1);
  localparam int NP   = 1500;

  logic mtc_clk40 = 1'b0, mhs_clk40 = 1'b0;
  logic mtc_pll_rst = 1'b1, mhs_pll_rst = 1'b1;
  logic mtc_rst_n = 1'b0, mhs_rst_n = 1'b0, mtc_run = 1'b0, mhs_run = 1'b0;
  logic mtc_clk80, mhs_clk80, mtc_locked, mhs_locked;
  logic [N-1:0] mtc_din, mhs_dout;
  logic [2:0] mtc_dma_rd_en, mtc_dma_empty, mhs_dma_wr_en, mhs_dma_full;
  logic [2:0][31:0] mtc_dma_rd_data, mhs_dma_wr_data;
  logic [2:0][CW-1:0] mtc_dma_count, mhs_dma_count;
  logic [31:0] mtc_time, mhs_time, mtc_dropped;
  logic mtc_overflow, mhs_busy;
  int checks = 0, failures = 0;

  mtc_mhs_system dut (.*);

  assign mtc_din = mhs_dout;   // the loopback cable

  always #12.5 mtc_clk40 = ~mtc_clk40;
  initial begin #7; forever #12.5 mhs_clk40 = ~mhs_clk40; end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [31:0]  ev_t [2*NP];
  logic [N-1:0] ev_f [2*NP];
  int wr_idx [3];
  int n_multi = 0, n_mhs_full = 0, max_backlog = 0, n_pairs = 0;
  bit mtc_stall = 1'b0;
  logic [N-1:0] ch_pulsed = '0;

  // ---- MHS host: each FIFO written on its own, respecting full ----
  always @(negedge mhs_clk80) begin
    for (int i = 0; i < 3; i++) begin
      mhs_dma_wr_en[i] = mhs_rst_n && (wr_idx[i] < NP) && !mhs_dma_full[i] &&
                         (($urandom % 100) < 50);
      if (i == 0) mhs_dma_wr_data[i] = ev_t[2*wr_idx[i]];
      if (i == 1) mhs_dma_wr_data[i] = ev_t[2*wr_idx[i] + 1];
      if (i == 2) mhs_dma_wr_data[i] = {ev_f[2*wr_idx[i] + 1], ev_f[2*wr_idx[i]]};
      if (mhs_dma_full[i]) n_mhs_full++;
    end
    ch_pulsed |= mhs_dout;
  end
  always @(posedge mhs_clk80) for (int i = 0; i < 3; i++) if (mhs_dma_wr_en[i]) wr_idx[i]++;

  // ---- MTC host: drains the three FIFOs, with a pause ----
  logic [31:0] q0 [$], q1 [$], q2 [$];
  always @(negedge mtc_clk80) begin
    for (int i = 0; i < 3; i++)
      mtc_dma_rd_en[i] = mtc_rst_n && !mtc_dma_empty[i] && !mtc_stall && (($urandom % 100) < 40);
    if (int'(mtc_dma_count[0]) > max_backlog) max_backlog = int'(mtc_dma_count[0]);
  end
  always @(posedge mtc_clk80) begin
    if (mtc_dma_rd_en[0]) q0.push_back(mtc_dma_rd_data[0]);
    if (mtc_dma_rd_en[1]) q1.push_back(mtc_dma_rd_data[1]);
    if (mtc_dma_rd_en[2]) q2.push_back(mtc_dma_rd_data[2]);
  end

  // ---- compare recovered events with the originals ----
  int  got_ev = 0;
  bit  have_offset = 0;
  logic [31:0] offset;
  task automatic take_pairs();
    logic [31:0] t0, t1, fw;
    while (q0.size() > 0 && q1.size() > 0 && q2.size() > 0) begin
      t0 = q0.pop_front(); t1 = q1.pop_front(); fw = q2.pop_front();
      if (!have_offset) begin offset = t0 - ev_t[0]; have_offset = 1; end
      if (got_ev + 1 < 2*NP) begin
        check(t0 - offset == ev_t[got_ev] && fw[15:0] == ev_f[got_ev],
              $sformatf("event %0d: got t=%0d f=%h, sent t=%0d f=%h", got_ev,
                        t0 - offset, fw[15:0], ev_t[got_ev], ev_f[got_ev]));
        check(t1 - offset == ev_t[got_ev+1] && fw[31:16] == ev_f[got_ev+1],
              $sformatf("event %0d: got t=%0d f=%h, sent t=%0d f=%h", got_ev + 1,
                        t1 - offset, fw[31:16], ev_t[got_ev+1], ev_f[got_ev+1]));
      end else check(0, "more pairs than sent");
      got_ev += 2;
      n_pairs++;
    end
  endtask

  initial begin
    int t;
    logic [N-1:0] recent [5];
    logic [N-1:0] busy_ch, f;
    foreach (recent[k]) recent[k] = '0;
    t = 2000;
    for (int i = 0; i < 2*NP; i++) begin
      int gap;
      gap = 1 + ($urandom % 12);
      // shift the recent-use window by the gap
      for (int g = 0; g < gap && g < 5; g++) begin
        for (int k = 4; k > 0; k--) recent[k] = recent[k-1];
        recent[0] = '0;
      end
      t += gap;
      busy_ch = recent[0] | recent[1] | recent[2] | recent[3] | recent[4];
      f = N'($urandom) & N'($urandom) & N'($urandom) & ~busy_ch;
      if (f == '0) begin
        for (int c = 0; c < N; c++) if (!busy_ch[(i + c) % N]) begin f = N'(1 << ((i + c) % N)); break; end
      end
      ev_t[i] = t;
      ev_f[i] = f;
      recent[0] |= f;
      if ($countones(f) > 1) n_multi++;
    end
    foreach (wr_idx[i]) wr_idx[i] = 0;
    mtc_dma_rd_en = '0;
    mhs_dma_wr_en = '0;
    #100;
    mtc_pll_rst = 1'b0; mhs_pll_rst = 1'b0;
    wait (mtc_locked && mhs_locked);
    check(1, "both clock multipliers locked");
    repeat (5) @(posedge mtc_clk80);
    mtc_rst_n = 1'b1;
    repeat (5) @(posedge mhs_clk80);
    mhs_rst_n = 1'b1;
    @(posedge mtc_clk80); #1 mtc_run = 1'b1;
    wait (wr_idx[0] >= D && wr_idx[1] >= D && wr_idx[2] >= D);
    @(posedge mhs_clk80); #1 mhs_run = 1'b1;
    // stall the MTC host for a while in the middle of the run
    wait (mhs_time > ev_t[NP/2]);
    mtc_stall = 1;
    wait (mhs_time > ev_t[NP/2] + 6000);
    mtc_stall = 0;
    wait (mhs_time > ev_t[2*NP-1] + 20);
    repeat (3000) begin @(posedge mtc_clk80); take_pairs(); end
    check(got_ev == 2*NP, $sformatf("recovered %0d of %0d events", got_ev, 2*NP));
    check(!mtc_overflow && mtc_dropped == 0, "no MTC FIFO overflow");
    // mechanisms
    check(n_multi > 0,        $sformatf("multi-channel events: %0d", n_multi));
    check(n_mhs_full > 0,     $sformatf("MHS FIFO full clocks: %0d", n_mhs_full));
    check(max_backlog > 100,  $sformatf("MTC FIFO backlog peak: %0d words", max_backlog));
    check(&ch_pulsed,         $sformatf("channels pulsed: %h", ch_pulsed));
    check(n_pairs == NP,      $sformatf("pairs recovered: %0d", n_pairs));
    $display("multi=%0d mhs_full=%0d backlog=%0d pairs=%0d offset=%0d",
             n_multi, n_mhs_full, max_backlog, n_pairs, offset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
