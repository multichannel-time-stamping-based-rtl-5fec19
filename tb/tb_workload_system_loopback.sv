// Workload test of the complete system with the MHS outputs cabled to the
// MTC inputs, at default sizes, following the two loopback experiments:
//  A. evenly spaced events (every 40 clocks) on all 16 channels at once;
//     the recovered stream must be the sent one shifted by one constant;
//  B. a two-channel, burst-like photon stream of the kind a fluorescence
//     correlation experiment produces (molecules crossing the focus give
//     bursts with ~20-clock mean spacing on top of a sparse background,
//     photons split at random between channels 0 and 1). From both the sent
//     and the recovered streams the four correlation histograms a[0][0],
//     a[0][1], a[1][0], a[1][1] are computed over log2-spaced delay bins
//     (delay d in [2^k, 2^(k+1)) clocks, k = 0..15, counting every ordered
//     photon pair); they must agree bin by bin.
// Host models fill the MHS FIFOs and drain the MTC FIFOs as in
// tb_mtc_mhs_system.
module tb_workload_system_loopback;
  timeunit 1ns; timeprecision 1ps;
  import pcs_pkg::*;
  localparam int N   = NUM_CH;
  localparam int D   = FIFO_DEPTH;
  localparam int CW  = $clog2(D + 1);
  localparam int NA  = 200;           // events of part A (even)
  localparam int NEV = 4000;          // all events (even)
  localparam int NB  = 16;            // delay bins

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
  assign mtc_din = mhs_dout;

  always #12.5 mtc_clk40 = ~mtc_clk40;
  initial begin #4; forever #12.5 mhs_clk40 = ~mhs_clk40; end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [31:0]  ev_t [NEV];
  logic [N-1:0] ev_f [NEV];
  logic [31:0]  rx_t [NEV];
  logic [N-1:0] rx_f [NEV];
  int wr_idx [3];
  int rx_n = 0;

  always @(negedge mhs_clk80)
    for (int i = 0; i < 3; i++) begin
      mhs_dma_wr_en[i] = mhs_rst_n && (wr_idx[i] < NEV/2) && !mhs_dma_full[i] && (($urandom % 100) < 50);
      if (i == 0) mhs_dma_wr_data[i] = ev_t[2*wr_idx[i]];
      if (i == 1) mhs_dma_wr_data[i] = ev_t[2*wr_idx[i] + 1];
      if (i == 2) mhs_dma_wr_data[i] = {ev_f[2*wr_idx[i] + 1], ev_f[2*wr_idx[i]]};
    end
  always @(posedge mhs_clk80) for (int i = 0; i < 3; i++) if (mhs_dma_wr_en[i]) wr_idx[i]++;

  always @(negedge mtc_clk80) mtc_dma_rd_en = {3{mtc_rst_n && (mtc_dma_empty == 3'b000)}};
  always @(posedge mtc_clk80) if (mtc_dma_rd_en[0] && rx_n + 1 < NEV) begin
    rx_t[rx_n] = mtc_dma_rd_data[0]; rx_f[rx_n] = mtc_dma_rd_data[2][15:0];
    rx_t[rx_n+1] = mtc_dma_rd_data[1]; rx_f[rx_n+1] = mtc_dma_rd_data[2][31:16];
    rx_n += 2;
  end

  // log2-binned correlation histograms between channels 0 and 1
  typedef longint hist_t [2][2][NB];
  function automatic hist_t correlate(const ref logic [31:0] t [NEV], const ref logic [N-1:0] f [NEV]);
    hist_t h;
    foreach (h[a, b, k]) h[a][b][k] = 0;
    for (int i = NA; i < NEV; i++)
      for (int j = i + 1; j < NEV; j++) begin
        longint d;
        int k;
        d = longint'(t[j]) - longint'(t[i]);
        if (d >= (64'd1 << NB)) break;
        k = $clog2(d + 1) - 1;          // floor(log2(d)) for d >= 1
        for (int a = 0; a < 2; a++)
          for (int b = 0; b < 2; b++)
            if (f[i][a] && f[j][b]) h[a][b][k]++;
      end
    return h;
  endfunction

  initial begin
    int t, last0, last1;
    bit in_burst;
    int burst_left;
    hist_t h_tx, h_rx;
    longint total;
    logic [31:0] offset;
    // part A: evenly spaced, all channels
    t = 3000;
    for (int i = 0; i < NA; i++) begin t += 40; ev_t[i] = t; ev_f[i] = '1; end
    // part B: bursts and background on channels 0 and 1
    t += 1000; last0 = -100; last1 = -100; in_burst = 0; burst_left = 0;
    for (int i = NA; i < NEV; i++) begin
      logic [N-1:0] f;
      if (burst_left == 0) begin
        in_burst = !in_burst;
        burst_left = in_burst ? 20 + ($urandom % 60) : 2 + ($urandom % 4);
      end
      burst_left--;
      t += in_burst ? 1 + ($urandom % 40) : 200 + ($urandom % 3000);
      f = (($urandom % 10) == 0) ? 16'h0003 : ((($urandom % 2) == 1) ? 16'h0002 : 16'h0001);
      // keep each channel's pulses separate (pulse 3 clocks + 2 low)
      while ((f[0] && t - last0 < 5) || (f[1] && t - last1 < 5)) t++;
      if (f[0]) last0 = t;
      if (f[1]) last1 = t;
      ev_t[i] = t; ev_f[i] = f;
    end
    foreach (wr_idx[i]) wr_idx[i] = 0;
    mtc_dma_rd_en = '0; mhs_dma_wr_en = '0;
    #100;
    mtc_pll_rst = 1'b0; mhs_pll_rst = 1'b0;
    wait (mtc_locked && mhs_locked);
    repeat (5) @(posedge mtc_clk80);
    mtc_rst_n = 1'b1;
    repeat (5) @(posedge mhs_clk80);
    mhs_rst_n = 1'b1;
    @(posedge mtc_clk80); #1 mtc_run = 1'b1;
    wait (wr_idx[2] >= 500);
    @(posedge mhs_clk80); #1 mhs_run = 1'b1;
    wait (mhs_time > ev_t[NEV-1] + 20);
    repeat (100) @(posedge mtc_clk80);
    check(rx_n == NEV, $sformatf("recovered %0d of %0d events", rx_n, NEV));
    offset = rx_t[0] - ev_t[0];
    for (int i = 0; i < NA && i < rx_n; i++)
      check(rx_t[i] - offset == ev_t[i] && rx_f[i] == ev_f[i], $sformatf("part A event %0d", i));
    for (int i = NA; i < rx_n; i++) begin
      rx_t[i] = rx_t[i] - offset;
      check(rx_t[i] == ev_t[i] && rx_f[i] == ev_f[i], $sformatf("part B event %0d", i));
    end
    h_tx = correlate(ev_t, ev_f);
    h_rx = correlate(rx_t, rx_f);
    total = 0;
    foreach (h_tx[a, b, k]) begin
      check(h_tx[a][b][k] == h_rx[a][b][k], $sformatf("a[%0d][%0d] bin %0d: %0d sent vs %0d recovered",
            a, b, k, h_tx[a][b][k], h_rx[a][b][k]));
      total += h_tx[a][b][k];
    end
    check(total > 10000, $sformatf("correlation pairs counted: %0d", total));
    $write("a[0][1] by bin:");
    for (int k = 0; k < NB; k++) $write(" %0d", h_rx[0][1][k]);
    $display("");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
