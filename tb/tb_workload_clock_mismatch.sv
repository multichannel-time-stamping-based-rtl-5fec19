// Workload test of the loopback with two independent board clocks: the MHS
// board oscillator runs 160 ppm slower than the MTC one (25.004 ns against
// 25 ns), as two separate boards with the same nominal 80 MHz clock would.
// The MHS replays 3000 evenly spaced events on all 16 channels. The MTC
// then counts time slightly faster than the MHS, so recovered timestamps
// follow sent * 1.00016 + offset. After fitting the offset, every
// recovered timestamp must lie within +/-1 count of that line: sampling an
// asynchronous edge can land one clock early or late, never more. The test
// also requires that such +/-1 steps actually occurred.
module tb_workload_clock_mismatch;
  timeunit 1ns; timeprecision 1ps;
  import pcs_pkg::*;
  localparam int N   = NUM_CH;
  localparam int D   = FIFO_DEPTH;
  localparam int CW  = $clog2(D + 1);
  localparam int NEV = 3000;
  localparam real RATIO = 12.502 / 12.5;   // MTC counts per MHS count

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
  initial begin #3; forever #12.502 mhs_clk40 = ~mhs_clk40; end

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
  logic [31:0]  rx_t [NEV];
  logic [N-1:0] rx_f [NEV];
  int wr_idx [3];
  int rx_n = 0;

  always @(negedge mhs_clk80)
    for (int i = 0; i < 3; i++) begin
      mhs_dma_wr_en[i] = mhs_rst_n && (wr_idx[i] < NEV/2) && !mhs_dma_full[i] && (($urandom % 100) < 50);
      if (i == 0) mhs_dma_wr_data[i] = ev_t[2*wr_idx[i]];
      if (i == 1) mhs_dma_wr_data[i] = ev_t[2*wr_idx[i] + 1];
      if (i == 2) mhs_dma_wr_data[i] = 32'hFFFF_FFFF;
    end
  always @(posedge mhs_clk80) for (int i = 0; i < 3; i++) if (mhs_dma_wr_en[i]) wr_idx[i]++;

  always @(negedge mtc_clk80) mtc_dma_rd_en = {3{mtc_rst_n && (mtc_dma_empty == 3'b000)}};
  always @(posedge mtc_clk80) if (mtc_dma_rd_en[0] && rx_n + 1 < NEV) begin
    rx_t[rx_n] = mtc_dma_rd_data[0]; rx_f[rx_n] = mtc_dma_rd_data[2][15:0];
    rx_t[rx_n+1] = mtc_dma_rd_data[1]; rx_f[rx_n+1] = mtc_dma_rd_data[2][31:16];
    rx_n += 2;
  end

  initial begin
    real sum, offset, dev;
    int n_early = 0, n_late = 0, n_exact = 0;
    for (int i = 0; i < NEV; i++) ev_t[i] = 2000 + 37 * i;
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
    // fit the offset of rx = RATIO * sent + offset
    sum = 0.0;
    for (int i = 0; i < rx_n; i++) sum += real'(rx_t[i]) - RATIO * real'(ev_t[i]);
    offset = sum / rx_n;
    for (int i = 0; i < rx_n; i++) begin
      dev = real'(rx_t[i]) - (RATIO * real'(ev_t[i]) + offset);
      check(dev > -1.5 && dev < 1.5 && rx_f[i] == 16'hFFFF,
            $sformatf("event %0d: %0.2f counts off the fitted line", i, dev));
      // step between neighbours against the ideal step
      if (i > 0) begin
        int step, ideal;
        step  = int'(rx_t[i] - rx_t[i-1]);
        ideal = $rtoi(RATIO * 37.0);
        if (step == ideal) n_exact++;
        else if (step == ideal + 1) n_late++;
        else if (step == ideal - 1) n_early++;
      end
    end
    check(n_early + n_late > 0, $sformatf("+/-1 count steps seen: %0d (exact %0d)", n_early + n_late, n_exact));
    check(n_early + n_late + n_exact == rx_n - 1, "every spacing within +/-1 count of ideal");
    $display("drift over run: %0d counts; spacings exact %0d, +1 %0d, -1 %0d",
             int'(rx_t[rx_n-1] - rx_t[0]) - int'(ev_t[NEV-1] - ev_t[0]), n_exact, n_late, n_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
