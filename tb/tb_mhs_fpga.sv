// Self-checking test of the MHS card logic at its full size (16 channels,
// 32-bit timestamps, three FIFOs of 1023 words).
//
// A host model writes 3000 random event pairs into the three FIFOs, each
// FIFO written on its own with random gaps and respecting `full`. Part of the
// stream is preloaded before `run`, so the FIFOs are seen full. Event times
// are strictly increasing with gaps of 1 to 12 clocks. Every clock the 16
// outputs are compared with the reference: channel c is high while the
// counter reads T+1..T+3 for some event at time T whose flag has bit c set.
// The width of isolated pulses is also measured (three clocks).
module tb_mhs_fpga;
  timeunit 1ns; timeprecision 1ps;
  localparam int N    = 16;
  localparam int D    = 1023;
  localparam int CW   = $clog2(D + 1);
  localparam int NP   = 3000;       // pairs
  localparam int MAXT = 60000;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [2:0] dma_wr_en = '0;
  logic [2:0][31:0] dma_wr_data = '0;
  logic [2:0] dma_full;
  logic [2:0][CW-1:0] dma_count;
  logic [N-1:0] dout;
  logic [31:0] time_now;
  logic busy;
  int checks = 0, failures = 0;

  mhs_fpga dut (.clk, .rst_n, .run, .dma_wr_en, .dma_wr_data, .dma_full, .dma_count,
                .dout, .time_now, .busy);

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

  logic [31:0]  ev_t [2*NP];
  logic [N-1:0] ev_f [2*NP];
  logic [N-1:0] flag_at [MAXT];   // OR of the flags of events at each time
  int wr_idx [3];
  int full_seen = 0, pulses = 0;

  // Host model: FIFO i writes word wr_idx[i] of its own stream when not full.
  always @(negedge clk) begin
    for (int i = 0; i < 3; i++) begin
      dma_wr_en[i] = rst_n && (wr_idx[i] < NP) && !dma_full[i] && (($urandom % 100) < 60);
      if (i == 0) dma_wr_data[i] = ev_t[2*wr_idx[i]];
      if (i == 1) dma_wr_data[i] = ev_t[2*wr_idx[i] + 1];
      if (i == 2) dma_wr_data[i] = {ev_f[2*wr_idx[i] + 1], ev_f[2*wr_idx[i]]};
      if (dma_full[i]) full_seen++;
    end
  end
  always @(posedge clk) for (int i = 0; i < 3; i++) if (dma_wr_en[i]) wr_idx[i]++;

  initial begin
    int t, c;
    logic [N-1:0] exp;
    t = 10000;                       // first event well after the preload
    foreach (flag_at[k]) flag_at[k] = '0;
    for (int i = 0; i < 2*NP; i++) begin
      t += 1 + ($urandom % 12);
      if (i < 20) t += 20;           // isolated events first
      ev_t[i] = t;
      ev_f[i] = (i < 20) ? N'(1 << (i % N)) : (N'($urandom) & N'($urandom)) | N'(1 << (i % N));
      flag_at[t] |= ev_f[i];
    end
    foreach (wr_idx[i]) wr_idx[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (wr_idx[0] >= D && wr_idx[1] >= D && wr_idx[2] >= D);
    @(posedge clk); #1 run = 1'b1;
    while (time_now < ev_t[2*NP-1] + 10) begin
      @(negedge clk);
      c = int'(time_now);
      exp = '0;
      for (int k = 1; k <= 3; k++) if (c - k >= 0) exp |= flag_at[c - k];
      checks++;
      if (dout !== exp) begin
        failures++;
        if (failures < 20) $display("FAIL at count %0d: dout %h exp %h", c, dout, exp);
      end
    end
    check(full_seen > 0, "FIFOs reached full during preload");
    check(wr_idx[0] == NP && wr_idx[1] == NP && wr_idx[2] == NP, "all words accepted");
    check(!busy && dma_count[0] == 0, "all pairs consumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // isolated pulse width on channel 0..15 during the first events
  int w [N];
  always @(negedge clk) if (run && time_now < ev_t[19] + 10) begin
    for (int ch = 0; ch < N; ch++) begin
      if (dout[ch]) w[ch]++;
      else if (w[ch] > 0) begin
        checks++;
        if (w[ch] != 3) begin failures++; $display("FAIL: pulse width %0d on ch %0d", w[ch], ch); end
        pulses++;
        w[ch] = 0;
      end
    end
  end
  initial foreach (w[ch]) w[ch] = 0;
endmodule
