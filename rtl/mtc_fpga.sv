// Multichannel time-stamper (MTC): the FPGA logic of the detector card.
//
// Sixteen photon-detector lines are sampled every 12.5 ns (80 MHz). In every
// clock in which at least one line rose, the value of a 32-bit time counter
// and a 16-bit flag of the lines that rose form one event. Events are paired;
// each pair goes into three DMA FIFOs of 1023 32-bit words: older timestamp
// to FIFO 0, newer to FIFO 1, both flags to FIFO 2 (older flag in bits 15:0,
// newer in 31:16). A DMA engine outside this design empties the FIFOs into
// host memory through the `dma_rd_*` ports, one port per FIFO.
//
// Structure: timestamp_counter -> input_edge_detector -> mtc_pair_packer ->
// 3 x dma_fifo. Timing: a level change sampled at clock edge k is stamped
// with the counter value of the clock that follows edge k+SYNC_STAGES, i.e.
// all timestamps carry the same fixed offset of SYNC_STAGES+1 counts. One
// event per clock is accepted; the FIFOs absorb bursts of up to 2*FIFO_DEPTH
// events. `run` starts counting and detection; `overflow` is sticky and
// `dropped` counts pairs lost to a full FIFO (both this design's additions).
module mtc_fpga
  import pcs_pkg::*;
#(
  parameter int unsigned N_CH        = NUM_CH,
  parameter int unsigned TS_BITS     = TS_W,
  parameter int unsigned DEPTH       = FIFO_DEPTH,
  parameter int unsigned SYNC_STAGES = 2,
  localparam int unsigned CW         = $clog2(DEPTH + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         run,
  input  logic [N_CH-1:0]              din,
  // DMA side of the FIFOs: 0 = older timestamps, 1 = newer, 2 = flags
  input  logic [2:0]                   dma_rd_en,
  output logic [2:0][TS_BITS-1:0]      dma_rd_data,
  output logic [2:0]                   dma_empty,
  output logic [2:0][CW-1:0]           dma_count,
  // status
  output logic [TS_BITS-1:0]           time_now,
  output logic                         overflow,
  output logic [31:0]                  dropped
);
  timeunit 1ns; timeprecision 1ps;

  logic [N_CH-1:0]            rise;
  logic [2:0]                 fifo_full;
  logic                       fifo_wr;
  logic [2:0][TS_BITS-1:0]    wr_word;
  logic [2*N_CH-1:0]          flag_word;

  timestamp_counter #(.WIDTH(TS_BITS)) u_counter (
    .clk, .rst_n, .run, .count(time_now)
  );

  input_edge_detector #(.N_CH(N_CH), .SYNC_STAGES(SYNC_STAGES)) u_edges (
    .clk, .rst_n, .din, .rise
  );

  mtc_pair_packer #(.N_CH(N_CH), .TS_BITS(TS_BITS)) u_packer (
    .clk, .rst_n, .run,
    .flags(rise), .timestamp(time_now),
    .fifo_full, .fifo_wr,
    .ts_old_word(wr_word[0]), .ts_new_word(wr_word[1]), .flag_word,
    .pending(), .overflow, .dropped
  );

  assign wr_word[2] = TS_BITS'(flag_word);

  for (genvar i = 0; i < 3; i++) begin : g_fifo
    dma_fifo #(.WIDTH(TS_BITS), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(fifo_wr), .wr_data(wr_word[i]), .full(fifo_full[i]),
      .rd_en(dma_rd_en[i]), .rd_data(dma_rd_data[i]), .empty(dma_empty[i]),
      .count(dma_count[i])
    );
  end

endmodule
