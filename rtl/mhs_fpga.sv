// Multichannel hardware simulator (MHS): the FPGA logic of the pulse card.
//
// The host streams photon events into three DMA FIFOs of 1023 32-bit words:
// FIFO 0 holds the older timestamp of each pair, FIFO 1 the newer one and
// FIFO 2 both 16-bit channel flags (older in bits 15:0, newer in 31:16) - the
// same layout the MTC produces. A pair loader pops one pair at a time into
// registers and compares its timestamps with a 32-bit counter that advances
// every 12.5 ns (80 MHz). On a match every channel whose flag bit is set
// emits a three-clock TTL pulse, so the outputs mimic 16 photon detectors.
//
// Structure: 3 x dma_fifo -> mhs_pair_loader -> mhs_pulse_generator, with
// timestamp_counter as time base. Timing: an event with timestamp T makes its
// outputs high during the clocks in which the counter reads T+1 .. T+3.
// `run` starts the counter and the matching, so the host can preload the
// FIFOs first (this start control is this design's choice).
module mhs_fpga
  import pcs_pkg::*;
#(
  parameter int unsigned N_CH       = NUM_CH,
  parameter int unsigned TS_BITS    = TS_W,
  parameter int unsigned DEPTH      = FIFO_DEPTH,
  parameter int unsigned PULSE_CLKS = PULSE_LEN,
  localparam int unsigned CW        = $clog2(DEPTH + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         run,
  // DMA side of the FIFOs: 0 = older timestamps, 1 = newer, 2 = flags
  input  logic [2:0]                   dma_wr_en,
  input  logic [2:0][TS_BITS-1:0]      dma_wr_data,
  output logic [2:0]                   dma_full,
  output logic [2:0][CW-1:0]           dma_count,
  // simulated detector outputs
  output logic [N_CH-1:0]              dout,
  // status
  output logic [TS_BITS-1:0]           time_now,
  output logic                         busy
);
  timeunit 1ns; timeprecision 1ps;

  logic [2:0]              fifo_empty;
  logic [2:0][TS_BITS-1:0] rd_word;
  logic                    fifo_rd;
  logic                    fire;
  logic [N_CH-1:0]         fire_flags;

  timestamp_counter #(.WIDTH(TS_BITS)) u_counter (
    .clk, .rst_n, .run, .count(time_now)
  );

  for (genvar i = 0; i < 3; i++) begin : g_fifo
    dma_fifo #(.WIDTH(TS_BITS), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(dma_wr_en[i]), .wr_data(dma_wr_data[i]), .full(dma_full[i]),
      .rd_en(fifo_rd), .rd_data(rd_word[i]), .empty(fifo_empty[i]),
      .count(dma_count[i])
    );
  end

  mhs_pair_loader #(.N_CH(N_CH), .TS_BITS(TS_BITS)) u_loader (
    .clk, .rst_n, .run, .count(time_now),
    .fifo_empty,
    .ts_old_word(rd_word[0]), .ts_new_word(rd_word[1]),
    .flag_word(rd_word[2][2*N_CH-1:0]),
    .fifo_rd, .fire, .fire_flags, .busy
  );

  mhs_pulse_generator #(.N_CH(N_CH), .PULSE_CLKS(PULSE_CLKS)) u_pulses (
    .clk, .rst_n, .fire, .fire_flags, .dout
  );

endmodule
