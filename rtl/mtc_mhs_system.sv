// Complete photon time-stamping test system: a multichannel hardware
// simulator (MHS) card and a multichannel time-stamper (MTC) card side by
// side, each with its own 40 MHz board clock multiplied to 80 MHz.
//
// The MHS turns a stream of (timestamp pair, flag word) records written into
// its three DMA FIFOs into 16 detector-like TTL pulse trains on `mhs_dout`.
// The MTC samples 16 detector lines on `mtc_din`, time-stamps rising edges
// and writes the same record format into its own three DMA FIFOs, read out
// through `mtc_dma_*`. The two cards are separate boards: wiring `mhs_dout`
// to `mtc_din` outside this module reproduces the loopback test, in which
// the MTC recovers the MHS timestamps up to a constant offset and a +/-1 count
// error when the two clocks differ. The DMA engines, the PCI interface and
// the host programs are outside this design; their FIFO ports are brought out.
// The clock multipliers are behavioural models; everything else is RTL.
// The derived 80 MHz clocks and PLL lock flags are outputs so that the
// DMA-side logic can run on the same clocks.
//
// Reset: each clock multiplier has its own active-high reset (`*_pll_rst`);
// the card logic has an active-low reset (`*_rst_n`) and is also held in
// reset while its multiplier is not locked. The logic resets on clock edges
// while the derived clock runs, so `*_rst_n` must stay low for a few derived
// clocks after `*_locked` rises.
module mtc_mhs_system
  import pcs_pkg::*;
#(
  parameter int unsigned N_CH  = NUM_CH,
  parameter int unsigned DEPTH = FIFO_DEPTH,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  // ---- MTC card ----
  input  logic                    mtc_clk40,
  input  logic                    mtc_pll_rst,
  input  logic                    mtc_rst_n,
  input  logic                    mtc_run,
  input  logic [N_CH-1:0]         mtc_din,
  output logic                    mtc_clk80,
  output logic                    mtc_locked,
  input  logic [2:0]              mtc_dma_rd_en,
  output logic [2:0][TS_W-1:0]    mtc_dma_rd_data,
  output logic [2:0]              mtc_dma_empty,
  output logic [2:0][CW-1:0]      mtc_dma_count,
  output logic [TS_W-1:0]         mtc_time,
  output logic                    mtc_overflow,
  output logic [31:0]             mtc_dropped,
  // ---- MHS card ----
  input  logic                    mhs_clk40,
  input  logic                    mhs_pll_rst,
  input  logic                    mhs_rst_n,
  input  logic                    mhs_run,
  output logic                    mhs_clk80,
  output logic                    mhs_locked,
  input  logic [2:0]              mhs_dma_wr_en,
  input  logic [2:0][TS_W-1:0]    mhs_dma_wr_data,
  output logic [2:0]              mhs_dma_full,
  output logic [2:0][CW-1:0]      mhs_dma_count,
  output logic [N_CH-1:0]         mhs_dout,
  output logic [TS_W-1:0]         mhs_time,
  output logic                    mhs_busy
);
  timeunit 1ns; timeprecision 1ps;

  derived_clock_pll #(.MULT(2)) u_mtc_pll (
    .clk_in(mtc_clk40), .rst(mtc_pll_rst), .clk_out(mtc_clk80), .locked(mtc_locked)
  );

  derived_clock_pll #(.MULT(2)) u_mhs_pll (
    .clk_in(mhs_clk40), .rst(mhs_pll_rst), .clk_out(mhs_clk80), .locked(mhs_locked)
  );

  mtc_fpga #(.N_CH(N_CH), .TS_BITS(TS_W), .DEPTH(DEPTH)) u_mtc (
    .clk(mtc_clk80), .rst_n(mtc_rst_n && mtc_locked), .run(mtc_run),
    .din(mtc_din),
    .dma_rd_en(mtc_dma_rd_en), .dma_rd_data(mtc_dma_rd_data),
    .dma_empty(mtc_dma_empty), .dma_count(mtc_dma_count),
    .time_now(mtc_time), .overflow(mtc_overflow), .dropped(mtc_dropped)
  );

  mhs_fpga #(.N_CH(N_CH), .TS_BITS(TS_W), .DEPTH(DEPTH)) u_mhs (
    .clk(mhs_clk80), .rst_n(mhs_rst_n && mhs_locked), .run(mhs_run),
    .dma_wr_en(mhs_dma_wr_en), .dma_wr_data(mhs_dma_wr_data),
    .dma_full(mhs_dma_full), .dma_count(mhs_dma_count),
    .dout(mhs_dout), .time_now(mhs_time), .busy(mhs_busy)
  );

endmodule
