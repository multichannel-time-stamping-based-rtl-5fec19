// Shared constants of the multichannel time-stamper (MTC) and the multichannel
// hardware pulse simulator (MHS).
//
// Both designs run from an 80 MHz clock (12.5 ns tick) derived from a 40 MHz
// board clock, use a 32-bit time counter, 16 photon channels and three 32-bit
// DMA FIFOs of 1023 words each. An event pair travels over the three FIFOs:
// the older timestamp in FIFO 0, the newer one in FIFO 1 and both 16-bit
// channel flags in FIFO 2 (older flag in the low half, newer flag in the high
// half; where the newer flag goes is this design's choice).
package pcs_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned NUM_CH     = 16;   // photon channels
  localparam int unsigned TS_W       = 32;   // timestamp width
  localparam int unsigned WORD_W     = 32;   // DMA FIFO word width
  localparam int unsigned FIFO_DEPTH = 1023; // FPGA-side FIFO depth in words
  localparam int unsigned PULSE_LEN  = 3;    // MHS output pulse length in clocks

endpackage
