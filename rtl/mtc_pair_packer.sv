// Event pairing stage of the MTC.
//
// Each clock in which one or more channels saw a rising edge is an event: its
// timestamp (the counter value) and its N_CH-bit flag (which channels fired)
// are captured. The first event of a pair is held in temporary registers; at
// the second event the pair is written, in the same clock, into the three DMA
// FIFOs: the older timestamp into FIFO 0, the newer one into FIFO 1, and the
// flags into FIFO 2 with the older flag in the low half and the newer flag in
// the high half. Writing pairs lets all three DMA channels carry data, so one
// FIFO word per channel moves two photon events.
//
// Events may arrive on every clock; a pair is written at most every other
// clock. If any FIFO is full when a pair is due, the pair is dropped, the
// sticky `overflow` flag is set and `dropped` counts lost pairs (overflow
// handling is this design's choice; the original relies on the FIFOs being
// deep enough). An unpaired event waits in the registers until the next
// event. `pending` shows that one is waiting. Because the pair is written in
// the clock of its second event, `ts_new_word` and the upper half of
// `flag_word` are simply the current `timestamp` and `flags` inputs.
module mtc_pair_packer
  import pcs_pkg::*;
#(
  parameter int unsigned N_CH   = NUM_CH,
  parameter int unsigned TS_BITS = TS_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  logic [N_CH-1:0]      flags,      // channels with a rising edge this clock
  input  logic [TS_BITS-1:0]   timestamp,  // counter value this clock
  // write side of the three FIFOs
  input  logic [2:0]           fifo_full,
  output logic                 fifo_wr,
  output logic [TS_BITS-1:0]   ts_old_word,
  output logic [TS_BITS-1:0]   ts_new_word,
  output logic [2*N_CH-1:0]    flag_word,
  // status
  output logic                 pending,
  output logic                 overflow,
  output logic [31:0]          dropped
);
  timeunit 1ns; timeprecision 1ps;

  logic [TS_BITS-1:0] ts_old_q;
  logic [N_CH-1:0]    flag_old_q;
  logic               event_now, pair_due;

  assign event_now = run && (|flags);
  assign pair_due  = event_now && pending;
  assign fifo_wr   = pair_due && !(|fifo_full);

  assign ts_old_word = ts_old_q;
  assign ts_new_word = timestamp;
  assign flag_word   = {flags, flag_old_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_old_q   <= '0;
      flag_old_q <= '0;
      pending    <= 1'b0;
      overflow   <= 1'b0;
      dropped    <= '0;
    end else if (event_now) begin
      if (!pending) begin
        ts_old_q   <= timestamp;
        flag_old_q <= flags;
        pending    <= 1'b1;
      end else begin
        pending <= 1'b0;
        if (|fifo_full) begin
          overflow <= 1'b1;
          dropped  <= dropped + 1'b1;
        end
      end
    end
  end

endmodule
