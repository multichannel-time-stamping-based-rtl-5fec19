// Timestamp-pair loader and match logic of the MHS.
//
// When it holds no unused timestamp and all three DMA FIFOs have a word, it
// pops one word from each (older timestamp, newer timestamp, flag word with
// the older flag in the low half) into temporary registers. The held older
// timestamp is then compared with the time counter every clock; on equality
// `fire` pulses for one clock with `fire_flags` set to the older flag. The
// newer timestamp is compared next, and when it matches the next pair is
// popped in that same clock, so back-to-back pairs leave no gap. Matching is
// exact equality, as in the original design: a timestamp that is already in
// the past when loaded waits until the counter wraps around. A pair becomes
// comparable one clock after it is popped, so the first timestamp sent must
// lie at least one clock after the counter value at which it is loaded.
// `busy` is high while a pair is held.
module mhs_pair_loader
  import pcs_pkg::*;
#(
  parameter int unsigned N_CH    = NUM_CH,
  parameter int unsigned TS_BITS = TS_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  logic [TS_BITS-1:0]   count,
  // read side of the three FIFOs (first-word-fall-through)
  input  logic [2:0]           fifo_empty,
  input  logic [TS_BITS-1:0]   ts_old_word,
  input  logic [TS_BITS-1:0]   ts_new_word,
  input  logic [2*N_CH-1:0]    flag_word,
  output logic                 fifo_rd,
  // match output
  output logic                 fire,
  output logic [N_CH-1:0]      fire_flags,
  output logic                 busy
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {EMPTY, WAIT_OLD, WAIT_NEW} state_t;

  state_t             state;
  logic [TS_BITS-1:0] ts_old_q, ts_new_q;
  logic [N_CH-1:0]    flag_old_q, flag_new_q;
  logic               avail, match_old, match_new;

  assign avail     = run && !(|fifo_empty);
  assign match_old = run && (state == WAIT_OLD) && (ts_old_q == count);
  assign match_new = run && (state == WAIT_NEW) && (ts_new_q == count);
  assign fifo_rd   = avail && ((state == EMPTY) || match_new);
  assign busy      = (state != EMPTY);

  always_comb begin
    fire       = match_old || match_new;
    fire_flags = '0;
    if (match_old)      fire_flags = flag_old_q;
    else if (match_new) fire_flags = flag_new_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= EMPTY;
      ts_old_q   <= '0;
      ts_new_q   <= '0;
      flag_old_q <= '0;
      flag_new_q <= '0;
    end else begin
      if (fifo_rd) begin
        ts_old_q   <= ts_old_word;
        ts_new_q   <= ts_new_word;
        flag_old_q <= flag_word[N_CH-1:0];
        flag_new_q <= flag_word[2*N_CH-1:N_CH];
        state      <= WAIT_OLD;
      end else if (match_old) begin
        state <= WAIT_NEW;
      end else if (match_new) begin
        state <= EMPTY;
      end
    end
  end

  logic [TS_BITS-1:0] pair_gap;
  assign pair_gap = ts_new_word - ts_old_word;

  // Stream rule: within a pair the newer timestamp lies after the older one
  // (modulo 2**TS_BITS, less than half the counter range ahead); otherwise
  // it would only match after a counter wrap.
  a_pair_in_order: assert property (@(posedge clk) disable iff (!rst_n)
      fifo_rd |-> (pair_gap != '0 && !pair_gap[TS_BITS-1]))
    else $error("mhs_pair_loader: pair timestamps not increasing");

endmodule
