// Rising-edge detector for the photon-detector inputs of the MTC.
//
// Every clock (80 MHz) all NUM_CH digital inputs are sampled. The inputs come
// from free-running detectors, so each passes through a SYNC_STAGES-flop
// synchronizer (this design's choice; the original loop simply samples the
// lines). A channel reports a rising edge for exactly one clock when its
// synchronized level goes from 0 to 1. `rise` is registered and appears
// SYNC_STAGES+1 clocks after the clock edge that first samples the new
// level; this fixed latency is the same for every channel and only shifts all
// timestamps by a constant. Reset fills the whole chain with ones, so a line
// that is already high when the design leaves reset is not counted as a photon.
module input_edge_detector
  import pcs_pkg::*;
#(
  parameter int unsigned N_CH        = NUM_CH,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] din,
  output logic [N_CH-1:0] rise
);
  timeunit 1ns; timeprecision 1ps;

  logic [SYNC_STAGES-1:0][N_CH-1:0] sync_q;
  logic [N_CH-1:0]                  prev_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= '1;
      prev_q <= '1;
      rise   <= '0;
    end else begin
      sync_q[0] <= din;
      for (int s = 1; s < SYNC_STAGES; s++) sync_q[s] <= sync_q[s-1];
      prev_q <= sync_q[SYNC_STAGES-1];
      rise   <= sync_q[SYNC_STAGES-1] & ~prev_q;
    end
  end

endmodule
