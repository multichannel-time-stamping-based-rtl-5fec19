// TTL pulse shaper of the MHS outputs.
//
// When the pair loader reports a timestamp match (`fire`), every output
// channel whose flag bit is set starts a pulse PULSE_CLKS clocks long (three
// clocks, 37.5 ns at 80 MHz, as in the original design). Each channel has its
// own down-counter; a new match on a channel whose pulse is still running
// restarts the count, so the pulse is stretched rather than doubled (this
// design's choice). The outputs are registered: a pulse starts on the clock
// edge that follows the match and stays high for exactly PULSE_CLKS clocks.
module mhs_pulse_generator
  import pcs_pkg::*;
#(
  parameter int unsigned N_CH       = NUM_CH,
  parameter int unsigned PULSE_CLKS = PULSE_LEN,
  localparam int unsigned CNT_W     = $clog2(PULSE_CLKS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fire,
  input  logic [N_CH-1:0] fire_flags,
  output logic [N_CH-1:0] dout
);
  timeunit 1ns; timeprecision 1ps;

  logic [N_CH-1:0][CNT_W-1:0] cnt_q, cnt_d;

  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      if (fire && fire_flags[c]) cnt_d[c] = CNT_W'(PULSE_CLKS);
      else if (cnt_q[c] != '0)   cnt_d[c] = cnt_q[c] - 1'b1;
      else                       cnt_d[c] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      dout  <= '0;
    end else begin
      cnt_q <= cnt_d;
      for (int c = 0; c < N_CH; c++) dout[c] <= (cnt_d[c] != '0);
    end
  end

endmodule
