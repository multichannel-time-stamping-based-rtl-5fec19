// Behavioural model (not synthesizable logic) of the FPGA clock multiplier
// that turns the 40 MHz board clock into the 80 MHz derived clock.
//
// On the real card this is the FPGA's PLL / digital clock manager, set up by
// the vendor tools; only its function (multiply the board clock) is given.
// The model measures the period of `clk_in` between rising edges and, after
// LOCK_CYCLES stable input periods, raises `locked` and generates `clk_out`
// with a period of (input period)/MULT, rounded down to whole
// picoseconds, and 50 % duty cycle, starting on a
// rising edge of `clk_in`. Phase alignment beyond that first edge, jitter and
// frequency limits are not modelled. `rst` (active high) stops the output and
// drops `locked`.
module derived_clock_pll #(
  parameter int unsigned MULT        = 2,
  parameter int unsigned LOCK_CYCLES = 4
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out,
  output logic locked
);
  // Time is kept in whole picoseconds in this module.
  timeunit 1ps; timeprecision 1ps;

  longint unsigned last_edge;
  longint unsigned period;
  longint unsigned half_out;
  int unsigned     stable;

  initial begin
    clk_out   = 1'b0;
    locked    = 1'b0;
    last_edge = 0;
    period    = 0;
    half_out  = 1;
    stable    = 0;
  end

  // Period measurement and lock detection.
  always @(posedge clk_in or posedge rst) begin
    if (rst) begin
      locked = 1'b0;
      stable = 0;
      period = 0;
    end else begin
      if (stable > 0) begin
        period   = $time - last_edge;
        half_out = (period / (2 * MULT) > 0) ? period / (2 * MULT) : 1;
      end
      last_edge = $time;
      if (stable <= LOCK_CYCLES) stable = stable + 1;
      else locked = 1'b1;
    end
  end

  // Output clock generation once locked.
  initial begin
    forever begin
      @(posedge locked);
      while (locked) begin
        clk_out = 1'b1;
        #(half_out);
        clk_out = 1'b0;
        #(half_out);
      end
    end
  end

endmodule
