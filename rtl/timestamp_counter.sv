// Free-running time base of both the MTC and the MHS.
//
// A TS_W-bit binary counter that advances by one every clock while `run` is
// high, so at 80 MHz one count is 12.5 ns. It wraps modulo 2**TS_W (about
// 53.7 s at 80 MHz); nothing marks the wrap, as in the original design. The
// counter clears to zero on reset (this reset behaviour is this design's
// choice). `count` is a register output: the value seen during a cycle is the
// timestamp of that cycle.
module timestamp_counter
  import pcs_pkg::*;
#(
  parameter int unsigned WIDTH = TS_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  output logic [WIDTH-1:0] count
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (run) count <= count + 1'b1;
  end

endmodule
