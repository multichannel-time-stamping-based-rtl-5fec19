// FPGA-side half of a DMA FIFO.
//
// A synchronous first-in first-out buffer of DEPTH words of WIDTH bits held in
// an array (embedded RAM on the FPGA). On one side the FPGA logic pushes or
// pops words; on the other a DMA engine that is not part of this design
// moves them to or from the host. Depth 1023 and width 32 follow the original
// design; DEPTH need not be a power of two, the pointers wrap at DEPTH.
//
// Interface: a write with `full` high and a read with `empty` high are
// ignored (assertions flag them). The read side is first-word-fall-through:
// `rd_data` always shows the oldest word while `empty` is low, and `rd_en`
// removes it at the clock edge. A word written at one edge is readable after
// that edge. `count` is the number of words held.
module dma_fifo
  import pcs_pkg::*;
#(
  parameter int unsigned WIDTH = WORD_W,
  parameter int unsigned DEPTH = FIFO_DEPTH,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [CW-1:0]    count
);
  timeunit 1ns; timeprecision 1ps;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Handshake rules: the producer must not push into a full FIFO and the
  // consumer must not pop an empty one.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("dma_fifo: write while full");
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("dma_fifo: read while empty");

endmodule
