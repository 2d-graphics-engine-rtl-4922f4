// sync_fifo: single-clock FIFO used for every queue in the graphics engine
// (the 163-bit command FIFO and the four 44-bit pixel FIFOs, all 16 deep).
//
// How it works: a memory array with a read pointer and a write pointer, each
// one bit wider than the address so that "full" (same address, different wrap
// bit) and "empty" (pointers equal) can be told apart. An enqueue is accepted
// only when the FIFO is not full and a dequeue only when it is not empty, as
// the ENQ_valid / DEQ_valid gating of the engine's FIFO does. Both may happen
// in the same cycle.
//
// Interface and timing: o_data always shows the oldest entry (first-word
// fall-through), so a consumer looks at o_data and o_empty and pulses i_deq
// in the same cycle to take it. A word enqueued in cycle n is visible on
// o_data in cycle n+1. Flags are registered-pointer functions, so they change
// one cycle after the enqueue or dequeue that moves them. Reset is
// synchronous and active high and empties the FIFO; the memory is not
// cleared.
//
// The engine's own FIFO drawing shares one memory address between read and
// write through a multiplexer and registers the input word; this version uses
// a separate read and write address instead, which keeps the behaviour seen at
// the ports (full, empty, fall-through data) and allows enqueue and dequeue in
// one cycle.
module sync_fifo #(
  parameter int unsigned WIDTH = 44,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             i_enq,
  input  logic [WIDTH-1:0] i_data,
  input  logic             i_deq,
  output logic [WIDTH-1:0] o_data,
  output logic             o_empty,
  output logic             o_full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      rptr, wptr;
  logic             enq_valid, deq_valid;

  assign o_empty   = (rptr == wptr);
  assign o_full    = (rptr[AW-1:0] == wptr[AW-1:0]) && (rptr[AW] != wptr[AW]);
  assign enq_valid = i_enq && !o_full;
  assign deq_valid = i_deq && !o_empty;
  assign o_data    = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      rptr <= '0;
      wptr <= '0;
    end else begin
      if (enq_valid) wptr <= wptr + 1'b1;
      if (deq_valid) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (enq_valid) mem[wptr[AW-1:0]] <= i_data;
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("sync_fifo: DEPTH must be a power of two");
  end

endmodule
