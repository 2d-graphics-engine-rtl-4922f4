// decoder: command queue and dispatcher of the 2D graphics engine.
//
// How it works: every request written by the processor is pushed, as a
// 3-bit op code and 160 bits of data, into a 16-deep command FIFO held inside
// this block. The decoder waits until the FIFO is not empty and every drawing
// operation reports ready-to-receive (RTR); in that cycle it dequeues the
// head command, drives its low 160 bits onto d_out, which all operations
// share, and raises the one valid line whose op code matches the top 3 bits.
// Op codes: 000 line, 001 blit, 010 character, 011 set pixel, 100 debug.
// An op code with no operation behind it is dequeued and dropped.
//
// Interface and timing: the valid lines and d_out are combinational from the
// FIFO head and the RTR inputs, and the valid pulse lasts exactly the one
// cycle of the dequeue; an operation must capture d_out on that edge. The
// valid lines are gated by the dequeue condition as well as the op code, so a
// command is delivered exactly once. The debug path has its own ready input
// (the debug FIFO not being full) and takes part in the "all ready" test like
// the four operations. o_full tells software whether it may post another
// command. Synchronous active-high reset empties the command FIFO.
module decoder
  import gfx2d_pkg::*;
#(
  parameter int unsigned         DW        = DATA_W,
  parameter int unsigned         OW        = OP_W,
  parameter int unsigned         CMD_DEPTH = 16,
  parameter logic [OP_W-1:0]     OPC_LINE  = OP_LINE,
  parameter logic [OP_W-1:0]     OPC_BLIT  = OP_BLIT,
  parameter logic [OP_W-1:0]     OPC_CHAR  = OP_CHAR,
  parameter logic [OP_W-1:0]     OPC_PIXEL = OP_PIXEL,
  parameter logic [OP_W-1:0]     OPC_DEBUG = OP_DEBUG
) (
  input  logic          clk,
  input  logic          rst,
  // from the register interface
  input  logic          i_enq,
  input  logic [OW-1:0] i_op,
  input  logic [DW-1:0] i_data,
  output logic          o_full,
  output logic          o_empty,
  // to the operations
  input  logic          rtr_line,
  input  logic          rtr_blit,
  input  logic          rtr_char,
  input  logic          rtr_pixel,
  input  logic          rtr_debug,
  output logic          valid_line,
  output logic          valid_blit,
  output logic          valid_char,
  output logic          valid_pixel,
  output logic          valid_debug,
  output logic [DW-1:0] d_out
);

  logic [OW+DW-1:0] head;
  logic [OW-1:0]    op;
  logic             deq;

  sync_fifo #(.WIDTH(OW + DW), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk    (clk),
    .rst    (rst),
    .i_enq  (i_enq),
    .i_data ({i_op, i_data}),
    .i_deq  (deq),
    .o_data (head),
    .o_empty(o_empty),
    .o_full (o_full)
  );

  assign op    = head[OW+DW-1:DW];
  assign d_out = head[DW-1:0];
  assign deq   = !o_empty && rtr_line && rtr_blit && rtr_char && rtr_pixel && rtr_debug;

  always_comb begin
    valid_line  = deq && (op == OPC_LINE);
    valid_blit  = deq && (op == OPC_BLIT);
    valid_char  = deq && (op == OPC_CHAR);
    valid_pixel = deq && (op == OPC_PIXEL);
    valid_debug = deq && (op == OPC_DEBUG);
  end

  // At most one operation is started per dequeue.
  a_onehot: assert property (@(posedge clk) disable iff (rst)
    $onehot0({valid_line, valid_blit, valid_char, valid_pixel, valid_debug}));

endmodule
