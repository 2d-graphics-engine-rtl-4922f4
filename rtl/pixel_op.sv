// pixel_op: the "set pixel" operation of the 2D graphics engine.
//
// How it works: setting a pixel needs no computation. When the decoder
// raises i_valid, the x coordinate (data word 1), y coordinate (word 2) and
// colour (word 5) are captured into a one-entry holding register, and the
// pixel is written into the pixel FIFO on the first cycle the FIFO is not
// full. While a pixel is held the block lowers o_rtr so the decoder sends
// nothing else. The holding register is this design's choice; the engine's
// description only says the pixel goes straight to its FIFO.
//
// Interface and timing: i_valid is a one-cycle strobe with the command data
// on i_data. o_enq rises the cycle after i_valid (later if i_full is high)
// for exactly one cycle with the pixel on o_pix. o_rtr is low from the cycle
// after i_valid until the cycle after the enqueue. Synchronous active-high
// reset.
module pixel_op
  import gfx2d_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                i_valid,
  input  logic [DATA_W-1:0]   i_data,
  output logic                o_rtr,
  output logic                o_enq,
  output pixel_t              o_pix,
  input  logic                i_full
);

  cmd_data_t d;
  logic      pending;

  assign d     = cmd_data_t'(i_data);
  assign o_rtr = !pending;
  assign o_enq = pending && !i_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= 1'b0;
      o_pix   <= '0;
    end else if (i_valid && !pending) begin
      pending   <= 1'b1;
      o_pix.x   <= coord(d.w1);
      o_pix.y   <= coord(d.w2);
      o_pix.rgb <= colour(d.w5);
    end else if (o_enq) begin
      pending <= 1'b0;
    end
  end

  a_no_enq_when_full: assert property (@(posedge clk) disable iff (rst) o_enq |-> !i_full);

endmodule
