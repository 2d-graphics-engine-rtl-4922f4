// blit: rectangle fill operation of the 2D graphics engine.
//
// How it works: two counters hold the current x and y. A command gives the
// corners (x0,y0) in data words 1-2 and (x1,y1) in words 3-4 and the colour
// in word 5. The counters start at (x0,y0); every cycle in which the output
// FIFO is not full one pixel is written and x is incremented, and when x has
// reached x1 it returns to x0 and y is incremented. The operation ends after
// writing (x1,y1). When the FIFO is full nothing changes (a stall). So the
// rectangle is written row by row, one pixel per clock cycle, which follows
// the engine's description; the corners are expected in order (x0 <= x1,
// y0 <= y1), as the driver supplies them.
//
// Interface and timing: i_valid is a one-cycle strobe with the command on
// i_data, accepted only while o_rtr is high. o_rtr falls on the next cycle
// and stays low until the cycle after the last pixel is enqueued. The first
// pixel is offered on o_enq/o_pix the cycle after i_valid; a rectangle of
// W x H pixels takes W*H cycles plus the stalled ones. Synchronous
// active-high reset.
module blit
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

  cmd_data_t          d;
  logic               busy;
  logic [COORD_W-1:0] cx, cy, x0, x1, y1;
  logic [RGB_W-1:0]   rgb;

  assign d     = cmd_data_t'(i_data);
  assign o_rtr = !busy;
  assign o_enq = busy && !i_full;
  assign o_pix = '{x: cx, y: cy, rgb: rgb};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cx <= '0; cy <= '0; x0 <= '0; x1 <= '0; y1 <= '0; rgb <= '0;
    end else if (!busy) begin
      if (i_valid) begin
        busy <= 1'b1;
        cx   <= coord(d.w1);
        x0   <= coord(d.w1);
        cy   <= coord(d.w2);
        x1   <= coord(d.w3);
        y1   <= coord(d.w4);
        rgb  <= colour(d.w5);
      end
    end else if (o_enq) begin
      if (cx != x1) begin
        cx <= cx + 1'b1;
      end else if (cy != y1) begin
        cx <= x0;
        cy <= cy + 1'b1;
      end else begin
        busy <= 1'b0;
      end
    end
  end

  a_no_enq_when_full: assert property (@(posedge clk) disable iff (rst) o_enq |-> !i_full);

endmodule
