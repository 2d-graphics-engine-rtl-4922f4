// arbiter: output FIFOs and frame-buffer writer of the 2D graphics engine.
//
// How it works: the block holds the four 16-deep pixel FIFOs, one per drawing
// operation (FIFO 1 pixel, 2 blit, 3 line, 4 character). A round-robin
// pointer names the FIFO whose turn it is. Each cycle the arbiter picks the
// first non-empty FIFO at or after the pointer, skipping empty ones, and puts
// that FIFO's head pixel on the frame-buffer write port. If the frame buffer
// grants user access (i_fb_rtr) the pixel is written and dequeued and the
// pointer moves to the FIFO after the one served, so the next FIFO in turn has
// highest priority; without the grant the pointer stays on the chosen FIFO and
// the pixel waits. The result is at most one pixel per clock, shared fairly.
// The four states, the skip-empty rule and the wait for the memory's ready
// signal follow the engine's arbiter; making the skip over several empty
// FIFOs happen in one cycle is this design's choice. The word address of a
// pixel is y * H_RES + x, a row-major frame buffer.
//
// Interface and timing: each operation has an enqueue strobe, a pixel and a
// full flag (o_full[i], registered FIFO state). The write port is Mealy:
// o_fb_we, o_fb_addr and o_fb_rgb are combinational from the FIFO heads, the
// pointer and i_fb_rtr, and a write happens on every clock edge where o_fb_we
// is high. A pixel enqueued in cycle n can be written in cycle n+1 at the
// earliest. Synchronous active-high reset empties the FIFOs and points at
// FIFO 1.
module arbiter
  import gfx2d_pkg::*;
#(
  parameter int unsigned NSRC   = 4,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned H_RES  = RES_H,
  parameter int unsigned AW     = FB_AW
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NSRC-1:0]   i_enq,
  input  pixel_t            i_pix [NSRC],
  output logic [NSRC-1:0]   o_full,
  output logic [NSRC-1:0]   o_empty,
  // frame-buffer user write port
  input  logic              i_fb_rtr,
  output logic              o_fb_we,
  output logic [AW-1:0]     o_fb_addr,
  output logic [RGB_W-1:0]  o_fb_rgb
);

  localparam int unsigned SW = (NSRC > 1) ? $clog2(NSRC) : 1;

  pixel_t          head [NSRC];
  logic [NSRC-1:0] deq;
  logic [SW-1:0]   ptr, sel;
  logic            found;
  pixel_t          pix;

  for (genvar i = 0; i < NSRC; i++) begin : g_fifo
    sync_fifo #(.WIDTH(PIX_W), .DEPTH(DEPTH)) u_fifo (
      .clk    (clk),
      .rst    (rst),
      .i_enq  (i_enq[i]),
      .i_data (i_pix[i]),
      .i_deq  (deq[i]),
      .o_data (head[i]),
      .o_empty(o_empty[i]),
      .o_full (o_full[i])
    );
  end

  // First non-empty FIFO at or after the pointer, in round-robin order.
  always_comb begin
    found = 1'b0;
    sel   = ptr;
    for (int k = 0; k < NSRC; k++) begin
      logic [SW-1:0] idx;
      idx = SW'((int'(ptr) + k) % NSRC);
      if (!found && !o_empty[idx]) begin
        found = 1'b1;
        sel   = idx;
      end
    end
  end

  assign pix       = head[sel];
  assign o_fb_we   = found && i_fb_rtr;
  assign o_fb_rgb  = pix.rgb;
  assign o_fb_addr = AW'(pix.y * H_RES + pix.x);

  always_comb begin
    deq = '0;
    if (o_fb_we) deq[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
    end else if (found) begin
      if (i_fb_rtr) ptr <= SW'((int'(sel) + 1) % NSRC);
      else          ptr <= sel;
    end
  end

endmodule
