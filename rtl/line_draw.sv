// line_draw: Bresenham line drawing operation of the 2D graphics engine.
//
// How it works: a command gives the end points (x0,y0) in data words 1-2 and
// (x1,y1) in words 3-4 and the colour in word 5. Four set-up stages prepare
// the integer-only Bresenham loop, one stage per clock:
//   1. |dx| = |x1-x0| and |dy| = |y1-y0|;
//   2. steep = |dy| > |dx|; if steep, swap x and y of both points;
//   3. if x0 > x1, swap the two points;
//   4. deltax = x1-x0, deltay = |y1-y0|, ystep = +1 or -1, error = 0.
// The drawing loop then steps x from x0 to x1, one pixel per cycle: it plots
// (y,x) if steep and (x,y) otherwise, adds deltay to the error and, when twice
// the error reaches deltax, steps y by ystep and subtracts deltax. As in the
// blit, a full output FIFO freezes the loop for that cycle. The set-up stages
// and loop follow the engine's description of its Bresenham unit; taking the
// y step when 2*error >= deltax is the standard form of the algorithm.
//
// Interface and timing: i_valid is a one-cycle strobe, accepted while o_rtr
// is high. o_rtr is low from the next cycle until the cycle after the last
// pixel is enqueued. The first pixel appears on o_enq 5 cycles after i_valid
// (4 set-up cycles), then one pixel per unstalled cycle, max(|dx|,|dy|)+1
// pixels in all. Synchronous active-high reset.
module line_draw
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

  typedef enum logic [2:0] {IDLE, ST1, ST2, ST3, ST4, DRAW} state_e;

  localparam int unsigned EW = COORD_W + 3;   // signed error / delta width

  cmd_data_t          d;
  state_e             state;
  logic [COORD_W-1:0] xa, ya, xb, yb;          // working end points
  logic [COORD_W-1:0] adx, ady;
  logic               steep;
  logic [COORD_W-1:0] x, y;
  logic signed [EW-1:0] deltax, deltay, err, err_next;
  logic               ystep_neg;
  logic [RGB_W-1:0]   rgb;

  assign d        = cmd_data_t'(i_data);
  assign o_rtr    = (state == IDLE);
  assign o_enq    = (state == DRAW) && !i_full;
  assign o_pix    = steep ? '{x: y, y: x, rgb: rgb} : '{x: x, y: y, rgb: rgb};
  assign err_next = err + deltay;

  function automatic logic [COORD_W-1:0] absdiff(input logic [COORD_W-1:0] a, b);
    return (a > b) ? a - b : b - a;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      xa <= '0; ya <= '0; xb <= '0; yb <= '0; adx <= '0; ady <= '0;
      steep <= 1'b0; x <= '0; y <= '0; deltax <= '0; deltay <= '0;
      err <= '0; ystep_neg <= 1'b0; rgb <= '0;
    end else begin
      unique case (state)
        IDLE: if (i_valid) begin
          xa    <= coord(d.w1);
          ya    <= coord(d.w2);
          xb    <= coord(d.w3);
          yb    <= coord(d.w4);
          rgb   <= colour(d.w5);
          state <= ST1;
        end
        ST1: begin
          adx   <= absdiff(xa, xb);
          ady   <= absdiff(ya, yb);
          state <= ST2;
        end
        ST2: begin
          steep <= ady > adx;
          if (ady > adx) begin
            xa <= ya; ya <= xa;
            xb <= yb; yb <= xb;
          end
          state <= ST3;
        end
        ST3: begin
          if (xa > xb) begin
            xa <= xb; xb <= xa;
            ya <= yb; yb <= ya;
          end
          state <= ST4;
        end
        ST4: begin
          deltax    <= EW'(xb - xa);
          deltay    <= EW'(absdiff(ya, yb));
          ystep_neg <= !(ya < yb);
          err       <= '0;
          x         <= xa;
          y         <= ya;
          state     <= DRAW;
        end
        DRAW: if (o_enq) begin
          if (x == xb) begin
            state <= IDLE;
          end else begin
            x <= x + 1'b1;
            if ((err_next <<< 1) >= deltax) begin
              y   <= ystep_neg ? y - 1'b1 : y + 1'b1;
              err <= err_next - deltax;
            end else begin
              err <= err_next;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_no_enq_when_full: assert property (@(posedge clk) disable iff (rst) o_enq |-> !i_full);

endmodule
