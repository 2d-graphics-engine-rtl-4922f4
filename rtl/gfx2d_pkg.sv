// gfx2d_pkg: types and constants shared by the 2D graphics engine.
//
// A command is a 3-bit op code plus five 32-bit data words, 163 bits in all,
// which is what the command FIFO stores. A pixel is a 10-bit x, a 10-bit y
// and a 24-bit RGB colour packed as {x, y, rgb}, 44 bits, which is what the
// four output FIFOs store. The op code values, the command and pixel widths
// and the screen size of 640x480 follow the engine's register map and FIFO
// table. Which data word carries which argument of an operation (x0, y0, x1,
// y1, colour; the ASCII code in word 3 for a character) is this design's
// reading of the driver's argument order.
package gfx2d_pkg;

  localparam int unsigned OP_W     = 3;
  localparam int unsigned WORD_W   = 32;
  localparam int unsigned NWORDS   = 5;
  localparam int unsigned DATA_W   = NWORDS * WORD_W;  // 160
  localparam int unsigned CMD_W    = OP_W + DATA_W;    // 163
  localparam int unsigned COORD_W  = 10;
  localparam int unsigned RGB_W    = 24;
  localparam int unsigned PIX_W    = 2 * COORD_W + RGB_W; // 44

  localparam int unsigned RES_H    = 640;
  localparam int unsigned RES_V    = 480;
  localparam int unsigned FB_AW    = 19;   // 512K-word frame buffer

  typedef enum logic [OP_W-1:0] {
    OP_LINE  = 3'b000,
    OP_BLIT  = 3'b001,
    OP_CHAR  = 3'b010,
    OP_PIXEL = 3'b011,
    OP_DEBUG = 3'b100
  } op_e;

  // Five data words; word1 is the least significant.
  typedef struct packed {
    logic [WORD_W-1:0] w5;   // RGB
    logic [WORD_W-1:0] w4;   // y1
    logic [WORD_W-1:0] w3;   // x1 (ASCII code for a character)
    logic [WORD_W-1:0] w2;   // y0
    logic [WORD_W-1:0] w1;   // x0
  } cmd_data_t;

  typedef struct packed {
    logic [OP_W-1:0] op;
    cmd_data_t       data;
  } cmd_t;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [RGB_W-1:0]   rgb;
  } pixel_t;

  // Unpacked view of the operands that the drawing operations take.
  function automatic logic [COORD_W-1:0] coord(input logic [WORD_W-1:0] w);
    return w[COORD_W-1:0];
  endfunction

  function automatic logic [RGB_W-1:0] colour(input logic [WORD_W-1:0] w);
    return w[RGB_W-1:0];
  endfunction

endpackage
