// gfx2d: top level of the 2D graphics engine, an OPB slave that draws pixels,
// filled rectangles (blits), lines and 8x8 characters into a frame buffer.
//
// How it works: software writes the operands into five data registers and
// then writes the op code with the request bit set. The request pushes the
// command into the decoder's command FIFO. The decoder hands the command to
// the pixel, blit, line or character unit when all units are ready, the unit
// generates pixels ({x, y, rgb}) into its own output FIFO, and the arbiter
// drains the four FIFOs round-robin, writing one pixel per clock into the
// frame buffer through the display controller's user write port whenever
// that port grants access. A debug op code (100) copies data word 1 into a
// 16-deep debug FIFO that software reads back through the debug register;
// the width and depth of that FIFO, and what the debug op stores, are this
// design's choice. The frame buffer is row-major, H_RES pixels per line,
// address y * H_RES + x.
//
// Interface and timing: one clock domain, synchronous active-high reset.
// OPB: see opb_interface (3 cycles per register access). Frame-buffer port:
// fb_we, fb_addr and fb_rgb are combinational; a pixel is written on each
// rising edge where fb_we is high, which happens only while fb_user_ok is
// high. Latency from the request write's acknowledge to the first pixel at
// the frame buffer is a few cycles (pixel: 3, blit: 3, line: 7, char: 4 or
// more), after which each unit produces one pixel per cycle.
module gfx2d
  import gfx2d_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR   = 32'hFFFF_FF00,
  parameter logic [31:0] C_HIGHADDR   = 32'hFFFF_FFFF,
  parameter int unsigned C_OPB_AWIDTH = 32,
  parameter int unsigned C_OPB_DWIDTH = 32,
  parameter int unsigned RESOLUTION_H = RES_H,
  parameter int unsigned FIFO_DEPTH   = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  // OPB slave
  input  logic [C_OPB_AWIDTH-1:0] OPB_ABus,
  input  logic [C_OPB_DWIDTH-1:0] OPB_DBus,
  input  logic                    OPB_RNW,
  input  logic                    OPB_select,
  output logic [C_OPB_DWIDTH-1:0] Sl_DBus,
  output logic                    Sl_xferAck,
  // frame-buffer user port of the display controller
  input  logic                    fb_user_ok,
  output logic                    fb_we,
  output logic [FB_AW-1:0]        fb_addr,
  output logic [RGB_W-1:0]        fb_rgb
);

  // Source order inside the arbiter: 0 pixel, 1 blit, 2 line, 3 char.
  localparam int unsigned SRC_PIXEL = 0;
  localparam int unsigned SRC_BLIT  = 1;
  localparam int unsigned SRC_LINE  = 2;
  localparam int unsigned SRC_CHAR  = 3;

  logic                req;
  logic [OP_W-1:0]     op;
  logic [DATA_W-1:0]   reg_data, d_bus;
  logic                cmd_full, cmd_empty;
  logic                rtr_line, rtr_blit, rtr_char, rtr_pixel;
  logic                v_line, v_blit, v_char, v_pixel, v_debug;
  logic [3:0]          enq, full, empty;
  pixel_t              pix [4];
  logic                dbg_full, dbg_empty, dbg_deq;
  logic [WORD_W-1:0]   dbg_data;

  opb_interface #(
    .C_BASEADDR  (C_BASEADDR),
    .C_HIGHADDR  (C_HIGHADDR),
    .C_OPB_AWIDTH(C_OPB_AWIDTH),
    .C_OPB_DWIDTH(C_OPB_DWIDTH)
  ) u_opb (
    .clk         (clk),
    .rst         (rst),
    .OPB_ABus    (OPB_ABus),
    .OPB_DBus    (OPB_DBus),
    .OPB_RNW     (OPB_RNW),
    .OPB_select  (OPB_select),
    .Sl_DBus     (Sl_DBus),
    .Sl_xferAck  (Sl_xferAck),
    .o_req       (req),
    .o_op        (op),
    .o_data      (reg_data),
    .i_blit_rtr  (rtr_blit),
    .i_line_rtr  (rtr_line),
    .i_char_rtr  (rtr_char),
    .i_gfx2d_rtr (!cmd_full),
    .i_mem_rtr   (fb_user_ok),
    .i_blit_full (full[SRC_BLIT]),
    .i_line_full (full[SRC_LINE]),
    .i_char_full (full[SRC_CHAR]),
    .i_pixel_full(full[SRC_PIXEL]),
    .i_dbg_empty (dbg_empty),
    .i_dbg_data  (dbg_data),
    .o_dbg_deq   (dbg_deq)
  );

  decoder #(.CMD_DEPTH(FIFO_DEPTH)) u_dec (
    .clk        (clk),
    .rst        (rst),
    .i_enq      (req),
    .i_op       (op),
    .i_data     (reg_data),
    .o_full     (cmd_full),
    .o_empty    (cmd_empty),
    .rtr_line   (rtr_line),
    .rtr_blit   (rtr_blit),
    .rtr_char   (rtr_char),
    .rtr_pixel  (rtr_pixel),
    .rtr_debug  (!dbg_full),
    .valid_line (v_line),
    .valid_blit (v_blit),
    .valid_char (v_char),
    .valid_pixel(v_pixel),
    .valid_debug(v_debug),
    .d_out      (d_bus)
  );

  pixel_op u_pixel (
    .clk(clk), .rst(rst), .i_valid(v_pixel), .i_data(d_bus), .o_rtr(rtr_pixel),
    .o_enq(enq[SRC_PIXEL]), .o_pix(pix[SRC_PIXEL]), .i_full(full[SRC_PIXEL])
  );

  blit u_blit (
    .clk(clk), .rst(rst), .i_valid(v_blit), .i_data(d_bus), .o_rtr(rtr_blit),
    .o_enq(enq[SRC_BLIT]), .o_pix(pix[SRC_BLIT]), .i_full(full[SRC_BLIT])
  );

  line_draw u_line (
    .clk(clk), .rst(rst), .i_valid(v_line), .i_data(d_bus), .o_rtr(rtr_line),
    .o_enq(enq[SRC_LINE]), .o_pix(pix[SRC_LINE]), .i_full(full[SRC_LINE])
  );

  char_draw u_char (
    .clk(clk), .rst(rst), .i_valid(v_char), .i_data(d_bus), .o_rtr(rtr_char),
    .o_enq(enq[SRC_CHAR]), .o_pix(pix[SRC_CHAR]), .i_full(full[SRC_CHAR])
  );

  arbiter #(.NSRC(4), .DEPTH(FIFO_DEPTH), .H_RES(RESOLUTION_H)) u_arb (
    .clk      (clk),
    .rst      (rst),
    .i_enq    (enq),
    .i_pix    (pix),
    .o_full   (full),
    .o_empty  (empty),
    .i_fb_rtr (fb_user_ok),
    .o_fb_we  (fb_we),
    .o_fb_addr(fb_addr),
    .o_fb_rgb (fb_rgb)
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_dbg_fifo (
    .clk    (clk),
    .rst    (rst),
    .i_enq  (v_debug),
    .i_data (d_bus[WORD_W-1:0]),
    .i_deq  (dbg_deq),
    .o_data (dbg_data),
    .o_empty(dbg_empty),
    .o_full (dbg_full)
  );

endmodule
