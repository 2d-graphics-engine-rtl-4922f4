// char_draw: character drawing operation of the 2D graphics engine.
//
// How it works: a command gives the top-left corner (x0,y0) in data words
// 1-2, the ASCII code in word 3 and the colour in word 5. The 64-bit glyph of
// the character is read from the glyph ROM and loaded into a left-shift
// register. Then, one bit per clock, the register's most significant bit is
// examined: a 1 writes the pixel (x0+countx, y0+county) with the colour into
// the output FIFO, a 0 writes nothing. After each bit the register shifts left
// by one and the 3-bit column counter countx advances; when it wraps from 7 to
// 0 the 3-bit row counter county advances. The operation ends as soon as the
// bits left in the register are all zero, so trailing blank pixels cost no
// time. A set bit that meets a full FIFO waits (nothing shifts or counts).
// The counters, the glyph and shift registers and the "stop when the data is
// zero" rule follow the engine's character circuit; pixel coordinates are
// formed combinationally from the counters rather than in separate x and y
// registers, which is this design's choice.
//
// Interface and timing: i_valid is a one-cycle strobe, accepted while o_rtr
// is high. Cycle 1 reads the ROM, cycle 2 loads the shift register, and from
// cycle 3 on one glyph bit is consumed per unstalled cycle. o_rtr returns
// high two cycles after the last set bit is written (an all-zero glyph keeps
// it low for 3 cycles). Drawing 'A' takes 2 + 54 + 1 cycles without stalls.
// Synchronous active-high reset.
module char_draw
  import gfx2d_pkg::*;
#(
  parameter string FONT_FILE = "rtl/char_font.hex"
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                i_valid,
  input  logic [DATA_W-1:0]   i_data,
  output logic                o_rtr,
  output logic                o_enq,
  output pixel_t              o_pix,
  input  logic                i_full
);

  typedef enum logic [1:0] {IDLE, READ, RUN} state_e;

  cmd_data_t          d;
  state_e             state;
  logic [COORD_W-1:0] x0, y0;
  logic [RGB_W-1:0]   rgb;
  logic [2:0]         countx, county;
  logic [63:0]        glyph, shreg;
  logic               msb, z, advance;

  char_rom #(.INIT_FILE(FONT_FILE)) u_rom (
    .clk   (clk),
    .i_en  (o_rtr && i_valid),
    .i_addr(d.w3[6:0]),
    .o_data(glyph)
  );

  assign d       = cmd_data_t'(i_data);
  assign o_rtr   = (state == IDLE);
  assign msb     = shreg[63];
  assign z       = |shreg;                       // bits remain to be drawn
  assign o_enq   = (state == RUN) && z && msb && !i_full;
  assign advance = (state == RUN) && z && (!msb || !i_full);
  assign o_pix   = '{x: x0 + COORD_W'(countx), y: y0 + COORD_W'(county), rgb: rgb};

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      x0 <= '0; y0 <= '0; rgb <= '0;
      countx <= '0; county <= '0; shreg <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          countx <= '0;
          county <= '0;
          if (i_valid) begin
            x0    <= coord(d.w1);
            y0    <= coord(d.w2);
            rgb   <= colour(d.w5);
            state <= READ;
          end
        end
        READ: begin
          shreg <= glyph;
          state <= RUN;
        end
        RUN: begin
          if (!z) begin
            state <= IDLE;
          end else if (advance) begin
            shreg  <= shreg << 1;
            countx <= countx + 1'b1;
            if (countx == 3'd7) county <= county + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_no_enq_when_full: assert property (@(posedge clk) disable iff (rst) o_enq |-> !i_full);

endmodule
