// opb_interface: OPB slave register interface of the 2D graphics engine.
//
// How it works: the processor stimulates the engine through a 256-byte
// register window on the OPB bus:
//   base+0   status  bits 2:0 op code (r/w), bit 3 request (write 1 to post
//                    the command; reads back the one-cycle pulse), bit 4
//                    blit ready, 5 line ready, 6 char ready, 7 engine ready
//                    (command FIFO not full), 8 frame buffer user access OK,
//                    9-12 blit/line/char/pixel output FIFO full, 31:13 zero
//   base+4 .. base+20   input data words 1-5 (r/w)
//   base+24  debug      reading it returns and removes the head of the debug
//                       FIFO, or DEADBEEF when that FIFO is empty
// A write of the status register with bit 3 set stores the op code and
// raises o_req for exactly one cycle, which pushes {op, data5..data1} into the
// command FIFO. A small FSM serves each transfer: from IDLE a selected access
// to the window goes to READ or WRITE, which acknowledges it (Sl_xferAck) and
// drives the read data or loads the register, then to DONE, where the data bus
// is driven back to zero, and back to IDLE. The register map, reset values
// and the four-step FSM follow the engine's register specification. The bus
// is modelled with plain [31:0] vectors, bit 0 least significant, rather than
// the OPB's big-endian bit numbering, and only the signals this slave needs
// are present: it never signals an error, retry or timeout suppression.
//
// Interface and timing: a transfer is acknowledged in the second cycle of
// OPB_select (Sl_xferAck high for one cycle, Sl_DBus valid in that cycle for
// a read, zero otherwise). The slave ignores the cycle after the
// acknowledge, so back-to-back transfers take 3 cycles each. Synchronous
// active-high reset clears all registers.
module opb_interface
  import gfx2d_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR   = 32'hFFFF_FF00,
  parameter logic [31:0] C_HIGHADDR   = 32'hFFFF_FFFF,
  parameter int unsigned C_OPB_AWIDTH = 32,
  parameter int unsigned C_OPB_DWIDTH = 32
) (
  input  logic                    clk,
  input  logic                    rst,
  // OPB slave side
  input  logic [C_OPB_AWIDTH-1:0] OPB_ABus,
  input  logic [C_OPB_DWIDTH-1:0] OPB_DBus,
  input  logic                    OPB_RNW,
  input  logic                    OPB_select,
  output logic [C_OPB_DWIDTH-1:0] Sl_DBus,
  output logic                    Sl_xferAck,
  // to the decoder
  output logic                    o_req,
  output logic [OP_W-1:0]         o_op,
  output logic [DATA_W-1:0]       o_data,
  // status inputs
  input  logic                    i_blit_rtr,
  input  logic                    i_line_rtr,
  input  logic                    i_char_rtr,
  input  logic                    i_gfx2d_rtr,
  input  logic                    i_mem_rtr,
  input  logic                    i_blit_full,
  input  logic                    i_line_full,
  input  logic                    i_char_full,
  input  logic                    i_pixel_full,
  // debug FIFO read port
  input  logic                    i_dbg_empty,
  input  logic [WORD_W-1:0]       i_dbg_data,
  output logic                    o_dbg_deq
);

  typedef enum logic [1:0] {IDLE, READ, WRITE, DONE} state_e;

  localparam logic [31:0] DEBUG_EMPTY = 32'hDEAD_BEEF;

  state_e                  state;
  logic [5:0]              widx;       // word offset within the window
  logic [WORD_W-1:0]       wdata;
  logic [WORD_W-1:0]       data_q [NWORDS];
  logic [WORD_W-1:0]       status, rdata;
  logic                    hit;

  assign hit = OPB_select && ((32'(OPB_ABus) - C_BASEADDR) <= (C_HIGHADDR - C_BASEADDR));

  assign status = {19'd0, i_pixel_full, i_char_full, i_line_full, i_blit_full,
                   i_mem_rtr, i_gfx2d_rtr, i_char_rtr, i_line_rtr, i_blit_rtr,
                   o_req, o_op};

  always_comb begin
    rdata = '0;
    if (widx == 6'd0)                          rdata = status;
    else if (widx >= 6'd1 && widx <= 6'(NWORDS)) rdata = data_q[3'(widx - 6'd1)];
    else if (widx == 6'(NWORDS + 1))           rdata = i_dbg_empty ? DEBUG_EMPTY : i_dbg_data;
  end

  assign Sl_DBus    = (state == READ) ? C_OPB_DWIDTH'(rdata) : '0;
  assign Sl_xferAck = (state == READ) || (state == WRITE);
  assign o_dbg_deq  = (state == READ) && (widx == 6'(NWORDS + 1)) && !i_dbg_empty;

  for (genvar i = 0; i < NWORDS; i++) begin : g_data
    assign o_data[i*WORD_W +: WORD_W] = data_q[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      widx  <= '0;
      wdata <= '0;
      o_req <= 1'b0;
      o_op  <= '0;
      for (int i = 0; i < NWORDS; i++) data_q[i] <= '0;
    end else begin
      o_req <= 1'b0;
      unique case (state)
        IDLE: if (hit) begin
          widx  <= 6'((32'(OPB_ABus) - C_BASEADDR) >> 2);
          wdata <= 32'(OPB_DBus);
          state <= OPB_RNW ? READ : WRITE;
        end
        READ:  state <= DONE;
        WRITE: begin
          if (widx == 6'd0) begin
            o_op  <= wdata[OP_W-1:0];
            o_req <= wdata[3];
          end else if (widx >= 6'd1 && widx <= 6'(NWORDS)) begin
            data_q[3'(widx - 6'd1)] <= wdata;
          end
          state <= DONE;
        end
        DONE:  state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  a_ack_one_cycle: assert property (@(posedge clk) disable iff (rst) Sl_xferAck |=> !Sl_xferAck);

endmodule
