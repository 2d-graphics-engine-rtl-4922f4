// tb_opb_interface: self-checking test of the OPB register interface.
//
// An OPB master task performs reads and writes. Checks: reset values; data
// registers 1-5 write and read back and appear on the command data bus;
// writing the status register with bit 3 set gives exactly one request pulse
// with the op code; each status bit follows its input; the debug register
// returns DEADBEEF when the debug FIFO is empty and otherwise its head, with
// one dequeue pulse; an address outside the window gets no acknowledge; the
// data bus is zero outside read acknowledges; a transfer is acknowledged in
// the second cycle of select.
module tb_opb_interface;
  import gfx2d_pkg::*;
  logic clk = 0, rst = 1;
  logic [31:0] abus = '0, dbus = '0, sl_dbus;
  logic rnw = 0, sel = 0, ack;
  logic req, dbg_deq;
  logic [OP_W-1:0] op;
  logic [DATA_W-1:0] data;
  logic [8:0] st_in = '0;     // blit,line,char,gfx2d,mem rtr; blit,line,char,pixel full
  logic dbg_empty = 1;
  logic [31:0] dbg_data = 32'h1234_5678;
  int checks = 0, failures = 0, req_pulses = 0, deq_pulses = 0;
  localparam logic [31:0] BASE = 32'hFFFF_FF00;

  opb_interface dut (.clk(clk), .rst(rst), .OPB_ABus(abus), .OPB_DBus(dbus), .OPB_RNW(rnw),
    .OPB_select(sel), .Sl_DBus(sl_dbus), .Sl_xferAck(ack), .o_req(req), .o_op(op), .o_data(data),
    .i_blit_rtr(st_in[0]), .i_line_rtr(st_in[1]), .i_char_rtr(st_in[2]), .i_gfx2d_rtr(st_in[3]),
    .i_mem_rtr(st_in[4]), .i_blit_full(st_in[5]), .i_line_full(st_in[6]), .i_char_full(st_in[7]),
    .i_pixel_full(st_in[8]), .i_dbg_empty(dbg_empty), .i_dbg_data(dbg_data), .o_dbg_deq(dbg_deq));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (req) req_pulses++;
    if (dbg_deq) deq_pulses++;
  end
  always @(negedge clk) if (!ack) begin
    checks++;
    if (sl_dbus != 0) begin failures++; $display("FAIL bus not zero at %0t", $time); end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic opb(input bit read, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] rd, output int cyc);
    @(negedge clk);
    sel = 1; rnw = read; abus = a; dbus = read ? '0 : wd;
    cyc = 0;
    do begin
      cyc++;
      @(posedge clk); #1;
    end while (!ack && cyc < 20);
    rd = sl_dbus;
    @(negedge clk);
    sel = 0; rnw = 0; abus = '0; dbus = '0;
    @(negedge clk);                  // the slave's return-to-zero cycle
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] wd);
    logic [31:0] rd; int cyc;
    opb(0, a, wd, rd, cyc);
    check(cyc == 1, "write acknowledged in second cycle of select");
  endtask

  task automatic rdreg(input logic [31:0] a, output logic [31:0] rd);
    int cyc;
    opb(1, a, '0, rd, cyc);
    check(cyc == 1, "read acknowledged in second cycle of select");
  endtask

  initial begin
    logic [31:0] v, w [5];
    int cyc, pulses;
    repeat (2) @(posedge clk);
    rst = 0;
    st_in = 9'b0_0001_1111;      // all ready, no FIFO full
    rdreg(BASE, v);
    check(v == 32'h0000_01F0, $sformatf("status reset value %h", v));
    for (int i = 0; i < 5; i++) begin
      rdreg(BASE + 32'(4 * (i + 1)), v);
      check(v == 0, "data reset value");
    end
    for (int i = 0; i < 5; i++) begin w[i] = $urandom(); wr(BASE + 32'(4 * (i + 1)), w[i]); end
    for (int i = 0; i < 5; i++) begin
      rdreg(BASE + 32'(4 * (i + 1)), v);
      check(v == w[i], "data read back");
      check(data[32*i +: 32] == w[i], "data on command bus");
    end
    // op code written without request: no pulse
    pulses = req_pulses;
    wr(BASE, 32'h0000_0002);
    check(req_pulses == pulses && op == 3'b010, "op without request");
    // request
    for (int o = 0; o < 5; o++) begin
      pulses = req_pulses;
      wr(BASE, 32'(8 | o));
      repeat (3) @(posedge clk);
      check(req_pulses == pulses + 1 && op == 3'(o), "one request pulse with op");
    end
    // status bits follow inputs
    for (int b = 0; b < 9; b++) begin
      st_in = 9'(1 << b);
      rdreg(BASE, v);
      check(v[12:4] == 9'(1 << b) && v[31:13] == 0, $sformatf("status bit %0d", b + 4));
    end
    // debug register
    dbg_empty = 1;
    pulses = deq_pulses;
    rdreg(BASE + 24, v);
    check(v == 32'hDEAD_BEEF && deq_pulses == pulses, "debug empty reads DEADBEEF");
    dbg_empty = 0;
    rdreg(BASE + 24, v);
    check(v == 32'h1234_5678 && deq_pulses == pulses + 1, "debug read dequeues");
    // outside the window: no acknowledge
    opb(1, 32'h8000_0000, '0, v, cyc);
    check(cyc == 20, "no acknowledge outside window");
    opb(0, 32'hFFFF_FE04, 32'hFFFF_FFFF, v, cyc);
    check(cyc == 20, "no acknowledge below base");
    rdreg(BASE + 4, v);
    check(v == w[0], "register untouched by foreign write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
