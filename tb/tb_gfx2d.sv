// tb_gfx2d: end-to-end test of the 2D graphics engine at its default size.
//
// The testbench plays the processor (an OPB master issuing the register
// writes the driver would) and the display controller (a 640x480 frame
// buffer behind a "user access OK" signal). It
//   1. checks the status register's reset value and that an empty debug
//      register reads DEADBEEF;
//   2. clears the whole screen with one blit while the frame buffer always
//      grants access, checks all 307200 pixels and that the blit wrote one
//      pixel per clock;
//   3. with access granted only 100 of every 400 cycles, posts a stream of
//      pixel, blit, line, character and debug commands, each drawing inside
//      its own 40x40 cell, polling the engine-ready status bit before each
//      post as the driver does; then checks the whole frame buffer against a
//      reference image built here (its own Bresenham and glyph scan), the
//      total number of writes, and reads the debug words back in order.
// It counts how often each mechanism happened: command FIFO full, output
// FIFO full stalls of each unit, decoder waits, arbiter skips and waits on the
// frame buffer, each op dispatched, debug reads empty and non-empty. A
// mechanism that never happened is a failure.
module tb_gfx2d;
  import gfx2d_pkg::*;
  localparam int H = 640, V = 480;
  localparam logic [31:0] BASE = 32'hFFFF_FF00;

  logic clk = 0, rst = 1;
  logic [31:0] abus = '0, dbus = '0, sl_dbus;
  logic rnw = 0, sel = 0, ack;
  logic fb_ok = 1, fb_we;
  logic [FB_AW-1:0] fb_addr;
  logic [RGB_W-1:0] fb_rgb;
  int checks = 0, failures = 0;

  gfx2d dut (.clk(clk), .rst(rst), .OPB_ABus(abus), .OPB_DBus(dbus), .OPB_RNW(rnw),
             .OPB_select(sel), .Sl_DBus(sl_dbus), .Sl_xferAck(ack),
             .fb_user_ok(fb_ok), .fb_we(fb_we), .fb_addr(fb_addr), .fb_rgb(fb_rgb));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- frame buffer
  logic [23:0] fb [H*V];
  logic [23:0] expect_fb [H*V];
  longint writes = 0, first_wr = -1, last_wr = -1, cycle = 0;
  bit gated = 0;
  int gate_cnt = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (fb_we && !rst) begin
      if (int'(fb_addr) < H * V) fb[fb_addr] <= fb_rgb;
      else begin failures++; $display("FAIL address out of frame %0d", fb_addr); end
      writes <= writes + 1;
      if (first_wr < 0) first_wr <= cycle;
      last_wr <= cycle;
    end
    if (gated) begin
      gate_cnt <= (gate_cnt + 1) % 400;
      fb_ok    <= (gate_cnt < 100);
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_cmd_full = 0, n_dec_wait = 0, n_arb_skip = 0, n_arb_wait = 0;
  int n_stall [4] = '{0, 0, 0, 0};
  int n_start [5] = '{0, 0, 0, 0, 0};
  int n_dbg_empty = 0, n_dbg_data = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.cmd_full) n_cmd_full++;
    if (!dut.cmd_empty && !(dut.rtr_line && dut.rtr_blit && dut.rtr_char && dut.rtr_pixel)) n_dec_wait++;
    if (dut.u_arb.o_fb_we && dut.u_arb.sel != dut.u_arb.ptr) n_arb_skip++;
    if (dut.u_arb.found && !fb_ok) n_arb_wait++;
    if (dut.full[0] && dut.u_pixel.pending)         n_stall[0]++;
    if (dut.full[1] && !dut.rtr_blit)               n_stall[1]++;
    if (dut.full[2] && !dut.rtr_line) n_stall[2]++;
    if (dut.full[3] && !dut.rtr_char) n_stall[3]++;
    if (dut.v_pixel) n_start[0]++;
    if (dut.v_blit)  n_start[1]++;
    if (dut.v_line)  n_start[2]++;
    if (dut.v_char)  n_start[3]++;
    if (dut.v_debug) n_start[4]++;
  end

  // ---------------------------------------------------------------- OPB master
  task automatic opb(input bit read, input logic [31:0] a, input logic [31:0] wd, output logic [31:0] rd);
    int cyc = 0;
    @(negedge clk);
    sel = 1; rnw = read; abus = a; dbus = read ? '0 : wd;
    do begin cyc++; @(posedge clk); #1; end while (!ack && cyc < 20);
    check(ack, "OPB acknowledge");
    rd = sl_dbus;
    @(negedge clk);
    sel = 0; rnw = 0; abus = '0; dbus = '0;
  endtask

  task automatic wr(input logic [31:0] off, input logic [31:0] v);
    logic [31:0] d;
    opb(0, BASE + off, v, d);
  endtask

  task automatic rd(input logic [31:0] off, output logic [31:0] v);
    opb(1, BASE + off, '0, v);
  endtask

  // driver: wait for engine ready, set the five data words, post the op
  task automatic post(input logic [2:0] op, input int w1, w2, w3, w4, input logic [23:0] rgb);
    logic [31:0] st;
    do rd(0, st); while (!st[7]);
    wr(4, 32'(w1)); wr(8, 32'(w2)); wr(12, 32'(w3)); wr(16, 32'(w4)); wr(20, 32'(rgb));
    wr(0, 32'h8 | 32'(op));
  endtask

  task automatic wait_idle();
    logic [31:0] st;
    int quiet = 0;
    while (quiet < 50) begin
      @(posedge clk);
      if (dut.cmd_empty && dut.rtr_blit && dut.rtr_line && dut.rtr_char && dut.rtr_pixel && (&dut.empty))
        quiet++;
      else quiet = 0;
    end
    rd(0, st);
    check(st[7:4] == 4'hF && st[12:9] == 4'h0, "status idle");
  endtask

  // ---------------------------------------------------------------- reference image
  longint exp_writes = 0;
  task automatic ref_plot(input int x, y, input logic [23:0] c);
    expect_fb[y * H + x] = c;
    exp_writes++;
  endtask

  task automatic ref_line(input int ax0, ay0, ax1, ay1, input logic [23:0] c);
    int x0 = ax0, y0 = ay0, x1 = ax1, y1 = ay1, t, dx, dy, err, ystep, y;
    bit steep;
    steep = ((y1 > y0 ? y1 - y0 : y0 - y1) > (x1 > x0 ? x1 - x0 : x0 - x1));
    if (steep) begin t = x0; x0 = y0; y0 = t; t = x1; x1 = y1; y1 = t; end
    if (x0 > x1) begin t = x0; x0 = x1; x1 = t; t = y0; y0 = y1; y1 = t; end
    dx = x1 - x0; dy = (y1 > y0) ? y1 - y0 : y0 - y1; err = 0; y = y0;
    ystep = (y0 < y1) ? 1 : -1;
    for (int x = x0; x <= x1; x++) begin
      if (steep) ref_plot(y, x, c); else ref_plot(x, y, c);
      err += dy;
      if (2 * err >= dx) begin y += ystep; err -= dx; end
    end
  endtask

  logic [63:0] font [128];

  // ---------------------------------------------------------------- test
  initial begin
    logic [31:0] st, v;
    logic [23:0] bg;
    logic [31:0] dbg_words [$];
    bg = 24'h10_20_30;
    $readmemh("rtl/char_font.hex", font);
    for (int i = 0; i < H * V; i++) begin fb[i] = '0; expect_fb[i] = '0; end
    repeat (3) @(posedge clk);
    rst = 0;

    // 1. reset state
    rd(0, st);
    check(st == 32'h0000_01F0, $sformatf("status after reset %h", st));
    rd(24, v);
    check(v == 32'hDEAD_BEEF, "empty debug FIFO reads DEADBEEF");
    n_dbg_empty++;

    // 2. clear screen: one full-frame blit, frame buffer always ready
    post(OP_BLIT, 0, 0, H - 1, V - 1, bg);
    for (int i = 0; i < H * V; i++) begin expect_fb[i] = bg; end
    exp_writes += H * V;
    wait_idle();
    check(writes == H * V, $sformatf("clear screen writes %0d", writes));
    check(last_wr - first_wr == H * V - 1, $sformatf("one pixel per clock (%0d cycles)", last_wr - first_wr + 1));
    for (int i = 0; i < H * V; i++) if (fb[i] != bg) begin check(0, $sformatf("clear pixel %0d", i)); break; end
    checks++;

    // 3. mixed command stream with a frame buffer that is often busy
    gated = 1;
    for (int k = 0; k < 40; k++) begin
      int cx, cy, kind;
      logic [23:0] c;
      int px, py, w, h, bx, by, x0, y0, x1, y1;
      logic [6:0] code;
      logic [31:0] wv;
      cx = (k % 15) * 42 + 2;
      cy = 20 + (k / 15) * 42;
      kind = k % 5;
      c = 24'($urandom()) | 24'h1;
      case (kind)
        0: begin   // pixel
          px = cx + $urandom_range(0, 39);
          py = cy + $urandom_range(0, 39);
          post(OP_PIXEL, px, py, 0, 0, c);
          ref_plot(px, py, c);
        end
        1: begin   // blit
          w = $urandom_range(1, 40);
          h = $urandom_range(1, 40);
          bx = cx + $urandom_range(0, 40 - w);
          by = cy + $urandom_range(0, 40 - h);
          post(OP_BLIT, bx, by, bx + w - 1, by + h - 1, c);
          for (int y = by; y < by + h; y++) for (int x = bx; x < bx + w; x++) ref_plot(x, y, c);
        end
        2: begin   // line
          x0 = cx + $urandom_range(0, 39);
          y0 = cy + $urandom_range(0, 39);
          x1 = cx + $urandom_range(0, 39);
          y1 = cy + $urandom_range(0, 39);
          post(OP_LINE, x0, y0, x1, y1, c);
          ref_line(x0, y0, x1, y1, c);
        end
        3: begin   // character
          code = (k % 2 == 1) ? 7'(32'h41 + $urandom_range(0, 25)) : 7'(32'h61 + $urandom_range(0, 25));
          post(OP_CHAR, cx, cy, int'(code), 0, c);
          for (int b = 0; b < 64; b++) if (font[code][63 - b]) ref_plot(cx + b % 8, cy + b / 8, c);
        end
        default: begin   // debug
          wv = $urandom();
          post(OP_DEBUG, int'(wv), 0, 0, 0, c);
          dbg_words.push_back(wv);
        end
      endcase
    end
    wait_idle();

    // 4. frame buffer busy for a long stretch: a burst of pixels, a long line
    //    and a dense character must fill their FIFOs and stall.
    gated = 0;
    for (int part = 0; part < 3; part++) begin
      @(negedge clk);
      fb_ok = 0;
      if (part == 0) begin
        post(OP_LINE, 10, 210, 300, 260, 24'h00FF00);
        ref_line(10, 210, 300, 260, 24'h00FF00);
      end else if (part == 1) begin
        post(OP_CHAR, 320, 210, 'h57, 0, 24'h0000FF);     // 'W'
        for (int b = 0; b < 64; b++) if (font[7'h57][63 - b]) ref_plot(320 + b % 8, 210 + b / 8, 24'h0000FF);
      end else begin
        for (int i = 0; i < 20; i++) begin
          post(OP_PIXEL, 10 + 2 * i, 200, 0, 0, 24'hFF0000);
          ref_plot(10 + 2 * i, 200, 24'hFF0000);
        end
      end
      repeat (150) @(posedge clk);
      @(negedge clk);
      fb_ok = 1;
      wait_idle();
    end
    check(writes == exp_writes, $sformatf("total writes %0d vs %0d", writes, exp_writes));
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < H * V; i++) if (fb[i] != expect_fb[i]) bad++;
      check(bad == 0, $sformatf("frame buffer matches reference (%0d wrong)", bad));
    end
    while (dbg_words.size() > 0) begin
      rd(24, v);
      check(v == dbg_words.pop_front(), "debug word");
      n_dbg_data++;
    end
    rd(24, v);
    check(v == 32'hDEAD_BEEF, "debug FIFO empty again");
    n_dbg_empty++;

    // mechanism coverage
    $display("cmd FIFO full cycles=%0d decoder waits=%0d arbiter skips=%0d arbiter waits=%0d",
             n_cmd_full, n_dec_wait, n_arb_skip, n_arb_wait);
    $display("stalls pixel=%0d blit=%0d line=%0d char=%0d", n_stall[0], n_stall[1], n_stall[2], n_stall[3]);
    $display("starts pixel=%0d blit=%0d line=%0d char=%0d debug=%0d; debug reads empty=%0d data=%0d",
             n_start[0], n_start[1], n_start[2], n_start[3], n_start[4], n_dbg_empty, n_dbg_data);
    check(n_cmd_full > 0, "command FIFO full happened");
    check(n_dec_wait > 0, "decoder wait happened");
    check(n_arb_skip > 0, "arbiter skip happened");
    check(n_arb_wait > 0, "arbiter wait on frame buffer happened");
    for (int i = 0; i < 4; i++) check(n_stall[i] > 0, $sformatf("output FIFO %0d full stall happened", i));
    for (int i = 0; i < 5; i++) check(n_start[i] > 0, $sformatf("op %0d dispatched", i));
    check(n_dbg_empty > 0 && n_dbg_data > 0, "debug reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
