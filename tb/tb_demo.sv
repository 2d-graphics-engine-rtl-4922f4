// tb_demo: the engine running the demo application's drawing functions.
//
// The high-level drawing functions of the engine's driver are reproduced here
// as sequences of register-level commands, the way software composes them
// from the four hardware operations:
//   clearScreen   one blit over the whole 640x480 screen
//   fillRect      one blit
//   drawRect      four lines
//   drawTriangle  three lines
//   drawStar      eight lines, a 4-point star with inner and outer radius
//   drawSquare, fillSquare  drawRect and fillRect with equal sides
//   rotateSquare90, rotateStar90  the shape turned from 0 to 90 degrees in
//                 15-degree steps; with clear set, each frame first erases the
//                 previous one by redrawing it in the background colour. How
//                 the driver steps the rotation is not known; these steps are
//                 this testbench's own.
//   drawString    one character command per letter, 8 pixels apart
//   ppmOp         one set-pixel command per pixel of a small 16x12 picture
//                 generated here (colour = {x*16, y*20, x+y})
// The frame buffer behind the engine only grants access outside the visible
// part of a 640x480 raster scan (800 x 525 clocks per frame), standing in for
// a display controller that reads the frame buffer while it draws the screen.
// After each function the image is compared with a reference drawn here, and
// the number of clock cycles each function took is printed.
module tb_demo;
  import gfx2d_pkg::*;
  localparam int H = 640, V = 480;
  localparam logic [31:0] BASE = 32'hFFFF_FF00;

  logic clk = 0, rst = 1;
  logic [31:0] abus = '0, dbus = '0, sl_dbus;
  logic rnw = 0, sel = 0, ack;
  logic fb_ok, fb_we;
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

  // raster-scan model of the display controller's user-access window
  int hcnt = 0, vcnt = 0;
  assign fb_ok = !(hcnt < H && vcnt < V);
  always @(posedge clk) begin
    if (hcnt == 799) begin
      hcnt <= 0;
      vcnt <= (vcnt == 524) ? 0 : vcnt + 1;
    end else hcnt <= hcnt + 1;
  end

  logic [23:0] fb [H*V];
  logic [23:0] ref_fb [H*V];
  always @(posedge clk) if (fb_we && !rst) fb[fb_addr] <= fb_rgb;

  // OPB master and driver
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

  task automatic post(input logic [2:0] op, input int w1, w2, w3, w4, input logic [23:0] rgb);
    logic [31:0] st, d;
    do opb(1, BASE, '0, st); while (!st[7]);
    opb(0, BASE + 4, 32'(w1), d);  opb(0, BASE + 8, 32'(w2), d);
    opb(0, BASE + 12, 32'(w3), d); opb(0, BASE + 16, 32'(w4), d);
    opb(0, BASE + 20, 32'(rgb), d);
    opb(0, BASE, 32'h8 | 32'(op), d);
  endtask

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 50) begin
      @(posedge clk);
      if (dut.cmd_empty && dut.rtr_blit && dut.rtr_line && dut.rtr_char && dut.rtr_pixel && (&dut.empty))
        quiet++;
      else quiet = 0;
    end
  endtask

  // reference drawing
  logic [63:0] font [128];
  task automatic r_line(input int ax0, ay0, ax1, ay1, input logic [23:0] c);
    int x0 = ax0, y0 = ay0, x1 = ax1, y1 = ay1, t, dx, dy, err, ystep, y;
    bit steep;
    steep = ((y1 > y0 ? y1 - y0 : y0 - y1) > (x1 > x0 ? x1 - x0 : x0 - x1));
    if (steep) begin t = x0; x0 = y0; y0 = t; t = x1; x1 = y1; y1 = t; end
    if (x0 > x1) begin t = x0; x0 = x1; x1 = t; t = y0; y0 = y1; y1 = t; end
    dx = x1 - x0; dy = (y1 > y0) ? y1 - y0 : y0 - y1; err = 0; y = y0;
    ystep = (y0 < y1) ? 1 : -1;
    for (int x = x0; x <= x1; x++) begin
      if (steep) ref_fb[x * H + y] = c; else ref_fb[y * H + x] = c;
      err += dy;
      if (2 * err >= dx) begin y += ystep; err -= dx; end
    end
  endtask

  // the demo functions: engine commands plus the same drawing in the reference
  task automatic line(input int x0, y0, x1, y1, input logic [23:0] c);
    post(OP_LINE, x0, y0, x1, y1, c);
    r_line(x0, y0, x1, y1, c);
  endtask

  task automatic fill_rect(input int x, y, w, h, input logic [23:0] c);
    post(OP_BLIT, x, y, x + w - 1, y + h - 1, c);
    for (int j = y; j < y + h; j++) for (int i = x; i < x + w; i++) ref_fb[j * H + i] = c;
  endtask

  task automatic draw_rect(input int x, y, w, h, input logic [23:0] c);
    line(x, y, x + w - 1, y, c);
    line(x + w - 1, y, x + w - 1, y + h - 1, c);
    line(x + w - 1, y + h - 1, x, y + h - 1, c);
    line(x, y + h - 1, x, y, c);
  endtask

  task automatic draw_triangle(input int x0, y0, x1, y1, x2, y2, input logic [23:0] c);
    line(x0, y0, x1, y1, c);
    line(x1, y1, x2, y2, c);
    line(x2, y2, x0, y0, c);
  endtask

  task automatic draw_star(input int x, y, r1, r2, input logic [23:0] c);
    // outer points on the axes, inner points on the diagonals (r1 * 0.7)
    int ri = (r1 * 7) / 10;
    int px [8], py [8];
    px = '{x + r2, x + ri, x, x - ri, x - r2, x - ri, x, x + ri};
    py = '{y, y + ri, y + r2, y + ri, y, y - ri, y - r2, y - ri};
    for (int i = 0; i < 8; i++) line(px[i], py[i], px[(i + 1) % 8], py[(i + 1) % 8], c);
  endtask

  // closed polygon through n points given as polar offsets from (x, y)
  task automatic polygon(input int x, y, n, input real rad[8], input real ang[8],
                         input logic [23:0] c);
    int px [8], py [8];
    for (int i = 0; i < n; i++) begin
      px[i] = int'(x + rad[i] * $cos(ang[i]));
      py[i] = int'(y + rad[i] * $sin(ang[i]));
    end
    for (int i = 0; i < n; i++) line(px[i], py[i], px[(i + 1) % n], py[(i + 1) % n], c);
  endtask

  localparam real PI = 3.14159265358979;
  localparam logic [23:0] BG = 24'h000040;

  // square of side w centred on (x, y), corners at a + 45 + k*90 degrees
  task automatic rotate_square90(input int x, y, w, input logic [23:0] c, input bit clear);
    real rad [8], ang [8], prev [8];
    for (int s = 0; s <= 6; s++) begin
      for (int k = 0; k < 4; k++) begin
        rad[k] = w / $sqrt(2.0);
        ang[k] = (s * 15 + 45 + k * 90) * PI / 180.0;
      end
      if (clear && s > 0) polygon(x, y, 4, rad, prev, BG);
      polygon(x, y, 4, rad, ang, c);
      prev = ang;
    end
  endtask

  // 4-point star: outer radius r2 at a + k*90, inner radius r1 half-way between
  task automatic rotate_star90(input int x, y, r1, r2, input logic [23:0] c, input bit clear);
    real rad [8], ang [8], prev [8];
    for (int s = 0; s <= 6; s++) begin
      for (int k = 0; k < 8; k++) begin
        rad[k] = (k % 2 == 0) ? real'(r2) : real'(r1);
        ang[k] = (s * 15 + k * 45) * PI / 180.0;
      end
      if (clear && s > 0) polygon(x, y, 8, rad, prev, BG);
      polygon(x, y, 8, rad, ang, c);
      prev = ang;
    end
  endtask

  task automatic draw_string(input int x, y, input logic [23:0] c, input string msg);
    for (int i = 0; i < msg.len(); i++) begin
      post(OP_CHAR, x + 8 * i, y, int'(msg[i]), 0, c);
      for (int b = 0; b < 64; b++)
        if (font[7'(msg[i])][63 - b]) ref_fb[(y + b / 8) * H + x + 8 * i + b % 8] = c;
    end
  endtask

  task automatic ppm(input int x, y);
    for (int j = 0; j < 12; j++)
      for (int i = 0; i < 16; i++) begin
        logic [23:0] c;
        c = {8'(i * 16), 8'(j * 20), 8'(i + j)};
        post(OP_PIXEL, x + i, y + j, 0, 0, c);
        ref_fb[(y + j) * H + x + i] = c;
      end
  endtask

  task automatic compare(input string what, input longint t0);
    int bad;
    wait_idle();
    bad = 0;
    for (int i = 0; i < H * V; i++) if (fb[i] != ref_fb[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d pixels differ", what, bad));
    $display("%-14s %0d cycles", what, ($time - t0) / 10);
  endtask

  initial begin
    longint t0;
    $readmemh("rtl/char_font.hex", font);
    for (int i = 0; i < H * V; i++) begin fb[i] = '0; ref_fb[i] = '0; end
    repeat (3) @(posedge clk);
    rst = 0;

    t0 = $time; post(OP_BLIT, 0, 0, H - 1, V - 1, BG);
    for (int i = 0; i < H * V; i++) ref_fb[i] = BG;
    compare("clearScreen", t0);
    t0 = $time; fill_rect(20, 20, 100, 60, 24'hFF0000);             compare("fillRect", t0);
    t0 = $time; draw_rect(140, 20, 100, 60, 24'h00FF00);            compare("drawRect", t0);
    t0 = $time; draw_triangle(300, 80, 350, 10, 420, 90, 24'hFFFF00); compare("drawTriangle", t0);
    t0 = $time; draw_star(520, 60, 20, 50, 24'h00FFFF);             compare("drawStar", t0);
    t0 = $time; draw_rect(20, 100, 50, 50, 24'hFF00FF);             compare("drawSquare", t0);
    t0 = $time; fill_rect(90, 100, 50, 50, 24'h0000FF);             compare("fillSquare", t0);
    t0 = $time; rotate_square90(120, 380, 60, 24'hFF8000, 1);       compare("rotateSquare90", t0);
    t0 = $time; rotate_star90(520, 380, 20, 50, 24'h80FF80, 1);     compare("rotateStar90", t0);
    t0 = $time; draw_string(20, 200, 24'hFFFFFF, "Hello World gfx");  compare("drawString", t0);
    t0 = $time; ppm(300, 300);                                       compare("ppmOp 16x12", t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
