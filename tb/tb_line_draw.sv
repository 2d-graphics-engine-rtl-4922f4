// tb_line_draw: self-checking test of the Bresenham line unit.
//
// Draws lines in all eight octants, horizontal, vertical, diagonal and
// single-point lines, plus random ones, with the output FIFO's full flag
// driven randomly. The pixels must equal, in order, those of a reference
// Bresenham model written here from the textbook algorithm (steep swap, end
// point swap, y step when 2*error >= deltax). Timing: four set-up cycles,
// then one cycle per pixel plus one per stalled cycle.
module tb_line_draw;
  import gfx2d_pkg::*;
  logic clk = 0, rst = 1, valid = 0, full = 0;
  logic [DATA_W-1:0] data = '0;
  logic rtr, enq;
  pixel_t pix;
  int checks = 0, failures = 0;

  line_draw dut (.clk(clk), .rst(rst), .i_valid(valid), .i_data(data), .o_rtr(rtr),
                 .o_enq(enq), .o_pix(pix), .i_full(full));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic ref_line(input int ax0, ay0, ax1, ay1, input logic [23:0] rgb, ref pixel_t q[$]);
    int x0 = ax0, y0 = ay0, x1 = ax1, y1 = ay1, t, dx, dy, err, ystep, y;
    bit steep = ((y1 > y0 ? y1 - y0 : y0 - y1) > (x1 > x0 ? x1 - x0 : x0 - x1));
    if (steep) begin t = x0; x0 = y0; y0 = t; t = x1; x1 = y1; y1 = t; end
    if (x0 > x1) begin t = x0; x0 = x1; x1 = t; t = y0; y0 = y1; y1 = t; end
    dx = x1 - x0; dy = (y1 > y0) ? y1 - y0 : y0 - y1; err = 0; y = y0;
    ystep = (y0 < y1) ? 1 : -1;
    for (int x = x0; x <= x1; x++) begin
      if (steep) q.push_back('{x: 10'(y), y: 10'(x), rgb: rgb});
      else       q.push_back('{x: 10'(x), y: 10'(y), rgb: rgb});
      err += dy;
      if (2 * err >= dx) begin y += ystep; err -= dx; end
    end
  endtask

  task automatic run_line(input int x0, y0, x1, y1, input int stall_pct);
    pixel_t exp [$];
    int cycles = 0, stalls = 0, n = 0, first = -1;
    logic [23:0] rgb = 24'($urandom());
    ref_line(x0, y0, x1, y1, rgb, exp);
    @(negedge clk);
    check(rtr, "ready before command");
    valid = 1;
    data  = {32'(rgb), 32'(y1), 32'(x1), 32'(y0), 32'(x0)};
    @(negedge clk);
    valid = 0; data = '0;
    while (!rtr) begin
      full = (cycles >= 5) && ($urandom_range(0, 99) < stall_pct);
      #1;
      if (full) begin
        stalls++;
        check(!enq, "no enqueue while full");
      end else if (enq) begin
        if (first < 0) first = cycles;
        check(n < exp.size() && pix == exp[n],
              $sformatf("pixel %0d of (%0d,%0d)-(%0d,%0d): got (%0d,%0d)", n, x0, y0, x1, y1, pix.x, pix.y));
        n++;
      end
      cycles++;
      @(negedge clk);
      full = 0;
    end
    check(n == exp.size(), "pixel count");
    check(first == 4, $sformatf("first pixel after 4 set-up cycles (got %0d)", first));
    check(cycles == 4 + exp.size() + stalls, "cycle count");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    run_line(0, 0, 100, 200, 0);      // steep, positive
    run_line(10, 10, 30, 15, 0);      // shallow
    run_line(30, 15, 10, 10, 20);     // reversed shallow
    run_line(50, 50, 40, 80, 0);      // steep, x decreasing
    run_line(50, 50, 80, 40, 0);      // shallow, y decreasing
    run_line(80, 40, 50, 50, 0);
    run_line(40, 80, 50, 50, 30);
    run_line(10, 60, 10, 20, 0);      // vertical up
    run_line(0, 479, 639, 479, 0);    // horizontal full width
    run_line(0, 0, 479, 479, 10);     // diagonal
    run_line(7, 7, 7, 7, 0);          // single point
    for (int i = 0; i < 20; i++)
      run_line($urandom_range(0, 639), $urandom_range(0, 479), $urandom_range(0, 639),
               $urandom_range(0, 479), $urandom_range(0, 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
