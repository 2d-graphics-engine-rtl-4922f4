// tb_arbiter: self-checking test of the arbiter and its four pixel FIFOs.
//
// Four producers enqueue random pixels at random rates (never while their
// FIFO is full) while the frame buffer's ready is driven randomly. A
// reference model keeps one queue per source and a round-robin pointer: in
// each cycle it serves the first non-empty queue at or after the pointer and
// then moves the pointer past it, or parks it on that queue when the frame
// buffer is not ready. Every write must match the model's pixel, address
// (y*640+x) and colour; a write must happen in every cycle where some FIFO
// holds data and the frame buffer is ready. Skips over empty FIFOs, waits on
// ready and full FIFOs must each be seen.
module tb_arbiter;
  import gfx2d_pkg::*;
  logic clk = 0, rst = 1, fb_rtr = 0;
  logic [3:0] enq = '0, full, empty;
  pixel_t pix [4];
  logic we;
  logic [FB_AW-1:0] addr;
  logic [RGB_W-1:0] rgb;
  int checks = 0, failures = 0, skips = 0, waits = 0, fulls = 0, writes = 0;
  pixel_t q [4][$];
  int ptr = 0;
  int rate [4];

  arbiter dut (.clk(clk), .rst(rst), .i_enq(enq), .i_pix(pix), .o_full(full), .o_empty(empty),
               .i_fb_rtr(fb_rtr), .o_fb_we(we), .o_fb_addr(addr), .o_fb_rgb(rgb));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int phase = 0; phase < 6; phase++) begin
      for (int s = 0; s < 4; s++) rate[s] = $urandom_range(0, 100);
      if (phase == 0) rate = '{100, 100, 100, 100};
      for (int cyc = 0; cyc < 1000; cyc++) begin
        int sel;
        @(negedge clk);
        fb_rtr = (phase == 5) ? 1'b1 : ($urandom_range(0, 99) < 60);
        for (int s = 0; s < 4; s++) begin
          enq[s] = !full[s] && ($urandom_range(0, 99) < rate[s]);
          pix[s] = '{x: 10'($urandom_range(0, 639)), y: 10'($urandom_range(0, 479)), rgb: 24'($urandom())};
          if (full[s]) fulls++;
        end
        #1;
        // reference round robin
        sel = -1;
        for (int k = 0; k < 4; k++)
          if (sel < 0 && q[(ptr + k) % 4].size() > 0) sel = (ptr + k) % 4;
        if (sel >= 0 && sel != ptr) skips++;
        check(empty == {q[3].size() == 0, q[2].size() == 0, q[1].size() == 0, q[0].size() == 0}, "empty flags");
        if (sel < 0) check(!we, "no write when all empty");
        else if (!fb_rtr) begin
          check(!we, "no write without ready");
          waits++;
          ptr = sel;
        end else begin
          pixel_t p;
          p = q[sel][0];
          check(we, "write when data and ready");
          check(addr == FB_AW'(p.y * 640 + p.x) && rgb == p.rgb, $sformatf("pixel from source %0d", sel));
          void'(q[sel].pop_front());
          writes++;
          ptr = (sel + 1) % 4;
        end
        for (int s = 0; s < 4; s++) if (enq[s]) q[s].push_back(pix[s]);
      end
    end
    check(skips > 0 && waits > 0 && fulls > 0, $sformatf("skips=%0d waits=%0d fulls=%0d", skips, waits, fulls));
    $display("writes=%0d skips=%0d waits=%0d full-cycles=%0d", writes, skips, waits, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
