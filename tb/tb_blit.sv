// tb_blit: self-checking test of the blit (rectangle fill) unit.
//
// Sends rectangles of several shapes (1x1, one row, one column, general) with
// random colours while the output FIFO's full flag is driven randomly. Every
// pixel written must match the row-major sweep from (x0,y0) to (x1,y1), in
// order, and the busy time must equal one cycle per pixel plus one per stalled
// cycle. The ready line must be low for the whole operation.
module tb_blit;
  import gfx2d_pkg::*;
  logic clk = 0, rst = 1, valid = 0, full = 0;
  logic [DATA_W-1:0] data = '0;
  logic rtr, enq;
  pixel_t pix;
  int checks = 0, failures = 0;

  blit dut (.clk(clk), .rst(rst), .i_valid(valid), .i_data(data), .o_rtr(rtr),
            .o_enq(enq), .o_pix(pix), .i_full(full));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_rect(input int x0, y0, x1, y1, input int stall_pct);
    pixel_t exp [$];
    int cycles = 0, stalls = 0, n = 0;
    logic [23:0] rgb = 24'($urandom());
    for (int y = y0; y <= y1; y++)
      for (int x = x0; x <= x1; x++) exp.push_back('{x: 10'(x), y: 10'(y), rgb: rgb});
    @(negedge clk);
    check(rtr, "ready before command");
    valid = 1;
    data  = {32'(rgb), 32'(y1), 32'(x1), 32'(y0), 32'(x0)};
    @(negedge clk);
    valid = 0; data = '0;
    while (!rtr) begin
      full = ($urandom_range(0, 99) < stall_pct);
      #1;
      if (full) begin
        stalls++;
        check(!enq, "no enqueue while full");
      end else if (enq) begin
        check(n < exp.size() && pix == exp[n], $sformatf("pixel %0d of (%0d,%0d)-(%0d,%0d)", n, x0, y0, x1, y1));
        n++;
      end
      cycles++;
      @(negedge clk);
      full = 0;
    end
    check(n == exp.size(), "pixel count");
    check(cycles == exp.size() + stalls, $sformatf("cycle count %0d vs %0d", cycles, exp.size() + stalls));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    run_rect(5, 7, 5, 7, 0);
    run_rect(0, 0, 9, 0, 0);
    run_rect(3, 10, 3, 15, 30);
    run_rect(100, 200, 111, 207, 0);
    run_rect(630, 470, 639, 479, 40);
    for (int i = 0; i < 10; i++) begin
      int x0, y0;
      x0 = $urandom_range(0, 600);
      y0 = $urandom_range(0, 450);
      run_rect(x0, y0, x0 + $urandom_range(0, 20), y0 + $urandom_range(0, 15), $urandom_range(0, 50));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
