// tb_pixel_op: self-checking test of the set-pixel unit.
//
// Sends random pixel commands, back to back whenever the unit is ready,
// with the FIFO full flag driven randomly. Each command must produce exactly
// one enqueue carrying its x, y and colour, never while full, with ready low
// from the cycle after the command until the cycle after its enqueue.
module tb_pixel_op;
  import gfx2d_pkg::*;
  logic clk = 0, rst = 1, valid = 0, full = 0;
  logic [DATA_W-1:0] data = '0;
  logic rtr, enq;
  pixel_t pix;
  int checks = 0, failures = 0;

  pixel_op dut (.clk(clk), .rst(rst), .i_valid(valid), .i_data(data), .o_rtr(rtr),
                .o_enq(enq), .o_pix(pix), .i_full(full));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      pixel_t p;
      int stall, seen, cyc;
      stall = $urandom_range(0, 3); seen = 0; cyc = 0;
      p = '{x: 10'($urandom_range(0, 639)), y: 10'($urandom_range(0, 479)), rgb: 24'($urandom())};
      @(negedge clk);
      check(rtr, "ready");
      valid = 1;
      // upper bits of the words are don't-care: fill them with noise
      data  = {$urandom() & 32'hFF00_0000 | 32'(p.rgb), $urandom(), $urandom(),
               $urandom() & 32'hFFFF_FC00 | 32'(p.y), $urandom() & 32'hFFFF_FC00 | 32'(p.x)};
      @(negedge clk);
      valid = 0;
      while (!rtr) begin
        full = (cyc < stall);
        #1;
        if (full) check(!enq, "no enqueue while full");
        if (enq) begin seen++; check(pix == p, "pixel contents"); end
        cyc++;
        @(negedge clk);
        full = 0;
      end
      check(seen == 1, "one enqueue per command");
      check(cyc == stall + 1, "busy for stall + 1 cycles");
    end
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
