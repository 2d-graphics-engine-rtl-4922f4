// tb_char_draw: self-checking test of the character drawing unit.
//
// Draws 'A' (whose glyph is fixed: rows 38 44 44 44 7C 44 44 00 hex), every
// other letter, and a non-letter code that has no glyph, at random positions,
// with the output FIFO's full flag driven randomly. Expected pixels come from
// the glyph table read independently here, scanned row by row, MSB first.
// Timing: one ROM cycle, then one cycle per glyph bit up to the last set bit,
// one cycle to see the empty register, plus one per stalled cycle.
module tb_char_draw;
  import gfx2d_pkg::*;
  logic clk = 0, rst = 1, valid = 0, full = 0;
  logic [DATA_W-1:0] data = '0;
  logic rtr, enq;
  pixel_t pix;
  int checks = 0, failures = 0;
  logic [63:0] font [128];

  char_draw dut (.clk(clk), .rst(rst), .i_valid(valid), .i_data(data), .o_rtr(rtr),
                 .o_enq(enq), .o_pix(pix), .i_full(full));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_char(input int x0, y0, input logic [6:0] code, input logic [63:0] glyph,
                          input int stall_pct);
    pixel_t exp [$];
    int cycles = 0, stalls = 0, n = 0, last = -1;
    logic [23:0] rgb = 24'($urandom());
    for (int b = 0; b < 64; b++)
      if (glyph[63 - b]) begin
        exp.push_back('{x: 10'(x0 + b % 8), y: 10'(y0 + b / 8), rgb: rgb});
        last = b;
      end
    @(negedge clk);
    check(rtr, "ready before command");
    valid = 1;
    data  = {32'(rgb), 32'd0, 32'(code), 32'(y0), 32'(x0)};
    @(negedge clk);
    valid = 0; data = '0;
    while (!rtr) begin
      full = (cycles >= 1) && ($urandom_range(0, 99) < stall_pct);
      #1;
      if (enq) begin
        check(n < exp.size() && pix == exp[n],
              $sformatf("char %0d pixel %0d: got (%0d,%0d)", code, n, pix.x, pix.y));
        n++;
      end else if (full && dut.shreg[63] && dut.state == 2) begin
        stalls++;
      end
      if (full) check(!enq, "no enqueue while full");
      cycles++;
      @(negedge clk);
      full = 0;
    end
    check(n == exp.size(), $sformatf("char %0d pixel count %0d vs %0d", code, n, exp.size()));
    check(cycles == 1 + (last + 1) + 1 + stalls, $sformatf("char %0d cycles %0d", code, cycles));
  endtask

  initial begin
    $readmemh("rtl/char_font.hex", font);
    repeat (2) @(posedge clk);
    rst = 0;
    run_char(100, 50, 7'h41, 64'h3844_4444_7C44_4400, 0);
    run_char(632, 472, 7'h41, 64'h3844_4444_7C44_4400, 30);
    run_char(10, 10, 7'h21, 64'h0, 0);            // '!' has no glyph
    for (int c = 0; c < 26; c++) begin
      check(font[7'h41 + c] != 0 && font[7'h61 + c] != 0, "letter glyph present");
      run_char($urandom_range(0, 630), $urandom_range(0, 470), 7'(7'h41 + c), font[7'h41 + c], $urandom_range(0, 40));
      run_char($urandom_range(0, 630), $urandom_range(0, 470), 7'(7'h61 + c), font[7'h61 + c], $urandom_range(0, 40));
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
