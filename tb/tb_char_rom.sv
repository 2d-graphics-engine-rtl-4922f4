// tb_char_rom: self-checking test of the glyph ROM.
//
// Checks the glyph of 'A' against its fixed bit pattern, that every upper-
// and lower-case letter has a non-blank glyph, that all other codes are
// blank, that the read is registered (one cycle) and that the output holds
// while the enable is low.
module tb_char_rom;
  logic clk = 0, en = 0;
  logic [6:0] addr = '0;
  logic [63:0] q;
  int checks = 0, failures = 0;

  char_rom dut (.clk(clk), .i_en(en), .i_addr(addr), .o_data(q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic rd(input logic [6:0] a, output logic [63:0] v);
    @(negedge clk); en = 1; addr = a;
    @(negedge clk); en = 0; v = q;
  endtask

  initial begin
    logic [63:0] v, a_glyph;
    rd(7'h41, a_glyph);
    check(a_glyph == 64'h3844_4444_7C44_4400, "glyph of A");
    addr = 7'h00;
    @(negedge clk);
    check(q == a_glyph, "output holds while disabled");
    for (int c = 0; c < 128; c++) begin
      bit letter;
      letter = (c >= 'h41 && c <= 'h5A) || (c >= 'h61 && c <= 'h7A);
      rd(7'(c), v);
      if (letter) check(v != 0 && v[7:0] == 0, $sformatf("glyph %0d present, row 7 blank", c));
      else        check(v == 0, $sformatf("code %0d blank", c));
    end
    rd(7'h61, v);
    check(v != a_glyph, "lower-case a differs from A");
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
