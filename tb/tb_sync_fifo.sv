// tb_sync_fifo: self-checking test of sync_fifo.
//
// Drives random enqueue/dequeue traffic into a 16-deep, 44-bit FIFO and
// compares data, full and empty against a queue reference model every cycle.
// Also checks that it holds exactly DEPTH words, that an enqueue while full
// and a dequeue while empty are ignored, and that reset empties it.
module tb_sync_fifo;
  localparam int W = 44, D = 16;
  logic clk = 0, rst = 1, enq = 0, deq = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .rst(rst), .i_enq(enq), .i_data(din),
    .i_deq(deq), .o_data(dout), .o_empty(empty), .o_full(full));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Compare outputs with the model, then apply the cycle's operations to it.
  task automatic step(input bit e, input bit d, input logic [W-1:0] v);
    enq = e; deq = d; din = v;
    #1;
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == D), "full flag");
    if (model.size() != 0) check(dout == model[0], "head data");
    @(posedge clk);
    begin
      int n = model.size();
      if (d && n != 0) void'(model.pop_front());
      if (e && n < D) model.push_back(v);   // enqueue while full is dropped
    end
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    #1;
    // Fill past full: the 17th word must be dropped.
    for (int i = 0; i < D + 1; i++) step(1, 0, W'(i + 100));
    check(full, "full after DEPTH words");
    check(model.size() == D, "model holds DEPTH");
    // Drain past empty.
    for (int i = 0; i < D + 1; i++) step(0, 1, '0);
    check(empty, "empty after drain");
    // Random traffic.
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 1) == 1, $urandom_range(0, 2) == 0 ? 1'b0 : 1'b1,
                                        {$urandom(), 12'($urandom())});
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 2) != 0, $urandom_range(0, 1) == 1,
                                        {$urandom(), 12'($urandom())});
    // Reset empties.
    step(1, 0, 44'h123);
    rst = 1; @(posedge clk); #1; rst = 0; model.delete();
    check(empty && !full, "reset empties");
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
