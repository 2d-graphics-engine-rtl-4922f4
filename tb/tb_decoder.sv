// tb_decoder: self-checking test of the command decoder.
//
// Posts random commands (all five op codes plus unused ones) while simulated
// operations stay busy for random times after each start. Checks that
// commands come out in order, each on the valid line of its op code with its
// 160 data bits, only in a cycle where every ready input is high, that unused
// op codes are dropped, and that the command FIFO reports full after 16
// commands and then refuses more.
module tb_decoder;
  import gfx2d_pkg::*;
  logic clk = 0, rst = 1, enq = 0;
  logic [OP_W-1:0] op = '0;
  logic [DATA_W-1:0] din = '0, dout;
  logic full, empty;
  logic [4:0] rtr, vld;            // line, blit, char, pixel, debug
  int busy [5];
  int checks = 0, failures = 0;
  typedef struct { logic [2:0] op; logic [DATA_W-1:0] d; } cmd_s;
  cmd_s model [$];
  int started [5] = '{0, 0, 0, 0, 0};

  decoder dut (.clk(clk), .rst(rst), .i_enq(enq), .i_op(op), .i_data(din), .o_full(full),
    .o_empty(empty), .rtr_line(rtr[0]), .rtr_blit(rtr[1]), .rtr_char(rtr[2]), .rtr_pixel(rtr[3]),
    .rtr_debug(rtr[4]), .valid_line(vld[0]), .valid_blit(vld[1]), .valid_char(vld[2]),
    .valid_pixel(vld[3]), .valid_debug(vld[4]), .d_out(dout));

  always #5 clk = ~clk;

  always_comb for (int i = 0; i < 5; i++) rtr[i] = (busy[i] == 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int target(input logic [2:0] o);
    case (o)
      3'b000: return 0;
      3'b001: return 1;
      3'b010: return 2;
      3'b011: return 3;
      3'b100: return 4;
      default: return -1;
    endcase
  endfunction

  // Monitor: evaluated just before each clock edge.
  always @(negedge clk) if (!rst) begin
    #4;
    if (vld != 0) begin
      check($onehot(vld), "one valid at a time");
      check(&rtr, "valid only when all ready");
    end
    if (!empty && (&rtr)) begin
      // a dequeue happens at this edge; drop leading unknown op codes in the model
      check(model.size() > 0, "model not empty");
      if (model.size() > 0) begin
        cmd_s c;
        int t;
        c = model.pop_front();
        t = target(c.op);
        if (t < 0) check(vld == 0, "unused op code dropped");
        else begin
          check(vld == 5'(1 << t), $sformatf("valid line for op %0d", c.op));
          check(dout == c.d, "data on D_out");
          started[t]++;
        end
      end
    end else check(vld == 0, "no valid without dequeue");
  end

  // Simulated operations: busy for a random time after each start.
  always @(posedge clk) for (int i = 0; i < 5; i++) begin
    if (vld[i]) busy[i] <= $urandom_range(1, 6);
    else if (busy[i] > 0) busy[i] <= busy[i] - 1;
  end

  task automatic post(input logic [2:0] o, input logic [DATA_W-1:0] d);
    @(negedge clk);
    enq = 1; op = o; din = d;
    if (!full) begin
      cmd_s c;
      c.op = o; c.d = d;
      model.push_back(c);
    end
    @(negedge clk);
    enq = 0;
  endtask

  initial begin
    for (int i = 0; i < 5; i++) busy[i] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++)
      post(3'($urandom_range(0, 7)), {$urandom(), $urandom(), $urandom(), $urandom(), $urandom()});
    repeat (100) @(posedge clk);
    check(empty && model.size() == 0, "all commands delivered");
    // Hold every operation busy and fill the command FIFO.
    @(negedge clk);
    for (int i = 0; i < 5; i++) busy[i] = 1000;
    for (int i = 0; i < 16; i++) post(3'b001, DATA_W'(i));
    check(full, "full after 16 commands");
    post(3'b001, DATA_W'(99));       // refused, not in model
    check(model.size() == 16, "17th command refused");
    for (int i = 0; i < 5; i++) busy[i] = 0;
    repeat (200) @(posedge clk);
    check(empty && model.size() == 0, "queue drained");
    for (int i = 0; i < 5; i++) check(started[i] > 0, $sformatf("operation %0d started", i));
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
