// tb_pu_stack: self-checking test of the 16-level return-address stack.
//
// Random pushes and pops are compared with a queue model; the stack is then
// filled to its 16 levels, a further push must report overflow and leave the
// contents alone, and popping everything must give the values back in
// reverse order, followed by an underflow on the next pop.
module tb_pu_stack;
  localparam int DEPTH = 16, W = 9;

  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic push, pop, empty, full, overflow, underflow;
  logic [W-1:0] din, top;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0;

  pu_stack #(.DEPTH(DEPTH), .WIDTH(W)) dut (.clk, .rst, .push, .pop, .din, .top,
    .empty, .full, .overflow, .underflow);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input bit pu, input bit po, input logic [W-1:0] d);
    push = pu; pop = po; din = d;
    #1;
    chk(overflow == (pu && model.size() == DEPTH), "overflow flag");
    chk(underflow == (po && model.size() == 0), "underflow flag");
    if (model.size() > 0) chk(top == model[$], "top of stack");
    chk(empty == (model.size() == 0) && full == (model.size() == DEPTH), "empty/full");
    @(posedge clk);
    if (pu && model.size() < DEPTH) model.push_back(d);
    else if (po && model.size() > 0) void'(model.pop_back());
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 400; t++) begin
      bit p = $urandom_range(0, 1) != 0;
      step(p, !p, W'($urandom));
    end
    while (model.size() < DEPTH) step(1, 0, W'($urandom));
    step(1, 0, 9'h1AB);                      // overflow
    chk(full && top == model[$], "overflowing push leaves the stack unchanged");
    while (model.size() > 0) step(0, 1, 0);
    step(0, 1, 0);                           // underflow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
