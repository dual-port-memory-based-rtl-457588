// tb_dpram: self-checking test of the dual-port RAM.
//
// Both ports are driven with random reads and writes on one clock for
// several thousand cycles, avoiding same-address writes from both ports.
// A reference array, updated at each edge, predicts every read word,
// including read-first behaviour when one port reads an address the other
// port (or itself) writes in the same cycle, and that a disabled port keeps
// its output. A last phase runs port B on its own, unrelated clock: words
// written through port A must be read back through port B and the reverse.
module tb_dpram;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, clk2 = 0, sep = 0, clk_b;
  always #5 clk = ~clk;
  always #7 clk2 = ~clk2;
  assign clk_b = sep ? clk2 : clk;

  logic en_a, we_a, en_b, we_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [31:0] wdata_a, wdata_b, rdata_a, rdata_b;

  dpram #(.DEPTH(DEPTH), .WIDTH(32)) dut (
    .clk_a(clk), .en_a, .we_a, .addr_a, .wdata_a, .rdata_a,
    .clk_b(clk_b), .en_b, .we_b, .addr_b, .wdata_b, .rdata_b);

  logic [31:0] ref_mem [DEPTH];
  logic [31:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_a = 0; we_a = 0; en_b = 0; we_b = 0; addr_a = 0; addr_b = 0; wdata_a = 0; wdata_b = 0;
    // fill through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en_a = 1; we_a = 1; addr_a = AW'(i); wdata_a = $urandom; ref_mem[i] = wdata_a;
    end
    @(negedge clk); en_a = 0; we_a = 0;
    // read all through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en_b = 1; addr_b = AW'(i);
      @(negedge clk);
      en_b = 0;
      checks++;
      if (rdata_b !== ref_mem[i]) begin
        failures++; $display("fill read mismatch at %0d: %h vs %h", i, rdata_b, ref_mem[i]);
      end
    end
    // random traffic on both ports
    exp_a = rdata_a; exp_b = rdata_b;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // check the outputs of the previous edge
      checks += 2;
      if (rdata_a !== exp_a) begin failures++; $display("A mismatch t=%0d", t); end
      if (rdata_b !== exp_b) begin failures++; $display("B mismatch t=%0d", t); end
      en_a = $urandom_range(0, 3) != 0; we_a = $urandom_range(0, 1) != 0;
      en_b = $urandom_range(0, 3) != 0; we_b = $urandom_range(0, 1) != 0;
      addr_a = AW'($urandom_range(0, 7)); addr_b = AW'($urandom_range(0, 7));
      if (en_a && we_a && en_b && we_b && addr_a == addr_b) we_b = 0;
      wdata_a = $urandom; wdata_b = $urandom;
      // predict: read-first on both ports
      if (en_a) exp_a = ref_mem[addr_a];
      if (en_b) exp_b = ref_mem[addr_b];
      if (en_a && we_a) ref_mem[addr_a] = wdata_a;
      if (en_b && we_b) ref_mem[addr_b] = wdata_b;
    end
    @(negedge clk);
    checks += 2;
    if (rdata_a !== exp_a) failures++;
    if (rdata_b !== exp_b) failures++;
    en_a = 0; en_b = 0; we_a = 0; we_b = 0;
    // port B on its own clock
    sep = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); en_a = 1; we_a = 1; addr_a = AW'(i); wdata_a = $urandom; ref_mem[i] = wdata_a;
    end
    @(negedge clk); en_a = 0; we_a = 0;
    for (int i = 16; i < 32; i++) begin
      @(negedge clk2); en_b = 1; we_b = 1; addr_b = AW'(i); wdata_b = $urandom; ref_mem[i] = wdata_b;
    end
    @(negedge clk2); en_b = 0; we_b = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk2); en_b = 1; addr_b = AW'(i);
      @(negedge clk2); en_b = 0;
      checks++;
      if (rdata_b !== ref_mem[i]) begin failures++; $display("two-clock B read %0d", i); end
    end
    for (int i = 16; i < 32; i++) begin
      @(negedge clk); en_a = 1; addr_a = AW'(i);
      @(negedge clk); en_a = 0;
      checks++;
      if (rdata_a !== ref_mem[i]) begin failures++; $display("two-clock A read %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
