// tb_dps: self-checking test of a DPS link (shared RAM plus sync lines).
//
// Side A writes a block of words that side B reads back, then side B writes
// a block that side A reads back, as two neighbouring units would. The sync
// lines are driven with random patterns and must appear on the other side
// exactly one clock later; after reset both inputs must read zero.
module tb_dps;
  localparam int DEPTH = 32, SB = 4, AW = $clog2(DEPTH);

  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0] a_wdata, a_rdata, b_wdata, b_rdata;
  logic [SB-1:0] a_so, a_si, b_so, b_si;

  dps #(.DEPTH(DEPTH), .SYNC_BITS(SB)) dut (.clk, .rst,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .a_sync_out(a_so), .a_sync_in(a_si),
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata, .b_sync_out(b_so), .b_sync_in(b_si));

  int checks = 0, failures = 0;
  logic [31:0] blk [DEPTH];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SB-1:0] pa, pb;
    rst = 1; a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0;
    a_wdata = 0; b_wdata = 0; a_so = 4'hF; b_so = 4'hF;
    repeat (2) @(negedge clk);
    chk(a_si == 0 && b_si == 0, "sync inputs cleared by reset");
    rst = 0;
    // A -> B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = $urandom; blk[i] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      b_en = 1; b_addr = AW'(i);
      @(negedge clk);
      chk(b_rdata == blk[i], $sformatf("B reads word %0d written by A", i));
    end
    b_en = 0;
    // B -> A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); b_en = 1; b_we = 1; b_addr = AW'(i); b_wdata = $urandom; blk[i] = b_wdata;
    end
    @(negedge clk); b_en = 0; b_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      a_en = 1; a_addr = AW'(i);
      @(negedge clk);
      chk(a_rdata == blk[i], $sformatf("A reads word %0d written by B", i));
    end
    a_en = 0;
    // sync lines: one cycle of latency in each direction
    for (int t = 0; t < 50; t++) begin
      pa = SB'($urandom); pb = SB'($urandom);
      a_so = pa; b_so = pb;
      @(negedge clk);
      chk(b_si == pa && a_si == pb, "sync lines cross after one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
