// tb_pu: self-checking test of one processing unit.
//
// The unit's code memory and its four data memories are modelled here as
// arrays with one cycle of read latency, the same timing as the block RAMs
// in the array. Small programs, built with the encoders of dsp_pkg, are
// loaded, the unit is started through its control register, and after HALT
// the data memories, registers and cycle counts are compared with values
// worked out by hand or by the testbench:
//   1 straight-line arithmetic over ports 0..3, no port conflicts: one
//     instruction per cycle (run time = instructions + 2 cycles of fill)
//   2 read-after-write through one memory and two sources in one memory:
//     one stall cycle each, correct values
//   3 loop with base-register stepping and DJNZ (sum of a vector)
//   4 CALL/RET, CMP and the four conditional branches
//   5 sync lines: SSET/SCLR outputs and a STST polling loop
//   6 error detection: illegal opcode, stack underflow and overflow,
//     sync on port 0; error clear
//   7 host stop and restart, global start_all/stop_all
module tb_pu;
  import dsp_pkg::*;
  localparam int CD = 512, MD = 512, SB = 4;

  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic code_en;
  logic [8:0] code_addr;
  word_t code_rdata;
  logic [3:0] mem_en, mem_we;
  logic [3:0][8:0] mem_addr;
  word_t [3:0] mem_wdata, mem_rdata;
  logic [2:0][SB-1:0] sync_out, sync_in;
  logic reg_we, start_all, stop_all, running, error;
  logic [3:0] reg_addr;
  word_t reg_wdata, reg_rdata;

  pu #(.CODE_DEPTH(CD), .MEM_DEPTH(MD), .SYNC_BITS(SB), .STACK_DEPTH(16)) dut (
    .clk, .rst, .code_en, .code_addr, .code_rdata, .mem_en, .mem_we, .mem_addr,
    .mem_wdata, .mem_rdata, .sync_out, .sync_in, .reg_we, .reg_addr, .reg_wdata,
    .reg_rdata, .start_all, .stop_all, .running, .error);

  word_t cm [CD];
  word_t dm [4][MD];

  always_ff @(posedge clk) begin
    if (code_en) code_rdata <= cm[code_addr];
    for (int p = 0; p < 4; p++) begin
      if (mem_en[p]) begin
        mem_rdata[p] <= dm[p][mem_addr[p]];
        if (mem_we[p]) dm[p][mem_addr[p]] <= mem_wdata[p];
      end
    end
  end

  int checks = 0, failures = 0;
  int run_cycles;
  always_ff @(posedge clk) if (running) run_cycles <= run_cycles + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t prog[$];

  task automatic load_and_reset();
    rst = 1;
    for (int i = 0; i < CD; i++) cm[i] = (i < prog.size()) ? prog[i] : word_t'(OP_HALT) << 27;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    run_cycles = 0;
    @(negedge clk);
  endtask

  task automatic reg_write(input logic [3:0] a, input word_t d);
    reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_we = 0;
  endtask

  // snapshot of the unit's registers, read through the register port
  word_t r_ctrl, r_pc, r_retire, r_errc;
  task automatic read_regs();
    reg_addr = REG_CTRL;   #1 r_ctrl   = reg_rdata;
    reg_addr = REG_PC;     #1 r_pc     = reg_rdata;
    reg_addr = REG_RETIRE; #1 r_retire = reg_rdata;
    reg_addr = REG_ERRC;   #1 r_errc   = reg_rdata;
  endtask

  task automatic run_to_stop(input int limit);
    int n = 0;
    reg_write(REG_CTRL, 32'h1);
    while (running && n < limit) begin @(negedge clk); n++; end
    chk(!running, "unit stopped within the time limit");
    @(negedge clk);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t v;
    int k;
    longint exp_sum;
    rst = 1; reg_we = 0; reg_addr = 0; reg_wdata = 0; start_all = 0; stop_all = 0; sync_in = '0;
    for (int p = 0; p < 4; p++) for (int i = 0; i < MD; i++) dm[p][i] = $urandom;

    // ---------- 1: straight-line code, one instruction per cycle ----------
    prog = {};
    prog.push_back(enc3(OP_ADD,  P_BYPASS, 0, P_LEFT, 0, P_RIGHT, 0));
    prog.push_back(enc3(OP_SUB,  P_DPR,   10, P_LEFT, 1, P_RIGHT, 1));
    prog.push_back(enc3(OP_MUL,  P_BYPASS, 1, P_LEFT, 2, P_RIGHT, 2));
    prog.push_back(enc3(OP_MULH, P_BYPASS, 5, P_LEFT, 3, P_RIGHT, 3));
    prog.push_back(enc3(OP_AND,  P_RIGHT, 20, P_DPR,  0, P_LEFT,  4));
    prog.push_back(enc3(OP_OR,   P_BYPASS, 2, P_DPR,  1, P_LEFT,  5));
    prog.push_back(enc3(OP_XOR,  P_RIGHT, 21, P_DPR,  2, P_LEFT,  6));
    prog.push_back(enc3(OP_SHL,  P_BYPASS, 3, P_DPR,  3, P_LEFT,  7));
    prog.push_back(enc3(OP_SHR,  P_RIGHT, 22, P_DPR,  4, P_LEFT,  8));
    prog.push_back(enc3(OP_SRA,  P_BYPASS, 4, P_DPR,  5, P_LEFT,  9));
    prog.push_back(enc3(OP_MOV,  P_LEFT,  30, P_DPR,  6, P_DPR,   0));
    prog.push_back(enci(OP_LDI,  P_RIGHT, 23, -5));
    prog.push_back(enci(OP_HALT, P_DPR, 0, 0));
    load_and_reset();
    begin
      word_t l[10], r[4], d[7];
      longint pr;
      for (int i = 0; i < 10; i++) l[i] = dm[1][i];
      for (int i = 0; i < 4; i++) r[i] = dm[2][i];
      for (int i = 0; i < 7; i++) d[i] = dm[0][i];
      run_to_stop(100);
      chk(dm[3][0] == l[0] + r[0], "ADD");
      chk(dm[0][10] == l[1] - r[1], "SUB");
      chk(dm[3][1] == l[2] * r[2], "MUL");
      pr = longint'($signed(l[3])) * longint'($signed(r[3]));
      chk(dm[3][5] == pr[63:32], "MULH");
      chk(dm[2][20] == (d[0] & l[4]), "AND");
      chk(dm[3][2] == (d[1] | l[5]), "OR");
      chk(dm[2][21] == (d[2] ^ l[6]), "XOR");
      chk(dm[3][3] == d[3] << l[7][4:0], "SHL");
      chk(dm[2][22] == d[4] >> l[8][4:0], "SHR");
      chk(dm[3][4] == word_t'($signed(d[5]) >>> l[9][4:0]), "SRA");
      chk(dm[1][30] == d[6], "MOV");
      chk(dm[2][23] == 32'hFFFF_FFFB, "LDI sign-extends");
      read_regs();
      chk(r_retire == 13, "13 instructions retired");
      chk(run_cycles == 13 + 2, $sformatf("one instruction per cycle: %0d cycles", run_cycles));
      read_regs();
      chk(r_ctrl == 32'b100, "status: halted, no error");
      chk(r_pc == 13, "pc after HALT");
    end

    // ---------- 2: port stalls ----------
    prog = {};
    prog.push_back(enci(OP_LDI, P_BYPASS, 5, 1000));                   // write p3
    prog.push_back(enc3(OP_ADD, P_DPR, 40, P_BYPASS, 5, P_LEFT, 0));    // read p3 at once: stall
    prog.push_back(enc3(OP_ADD, P_RIGHT, 40, P_LEFT, 1, P_LEFT, 2));    // both in p1: stall
    prog.push_back(enci(OP_HALT, P_DPR, 0, 0));
    load_and_reset();
    begin
      word_t l0, l1, l2;
      l0 = dm[1][0]; l1 = dm[1][1]; l2 = dm[1][2];
      run_to_stop(100);
      chk(dm[0][40] == 1000 + l0, "read-after-write through one memory");
      chk(dm[2][40] == l1 + l2, "two sources in one memory");
      chk(run_cycles == 4 + 2 + 2, $sformatf("two stall cycles: %0d cycles", run_cycles));
    end

    // ---------- 3: loop over a vector with base registers ----------
    prog = {};
    prog.push_back(enci(OP_LDI,  P_DPR, 0, 0));                          // 0 acc = 0
    prog.push_back(enci(OP_SETB, P_LEFT, 0, 100));                       // 1 base[p1] = 100
    prog.push_back(enci(OP_LDLC, P_DPR, 0, 8));                          // 2 8 passes
    prog.push_back(enc3(OP_ADD,  P_DPR, 0, P_DPR, 0, P_LEFT, 0));        // 3 acc += p1[base]
    prog.push_back(enci(OP_ADDB, P_LEFT, 0, 1));                         // 4 base[p1]++
    prog.push_back(enci(OP_DJNZ, P_DPR, 0, 3));                          // 5
    prog.push_back(enci(OP_HALT, P_DPR, 0, 0));                          // 6
    load_and_reset();
    exp_sum = 0;
    for (int i = 0; i < 8; i++) begin dm[1][100 + i] = $urandom_range(0, 100000); exp_sum += dm[1][100 + i]; end
    run_to_stop(200);
    chk(dm[0][0] == word_t'(exp_sum), "vector sum through a DJNZ loop");
    read_regs();
    chk(r_retire == 3 + 8 * 3 + 1, "loop retired count");

    // ---------- 4: procedures, compare and branches ----------
    prog = {};
    prog.push_back(enci(OP_LDI,  P_DPR, 1, 5));                          // 0
    prog.push_back(enci(OP_LDI,  P_DPR, 2, 7));                          // 1
    prog.push_back(enci(OP_CALL, P_DPR, 0, 20));                         // 2
    prog.push_back(enc3(OP_CMP,  P_DPR, 0, P_DPR, 1, P_DPR, 2));         // 3 5 < 7
    prog.push_back(enci(OP_BGE,  P_DPR, 0, 30));                         // 4 not taken
    prog.push_back(enci(OP_BLT,  P_DPR, 0, 8));                          // 5 taken
    prog.push_back(enci(OP_LDI,  P_DPR, 3, 111));                        // 6 skipped
    prog.push_back(enci(OP_HALT, P_DPR, 0, 0));                          // 7
    prog.push_back(enci(OP_LDI,  P_DPR, 3, 222));                        // 8
    prog.push_back(enc3(OP_CMP,  P_DPR, 0, P_DPR, 1, P_DPR, 1));         // 9 equal
    prog.push_back(enci(OP_BNZ,  P_DPR, 0, 30));                         // 10 not taken
    prog.push_back(enci(OP_BZ,   P_DPR, 0, 13));                         // 11 taken
    prog.push_back(enci(OP_LDI,  P_DPR, 4, 111));                        // 12 skipped
    prog.push_back(enci(OP_JMP,  P_DPR, 0, 15));                         // 13
    prog.push_back(enci(OP_LDI,  P_DPR, 4, 111));                        // 14 skipped
    prog.push_back(enci(OP_LDI,  P_DPR, 4, 333));                        // 15
    prog.push_back(enci(OP_HALT, P_DPR, 0, 0));                          // 16
    while (prog.size() < 20) prog.push_back(enci(OP_HALT, P_DPR, 0, 0));
    prog.push_back(enc3(OP_ADD,  P_BYPASS, 0, P_DPR, 1, P_DPR, 2));      // 20 subroutine
    prog.push_back(enci(OP_CALL, P_DPR, 0, 24));                         // 21 nested call
    prog.push_back(enci(OP_RET,  P_DPR, 0, 0));                          // 22
    while (prog.size() < 24) prog.push_back(enci(OP_HALT, P_DPR, 0, 0));
    prog.push_back(enc3(OP_MUL,  P_RIGHT, 0, P_DPR, 1, P_DPR, 2));       // 24
    prog.push_back(enci(OP_RET,  P_DPR, 0, 0));                          // 25
    while (prog.size() < 30) prog.push_back(enci(OP_HALT, P_DPR, 0, 0));
    prog.push_back(enci(OP_LDI,  P_DPR, 5, 666));                        // 30 never reached
    prog.push_back(enci(OP_HALT, P_DPR, 0, 0));
    load_and_reset();
    dm[0][5] = 0;
    run_to_stop(300);
    chk(dm[3][0] == 12, "subroutine result");
    chk(dm[2][0] == 35, "nested subroutine result");
    chk(dm[0][3] == 222, "BLT taken, BGE not taken");
    chk(dm[0][4] == 333, "BZ taken, BNZ not taken, JMP");
    chk(dm[0][5] == 0, "no branch to 30");
    read_regs();
    chk(r_pc == 17, "halted at 16");
    chk(!error, "no error");

    // ---------- 5: synchronization lines ----------
    prog = {};
    prog.push_back(enci(OP_SSET, P_RIGHT, 0, 2));                        // 0 right link bit 2
    prog.push_back(enci(OP_SSET, P_BYPASS, 0, 3));                       // 1 bypass bit 3
    prog.push_back(enci(OP_STST, P_LEFT, 0, 1));                         // 2 wait left bit 1
    prog.push_back(enci(OP_BZ,   P_DPR, 0, 2));                          // 3
    prog.push_back(enci(OP_LDI,  P_DPR, 50, 99));                        // 4
    prog.push_back(enci(OP_SCLR, P_RIGHT, 0, 2));                        // 5
    prog.push_back(enci(OP_HALT, P_DPR, 0, 0));                          // 6
    load_and_reset();
    dm[0][50] = 0;
    reg_write(REG_CTRL, 32'h1);
    repeat (60) @(negedge clk);
    chk(sync_out[1] == 4'b0100 && sync_out[2] == 4'b1000 && sync_out[0] == 0, "SSET drives lines");
    chk(running && dm[0][50] == 0, "unit waits for the sync input");
    sync_in[0][1] = 1;
    repeat (20) @(negedge clk);
    chk(!running && dm[0][50] == 99, "unit continues after the sync input rises");
    chk(sync_out[1] == 4'b0000 && sync_out[2] == 4'b1000, "SCLR clears the line");
    sync_in = '0;

    // ---------- 6: errors ----------
    prog = {};
    prog.push_back(32'hE800_0000);                                       // opcode 29: illegal
    load_and_reset();
    run_to_stop(50);
    read_regs();
    chk(error && r_errc == ERR_ILLEGAL && r_ctrl == 32'b010,
        "illegal opcode sets error");
    reg_write(REG_CTRL, 32'h1);
    @(negedge clk);
    chk(!running, "start refused while error is set");
    reg_write(REG_CTRL, 32'h4);
    read_regs();
    chk(!error && r_errc == ERR_NONE, "error cleared");

    prog = {enci(OP_RET, P_DPR, 0, 0)};
    load_and_reset();
    run_to_stop(50);
    read_regs();
    chk(error && r_errc == ERR_UNDERFLOW, "RET on empty stack");

    prog = {enci(OP_CALL, P_DPR, 0, 0)};                                 // endless recursion
    load_and_reset();
    run_to_stop(200);
    read_regs();
    chk(error && r_errc == ERR_OVERFLOW, "17th nested CALL overflows");
    chk(r_retire == 17, "16 calls accepted");

    prog = {enci(OP_SSET, P_DPR, 0, 0)};
    load_and_reset();
    run_to_stop(50);
    read_regs();
    chk(error && r_errc == ERR_SYNCPORT, "sync on port 0");

    // ---------- 7: stop / restart ----------
    prog = {};
    prog.push_back(enci(OP_LDI, P_DPR, 60, 0));                          // 0
    prog.push_back(enci(OP_LDI, P_DPR, 61, 1));                          // 1
    prog.push_back(enc3(OP_ADD, P_DPR, 60, P_DPR, 60, P_DPR, 61));       // 2 count
    prog.push_back(enci(OP_JMP, P_DPR, 0, 2));                           // 3
    load_and_reset();
    start_all = 1; @(negedge clk); start_all = 0;
    repeat (100) @(negedge clk);
    stop_all = 1; @(negedge clk); stop_all = 0;
    repeat (5) @(negedge clk);
    chk(!running, "stop_all stops the unit");
    v = dm[0][60];
    chk(v > 10, "counter advanced while running");
    repeat (20) @(negedge clk);
    chk(dm[0][60] == v, "no progress while stopped");
    read_regs();
    k = int'(r_pc);
    chk(k == 2 || k == 3, "pc stays inside the loop");
    reg_write(REG_CTRL, 32'h1);
    repeat (50) @(negedge clk);
    chk(dm[0][60] > v, "restart continues the loop");
    reg_write(REG_CTRL, 32'h2);
    repeat (5) @(negedge clk);
    chk(!running, "host stop");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
