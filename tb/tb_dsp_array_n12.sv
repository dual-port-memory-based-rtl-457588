// tb_dsp_array_n12: the ring pipeline workload on the 12-unit configuration
// (the larger of the two system sizes in the synthesis tables), to show
// that the ring and bypass wiring generalise beyond 6 units: bypass pairs
// 0-3, 2-5, 4-7, 6-9, 8-11, 10-1. The host loads all programs and the
// input vector, starts all units with the global start register, waits for
// all to stop and checks the vector that has passed through all 12 units,
// and every unit's own and bypass partner's checksum.
module tb_dsp_array_n12;
  import dsp_pkg::*;
  import tb_ring_prog_pkg::*;

  localparam int N   = 12;
  localparam int HAW = 9;
  localparam int UW  = $clog2(N);
  localparam int HA  = HAW + 2 + UW + 1;
  localparam int LEN = 24;   // vector length

  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic host_en, host_we, host_rvalid, any_error;
  logic [HA-1:0] host_addr;
  word_t host_wdata, host_rdata;
  logic [N-1:0] unit_running;

  dsp_array #(.N_UNITS(N)) dut (.clk, .rst, .host_en, .host_we, .host_addr, .host_wdata, .host_rdata,
                 .host_rvalid, .any_error, .unit_running);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- host bus ----------------
  function automatic logic [HA-1:0] ua(int k, region_e r, int off);
    return {1'b0, UW'(k), 2'(r), HAW'(off)};
  endfunction
  function automatic logic [HA-1:0] ga(logic [3:0] r);
    return {1'b1, (HA-1)'(r)};
  endfunction

  task automatic hwrite(input logic [HA-1:0] a, input word_t d);
    host_en = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic hread(input logic [HA-1:0] a, output word_t d);
    host_en = 1; host_we = 0; host_addr = a;
    @(negedge clk);
    host_en = 0;
    chk(host_rvalid, "read data valid one cycle after the request");
    d = host_rdata;
  endtask

  // ---------------- mechanism counters ----------------
  logic [N-1:0] v_stall_port, v_stall_same, v_wait, v_call, v_byp_rd;
  for (genvar k = 0; k < N; k++) begin : g_probe
    assign v_stall_same[k] = dut.g_unit[k].u_pu.d_stall && dut.g_unit[k].u_pu.issue_a
                             && dut.g_unit[k].u_pu.d_ir.aport == dut.g_unit[k].u_pu.d_ir.bport;
    assign v_stall_port[k] = dut.g_unit[k].u_pu.d_stall && !v_stall_same[k];
    assign v_wait[k]       = dut.g_unit[k].u_pu.x_valid && dut.g_unit[k].u_pu.x_op == OP_BZ
                             && dut.g_unit[k].u_pu.flag_z;
    assign v_call[k]       = dut.g_unit[k].u_pu.x_valid && dut.g_unit[k].u_pu.x_op == OP_CALL;
    assign v_byp_rd[k]     = dut.pu_en[k][P_BYPASS] && !dut.pu_we[k][P_BYPASS];
  end

  int n_stall_port = 0, n_stall_same = 0, n_wait = 0, n_call = 0, n_wrap_rd = 0,
      n_byp_rd = 0, n_start_all = 0;

  always_ff @(posedge clk) begin
    if (!rst) begin
      n_stall_port <= n_stall_port + $countones(v_stall_port);
      n_stall_same <= n_stall_same + $countones(v_stall_same);
      n_wait       <= n_wait + $countones(v_wait);
      n_call       <= n_call + $countones(v_call);
      n_byp_rd     <= n_byp_rd + $countones(v_byp_rd);
      if (dut.pu_en[0][P_LEFT] && !dut.pu_we[0][P_LEFT]) n_wrap_rd <= n_wrap_rd + 1;
      if (dut.start_all) n_start_all <= n_start_all + 1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
  endtask

  task automatic load_code(input int k, input word_t p[$]);
    for (int i = 0; i < p.size(); i++) hwrite(ua(k, R_CODE, i), p[i]);
  endtask

  initial begin
    word_t p[$];
    word_t x[LEN], y[LEN], sums[N], v;
    int cycles;
    host_en = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    do_reset();

    // ================= 1: ring pipeline =================
    for (int k = 0; k < N; k++) begin
      gen_ring_program(k, N, LEN, p);
      load_code(k, p);
    end
    for (int i = 0; i < LEN; i++) begin
      x[i] = $urandom;
      hwrite(ua(0, R_DATA, i), x[i]);
    end
    // reference
    for (int i = 0; i < LEN; i++) y[i] = x[i];
    for (int k = 0; k < N; k++) begin
      sums[k] = 0;
      for (int i = 0; i < LEN; i++) begin
        y[i] = y[i] * word_t'(coef(k)) + word_t'(offs(k));
        sums[k] += y[i];
      end
    end
    hwrite(ga(GREG_CTRL), 32'h1);                       // start all
    cycles = 0;
    do begin
      repeat (20) @(negedge clk);
      cycles += 21;
      hread(ga(GREG_RUNNING), v);
    end while (v != 0 && cycles < 100000);
    chk(v == 0, "all units finished");
    hread(ga(GREG_ERROR), v);
    chk(v == 0, "no unit reports an error");
    for (int i = 0; i < LEN; i++) begin
      hread(ua(0, R_DATA, 64 + i), v);
      chk(v == y[i], $sformatf("ring result word %0d: %h expected %h", i, v, y[i]));
    end
    for (int k = 0; k < N; k++) begin
      int j;
      j = int'(bypass_partner(k, N));
      hread(ua(k, R_DATA, 125), v);
      chk(v == sums[k], $sformatf("unit %0d checksum", k));
      hread(ua(k, R_DATA, 126), v);
      chk(v == sums[j], $sformatf("unit %0d received checksum of bypass partner %0d", k, j));
      hread(ua(k, R_REGS, REG_CTRL), v);
      chk(v == 32'b100, $sformatf("unit %0d halted without error", k));
    end
    $display("ring pipeline of %0d units, %0d words: about %0d cycles", N, LEN, cycles);

    // ================= mechanisms =================
    $display("port stalls (write port busy): %0d", n_stall_port);
    $display("port stalls (two sources in one memory): %0d", n_stall_same);
    $display("sync wait loop passes: %0d", n_wait);
    $display("subroutine calls: %0d", n_call);
    $display("reads over the ring-closing link: %0d", n_wrap_rd);
    $display("reads over bypass links: %0d", n_byp_rd);
    $display("global start: %0d", n_start_all);
    chk(n_stall_port > 0, "write-port stall happened");
    chk(n_stall_same > 0, "same-memory stall happened");
    chk(n_wait > 0, "sync wait happened");
    chk(n_call >= N * LEN, "one call per element and unit");
    chk(n_wrap_rd >= LEN, "ring-closing link carried the result");
    chk(n_byp_rd > 0, "bypass links used");
    chk(n_start_all > 0, "global start used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
