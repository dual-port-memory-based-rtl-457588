// tb_prog_if: self-checking test of the programming-interface decoder.
//
// The unit side is modelled here by simple per-unit, per-region register
// files with one cycle of read latency, and the global side by a register
// file as well. Random host writes and reads must reach exactly the unit
// and region the address names, and read data must come back with
// host_rvalid one cycle after the request.
module tb_prog_if;
  import dsp_pkg::*;
  localparam int N = 6, HAW = 9;
  localparam int UW = $clog2(N);
  localparam int HA = HAW + 2 + UW + 1;

  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic host_en, host_we, host_rvalid;
  logic [HA-1:0] host_addr;
  word_t host_wdata, host_rdata;
  logic [N-1:0] unit_en;
  logic unit_we, g_en, g_we;
  region_e unit_region;
  logic [HAW-1:0] unit_addr;
  word_t unit_wdata, g_wdata, g_rdata;
  word_t [N-1:0] unit_rdata;
  logic [3:0] g_addr;

  prog_if #(.N_UNITS(N), .HAW(HAW)) dut (.clk, .rst, .host_en, .host_we, .host_addr,
    .host_wdata, .host_rdata, .host_rvalid, .unit_en, .unit_we, .unit_region, .unit_addr,
    .unit_wdata, .unit_rdata, .g_en, .g_we, .g_addr, .g_wdata, .g_rdata);

  // unit-side model: 3 regions x 16 words per unit
  word_t umem [N][3][16];
  word_t gmem [16];
  always_ff @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      if (unit_en[k]) begin
        unit_rdata[k] <= umem[k][unit_region][unit_addr[3:0]];
        if (unit_we) umem[k][unit_region][unit_addr[3:0]] <= unit_wdata;
      end
    end
    if (g_en) begin
      g_rdata <= gmem[g_addr];
      if (g_we) gmem[g_addr] <= g_wdata;
    end
  end

  word_t ref_u [N][3][16];
  word_t ref_g [16];
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [HA-1:0] uaddr(int k, int r, int o);
    return {1'b0, UW'(k), 2'(r), HAW'(o)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; host_en = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    for (int k = 0; k < N; k++) for (int r = 0; r < 3; r++) for (int o = 0; o < 16; o++) begin
      umem[k][r][o] = 0; ref_u[k][r][o] = 0;
    end
    for (int o = 0; o < 16; o++) begin gmem[o] = 0; ref_g[o] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      int k, r, o;
      bit g, w;
      k = $urandom_range(0, N-1); r = $urandom_range(0, 2); o = $urandom_range(0, 15);
      g = $urandom_range(0, 5) == 0; w = $urandom_range(0, 1) != 0;
      host_en = 1; host_we = w; host_wdata = $urandom;
      host_addr = g ? {1'b1, (HA-1)'(o)} : uaddr(k, r, o);
      if (w) begin
        if (g) ref_g[o] = host_wdata; else ref_u[k][r][o] = host_wdata;
      end
      @(negedge clk);
      host_en = 0;
      chk(host_rvalid == !w, "rvalid one cycle after a read only");
      if (!w) chk(host_rdata == (g ? ref_g[o] : ref_u[k][r][o]),
                  $sformatf("read data unit %0d region %0d off %0d global %0d", k, r, o, g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
