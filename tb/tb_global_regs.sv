// tb_global_regs: self-checking test of the global control registers.
//
// Checks that a write of the start or stop bit gives exactly one pulse of
// start_all / stop_all in the next cycle, that the error, running and
// unit-count registers read back what the units report (one cycle after
// the request), and that any_error is the OR of the units' error flags.
module tb_global_regs;
  import dsp_pkg::*;
  localparam int N = 6;

  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic en, we, start_all, stop_all, any_error;
  logic [3:0] addr;
  word_t wdata, rdata;
  logic [N-1:0] uerr, urun;
  int checks = 0, failures = 0;

  global_regs #(.N_UNITS(N)) dut (.clk, .rst, .en, .we, .addr, .wdata, .rdata,
    .unit_error(uerr), .unit_running(urun), .start_all, .stop_all, .any_error);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input logic [3:0] a, output word_t v);
    en = 1; we = 0; addr = a;
    @(negedge clk);
    en = 0;
    v = rdata;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t v;
    rst = 1; en = 0; we = 0; addr = 0; wdata = 0; uerr = 0; urun = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // start pulse
    en = 1; we = 1; addr = GREG_CTRL; wdata = 32'h1;
    @(negedge clk);
    en = 0; we = 0;
    chk(start_all && !stop_all, "start_all pulse after write");
    @(negedge clk);
    chk(!start_all && !stop_all, "start_all lasts one cycle");
    // stop pulse
    en = 1; we = 1; addr = GREG_CTRL; wdata = 32'h2;
    @(negedge clk);
    en = 0; we = 0;
    chk(stop_all && !start_all, "stop_all pulse after write");
    @(negedge clk);
    chk(!stop_all, "stop_all lasts one cycle");
    // a write to another register gives no pulse
    en = 1; we = 1; addr = GREG_ERROR; wdata = 32'h3;
    @(negedge clk);
    en = 0; we = 0;
    chk(!stop_all && !start_all, "no pulse for other registers");
    for (int t = 0; t < 40; t++) begin
      uerr = N'($urandom); urun = N'($urandom);
      #1;
      chk(any_error == (uerr != 0), "any_error is the OR of unit errors");
      rd(GREG_ERROR, v);   chk(v == 32'(uerr), "error register");
      rd(GREG_RUNNING, v); chk(v == 32'(urun), "running register");
    end
    rd(GREG_NUNITS, v); chk(v == N, "unit count register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
