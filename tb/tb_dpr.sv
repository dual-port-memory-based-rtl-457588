// tb_dpr: self-checking test of the DPR (code area, data area, register
// access between host and one unit).
//
// The host writes a program image into the code area and data into the data
// area; the unit-side fetch and data ports must read them back, and words the
// unit writes into the data area must be readable by the host. Register
// writes must appear on the unit's register port, and register reads must
// return the unit's value one cycle after the request.
module tb_dpr;
  import dsp_pkg::*;
  localparam int CD = 64, DD = 64, HAW = 9;

  logic clk = 0;
  always #5 clk = ~clk;

  logic host_en, host_we, code_en, data_en, data_we, reg_we;
  region_e host_region;
  logic [HAW-1:0] host_addr;
  word_t host_wdata, host_rdata, code_rdata, data_wdata, data_rdata, reg_wdata, reg_rdata;
  logic [5:0] code_addr, data_addr;
  logic [3:0] reg_addr;

  dpr #(.CODE_DEPTH(CD), .DATA_DEPTH(DD), .HAW(HAW)) dut (.clk, .host_en, .host_we,
    .host_region, .host_addr, .host_wdata, .host_rdata, .code_en, .code_addr, .code_rdata,
    .data_en, .data_we, .data_addr, .data_wdata, .data_rdata,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata);

  // unit register model: 16 registers, combinational read
  word_t uregs [16];
  assign reg_rdata = uregs[reg_addr];
  always_ff @(posedge clk) if (reg_we) uregs[reg_addr] <= reg_wdata;

  word_t code_img [CD], data_img [DD];
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hwrite(input region_e r, input int a, input word_t d);
    host_en = 1; host_we = 1; host_region = r; host_addr = HAW'(a); host_wdata = d;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic hread(input region_e r, input int a, output word_t d);
    host_en = 1; host_we = 0; host_region = r; host_addr = HAW'(a);
    @(negedge clk);
    host_en = 0;
    d = host_rdata;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t v;
    host_en = 0; host_we = 0; host_region = R_CODE; host_addr = 0; host_wdata = 0;
    code_en = 0; code_addr = 0; data_en = 0; data_we = 0; data_addr = 0; data_wdata = 0;
    for (int i = 0; i < 16; i++) uregs[i] = 32'(i) * 32'h0101_0101;
    @(negedge clk);
    for (int i = 0; i < CD; i++) begin code_img[i] = $urandom; hwrite(R_CODE, i, code_img[i]); end
    for (int i = 0; i < DD; i++) begin data_img[i] = $urandom; hwrite(R_DATA, i, data_img[i]); end
    // unit fetches code and reads data in the same cycles
    for (int i = 0; i < CD; i++) begin
      code_en = 1; code_addr = 6'(i); data_en = 1; data_addr = 6'(CD - 1 - i);
      @(negedge clk);
      chk(code_rdata == code_img[i], "unit fetch sees host code");
      chk(data_rdata == data_img[CD - 1 - i], "unit data read sees host data");
    end
    code_en = 0; data_en = 0;
    // unit writes results, host reads them
    for (int i = 0; i < 8; i++) begin
      data_en = 1; data_we = 1; data_addr = 6'(i); data_wdata = 32'hC0DE_0000 + 32'(i);
      @(negedge clk);
    end
    data_en = 0; data_we = 0;
    for (int i = 0; i < 8; i++) begin
      hread(R_DATA, i, v);
      chk(v == 32'hC0DE_0000 + 32'(i), "host reads unit result");
    end
    for (int i = 0; i < 8; i++) begin
      hread(R_CODE, i, v);
      chk(v == code_img[i], "host reads code back");
    end
    // register access
    hwrite(R_REGS, 5, 32'hDEAD_BEEF);
    chk(uregs[5] == 32'hDEAD_BEEF, "register write reaches the unit");
    for (int i = 0; i < 16; i++) begin
      hread(R_REGS, i, v);
      chk(v == uregs[i], "register read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
