// dpr: "DPRAM and register access interface", the link between one
// processing unit and the programming interface.
//
// The memory seen by the host is split into two areas: a code area, which
// holds the unit's program, and a data area, through which the host sends
// input data and coefficients and collects results. Each area is its own
// dual-port RAM, so the unit can fetch an instruction and access its data
// area in the same cycle; the host side reaches both through one address
// window, selected by the region field. A third region passes register
// reads and writes on to the unit's control and status registers.
//
// Host side: one access per cycle (host_en, host_we, host_region, host_addr,
// host_wdata). Read data is on host_rdata one cycle after the request, for
// all three regions. Unit side: a read-only code port and a read/write data
// port, both with one cycle read latency; a register port with a
// combinational read value (reg_rdata) that is sampled here.
//
// The split into two areas and the host access to unit registers follow the
// source description. Making the areas two separate RAMs, their sizes (512
// words each) and the register-port handshake are this design's choices.
module dpr
  import dsp_pkg::*;
#(
  parameter int unsigned CODE_DEPTH = 512,
  parameter int unsigned DATA_DEPTH = 512,
  parameter int unsigned HAW        = 9,    // host offset width, >= both address widths
  localparam int unsigned CAW       = $clog2(CODE_DEPTH),
  localparam int unsigned DAW       = $clog2(DATA_DEPTH)
) (
  input  logic            clk,
  // programming interface side
  input  logic            host_en,
  input  logic            host_we,
  input  region_e         host_region,
  input  logic [HAW-1:0]  host_addr,
  input  word_t           host_wdata,
  output word_t           host_rdata,
  // unit side: code fetch
  input  logic            code_en,
  input  logic [CAW-1:0]  code_addr,
  output word_t           code_rdata,
  // unit side: data area (the unit's port 0)
  input  logic            data_en,
  input  logic            data_we,
  input  logic [DAW-1:0]  data_addr,
  input  word_t           data_wdata,
  output word_t           data_rdata,
  // unit side: register access
  output logic            reg_we,
  output logic [3:0]      reg_addr,
  output word_t           reg_wdata,
  input  word_t           reg_rdata
);

  logic  h_code, h_data, h_regs;
  word_t code_host_rdata, data_host_rdata, reg_q;
  region_e region_q;

  assign h_code = host_en && host_region == R_CODE;
  assign h_data = host_en && host_region == R_DATA;
  assign h_regs = host_en && host_region == R_REGS;

  dpram #(.DEPTH(CODE_DEPTH), .WIDTH(32)) u_code (
    .clk_a(clk), .en_a(code_en), .we_a(1'b0), .addr_a(code_addr), .wdata_a('0),
    .rdata_a(code_rdata),
    .clk_b(clk), .en_b(h_code), .we_b(host_we), .addr_b(host_addr[CAW-1:0]),
    .wdata_b(host_wdata), .rdata_b(code_host_rdata)
  );

  dpram #(.DEPTH(DATA_DEPTH), .WIDTH(32)) u_data (
    .clk_a(clk), .en_a(data_en), .we_a(data_we), .addr_a(data_addr), .wdata_a(data_wdata),
    .rdata_a(data_rdata),
    .clk_b(clk), .en_b(h_data), .we_b(host_we), .addr_b(host_addr[DAW-1:0]),
    .wdata_b(host_wdata), .rdata_b(data_host_rdata)
  );

  assign reg_we    = h_regs && host_we;
  assign reg_addr  = host_addr[3:0];
  assign reg_wdata = host_wdata;

  always_ff @(posedge clk) begin
    if (host_en) region_q <= host_region;
    if (h_regs && !host_we) reg_q <= reg_rdata;
  end

  always_comb begin
    unique case (region_q)
      R_CODE:  host_rdata = code_host_rdata;
      R_DATA:  host_rdata = data_host_rdata;
      R_REGS:  host_rdata = reg_q;
      default: host_rdata = '0;
    endcase
  end

endmodule
