// prog_if: the programming interface, a simple memory-mapped host bus that
// reaches every unit's DPR (code area, data area, unit registers) and the
// global registers.
//
// Host address, from the top bit down:
//   [HA-1]                 1 = global registers, 0 = a unit
//   [HAW+2 +: UW]          unit number
//   [HAW +: 2]             region: 0 code, 1 data, 2 unit registers
//   [HAW-1:0]              word offset inside the region
// One request per cycle (host_en, host_we, host_addr, host_wdata). For a
// read, host_rvalid is high one cycle later with the word on host_rdata.
// Writes complete in the cycle of the request and return nothing.
//
// The source describes a VME-like programming interface that loads code and
// data into the DPRs and reaches the unit and global registers; the address
// layout and timing here are this design's choices.
module prog_if
  import dsp_pkg::*;
#(
  parameter int unsigned N_UNITS = 6,
  parameter int unsigned HAW     = 9,
  localparam int unsigned UW     = (N_UNITS > 1) ? $clog2(N_UNITS) : 1,
  localparam int unsigned HA     = HAW + 2 + UW + 1
) (
  input  logic                 clk,
  input  logic                 rst,
  // host bus
  input  logic                 host_en,
  input  logic                 host_we,
  input  logic [HA-1:0]        host_addr,
  input  word_t                host_wdata,
  output word_t                host_rdata,
  output logic                 host_rvalid,
  // to the DPRs (address, region and data are shared, enables are per unit)
  output logic [N_UNITS-1:0]   unit_en,
  output logic                 unit_we,
  output region_e              unit_region,
  output logic [HAW-1:0]       unit_addr,
  output word_t                unit_wdata,
  input  word_t [N_UNITS-1:0]  unit_rdata,
  // to the global registers
  output logic                 g_en,
  output logic                 g_we,
  output logic [3:0]           g_addr,
  output word_t                g_wdata,
  input  word_t                g_rdata
);

  logic          is_global;
  logic [UW-1:0] unit_sel;
  logic          rd_global_q;
  logic [UW-1:0] rd_unit_q;

  assign is_global   = host_addr[HA-1];
  assign unit_sel    = host_addr[HAW+2 +: UW];
  assign unit_we     = host_we;
  assign unit_region = region_e'(host_addr[HAW +: 2]);
  assign unit_addr   = host_addr[HAW-1:0];
  assign unit_wdata  = host_wdata;
  assign g_en        = host_en && is_global;
  assign g_we        = host_we;
  assign g_addr      = host_addr[3:0];
  assign g_wdata     = host_wdata;

  always_comb begin
    for (int k = 0; k < N_UNITS; k++)
      unit_en[k] = host_en && !is_global && unit_sel == UW'(k);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      host_rvalid <= 1'b0;
      rd_global_q <= 1'b0;
      rd_unit_q   <= '0;
    end else begin
      host_rvalid <= host_en && !host_we;
      if (host_en && !host_we) begin
        rd_global_q <= is_global;
        rd_unit_q   <= unit_sel;
      end
    end
  end

  always_comb begin
    if (rd_global_q)                      host_rdata = g_rdata;
    else if (32'(rd_unit_q) < N_UNITS)     host_rdata = unit_rdata[rd_unit_q];
    else                                  host_rdata = '0;
  end

endmodule
