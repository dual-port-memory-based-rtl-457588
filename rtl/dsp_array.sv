// dsp_array: the complete DPRAM-coupled parallel DSP system.
//
// N_UNITS programmable processing units (PUs) work in parallel and exchange
// data only through dual-port memories, so no unit ever waits for a bus
// arbiter. The units form a ring: between unit k and unit (k+1) mod N sits
// one DPS link (a dual-port RAM plus sync lines), used as port 2 ("right")
// of unit k and port 1 ("left") of unit k+1. To shorten the path across the
// ring, every unit has a fourth memory interface (port 3) with a "bypass"
// DPS link: unit k is joined to unit j with
//     j = (k + 3) mod N  for even k,
//     j = (k - 3) mod N  for odd k,
// so for N = 6 the bypass pairs are 0-3, 2-5 and 4-1. Bypass link b joins
// unit 2b (side A) and unit (2b+3) mod N (side B). N must be even and at
// least 6. Each unit also has a DPR: a code memory and a data memory shared
// with the host, plus access to the unit's registers. All units' DPRs and the
// global registers sit on the one programming interface (prog_if).
//
// Memories per system: N DPRs (two RAMs each), N ring links and N/2 bypass
// links. Everything runs on one clock; rst is synchronous and active high.
// Host timing is that of prog_if: read data one cycle after the request.
//
// The ring, the bypass rule, the DPR/DPS roles, the global start/stop and
// error registers and the default of 6 units follow the source description;
// the memory sizes and number of sync lines are this design's choices.
module dsp_array
  import dsp_pkg::*;
#(
  parameter int unsigned N_UNITS     = 6,
  parameter int unsigned CODE_DEPTH  = 512,
  parameter int unsigned MEM_DEPTH   = 512,   // DPR data area and every DPS link
  parameter int unsigned SYNC_BITS   = 4,
  parameter int unsigned STACK_DEPTH = 16,
  localparam int unsigned HAW        = ($clog2(CODE_DEPTH) > $clog2(MEM_DEPTH)) ?
                                       $clog2(CODE_DEPTH) : $clog2(MEM_DEPTH),
  localparam int unsigned UW         = $clog2(N_UNITS),
  localparam int unsigned HA         = HAW + 2 + UW + 1
) (
  input  logic               clk,
  input  logic               rst,
  // programming interface (host bus)
  input  logic               host_en,
  input  logic               host_we,
  input  logic [HA-1:0]      host_addr,
  input  word_t              host_wdata,
  output word_t              host_rdata,
  output logic               host_rvalid,
  // status
  output logic               any_error,
  output logic [N_UNITS-1:0] unit_running
);

  localparam int unsigned PCW = $clog2(CODE_DEPTH);
  localparam int unsigned AW  = $clog2(MEM_DEPTH);
  localparam int unsigned NB  = N_UNITS / 2;

  if (N_UNITS % 2 != 0 || N_UNITS < 6) begin : g_bad_n
    $error("dsp_array: N_UNITS must be even and at least 6");
  end

  // ---------------- programming interface ----------------
  logic [N_UNITS-1:0]  h_en;
  logic                h_we;
  region_e             h_region;
  logic [HAW-1:0]      h_addr;
  word_t               h_wdata;
  word_t [N_UNITS-1:0] h_rdata;
  logic                g_en, g_we;
  logic [3:0]          g_addr;
  word_t               g_wdata, g_rdata;
  logic                start_all, stop_all;
  logic [N_UNITS-1:0]  unit_error;

  prog_if #(.N_UNITS(N_UNITS), .HAW(HAW)) u_prog_if (
    .clk, .rst,
    .host_en, .host_we, .host_addr, .host_wdata, .host_rdata, .host_rvalid,
    .unit_en(h_en), .unit_we(h_we), .unit_region(h_region), .unit_addr(h_addr),
    .unit_wdata(h_wdata), .unit_rdata(h_rdata),
    .g_en, .g_we, .g_addr, .g_wdata, .g_rdata
  );

  global_regs #(.N_UNITS(N_UNITS)) u_global (
    .clk, .rst, .en(g_en), .we(g_we), .addr(g_addr), .wdata(g_wdata), .rdata(g_rdata),
    .unit_error, .unit_running, .start_all, .stop_all, .any_error
  );

  // ---------------- unit-side memory interfaces ----------------
  logic  [N_UNITS-1:0][NPORTS-1:0]         pu_en, pu_we;
  logic  [N_UNITS-1:0][NPORTS-1:0][AW-1:0] pu_addr;
  word_t [N_UNITS-1:0][NPORTS-1:0]         pu_wdata, pu_rdata;
  logic  [N_UNITS-1:0][2:0][SYNC_BITS-1:0] pu_sync_out, pu_sync_in;

  // ring links: side A = unit k (port 2), side B = unit k+1 (port 1)
  logic  [N_UNITS-1:0]                 ra_en, ra_we, rb_en, rb_we;
  logic  [N_UNITS-1:0][AW-1:0]         ra_addr, rb_addr;
  word_t [N_UNITS-1:0]                 ra_wdata, ra_rdata, rb_wdata, rb_rdata;
  logic  [N_UNITS-1:0][SYNC_BITS-1:0]  ra_so, ra_si, rb_so, rb_si;

  // bypass links: side A = unit 2b, side B = unit (2b+3) mod N (both port 3)
  logic  [NB-1:0]                      ba_en, ba_we, bb_en, bb_we;
  logic  [NB-1:0][AW-1:0]              ba_addr, bb_addr;
  word_t [NB-1:0]                      ba_wdata, ba_rdata, bb_wdata, bb_rdata;
  logic  [NB-1:0][SYNC_BITS-1:0]       ba_so, ba_si, bb_so, bb_si;

  for (genvar c = 0; c < N_UNITS; c++) begin : g_ring
    dps #(.DEPTH(MEM_DEPTH), .SYNC_BITS(SYNC_BITS)) u_link (
      .clk, .rst,
      .a_en(ra_en[c]), .a_we(ra_we[c]), .a_addr(ra_addr[c]), .a_wdata(ra_wdata[c]),
      .a_rdata(ra_rdata[c]), .a_sync_out(ra_so[c]), .a_sync_in(ra_si[c]),
      .b_en(rb_en[c]), .b_we(rb_we[c]), .b_addr(rb_addr[c]), .b_wdata(rb_wdata[c]),
      .b_rdata(rb_rdata[c]), .b_sync_out(rb_so[c]), .b_sync_in(rb_si[c])
    );
  end

  for (genvar b = 0; b < NB; b++) begin : g_bypass
    dps #(.DEPTH(MEM_DEPTH), .SYNC_BITS(SYNC_BITS)) u_link (
      .clk, .rst,
      .a_en(ba_en[b]), .a_we(ba_we[b]), .a_addr(ba_addr[b]), .a_wdata(ba_wdata[b]),
      .a_rdata(ba_rdata[b]), .a_sync_out(ba_so[b]), .a_sync_in(ba_si[b]),
      .b_en(bb_en[b]), .b_we(bb_we[b]), .b_addr(bb_addr[b]), .b_wdata(bb_wdata[b]),
      .b_rdata(bb_rdata[b]), .b_sync_out(bb_so[b]), .b_sync_in(bb_si[b])
    );
  end

  // ---------------- units and their DPRs ----------------
  for (genvar k = 0; k < N_UNITS; k++) begin : g_unit
    localparam int unsigned LEFT    = (k + N_UNITS - 1) % N_UNITS;  // ring link on the left
    localparam int unsigned PARTNER = bypass_partner(k, N_UNITS);
    localparam int unsigned BLINK   = (k % 2 == 0) ? k / 2 : PARTNER / 2;

    logic          code_en;
    logic [PCW-1:0] code_addr;
    word_t         code_rdata;
    logic          reg_we;
    logic [3:0]    reg_addr;
    word_t         reg_wdata, reg_rdata;

    dpr #(.CODE_DEPTH(CODE_DEPTH), .DATA_DEPTH(MEM_DEPTH), .HAW(HAW)) u_dpr (
      .clk,
      .host_en(h_en[k]), .host_we(h_we), .host_region(h_region), .host_addr(h_addr),
      .host_wdata(h_wdata), .host_rdata(h_rdata[k]),
      .code_en, .code_addr, .code_rdata,
      .data_en(pu_en[k][P_DPR]), .data_we(pu_we[k][P_DPR]), .data_addr(pu_addr[k][P_DPR]),
      .data_wdata(pu_wdata[k][P_DPR]), .data_rdata(pu_rdata[k][P_DPR]),
      .reg_we, .reg_addr, .reg_wdata, .reg_rdata
    );

    pu #(.CODE_DEPTH(CODE_DEPTH), .MEM_DEPTH(MEM_DEPTH), .SYNC_BITS(SYNC_BITS),
         .STACK_DEPTH(STACK_DEPTH)) u_pu (
      .clk, .rst,
      .code_en, .code_addr, .code_rdata,
      .mem_en(pu_en[k]), .mem_we(pu_we[k]), .mem_addr(pu_addr[k]),
      .mem_wdata(pu_wdata[k]), .mem_rdata(pu_rdata[k]),
      .sync_out(pu_sync_out[k]), .sync_in(pu_sync_in[k]),
      .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
      .start_all, .stop_all, .running(unit_running[k]), .error(unit_error[k])
    );

    // port 2: ring link k, side A
    assign ra_en[k]    = pu_en[k][P_RIGHT];
    assign ra_we[k]    = pu_we[k][P_RIGHT];
    assign ra_addr[k]  = pu_addr[k][P_RIGHT];
    assign ra_wdata[k] = pu_wdata[k][P_RIGHT];
    assign ra_so[k]    = pu_sync_out[k][1];
    assign pu_rdata[k][P_RIGHT] = ra_rdata[k];
    assign pu_sync_in[k][1]     = ra_si[k];

    // port 1: ring link k-1, side B
    assign rb_en[LEFT]    = pu_en[k][P_LEFT];
    assign rb_we[LEFT]    = pu_we[k][P_LEFT];
    assign rb_addr[LEFT]  = pu_addr[k][P_LEFT];
    assign rb_wdata[LEFT] = pu_wdata[k][P_LEFT];
    assign rb_so[LEFT]    = pu_sync_out[k][0];
    assign pu_rdata[k][P_LEFT] = rb_rdata[LEFT];
    assign pu_sync_in[k][0]    = rb_si[LEFT];

    // port 3: bypass link, side A for even units, side B for odd units
    if (k % 2 == 0) begin : g_byp_a
      assign ba_en[BLINK]    = pu_en[k][P_BYPASS];
      assign ba_we[BLINK]    = pu_we[k][P_BYPASS];
      assign ba_addr[BLINK]  = pu_addr[k][P_BYPASS];
      assign ba_wdata[BLINK] = pu_wdata[k][P_BYPASS];
      assign ba_so[BLINK]    = pu_sync_out[k][2];
      assign pu_rdata[k][P_BYPASS] = ba_rdata[BLINK];
      assign pu_sync_in[k][2]      = ba_si[BLINK];
    end else begin : g_byp_b
      assign bb_en[BLINK]    = pu_en[k][P_BYPASS];
      assign bb_we[BLINK]    = pu_we[k][P_BYPASS];
      assign bb_addr[BLINK]  = pu_addr[k][P_BYPASS];
      assign bb_wdata[BLINK] = pu_wdata[k][P_BYPASS];
      assign bb_so[BLINK]    = pu_sync_out[k][2];
      assign pu_rdata[k][P_BYPASS] = bb_rdata[BLINK];
      assign pu_sync_in[k][2]      = bb_si[BLINK];
    end
  end

endmodule
