// dps: "DPRAM and synchronization interface", the link between two
// processing units (a ring neighbour or a bypass partner).
//
// One dual-port RAM is shared by the two units: side A uses RAM port A and
// side B uses RAM port B, so both can read and write it in the same cycle with
// no arbitration. Next to the RAM run a few one-bit synchronization lines in
// each direction. Each unit drives its own lines (set/clear from its program)
// and reads the lines of the other side; a program uses them to announce that
// a buffer in the shared RAM is full or free, which is also how the two units
// avoid writing one address at the same time.
//
// The sync lines are registered here once on their way across, so a bit set
// by one unit is seen by the other one cycle later. The source gives no number
// of lines ("a few"); SYNC_BITS = 4 and the one-cycle register are this
// design's choices, as is the RAM size.
module dps #(
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned SYNC_BITS = 4,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst,
  // side A
  input  logic                 a_en,
  input  logic                 a_we,
  input  logic [AW-1:0]        a_addr,
  input  logic [31:0]          a_wdata,
  output logic [31:0]          a_rdata,
  input  logic [SYNC_BITS-1:0] a_sync_out,  // driven by the unit on side A
  output logic [SYNC_BITS-1:0] a_sync_in,   // seen by the unit on side A
  // side B
  input  logic                 b_en,
  input  logic                 b_we,
  input  logic [AW-1:0]        b_addr,
  input  logic [31:0]          b_wdata,
  output logic [31:0]          b_rdata,
  input  logic [SYNC_BITS-1:0] b_sync_out,
  output logic [SYNC_BITS-1:0] b_sync_in
);

  dpram #(.DEPTH(DEPTH), .WIDTH(32)) u_ram (
    .clk_a(clk), .en_a(a_en), .we_a(a_we), .addr_a(a_addr), .wdata_a(a_wdata), .rdata_a(a_rdata),
    .clk_b(clk), .en_b(b_en), .we_b(b_we), .addr_b(b_addr), .wdata_b(b_wdata), .rdata_b(b_rdata)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      a_sync_in <= '0;
      b_sync_in <= '0;
    end else begin
      a_sync_in <= b_sync_out;
      b_sync_in <= a_sync_out;
    end
  end

endmodule
