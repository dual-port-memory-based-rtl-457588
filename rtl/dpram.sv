// dpram: true dual-port RAM, the building block of every link in the array.
//
// Two independent ports (A and B), each with its own clock, address, data in,
// data out and write enable, as in the usual FPGA block RAM. Each port also
// has an enable: when it is low the port neither reads nor writes and its
// data output keeps its last value. Reads are synchronous: rdata shows the
// word one clock edge after the address was presented with en high. A read of
// an address written in the same cycle returns the old word (read-first).
//
// The only conflict the source description names is both ports writing the
// same address at once; it leaves the outcome open and expects the two users
// to avoid it with a handshake. An assertion, sampled on clock A, flags it;
// the stored value is then whichever write lands last.
// Depth and width are parameters; the defaults (512 x 32 bits, 16 kbit, one
// Virtex-4 RAMB16 of data) are this design's choice.
//
// The array is written from two processes, one per port clock. This is the
// standard description of a true dual-port block RAM; a lint tool may report
// the array as driven from several processes, which is intended here.
module dpram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  // port A
  input  logic             clk_a,
  input  logic             en_a,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  // port B
  input  logic             clk_b,
  input  logic             en_b,
  input  logic             we_b,
  input  logic [AW-1:0]    addr_b,
  input  logic [WIDTH-1:0] wdata_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (en_a) begin
      rdata_a <= mem[addr_a];
      if (we_a) mem[addr_a] <= wdata_a;
    end
  end

  always_ff @(posedge clk_b) begin
    if (en_b) begin
      rdata_b <= mem[addr_b];
      if (we_b) mem[addr_b] <= wdata_b;
    end
  end

  // Both ports writing one address in the same cycle is a program error.
  always_ff @(posedge clk_a)
    a_no_write_collision: assert (!(en_a && we_a && en_b && we_b && addr_a == addr_b))
      else $error("dpram: both ports write address %0d in the same cycle", addr_a);

endmodule
