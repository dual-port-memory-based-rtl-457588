// global_regs: registers shared by all processing units.
//
// They let the host see at once whether any unit reports a processing error
// and start or stop all units in the same clock cycle. Writing GREG_CTRL with
// bit 0 set gives a one-cycle start_all pulse, with bit 1 set a one-cycle
// stop_all pulse (both in the cycle after the write). GREG_ERROR returns the
// error flag of each unit (bit k = unit k), GREG_RUNNING their running flags,
// GREG_NUNITS the number of units. any_error is the OR of all error flags,
// for use as an interrupt line. Read data appear one cycle after the request.
//
// The three functions (error detection, start all, stop all) follow the
// source description; the register map, the pulse timing and any_error are
// this design's choices.
module global_regs
  import dsp_pkg::*;
#(
  parameter int unsigned N_UNITS = 6
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic               we,
  input  logic [3:0]         addr,
  input  word_t              wdata,
  output word_t              rdata,
  input  logic [N_UNITS-1:0] unit_error,
  input  logic [N_UNITS-1:0] unit_running,
  output logic               start_all,
  output logic               stop_all,
  output logic               any_error
);

  assign any_error = |unit_error;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_all <= 1'b0;
      stop_all  <= 1'b0;
      rdata     <= '0;
    end else begin
      start_all <= en && we && addr == GREG_CTRL && wdata[0];
      stop_all  <= en && we && addr == GREG_CTRL && wdata[1];
      if (en && !we) begin
        unique case (addr)
          GREG_ERROR:   rdata <= 32'(unit_error);
          GREG_RUNNING: rdata <= 32'(unit_running);
          GREG_NUNITS:  rdata <= 32'(N_UNITS);
          default:      rdata <= '0;
        endcase
      end
    end
  end

endmodule
