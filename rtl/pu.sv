// pu: programmable processing unit of the DPRAM-coupled DSP array.
//
// The unit has no register file. Each instruction names two source operands
// and one destination, each as (memory interface, offset), and the unit works
// directly on four data memories: the data area of its own DPR (port 0), the
// DPS links to its ring neighbours (ports 1 and 2) and its bypass DPS link
// (port 3). Code comes from the code area of the DPR through a separate
// fetch port. The effective address of an operand is base[port] + offset,
// with one base register per port (SETB/ADDB). See dsp_pkg for the encoding.
//
// Pipeline, three stages, one instruction per cycle when operands are spread
// over different memories:
//   F  the program counter is presented to the code memory;
//   D  the instruction is decoded, base registers are applied, and the two
//      source reads are issued to their memories;
//   X  the read data arrive, the ALU computes, the result is written to the
//      destination memory, and flags, jumps, calls, loops and sync bits are
//      handled.
// So in one cycle the unit fetches one instruction, reads two arguments and
// writes the result of the previous instruction, as the source describes.
// Every memory port does one access per cycle. When a read in D needs the
// port that X writes in the same cycle, or both sources sit in the same
// memory, D holds the instruction for a cycle ("port stall"); values read
// early are kept in hold registers. The stall also orders a write and a
// following read of the same memory, so no forwarding is needed.
// Jumps, branches, calls, returns and DJNZ are resolved in X; the two younger
// instructions in F and D are discarded (two-cycle penalty).
//
// Synchronization: for each of the three links the unit drives SYNC_BITS
// output lines (SSET, SCLR) and tests the partner's lines (STST sets Z when
// the tested line is low).
//
// Control: the unit runs while `running` is set. Start and stop come from its
// own control register or from the global start/stop lines. HALT, an illegal
// opcode, a stack overflow or underflow, or a sync instruction aimed at
// port 0 stop the unit; the last four also set the sticky error flag and the
// cause register, which the global registers collect. On stop the
// instructions already in D and X finish; the program counter then holds the
// address of the next instruction, so a restart continues there.
//
// From the source: 32-bit instructions and data, add/sub/multiply/shift/
// logic operations, loops, comparisons, jumps and conditional branches, the
// 16-level stack for procedures, set/clear/test of sync bits, control and
// status registers, four memory interfaces used as above. The encoding, base
// registers, loop counter, pipeline and hazard handling, error causes and
// register map are this design's own choices.
module pu
  import dsp_pkg::*;
#(
  parameter int unsigned CODE_DEPTH  = 512,
  parameter int unsigned MEM_DEPTH   = 512,  // depth of each of the four data memories
  parameter int unsigned SYNC_BITS   = 4,
  parameter int unsigned STACK_DEPTH = 16,
  localparam int unsigned PCW        = $clog2(CODE_DEPTH),
  localparam int unsigned AW         = $clog2(MEM_DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst,
  // code fetch (code area of the DPR)
  output logic                  code_en,
  output logic [PCW-1:0]        code_addr,
  input  word_t                 code_rdata,
  // four data memory interfaces, index = port number
  output logic [NPORTS-1:0]     mem_en,
  output logic [NPORTS-1:0]     mem_we,
  output logic [NPORTS-1:0][AW-1:0] mem_addr,
  output word_t [NPORTS-1:0]    mem_wdata,
  input  word_t [NPORTS-1:0]    mem_rdata,
  // synchronization lines of links 1..3 (index 0 = port 1)
  output logic [2:0][SYNC_BITS-1:0] sync_out,
  input  logic [2:0][SYNC_BITS-1:0] sync_in,
  // register access from the programming interface
  input  logic                  reg_we,
  input  logic [3:0]            reg_addr,
  input  word_t                 reg_wdata,
  output word_t                 reg_rdata,
  // global control
  input  logic                  start_all,
  input  logic                  stop_all,
  output logic                  running,
  output logic                  error
);

  localparam int unsigned SBW = (SYNC_BITS > 1) ? $clog2(SYNC_BITS) : 1;

  // ------------------------------------------------------------------
  // Decode helpers
  // ------------------------------------------------------------------
  function automatic logic reads_a(opcode_e op);
    return op inside {OP_ADD, OP_SUB, OP_MUL, OP_MULH, OP_AND, OP_OR, OP_XOR,
                      OP_SHL, OP_SHR, OP_SRA, OP_MOV, OP_CMP};
  endfunction

  function automatic logic reads_b(opcode_e op);
    return op inside {OP_ADD, OP_SUB, OP_MUL, OP_MULH, OP_AND, OP_OR, OP_XOR,
                      OP_SHL, OP_SHR, OP_SRA, OP_CMP};
  endfunction

  function automatic logic writes_mem(opcode_e op);
    return op inside {OP_ADD, OP_SUB, OP_MUL, OP_MULH, OP_AND, OP_OR, OP_XOR,
                      OP_SHL, OP_SHR, OP_SRA, OP_MOV, OP_LDI};
  endfunction

  function automatic logic legal(opcode_e op);
    return op inside {OP_NOP, OP_ADD, OP_SUB, OP_MUL, OP_MULH, OP_AND, OP_OR, OP_XOR,
                      OP_SHL, OP_SHR, OP_SRA, OP_MOV, OP_CMP, OP_LDI, OP_SETB, OP_ADDB,
                      OP_JMP, OP_BZ, OP_BNZ, OP_BLT, OP_BGE, OP_CALL, OP_RET, OP_LDLC,
                      OP_DJNZ, OP_SSET, OP_SCLR, OP_STST, OP_HALT};
  endfunction

  // ------------------------------------------------------------------
  // State
  // ------------------------------------------------------------------
  logic [PCW-1:0]          pc;          // address of the next fetch
  logic                    halted;
  logic [2:0]              err_cause;
  logic [31:0]             retired;
  logic                    flag_z, flag_n;
  logic [31:0]             loop_cnt;
  logic [NPORTS-1:0][AW-1:0] base;

  // D stage
  logic                    d_valid;
  logic [PCW-1:0]          d_pc;
  instr_t                  d_ir;
  logic                    d_a_done, d_b_done;   // read issued in an earlier cycle
  logic                    d_a_pend, d_b_pend;   // read issued in the previous cycle
  word_t                   d_a_hold, d_b_hold;

  // X stage
  logic                    x_valid;
  opcode_e                 x_op;
  port_e                   x_dport, x_aport, x_bport;
  logic [AW-1:0]           x_daddr;
  logic [IMMW-1:0]         x_imm;
  logic [PCW-1:0]          x_pc;
  logic                    x_a_fresh, x_b_fresh;
  word_t                   x_a_hold, x_b_hold;

  // ------------------------------------------------------------------
  // D stage: decode and read issue
  // ------------------------------------------------------------------
  logic          x_wr;                 // X writes memory this cycle
  logic          need_a, need_b, issue_a, issue_b, d_ready, d_stall, d_fire;
  logic [AW-1:0] ea_a, ea_b, ea_d;
  word_t         a_now, b_now;         // source values already read by D
  logic          redirect;
  logic [PCW-1:0] redirect_pc;
  logic          fetch_en;

  assign d_ir = instr_t'(code_rdata);
  assign x_wr = x_valid && writes_mem(x_op);

  assign ea_a = base[d_ir.aport] + AW'(d_ir.aoff);
  assign ea_b = base[d_ir.bport] + AW'(d_ir.boff);
  assign ea_d = base[d_ir.dport] + AW'(d_ir.doff);

  assign need_a  = d_valid && reads_a(d_ir.op) && !d_a_done;
  assign need_b  = d_valid && reads_b(d_ir.op) && !d_b_done;
  assign issue_a = need_a && !(x_wr && d_ir.aport == x_dport);
  assign issue_b = need_b && !(x_wr && d_ir.bport == x_dport)
                          && !(issue_a && d_ir.aport == d_ir.bport);
  assign d_ready = (!need_a || issue_a) && (!need_b || issue_b);
  assign d_stall = d_valid && !d_ready;
  assign d_fire  = d_valid && d_ready && !redirect;

  assign a_now = d_a_pend ? mem_rdata[d_ir.aport] : d_a_hold;
  assign b_now = d_b_pend ? mem_rdata[d_ir.bport] : d_b_hold;

  // ------------------------------------------------------------------
  // Memory ports: X write has the port; D reads use the rest
  // ------------------------------------------------------------------
  word_t a_val, b_val, alu_y, wr_data;
  logic  alu_z, alu_n;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      mem_en[p]    = 1'b0;
      mem_we[p]    = 1'b0;
      mem_addr[p]  = '0;
      mem_wdata[p] = wr_data;
      if (x_wr && x_dport == port_e'(p)) begin
        mem_en[p]   = 1'b1;
        mem_we[p]   = 1'b1;
        mem_addr[p] = x_daddr;
      end else if (issue_a && !redirect && d_ir.aport == port_e'(p)) begin
        mem_en[p]   = 1'b1;
        mem_addr[p] = ea_a;
      end else if (issue_b && !redirect && d_ir.bport == port_e'(p)) begin
        mem_en[p]   = 1'b1;
        mem_addr[p] = ea_b;
      end
    end
  end

  // ------------------------------------------------------------------
  // X stage: execute and write back
  // ------------------------------------------------------------------
  assign a_val = x_a_fresh ? mem_rdata[x_aport] : x_a_hold;
  assign b_val = x_b_fresh ? mem_rdata[x_bport] : x_b_hold;

  pu_alu u_alu (.op(x_op), .a(a_val), .b(b_val), .y(alu_y), .zero(alu_z), .neg(alu_n));

  assign wr_data = (x_op == OP_LDI) ? word_t'($signed(x_imm)) : alu_y;

  // stack
  logic           st_push, st_pop, st_over, st_under, st_empty, st_full;
  logic [PCW-1:0] st_top;

  assign st_push = x_valid && x_op == OP_CALL;
  assign st_pop  = x_valid && x_op == OP_RET;

  pu_stack #(.DEPTH(STACK_DEPTH), .WIDTH(PCW)) u_stack (
    .clk, .rst, .push(st_push), .pop(st_pop), .din(x_pc + PCW'(1)),
    .top(st_top), .empty(st_empty), .full(st_full),
    .overflow(st_over), .underflow(st_under)
  );

  logic          x_sync_link_ok;
  logic [1:0]    x_link;              // 0..2 for ports 1..3
  logic [SBW-1:0] x_sbit;
  logic          x_taken, x_halt, x_err;
  logic [2:0]    x_err_cause;
  logic [31:0]   loop_next;

  assign x_link         = 2'(x_dport) - 2'd1;
  assign x_sbit         = x_imm[SBW-1:0];
  assign x_sync_link_ok = (x_dport != P_DPR);
  assign loop_next      = loop_cnt - 32'd1;

  always_comb begin
    x_taken     = 1'b0;
    x_halt      = 1'b0;
    x_err       = 1'b0;
    x_err_cause = ERR_NONE;
    if (x_valid) begin
      unique case (x_op)
        OP_JMP:  x_taken = 1'b1;
        OP_BZ:   x_taken = flag_z;
        OP_BNZ:  x_taken = !flag_z;
        OP_BLT:  x_taken = flag_n;
        OP_BGE:  x_taken = !flag_n;
        OP_CALL: begin x_taken = !st_over;  x_err = st_over;  x_err_cause = ERR_OVERFLOW;  end
        OP_RET:  begin x_taken = !st_under; x_err = st_under; x_err_cause = ERR_UNDERFLOW; end
        OP_DJNZ: x_taken = (loop_next != '0);
        OP_SSET, OP_SCLR, OP_STST: begin
          x_err = !x_sync_link_ok; x_err_cause = ERR_SYNCPORT;
        end
        OP_HALT: x_halt = 1'b1;
        default: if (!legal(x_op)) begin x_err = 1'b1; x_err_cause = ERR_ILLEGAL; end
      endcase
    end
  end

  assign redirect = x_taken || x_halt || x_err;

  always_comb begin
    if (x_err)                               redirect_pc = x_pc;
    else if (x_halt)                         redirect_pc = x_pc + PCW'(1);
    else if (x_op == OP_RET)                 redirect_pc = st_top;
    else                                     redirect_pc = x_imm[PCW-1:0];
  end

  // ------------------------------------------------------------------
  // Fetch and control
  // ------------------------------------------------------------------
  logic host_start, host_stop, host_clr, host_pc_we;

  assign host_start = reg_we && reg_addr == REG_CTRL && reg_wdata[0];
  assign host_stop  = reg_we && reg_addr == REG_CTRL && reg_wdata[1];
  assign host_clr   = reg_we && reg_addr == REG_CTRL && reg_wdata[2];
  assign host_pc_we = reg_we && reg_addr == REG_PC && !running;

  assign fetch_en  = running && !d_stall && !redirect;
  assign code_en   = fetch_en;
  assign code_addr = pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc        <= '0;
      running   <= 1'b0;
      halted    <= 1'b0;
      error     <= 1'b0;
      err_cause <= ERR_NONE;
      retired   <= '0;
      d_valid   <= 1'b0;
      d_pc      <= '0;
      x_valid   <= 1'b0;
      flag_z    <= 1'b0;
      flag_n    <= 1'b0;
      loop_cnt  <= '0;
      base      <= '0;
      sync_out  <= '0;
      d_a_done  <= 1'b0;
      d_b_done  <= 1'b0;
      d_a_pend  <= 1'b0;
      d_b_pend  <= 1'b0;
      x_a_fresh <= 1'b0;
      x_b_fresh <= 1'b0;
    end else begin
      // ---- run control ----
      if (host_clr) begin
        error     <= 1'b0;
        err_cause <= ERR_NONE;
      end
      if ((host_start || start_all) && !error) begin
        running <= 1'b1;
        halted  <= 1'b0;
      end
      if (host_stop || stop_all) running <= 1'b0;
      if (x_halt) begin
        running <= 1'b0;
        halted  <= 1'b1;
      end
      if (x_err) begin
        running   <= 1'b0;
        error     <= 1'b1;
        err_cause <= x_err_cause;
      end

      // ---- F ----
      if (redirect)        pc <= redirect_pc;
      else if (fetch_en)   pc <= pc + PCW'(1);
      else if (host_pc_we) pc <= reg_wdata[PCW-1:0];
      if (fetch_en) d_pc <= pc;

      if (redirect)       d_valid <= 1'b0;
      else if (!d_stall)  d_valid <= fetch_en;

      // ---- D ----
      if (d_fire || redirect || !d_valid) begin
        d_a_done <= 1'b0;
        d_b_done <= 1'b0;
        d_a_pend <= 1'b0;
        d_b_pend <= 1'b0;
      end else begin
        // stalled: remember what has been read so far
        if (d_a_pend) d_a_hold <= mem_rdata[d_ir.aport];
        if (d_b_pend) d_b_hold <= mem_rdata[d_ir.bport];
        d_a_done <= d_a_done | issue_a;
        d_b_done <= d_b_done | issue_b;
        d_a_pend <= issue_a;
        d_b_pend <= issue_b;
      end

      if (d_fire) begin
        unique case (d_ir.op)
          OP_SETB: base[d_ir.dport] <= d_ir[AW-1:0];
          OP_ADDB: base[d_ir.dport] <= base[d_ir.dport] + d_ir[AW-1:0];
          default: ;
        endcase
      end

      x_valid <= d_fire;
      if (d_fire) begin
        x_op      <= d_ir.op;
        x_dport   <= d_ir.dport;
        x_aport   <= d_ir.aport;
        x_bport   <= d_ir.bport;
        x_daddr   <= ea_d;
        x_imm     <= d_ir[IMMW-1:0];
        x_pc      <= d_pc;
        x_a_fresh <= issue_a;
        x_b_fresh <= issue_b;
        x_a_hold  <= a_now;
        x_b_hold  <= b_now;
      end

      // ---- X ----
      if (x_valid) begin
        retired <= retired + 32'd1;
        unique case (x_op)
          OP_CMP: begin
            flag_z <= alu_z;
            flag_n <= alu_n;
          end
          OP_LDLC: loop_cnt <= 32'(x_imm);
          OP_DJNZ: loop_cnt <= loop_next;
          OP_SSET: if (x_sync_link_ok) sync_out[x_link][x_sbit] <= 1'b1;
          OP_SCLR: if (x_sync_link_ok) sync_out[x_link][x_sbit] <= 1'b0;
          OP_STST: if (x_sync_link_ok) flag_z <= !sync_in[x_link][x_sbit];
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------------
  // Register read
  // ------------------------------------------------------------------
  always_comb begin
    unique case (reg_addr)
      REG_CTRL:   reg_rdata = {29'd0, halted, error, running};
      REG_PC:     reg_rdata = 32'(pc);
      REG_RETIRE: reg_rdata = retired;
      REG_ERRC:   reg_rdata = 32'(err_cause);
      default:    reg_rdata = '0;
    endcase
  end

  // A memory port is never asked for two accesses in one cycle.
  always_ff @(posedge clk)
    if (!rst) a_one_access_per_port:
      assert (!(issue_a && issue_b && !redirect && d_ir.aport == d_ir.bport));

endmodule
