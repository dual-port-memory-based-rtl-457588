// dsp_pkg: types, constants and helper functions shared by the DPRAM-coupled
// DSP array.
//
// The array is built from processing units (PUs) that have no register file:
// every instruction reads its two arguments from data memories and writes its
// result to a data memory. A PU has four data memory interfaces ("ports"):
//   port 0  the data area of its own DPR (the memory shared with the host)
//   port 1  the DPS link to the previous unit in the ring ("left")
//   port 2  the DPS link to the next unit in the ring ("right")
//   port 3  the DPS bypass link to unit (k+3) mod N or (k-3) mod N
// The 32-bit data word, the 32-bit instruction, the 16-level stack, the
// bypass rule and the kinds of operations follow the source description; the
// instruction encoding below, the memory depths and the number of sync lines
// are this design's own choices.
//
// Instruction word (32 bits):
//   [31:27] opcode
//   [26:25] destination port   [24:18] destination offset
//   [17:16] source A port      [15:9]  source A offset
//   [8:7]   source B port      [6:0]   source B offset
// The address sent to a memory is base[port] + offset, where base[] are four
// per-port base registers set by SETB/ADDB (this is how loops walk arrays).
// Immediate-form instructions (LDI, SETB, ADDB, jumps, LDLC, sync ops) use
// bits [17:0] as an 18-bit immediate instead of the two source fields.
package dsp_pkg;

  localparam int unsigned DW       = 32;  // data word and instruction width
  localparam int unsigned OFFW     = 7;   // operand offset field width
  localparam int unsigned IMMW     = 18;  // immediate field width
  localparam int unsigned NPORTS   = 4;   // data memory interfaces per PU

  typedef logic [DW-1:0] word_t;

  typedef enum logic [1:0] {
    P_DPR    = 2'd0,
    P_LEFT   = 2'd1,
    P_RIGHT  = 2'd2,
    P_BYPASS = 2'd3
  } port_e;

  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_ADD  = 5'd1,   // d = a + b
    OP_SUB  = 5'd2,   // d = a - b
    OP_MUL  = 5'd3,   // d = low 32 bits of a * b
    OP_MULH = 5'd4,   // d = high 32 bits of signed a * b (Q31 product)
    OP_AND  = 5'd5,
    OP_OR   = 5'd6,
    OP_XOR  = 5'd7,
    OP_SHL  = 5'd8,   // d = a << b[4:0]
    OP_SHR  = 5'd9,   // d = a >> b[4:0], logical
    OP_SRA  = 5'd10,  // d = a >>> b[4:0], arithmetic
    OP_MOV  = 5'd11,  // d = a
    OP_CMP  = 5'd12,  // flags Z = (a == b), N = (a < b) signed
    OP_LDI  = 5'd13,  // d = sign-extended imm18
    OP_SETB = 5'd14,  // base[dport] = imm
    OP_ADDB = 5'd15,  // base[dport] = base[dport] + imm
    OP_JMP  = 5'd16,  // pc = imm
    OP_BZ   = 5'd17,  // if Z  pc = imm
    OP_BNZ  = 5'd18,  // if !Z pc = imm
    OP_BLT  = 5'd19,  // if N  pc = imm
    OP_BGE  = 5'd20,  // if !N pc = imm
    OP_CALL = 5'd21,  // push pc+1, pc = imm
    OP_RET  = 5'd22,  // pc = pop
    OP_LDLC = 5'd23,  // loop counter = imm
    OP_DJNZ = 5'd24,  // loop counter -= 1, if it is not 0 then pc = imm
    OP_SSET = 5'd25,  // sync output bit imm of link dport set to 1
    OP_SCLR = 5'd26,  // sync output bit imm of link dport cleared
    OP_STST = 5'd27,  // Z = !(sync input bit imm of link dport)
    OP_HALT = 5'd31   // stop this unit
  } opcode_e;

  typedef struct packed {
    opcode_e          op;
    port_e            dport;
    logic [OFFW-1:0]  doff;
    port_e            aport;
    logic [OFFW-1:0]  aoff;
    port_e            bport;
    logic [OFFW-1:0]  boff;
  } instr_t;

  // Programming-interface regions inside one unit's address window
  typedef enum logic [1:0] {
    R_CODE = 2'd0,
    R_DATA = 2'd1,
    R_REGS = 2'd2,
    R_NONE = 2'd3
  } region_e;

  // Per-unit register numbers (offset within R_REGS)
  localparam logic [3:0] REG_CTRL   = 4'd0; // w: bit0 start, bit1 stop, bit2 clear error
                                            // r: bit0 running, bit1 error, bit2 halted
  localparam logic [3:0] REG_PC     = 4'd1; // r/w program counter (write while stopped)
  localparam logic [3:0] REG_RETIRE = 4'd2; // r: instructions completed since reset
  localparam logic [3:0] REG_ERRC   = 4'd3; // r: error cause

  // Error causes reported in REG_ERRC
  localparam logic [2:0] ERR_NONE      = 3'd0;
  localparam logic [2:0] ERR_ILLEGAL   = 3'd1;
  localparam logic [2:0] ERR_OVERFLOW  = 3'd2;
  localparam logic [2:0] ERR_UNDERFLOW = 3'd3;
  localparam logic [2:0] ERR_SYNCPORT  = 3'd4;

  // Global register numbers (offset within the global window)
  localparam logic [3:0] GREG_CTRL    = 4'd0; // w: bit0 start all, bit1 stop all
  localparam logic [3:0] GREG_ERROR   = 4'd1; // r: error bit of each unit, bit k = unit k
  localparam logic [3:0] GREG_RUNNING = 4'd2; // r: running bit of each unit
  localparam logic [3:0] GREG_NUNITS  = 4'd3; // r: number of units

  // Bypass partner of unit k in a ring of n units (n even, n >= 6):
  // even k -> (k + 3) mod n, odd k -> (k - 3) mod n.
  function automatic int unsigned bypass_partner(int unsigned k, int unsigned n);
    if (k % 2 == 0) return (k + 3) % n;
    else            return (k + n - 3) % n;
  endfunction

  // Instruction encoders (three-operand form and immediate form)
  function automatic word_t enc3(opcode_e op, port_e dp, int unsigned doff,
                                 port_e ap, int unsigned aoff,
                                 port_e bp, int unsigned boff);
    instr_t i;
    i.op = op;
    i.dport = dp; i.doff = OFFW'(doff);
    i.aport = ap; i.aoff = OFFW'(aoff);
    i.bport = bp; i.boff = OFFW'(boff);
    return word_t'(i);
  endfunction

  function automatic word_t enci(opcode_e op, port_e dp, int unsigned doff, int imm);
    word_t w;
    w = enc3(op, dp, doff, P_DPR, 0, P_DPR, 0);
    w[IMMW-1:0] = IMMW'(imm);
    return w;
  endfunction

endpackage
