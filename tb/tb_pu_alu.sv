// tb_pu_alu: self-checking test of the processing-unit ALU.
//
// Random and corner-case operand pairs for every operation; the expected
// results are computed here with 64-bit integer arithmetic.
module tb_pu_alu;
  import dsp_pkg::*;

  opcode_e op;
  word_t a, b, y;
  logic zero, neg;
  int checks = 0, failures = 0;

  pu_alu dut (.op, .a, .b, .y, .zero, .neg);

  function automatic word_t model(opcode_e o, word_t x, word_t z);
    longint sx, sz, p;
    sx = longint'($signed(x)); sz = longint'($signed(z)); p = sx * sz;
    case (o)
      OP_ADD:  return word_t'(sx + sz);
      OP_SUB:  return word_t'(sx - sz);
      OP_MUL:  return p[31:0];
      OP_MULH: return p[63:32];
      OP_AND:  return x & z;
      OP_OR:   return x | z;
      OP_XOR:  return x ^ z;
      OP_SHL:  return word_t'({32'd0, x} << z[4:0]);
      OP_SHR:  return word_t'({32'd0, x} >> z[4:0]);
      OP_SRA:  return word_t'(sx >>> z[4:0]);
      OP_MOV:  return x;
      default: return '0;
    endcase
  endfunction

  initial begin
    opcode_e ops[11] = '{OP_ADD, OP_SUB, OP_MUL, OP_MULH, OP_AND, OP_OR, OP_XOR,
                         OP_SHL, OP_SHR, OP_SRA, OP_MOV};
    word_t corner[6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h4000_0000};
    for (int i = 0; i < 11; i++) begin
      for (int t = 0; t < 300; t++) begin
        op = ops[i];
        a = (t < 36) ? corner[t % 6] : $urandom;
        b = (t < 36) ? corner[t / 6] : $urandom;
        #1;
        checks++;
        if (y !== model(op, a, b)) begin
          failures++;
          $display("FAIL %s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, model(op, a, b));
        end
        checks++;
        if (zero !== (a == b) || neg !== ($signed(a) < $signed(b))) begin
          failures++; $display("FAIL flags a=%h b=%h", a, b);
        end
      end
    end
    // Q1.31 example: 0.5 * 0.5 = 0.25, MULH gives the product / 2^32
    op = OP_MULH; a = 32'h4000_0000; b = 32'h4000_0000; #1;
    checks++; if (y !== 32'h1000_0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
