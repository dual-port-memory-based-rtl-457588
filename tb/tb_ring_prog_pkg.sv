// tb_ring_prog_pkg: program generator for the end-to-end array tests.
//
// gen_ring_program(k, n, len) returns the machine code of unit k of an
// n-unit array for the "ring pipeline" workload:
//   unit 0 reads x[i] (its DPR data area, words 0..len-1); every unit k
//   computes y_k[i] = y_{k-1}[i] * C(k) + B(k) (y_{-1} = x) in a subroutine
//   called once per element, writes y_k into the ring link on its right and
//   then raises sync bit 0 on that link. Unit k>0 waits for sync bit 0 on
//   its left link before starting. The last unit's result travels over the
//   ring link that closes the ring back to unit 0, which copies it into its
//   DPR data area at words 64..64+len-1.
//   Each unit also keeps the sum of its y_k, stores it in DPR word 125,
//   sends it over its bypass link (even unit to word 0, odd unit to word 1),
//   raises bypass sync bit 0, waits for its partner's bit and stores the
//   partner's sum in DPR word 126.
// coef()/offs() give C(k) and B(k). len must be at most 56.
package tb_ring_prog_pkg;
  import dsp_pkg::*;

  localparam int FUNC_ADDR = 100;

  function automatic int coef(int k);
    return (k % 2 == 0) ? k + 2 : -(k + 1);
  endfunction

  function automatic int offs(int k);
    return 10 * k + 1;
  endfunction

  function automatic void gen_ring_program(input int k, input int n, input int len,
                                           ref word_t p[$]);
    port_e src;
    int lp, w;
    src = (k == 0) ? P_DPR : P_LEFT;
    p = {};
    if (k != 0) begin
      p.push_back(enci(OP_STST, P_LEFT, 0, 0));
      p.push_back(enci(OP_BZ,   P_DPR, 0, 0));
    end
    p.push_back(enci(OP_LDI,  P_BYPASS, 120, coef(k)));
    p.push_back(enci(OP_LDI,  P_BYPASS, 121, offs(k)));
    p.push_back(enci(OP_LDI,  P_BYPASS, 122, 0));
    p.push_back(enci(OP_LDLC, P_DPR, 0, len));
    lp = p.size();
    p.push_back(enci(OP_CALL, P_DPR, 0, FUNC_ADDR));
    p.push_back(enci(OP_ADDB, src, 0, 1));
    p.push_back(enci(OP_ADDB, P_RIGHT, 0, 1));
    p.push_back(enci(OP_DJNZ, P_DPR, 0, lp));
    p.push_back(enci(OP_SSET, P_RIGHT, 0, 0));
    p.push_back(enc3(OP_MOV,  P_BYPASS, (k % 2 == 0) ? 0 : 1, P_BYPASS, 122, P_DPR, 0));
    p.push_back(enci(OP_SSET, P_BYPASS, 0, 0));
    p.push_back(enci(OP_SETB, P_DPR, 0, 0));
    p.push_back(enc3(OP_MOV,  P_DPR, 125, P_BYPASS, 122, P_DPR, 0));
    w = p.size();
    p.push_back(enci(OP_STST, P_BYPASS, 0, 0));
    p.push_back(enci(OP_BZ,   P_DPR, 0, w));
    p.push_back(enc3(OP_MOV,  P_DPR, 126, P_BYPASS, (k % 2 == 0) ? 1 : 0, P_DPR, 0));
    if (k == 0) begin
      w = p.size();
      p.push_back(enci(OP_STST, P_LEFT, 0, 0));
      p.push_back(enci(OP_BZ,   P_DPR, 0, w));
      p.push_back(enci(OP_SETB, P_DPR, 0, 64));
      p.push_back(enci(OP_SETB, P_LEFT, 0, 0));
      p.push_back(enci(OP_LDLC, P_DPR, 0, len));
      lp = p.size();
      p.push_back(enc3(OP_MOV,  P_DPR, 0, P_LEFT, 0, P_DPR, 0));
      p.push_back(enci(OP_ADDB, P_DPR, 0, 1));
      p.push_back(enci(OP_ADDB, P_LEFT, 0, 1));
      p.push_back(enci(OP_DJNZ, P_DPR, 0, lp));
    end
    p.push_back(enci(OP_HALT, P_DPR, 0, 0));
    while (p.size() < FUNC_ADDR) p.push_back(enci(OP_HALT, P_DPR, 0, 0));
    // subroutine: one element
    p.push_back(enc3(OP_MUL, P_BYPASS, 123, src, 0, P_BYPASS, 120));
    p.push_back(enc3(OP_ADD, P_RIGHT, 0, P_BYPASS, 123, P_BYPASS, 121));
    p.push_back(enc3(OP_ADD, P_BYPASS, 122, P_BYPASS, 122, P_RIGHT, 0));
    p.push_back(enci(OP_RET, P_DPR, 0, 0));
  endfunction

endpackage
