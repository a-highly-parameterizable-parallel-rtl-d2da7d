// wppa_tb_pkg: helpers shared by the WPPE and array testbenches to build
// VLIW words and configuration streams (see wppa_pkg for the layouts).
package wppa_tb_pkg;
  import wppa_pkg::*;

  function automatic add_slot_t slot(add_op_e op, int dst, int srca, int srcb, int imm);
    add_slot_t s;
    s.op = op; s.dst = 4'(dst); s.srca = 4'(srca); s.srcb = 4'(srcb); s.imm = 5'(imm);
    return s;
  endfunction

  function automatic add_slot_t nop();
    return slot(OP_NOP, 0, 0, 0, 0);
  endfunction

  // branch slot; en = 0 gives fall-through
  function automatic br_slot_t branch(bit en, flag_src_e f1, flag_src_e f0,
                                      int t3, int t2, int t1, int t0);
    br_slot_t b;
    b.en = en; b.fsel[1] = f1; b.fsel[0] = f0;
    b.tgt[3] = 8'(t3); b.tgt[2] = 8'(t2); b.tgt[1] = 8'(t1); b.tgt[0] = 8'(t0);
    return b;
  endfunction

  function automatic br_slot_t no_branch();
    return branch(0, FS_A0_Z, FS_A0_Z, 0, 0, 0, 0);
  endfunction

  function automatic vliw_t word(br_slot_t b, add_slot_t a1, add_slot_t a0);
    vliw_t w;
    w.br = b; w.add[1] = a1; w.add[0] = a0;
    return w;
  endfunction

  function automatic logic [31:0] prog_header(int n_words, int first_addr);
    return {CW_PROG, 14'h0, 8'(n_words), 8'(first_addr)};
  endfunction

  function automatic logic [31:0] icn_word(bit last, int column, int value);
    return {CW_ICN, last, 5'(column), 16'h0, 8'(value)};
  endfunction

  // slice k (0 = least significant) of a VLIW word for the config bus
  function automatic logic [31:0] slice(vliw_t w, int k);
    logic [95:0] x;
    x = {17'h0, w};
    return x[32*k +: 32];
  endfunction
endpackage
