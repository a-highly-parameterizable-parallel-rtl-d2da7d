// wppe_decoder: instruction decoder of a WPPE.
//
// Splits one VLIW word into the controls of the functional units and works
// out which register-file locations the word touches: which input FIFOs it
// reads (and so must pop), and whether every one of them holds data. When a
// FIFO it reads is empty the word cannot execute, and stall asks the WPPE to
// retry it in the next cycle. Both operands of a unit, and the units of one
// word, that name the same FIFO share one popped value.
//
// Combinational. The instruction layout and the register map are this
// design's (see wppa_pkg); the document names the decoder only.
module wppe_decoder
  import wppa_pkg::*;
#(
  parameter int unsigned NA = NUM_ADD,
  parameter int unsigned NF = NUM_FIFO,
  parameter int unsigned NG = NUM_GP
) (
  input  vliw_t                        instr,
  input  logic [NF-1:0]                fifo_empty,
  output add_op_e   [NA-1:0]           op,
  output logic      [NA-1:0][RADDR_W-1:0] srca,
  output logic      [NA-1:0][RADDR_W-1:0] srcb,
  output logic      [NA-1:0][RADDR_W-1:0] dst,
  output logic      [NA-1:0][IMM_W-1:0]   imm,
  output logic [NF-1:0]                fifo_pop,   // FIFOs read by this word
  output logic                         stall,
  output br_slot_t                     br
);
  function automatic logic is_fifo(logic [RADDR_W-1:0] a);
    return (int'(a) >= NG) && (int'(a) < NG + NF);
  endfunction

  always_comb begin
    fifo_pop = '0;
    for (int u = 0; u < NA; u++) begin
      op[u]   = instr.add[u].op;
      srca[u] = instr.add[u].srca;
      srcb[u] = instr.add[u].srcb;
      dst[u]  = instr.add[u].dst;
      imm[u]  = instr.add[u].imm;
      if (op[u] != OP_NOP && is_fifo(srca[u]))
        fifo_pop[int'(srca[u]) - NG] = 1'b1;
      if ((op[u] == OP_ADD || op[u] == OP_SUB) && is_fifo(srcb[u]))
        fifo_pop[int'(srcb[u]) - NG] = 1'b1;
    end
    stall = |(fifo_pop & fifo_empty);
    br    = instr.br;
  end
endmodule
