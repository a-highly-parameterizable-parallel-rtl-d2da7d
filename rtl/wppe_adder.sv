// wppe_adder: adder/subtractor functional unit of a WPPE.
//
// The case-study processing element carries two of these units; the
// document names them "adder modules" and gives the operand width (16 bits)
// and the immediate width (5 bits). The operation set and the status flags
// are this design's choice: ADD and SUB take two register operands, ADDI and
// SUBI take register operand A and the sign-extended immediate. NOP does
// nothing and reports no write.
//
// Purely combinational: res, st and wr follow op/a/b/imm in the same cycle.
// st.z is set for a zero result, st.n for a set sign bit, st.c for the carry
// out of the addition (for subtraction: no borrow, i.e. a >= b unsigned).
module wppe_adder
  import wppa_pkg::*;
#(
  parameter int unsigned W  = DATA_W,
  parameter int unsigned IW = IMM_W
) (
  input  add_op_e        op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [IW-1:0]  imm,
  output logic [W-1:0]   res,
  output status_t        st,
  output logic           wr    // op produces a result
);
  logic [W-1:0] opb;
  logic         sub;
  logic [W:0]   sum;

  always_comb begin
    sub = (op == OP_SUB) || (op == OP_SUBI);
    if (op == OP_ADDI || op == OP_SUBI) opb = W'($signed(imm));
    else                                opb = b;
    sum  = {1'b0, a} + {1'b0, (sub ? ~opb : opb)} + {{W{1'b0}}, sub};
    res  = sum[W-1:0];
    wr   = (op == OP_ADD) || (op == OP_SUB) || (op == OP_ADDI) || (op == OP_SUBI);
    st.z = (res == '0);
    st.n = res[W-1];
    st.c = sum[W];
  end
endmodule
