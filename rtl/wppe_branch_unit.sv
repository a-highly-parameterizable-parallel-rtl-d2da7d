// wppe_branch_unit: multiway branch unit (BUnit) of a WPPE.
//
// Following the document, each branch instruction names F branch flags and
// 2^F target addresses; the F flags, evaluated in parallel, form the index
// of the target that becomes the next program counter. Each flag is picked
// from a set of NSRC flag sources by a select field of the instruction
// (here: the registered status flags of the adders and the "data present"
// state of two input FIFOs, see wppa_pkg::flag_src_e).
//
// Without a branch the program counter steps by one and wraps to 0 after
// address LAST (the last VLIW word of the program memory); that wrap is this
// design's choice. Combinational; next_pc is taken by the pc register.
module wppe_branch_unit #(
  parameter int unsigned AW   = 8,
  parameter int unsigned F    = 2,
  parameter int unsigned NSRC = 8,
  parameter int unsigned SELW = 3,
  parameter int unsigned LAST = 3
) (
  input  logic                         en,
  input  logic [F-1:0][SELW-1:0]       fsel,
  input  logic [(1<<F)-1:0][AW-1:0]    tgt,
  input  logic [NSRC-1:0]              flag_src,
  input  logic [AW-1:0]                pc,
  output logic [F-1:0]                 flags,
  output logic [AW-1:0]                next_pc
);
  always_comb begin
    for (int k = 0; k < F; k++)
      flags[k] = (int'(fsel[k]) < NSRC) ? flag_src[fsel[k]] : 1'b0;
    if (en)                    next_pc = tgt[flags];
    else if (pc >= AW'(LAST))  next_pc = '0;
    else                       next_pc = pc + 1'b1;
  end
endmodule
