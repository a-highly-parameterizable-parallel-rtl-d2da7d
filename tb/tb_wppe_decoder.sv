// tb_wppe_decoder: self-checking test of the WPPE instruction decoder.
// Random VLIW words and FIFO states; the slot fields, the set of FIFOs the
// word reads (srca of any non-NOP slot, srcb of ADD/SUB slots only) and the
// stall condition are compared with a reference computed here.
module tb_wppe_decoder;
  import wppa_pkg::*;
  vliw_t instr;
  logic [5:0] fifo_empty, fifo_pop;
  add_op_e [1:0] op;
  logic [1:0][3:0] srca, srcb, dst;
  logic [1:0][4:0] imm;
  logic stall;
  br_slot_t br;
  int checks = 0, failures = 0, n_stall = 0;

  wppe_decoder dut (.instr, .fifo_empty, .op, .srca, .srcb, .dst, .imm, .fifo_pop, .stall, .br);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [5:0] epop;
      instr = vliw_t'({15'($urandom), $urandom, $urandom});
      for (int u = 0; u < 2; u++) instr.add[u].op = add_op_e'($urandom_range(0, 4));
      fifo_empty = 6'($urandom);
      epop = 0;
      for (int u = 0; u < 2; u++) begin
        int a, b;
        a = instr.add[u].srca; b = instr.add[u].srcb;
        if (instr.add[u].op != OP_NOP && a >= 8 && a <= 13) epop[a-8] = 1;
        if ((instr.add[u].op == OP_ADD || instr.add[u].op == OP_SUB) && b >= 8 && b <= 13) epop[b-8] = 1;
      end
      #1;
      checks++;
      if (fifo_pop !== epop || stall !== |(epop & fifo_empty)) begin
        failures++; $display("FAIL pop=%b exp=%b stall=%b", fifo_pop, epop, stall);
      end
      checks++;
      if (br !== instr.br || op[1] !== instr.add[1].op || dst[0] !== instr.add[0].dst ||
          srca[1] !== instr.add[1].srca || srcb[0] !== instr.add[0].srcb || imm[1] !== instr.add[1].imm) begin
        failures++; $display("FAIL fields");
      end
      if (stall) n_stall++;
    end
    checks++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
