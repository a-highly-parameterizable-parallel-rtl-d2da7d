// tb_wppe_adder: self-checking test of the WPPE adder/subtractor unit.
// Drives random operations and operands (plus corner values) and compares
// the result, the write flag and the Z/N/C status flags with a reference
// computed here in 32-bit integer arithmetic.
module tb_wppe_adder;
  import wppa_pkg::*;
  add_op_e      op;
  logic [15:0]  a, b, res;
  logic [4:0]   imm;
  status_t      st;
  logic         wr;
  int checks = 0, failures = 0;

  wppe_adder dut (.op, .a, .b, .imm, .res, .st, .wr);

  task automatic check_one();
    int unsigned ea, eb, full;
    logic [15:0] eres;
    logic ec, ewr;
    ea = a;
    eb = (op == OP_ADDI || op == OP_SUBI) ? (imm[4] ? (32'hFFE0 | imm) : imm) : b;
    ewr = (op != OP_NOP);
    if (op == OP_SUB || op == OP_SUBI) begin
      full = ea + ((~eb) & 32'hFFFF) + 1;
    end else begin
      full = ea + eb;
    end
    eres = full[15:0];
    ec   = full[16];
    #1;
    checks++;
    if (wr !== ewr) begin failures++; $display("FAIL wr op=%0d", op); end
    if (ewr) begin
      checks++;
      if (res !== eres || st.c !== ec || st.z !== (eres == 0) || st.n !== eres[15]) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h imm=%h res=%h exp=%h st=%b c=%b", op, a, b, imm, res, eres, st, ec);
      end
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // corner cases
    op = OP_ADD;  a = 16'hFFFF; b = 16'h0001; imm = 0; check_one();
    op = OP_SUB;  a = 16'h0005; b = 16'h0005; check_one();
    op = OP_SUB;  a = 16'h0003; b = 16'h0005; check_one();
    op = OP_ADDI; a = 16'h0010; imm = 5'h1F; check_one();   // +(-1)
    op = OP_SUBI; a = 16'h0010; imm = 5'h10; check_one();   // -(-16)
    op = OP_NOP;  check_one();
    for (int i = 0; i < 2000; i++) begin
      op  = add_op_e'($urandom_range(0, 4));
      a   = 16'($urandom);
      b   = (i % 7 == 0) ? a : 16'($urandom);
      imm = 5'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
