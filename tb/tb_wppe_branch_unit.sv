// tb_wppe_branch_unit: self-checking test of the multiway branch unit.
// For random flag sources, flag selects, targets and pc values it checks
// that the two selected flags index the four targets (2^2 targets from one
// branch word), and that without a branch pc steps by one and wraps after
// the last program address.
module tb_wppe_branch_unit;
  logic            en;
  logic [1:0][2:0] fsel;
  logic [3:0][7:0] tgt;
  logic [7:0]      flag_src, pc, next_pc;
  logic [1:0]      flags;
  int checks = 0, failures = 0;
  int hit [4];

  wppe_branch_unit #(.AW(8), .F(2), .NSRC(8), .SELW(3), .LAST(3)) dut (
    .en, .fsel, .tgt, .flag_src, .pc, .flags, .next_pc);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [1:0] ef;
      logic [7:0] enext;
      en = 1'($urandom);
      fsel[0] = 3'($urandom); fsel[1] = 3'($urandom);
      for (int k = 0; k < 4; k++) tgt[k] = 8'($urandom);
      flag_src = 8'($urandom);
      pc = 8'($urandom_range(0, 3));
      ef = {flag_src[fsel[1]], flag_src[fsel[0]]};
      enext = en ? tgt[ef] : ((pc == 3) ? 8'd0 : pc + 8'd1);
      #1;
      checks++;
      if (flags !== ef || next_pc !== enext) begin
        failures++; $display("FAIL en=%b flags=%b/%b next=%h exp=%h", en, flags, ef, next_pc, enext);
      end
      if (en) hit[ef]++;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (hit[k] == 0) begin failures++; $display("FAIL target %0d never taken", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
