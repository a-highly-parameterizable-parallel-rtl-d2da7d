// tb_wppe: self-checking test of one WPPE.
// Loads a four-word program through the instruction-memory port and runs
// it against a model of the expected results:
//   0: r0 = r0 + i0           | r1 = r1 + 1
//   1: o0 = r0 + 0            | r2 = r1 - 3      (sets adder-1 flags)
//   2: multiway branch on {adder1.N, adder1.Z}: N -> 0, Z -> 3, else -> 3
//   3: o1 = r0 + 0, branch to 3 (stay)
// Input words arrive on port 0 with gaps, so the WPPE must stall on the
// empty FIFO. Checked: the three running sums on o0, the final sum on o1,
// that every loop iteration with data present takes 3 cycles, that stalls
// happened, that hold restarts the program at address 0, and that words
// sent to an unread FIFO raise the overflow flag once it is full.
module tb_wppe;
  import wppa_pkg::*;
  import wppa_tb_pkg::*;
  logic clk = 0, rst_n = 0, hold = 0;
  logic imem_we = 0;
  logic [7:0] imem_waddr = 0, pc;
  logic [78:0] imem_wdata = 0;
  link_t [5:0] in_link;
  link_t [1:0] out_link;
  logic stall, ovf;
  int checks = 0, failures = 0;
  int cyc = 0, n_stall = 0;
  logic [15:0] o0_seen [$];
  int o0_cyc [$];
  vliw_t prog [4];

  wppe #(.NF(6), .FIFO_DEPTH(4), .IMEM_DEPTH(4)) dut (
    .clk, .rst_n, .hold, .imem_we, .imem_waddr, .imem_wdata,
    .in_link, .out_link, .stall, .fifo_overflow(ovf), .pc_o(pc));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && stall) n_stall++;
    if (rst_n && out_link[0].valid) begin o0_seen.push_back(out_link[0].data); o0_cyc.push_back(cyc); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send_in(int port, logic [15:0] v);
    @(negedge clk); in_link[port] = '{valid: 1'b1, data: v};
    @(negedge clk); in_link[port] = '0;
  endtask

  initial begin
    logic [15:0] v [3];
    int sum;
    in_link = '0;
    prog[0] = word(no_branch(), slot(OP_ADDI, 1, 1, 0, 1), slot(OP_ADD, 0, 0, 8, 0));
    prog[1] = word(no_branch(), slot(OP_SUBI, 2, 1, 0, 3), slot(OP_ADDI, 14, 0, 0, 0));
    prog[2] = word(branch(1, FS_A1_N, FS_A1_Z, 0, 0, 3, 3), nop(), nop());
    prog[3] = word(branch(1, FS_A0_Z, FS_A0_Z, 3, 3, 3, 3), nop(), slot(OP_ADDI, 15, 0, 0, 0));
    repeat (2) @(posedge clk);
    rst_n = 1;
    // hold while loading, as the configuration loader does
    hold = 1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0; hold = 0;
    v[0] = 16'h1234; v[1] = 16'h0F0F; v[2] = 16'hFFF0;
    // first word late: WPPE stalls at pc 0
    repeat (6) @(negedge clk);
    checks++;
    if (pc !== 0 || !stall) begin failures++; $display("FAIL expected stall at pc 0, pc=%0d", pc); end
    send_in(0, v[0]);
    repeat (10) @(negedge clk);
    // two words back to back: iterations without stall
    send_in(0, v[1]);
    send_in(0, v[2]);
    repeat (30) @(negedge clk);
    sum = 0;
    checks++;
    if (o0_seen.size() != 3) begin failures++; $display("FAIL o0 written %0d times", o0_seen.size()); end
    for (int i = 0; i < 3 && i < o0_seen.size(); i++) begin
      sum = (sum + v[i]) & 16'hFFFF;
      checks++;
      if (o0_seen[i] !== 16'(sum)) begin failures++; $display("FAIL o0[%0d]=%h exp %h", i, o0_seen[i], 16'(sum)); end
    end
    checks++;
    if (o0_seen.size() == 3 && o0_cyc[2] - o0_cyc[1] != 3) begin
      failures++; $display("FAIL iteration took %0d cycles, expected 3", o0_cyc[2] - o0_cyc[1]);
    end
    checks++;
    if (pc !== 3 || out_link[1].valid !== 1 || out_link[1].data !== 16'(sum)) begin
      failures++; $display("FAIL final state pc=%0d o1=%h", pc, out_link[1].data);
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no stall seen"); end
    // hold restarts at 0
    @(negedge clk); hold = 1;
    @(negedge clk); hold = 0;
    #1; checks++;
    if (pc !== 0) begin failures++; $display("FAIL hold did not reset pc"); end
    // overflow of an unread FIFO (port 1, depth 4)
    checks++;
    if (ovf) begin failures++; $display("FAIL overflow too early"); end
    for (int i = 0; i < 5; i++) send_in(1, 16'(i));
    @(negedge clk);
    checks++;
    if (!ovf) begin failures++; $display("FAIL no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
