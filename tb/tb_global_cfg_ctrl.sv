// tb_global_cfg_ctrl: self-checking test of the global configuration
// controller, with a small memory model in the testbench (one-cycle read
// latency). Checks: the mask registers, the bus sequence of a program
// transfer (SELECT, BEGIN with the first VLIW address, 12 DATA words in
// memory order, END) and that it takes 18 cycles for four VLIW words; an
// interconnect transfer of 12 icn words that takes 13 cycles; and that the
// masks cannot change while busy.
module tb_global_cfg_ctrl;
  import wppa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mask_we = 0, start = 0, busy, done, mem_re;
  logic [3:0] mask_h_in = 0, mask_v_in = 0, mask_h, mask_v;
  logic [7:0] start_addr = 0, mem_raddr;
  logic [31:0] mem_rdata = 0;
  cfg_bus_t bus;
  logic [31:0] mem [256];
  int checks = 0, failures = 0;
  cfg_bus_t seen [$];
  int cyc;

  global_cfg_ctrl dut (.clk, .rst_n, .mask_we, .mask_h_in, .mask_v_in, .start, .start_addr,
                       .busy, .done, .mem_re, .mem_raddr, .mem_rdata, .bus, .mask_h, .mask_v);

  always #5 clk = ~clk;
  always @(posedge clk) if (mem_re) mem_rdata <= mem[mem_raddr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // run one transfer from addr, return cycle count (start cycle .. done cycle)
  task automatic run(input logic [7:0] addr, output int n);
    seen.delete();
    @(negedge clk); start = 1; start_addr = addr;
    n = 0;
    forever begin
      @(posedge clk);
      n++;
      if (bus.cmd != CB_IDLE) seen.push_back(bus);
      if (done) break;
      #1 start = 0;
    end
    #1 start = 0;
  endtask

  initial begin
    int n;
    for (int i = 0; i < 256; i++) mem[i] = 0;
    // program at 16: header (4 words, start address 0), 12 data words
    mem[16] = {2'b01, 14'h0, 8'd4, 8'd0};
    for (int i = 0; i < 12; i++) mem[17 + i] = 32'hA000_0000 + i;
    // icn scheme at 40: 12 writes, last one flagged
    for (int i = 0; i < 12; i++) mem[40 + i] = {2'b10, (i == 11), 5'(i % 10), 16'h0, 8'(i & 1)};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); mask_we = 1; mask_h_in = 4'b0011; mask_v_in = 4'b1100;
    @(negedge clk); mask_we = 0;
    checks++;
    if (mask_h !== 4'b0011 || mask_v !== 4'b1100) begin failures++; $display("FAIL masks"); end

    run(8'd16, n);
    checks++;
    if (n != 18) begin failures++; $display("FAIL program took %0d cycles, expected 18", n); end
    checks++;
    if (seen.size() != 15 || seen[0].cmd != CB_SELECT || seen[1].cmd != CB_BEGIN ||
        seen[1].data != 0 || seen[14].cmd != CB_END) begin
      failures++; $display("FAIL program bus sequence, %0d commands", seen.size());
    end
    for (int i = 0; i < 12 && i + 2 < seen.size(); i++) begin
      checks++;
      if (seen[2+i].cmd != CB_DATA || seen[2+i].data != 32'hA000_0000 + i) begin
        failures++; $display("FAIL data word %0d = %h", i, seen[2+i].data);
      end
    end

    run(8'd40, n);
    checks++;
    if (n != 13) begin failures++; $display("FAIL icn took %0d cycles, expected 13", n); end
    checks++;
    if (seen.size() != 12) begin failures++; $display("FAIL icn writes %0d", seen.size()); end
    for (int i = 0; i < 12 && i < seen.size(); i++) begin
      checks++;
      if (seen[i].cmd != CB_ICN || seen[i].data != mem[40+i]) begin failures++; $display("FAIL icn word %0d", i); end
    end

    // mask write ignored while busy
    @(negedge clk); start = 1; start_addr = 8'd16;
    @(negedge clk); start = 0; mask_we = 1; mask_h_in = 4'b1111;
    @(negedge clk); mask_we = 0;
    checks++;
    if (!busy || mask_h !== 4'b0011) begin failures++; $display("FAIL mask changed while busy"); end
    wait (!busy);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
