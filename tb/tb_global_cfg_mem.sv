// tb_global_cfg_mem: self-checking test of the global configuration memory.
// Fills it through the write port, then reads random addresses and checks
// the one-cycle read latency and that rdata holds while re is low.
module tb_global_cfg_mem;
  logic clk = 0, rst_n = 0;
  logic we = 0, re = 0;
  logic [7:0]  waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  global_cfg_mem #(.W(32), .DEPTH(256)) dut (.clk, .rst_n, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] last;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    last = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      re = 1'($urandom); raddr = 8'($urandom);
      if (t % 17 == 0) begin we = 1; waddr = 8'($urandom); wdata = $urandom; end else we = 0;
      @(posedge clk);
      if (re) last = model[raddr];
      if (we) model[waddr] = wdata;
      #1; checks++;
      if (rdata !== last) begin failures++; $display("FAIL rdata=%h exp=%h", rdata, last); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
