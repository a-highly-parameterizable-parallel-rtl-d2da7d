// tb_wppe_imem: self-checking test of the VLIW instruction memory.
// Checks that it is cleared by reset, that written words read back on the
// asynchronous port, that out-of-range writes are ignored and that
// out-of-range reads return zero.
module tb_wppe_imem;
  logic clk = 0, rst_n = 0;
  logic we = 0;
  logic [7:0]  waddr = 0, rd_addr = 0;
  logic [78:0] wdata = 0, rd_data;
  logic [78:0] model [4];
  int checks = 0, failures = 0;

  wppe_imem #(.W(79), .AW(8), .DEPTH(4)) dut (.clk, .rst_n, .we, .waddr, .wdata, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      rd_addr = 8'(i); #1; checks++;
      if (rd_data !== '0) begin failures++; $display("FAIL not cleared %0d", i); end
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = (t % 9 == 0) ? 8'($urandom_range(4, 255)) : 8'($urandom_range(0, 3));
      wdata = {15'($urandom), $urandom, $urandom};
      rd_addr = (t % 13 == 0) ? 8'($urandom_range(4, 255)) : 8'($urandom_range(0, 3));
      #1; checks++;
      if (rd_data !== ((rd_addr < 4) ? model[rd_addr[1:0]] : 79'h0)) begin
        failures++; $display("FAIL read %0d got %h", rd_addr, rd_data);
      end
      @(posedge clk);
      if (we && waddr < 4) model[waddr[1:0]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
