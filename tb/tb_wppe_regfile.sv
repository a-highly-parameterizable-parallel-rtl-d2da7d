// tb_wppe_regfile: self-checking test of the WPPE register file.
// Random writes through both write ports (including collisions, FIFO
// addresses and output registers) are mirrored in a model; all four read
// ports and the output registers with their one-cycle valid pulse are
// compared with it every cycle.
module tb_wppe_regfile;
  logic clk = 0, rst_n = 0;
  logic [3:0][3:0]  raddr;
  logic [3:0][15:0] rdata;
  logic [1:0]       we;
  logic [1:0][3:0]  waddr;
  logic [1:0][15:0] wdata;
  logic [1:0][15:0] out_data;
  logic [1:0]       out_valid;
  int checks = 0, failures = 0;
  logic [15:0] model [16];
  logic [1:0]  exp_valid;

  wppe_regfile dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata, .out_data, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) model[i] = 0;
    exp_valid = 0;
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) raddr[p] = 4'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        logic [15:0] e;
        e = (raddr[p] < 8 || raddr[p] >= 14) ? model[raddr[p]] : 16'h0;
        checks++;
        if (rdata[p] !== e) begin failures++; $display("FAIL read p=%0d a=%0d got=%h exp=%h", p, raddr[p], rdata[p], e); end
      end
      checks++;
      if (out_valid !== exp_valid || out_data[0] !== model[14] || out_data[1] !== model[15]) begin
        failures++; $display("FAIL out valid=%b exp=%b", out_valid, exp_valid);
      end
      for (int p = 0; p < 2; p++) begin
        we[p] = 1'($urandom);
        waddr[p] = (t % 5 == 0) ? 4'd14 + 4'(p) : 4'($urandom);
        wdata[p] = 16'($urandom);
      end
      if (t % 11 == 0) waddr[1] = waddr[0];
      @(posedge clk);
      exp_valid = 0;
      for (int p = 0; p < 2; p++)
        if (we[p] && (waddr[p] < 8 || waddr[p] >= 14)) begin
          model[waddr[p]] = wdata[p];
          if (waddr[p] >= 14) exp_valid[waddr[p] - 14] = 1'b1;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
