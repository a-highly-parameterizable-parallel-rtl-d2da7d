// tb_cfg_loader: self-checking test of the per-WPPE configuration loader.
// Plays configuration bus sequences at the loader: a program of four VLIW
// words (SELECT, BEGIN, 12 DATA, END) with the loader selected, the same
// with the loader not selected (row or column bit clear), and icn writes
// with and without both mask bits. Checks the VLIW words and addresses
// written, hold during the transfer, and the icn register writes.
module tb_cfg_loader;
  import wppa_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_bus_t bus;
  logic row_bit = 0, col_bit = 0;
  logic imem_we, icn_we, hold;
  logic [7:0] imem_waddr, icn_val;
  logic [78:0] imem_wdata;
  logic [4:0] icn_idx;
  int checks = 0, failures = 0;
  logic [78:0] got_w [$];
  logic [7:0]  got_a [$];
  int n_icn = 0;
  int hold_cycles = 0;

  cfg_loader dut (.clk, .rst_n, .bus, .row_bit, .col_bit, .imem_we, .imem_waddr, .imem_wdata,
                  .icn_we, .icn_idx, .icn_val, .hold);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && imem_we) begin got_w.push_back(imem_wdata); got_a.push_back(imem_waddr); end
    if (rst_n && icn_we) n_icn++;
    if (rst_n && hold) hold_cycles++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(cb_cmd_e c, logic [31:0] d);
    @(negedge clk); bus.cmd = c; bus.data = d;
  endtask

  task automatic send_prog(input logic [78:0] w [4], input logic [7:0] start);
    send(CB_SELECT, 0);
    send(CB_BEGIN, {24'h0, start});
    for (int i = 0; i < 4; i++) begin
      logic [95:0] x;
      x = {17'h0, w[i]};
      send(CB_DATA, x[31:0]); send(CB_DATA, x[63:32]); send(CB_DATA, x[95:64]);
    end
    send(CB_END, 0);
    send(CB_IDLE, 0);
  endtask

  initial begin
    logic [78:0] w [4];
    bus = '{cmd: CB_IDLE, data: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) w[i] = {15'($urandom), $urandom, $urandom};
    // selected
    row_bit = 1; col_bit = 1;
    send_prog(w, 8'd0);
    repeat (2) @(posedge clk);
    checks++;
    if (got_w.size() != 4) begin failures++; $display("FAIL wrote %0d words", got_w.size()); end
    for (int i = 0; i < got_w.size() && i < 4; i++) begin
      checks++;
      if (got_w[i] !== w[i] || got_a[i] !== 8'(i)) begin failures++; $display("FAIL word %0d", i); end
    end
    checks++;
    if (hold_cycles < 13) begin failures++; $display("FAIL hold only %0d cycles", hold_cycles); end
    checks++;
    if (hold) begin failures++; $display("FAIL hold stays high"); end
    // not selected: column bit clear
    got_w.delete(); got_a.delete();
    row_bit = 1; col_bit = 0;
    send_prog(w, 8'd0);
    row_bit = 0; col_bit = 1;
    send_prog(w, 8'd0);
    repeat (2) @(posedge clk);
    checks++;
    if (got_w.size() != 0) begin failures++; $display("FAIL unselected loader wrote"); end
    // icn writes
    row_bit = 1; col_bit = 1;
    send(CB_ICN, {2'b10, 1'b0, 5'd8, 16'h0, 8'd3});
    @(posedge clk); #1;
    checks++;
    if (!icn_we || icn_idx !== 5'd8 || icn_val !== 8'd3) begin failures++; $display("FAIL icn write"); end
    row_bit = 0;
    send(CB_ICN, {2'b10, 1'b1, 5'd9, 16'h0, 8'd2});
    send(CB_IDLE, 0);
    repeat (2) @(posedge clk);
    checks++;
    if (n_icn != 1) begin failures++; $display("FAIL icn count %0d", n_icn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
