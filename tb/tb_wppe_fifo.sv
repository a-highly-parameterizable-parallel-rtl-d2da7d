// tb_wppe_fifo: self-checking test of the WPPE input FIFO.
// Random pushes and pops are checked against a queue model: head, empty,
// full, the number of words held, dropping on overflow and the sticky
// overflow flag. Pops are only issued when the model is non-empty.
module tb_wppe_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [15:0] din = 0, head;
  logic empty, full, overflow;
  int checks = 0, failures = 0;
  logic [15:0] q[$];
  logic exp_ovf = 0;
  int n_ovf = 0;

  wppe_fifo #(.W(16), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .head, .empty, .full, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check state
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || overflow !== exp_ovf ||
          (q.size() > 0 && head !== q[0])) begin
        failures++;
        $display("FAIL t=%0t size=%0d empty=%b full=%b ovf=%b head=%h exp=%h", $time, q.size(), empty, full, overflow, head, (q.size()>0)?q[0]:16'h0);
      end
      push = ($urandom_range(0, 99) < ((i / 500) % 2 ? 80 : 40));
      pop  = (q.size() > 0) && ($urandom_range(0, 99) < 50);
      din  = 16'($urandom);
      @(posedge clk);
      #1;
      begin
        bit popped;
        popped = pop;
        if (popped) void'(q.pop_front());
        if (push) begin
          if (q.size() < DEPTH) q.push_back(din);
          else begin exp_ovf = 1; n_ovf++; end
        end
      end
    end
    @(negedge clk); push = 0; pop = 0;
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
