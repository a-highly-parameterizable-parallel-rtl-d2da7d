// wppe_fifo: input FIFO of a WPPE.
//
// Every word that arrives on an input link with its valid bit set is pushed;
// the execution stage pops the head when an instruction reads the FIFO's
// register address. The document names the input FIFOs and makes their
// number a parameter (6 in the case study) but gives neither depth nor
// flow control. Here the depth is a parameter (4 by default) and links have
// no back-pressure: a word that arrives while the FIFO is full is dropped
// and the sticky overflow flag is raised. A push and a pop in the same
// cycle are both served, also when the FIFO is full.
//
// Timing: a word pushed in cycle t is readable (head/empty) in cycle t+1.
module wppe_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] head,
  output logic         empty,
  output logic         full,
  output logic         overflow   // sticky: a word was dropped
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign head    = mem[rd_ptr];
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      end
      if (do_pop) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      if (push && !do_push) overflow <= 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  // A pop is only requested when the FIFO holds data.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("wppe_fifo: pop while empty");
endmodule
