// wppe_imem: VLIW instruction memory of a WPPE.
//
// DEPTH words of W bits (4 words of 79 bits in the case study). The
// configuration loader writes one whole VLIW word per write; the program
// counter reads asynchronously, so the word at rd_addr is available in the
// same cycle. Addresses at or beyond DEPTH read as all zeros, which decodes
// as an instruction that does nothing and falls through. The memory is
// cleared on reset so that an unconfigured WPPE idles. Depth, read timing
// and reset are this design's choices; the document gives the width, the
// address width (8 bits) and the program size.
module wppe_imem #(
  parameter int unsigned W     = 79,
  parameter int unsigned AW    = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  localparam int unsigned IXW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we && (int'(waddr) < DEPTH)) begin
      mem[waddr[IXW-1:0]] <= wdata;
    end
  end

  assign rd_data = (int'(rd_addr) < DEPTH) ? mem[rd_addr[IXW-1:0]] : '0;
endmodule
