// wppe_regfile: general purpose registers and output registers of a WPPE.
//
// The register address space is 4 bits wide (the document's register
// address width). Addresses 0 .. NGP-1 are the general purpose registers
// (8 in the case study), addresses 14 and 15 the two output registers
// o0/o1, whose contents drive the WPPE's output ports. Addresses 8-13
// belong to the input FIFOs, which live outside this module: a read there
// returns 0 and a write there is ignored. That address map is this
// design's choice.
//
// NR asynchronous read ports, NWR synchronous write ports. When two write
// ports hit the same register in one cycle, the higher-numbered port wins.
// Writing an output register sets its out_valid for exactly the next cycle,
// which marks the word as sent on the link; out_data holds the last value.
module wppe_regfile
  import wppa_pkg::*;
#(
  parameter int unsigned W   = DATA_W,
  parameter int unsigned AW  = RADDR_W,
  parameter int unsigned NGP = NUM_GP,
  parameter int unsigned NO  = NUM_OUT,
  parameter int unsigned NR  = 2 * NUM_ADD,
  parameter int unsigned NWR = NUM_ADD
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NR-1:0][AW-1:0]  raddr,
  output logic [NR-1:0][W-1:0]   rdata,
  input  logic [NWR-1:0]         we,
  input  logic [NWR-1:0][AW-1:0] waddr,
  input  logic [NWR-1:0][W-1:0]  wdata,
  output logic [NO-1:0][W-1:0]   out_data,
  output logic [NO-1:0]          out_valid
);
  localparam int unsigned OUT_BASE = (1 << AW) - NO;

  logic [NGP-1:0][W-1:0] gp;

  always_comb begin
    for (int p = 0; p < NR; p++) begin
      rdata[p] = '0;
      if (int'(raddr[p]) < NGP)            rdata[p] = gp[raddr[p]];
      else if (int'(raddr[p]) >= OUT_BASE) rdata[p] = out_data[int'(raddr[p]) - OUT_BASE];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gp        <= '0;
      out_data  <= '0;
      out_valid <= '0;
    end else begin
      out_valid <= '0;
      for (int p = 0; p < NWR; p++) begin
        if (we[p]) begin
          if (int'(waddr[p]) < NGP) gp[waddr[p]] <= wdata[p];
          else if (int'(waddr[p]) >= OUT_BASE) begin
            out_data[int'(waddr[p]) - OUT_BASE]  <= wdata[p];
            out_valid[int'(waddr[p]) - OUT_BASE] <= 1'b1;
          end
        end
      end
    end
  end
endmodule
