// global_cfg_mem: global configuration memory of the processor array.
//
// Holds the configurations -- VLIW programs and interconnect schemes, as
// 32-bit configuration words (see wppa_pkg) -- that the global configuration
// controller sends to the WPPEs. Its width equals the configuration bus
// width, as in the document; the depth (256 words) and the separate write
// port, through which the external control unit fills it, are this
// design's choices.
//
// One synchronous read port: the word at raddr is on rdata in the cycle
// after re; rdata holds its value while re is low. One synchronous write
// port for the external side.
module global_cfg_mem #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end
endmodule
