// wppa_top: weakly programmable processor array (WPPA).
//
// An N x M grid (4 x 4 by default) of tiles. Each tile is a WPPE, the
// interconnect wrapper around it and the WPPE's configuration loader. The
// wrappers are tied to their four neighbours by fixed links, two per
// direction (the static level of interconnect); which of those links
// actually carry data, and whether a wrapper passes data through, is set by
// the select registers in the wrappers (the dynamic level). Links at the
// edge of the grid are the array's I/O ports. Each wrapper has its own
// adjacency matrix, ADJ_MTX[r][c]; all default to the case-study mesh matrix.
// UNIFORM_SEL = 1 builds every wrapper with equal-width select registers
// instead of the minimal widths (see icn_wrapper).
//
// One global configuration controller and one global configuration memory
// serve the whole array over a shared 32-bit configuration bus. The
// external control unit (for example a host processor) loads the memory,
// writes the multicast mask registers and starts transfers. A tile takes
// part in a transfer when its row bit in H and its column bit in V are set.
// Bit numbering follows the multicast figure of the document: H bit 0 is the
// bottom row (r = N-1), V bit 0 the rightmost column (c = M-1).
//
// Tile (r, c): r = 0 is the north row, c = 0 the west column. Wrapper
// output N(k) drives the S(k) input of the tile above, E(k) the W(k) input
// of the tile to the east, and so on. The WPPE has six input FIFOs (the
// case-study number) but the adjacency matrix gives it two input ports, so
// FIFOs 0 and 1 are fed by the wrapper and FIFOs 2-5 receive nothing.
module wppa_top
  import wppa_pkg::*;
#(
  parameter int unsigned N          = ARRAY_N,
  parameter int unsigned M          = ARRAY_M,
  parameter adj_t [N-1:0][M-1:0] ADJ_MTX = {(N*M){A_CS}},
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned MEM_DEPTH  = 256,
  parameter bit          UNIFORM_SEL = 1'b0,
  parameter int unsigned MAW        = $clog2(MEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // external control unit
  input  logic              mem_we,
  input  logic [MAW-1:0]    mem_waddr,
  input  logic [CFG_W-1:0]  mem_wdata,
  input  logic              mask_we,
  input  logic [N-1:0]      mask_h,
  input  logic [M-1:0]      mask_v,
  input  logic              cfg_start,
  input  logic [MAW-1:0]    cfg_start_addr,
  output logic              cfg_busy,
  output logic              cfg_done,
  // array edge links, two per tile side
  input  link_t [M-1:0][ICN_SIG-1:0] north_in,
  output link_t [M-1:0][ICN_SIG-1:0] north_out,
  input  link_t [M-1:0][ICN_SIG-1:0] south_in,
  output link_t [M-1:0][ICN_SIG-1:0] south_out,
  input  link_t [N-1:0][ICN_SIG-1:0] west_in,
  output link_t [N-1:0][ICN_SIG-1:0] west_out,
  input  link_t [N-1:0][ICN_SIG-1:0] east_in,
  output link_t [N-1:0][ICN_SIG-1:0] east_out,
  // status
  output logic [N-1:0][M-1:0] pe_stall,
  output logic [N-1:0][M-1:0] pe_overflow,
  output logic [N-1:0][M-1:0] pe_hold,
  output logic [N-1:0][M-1:0][PC_W-1:0] pe_pc
);
  // row indices of the adjacency matrix
  localparam int unsigned IN_N = 0, IN_E = 2, IN_S = 4, IN_W = 6, IN_P = 8;

  // ---- global configuration ------------------------------------------------
  cfg_bus_t          bus;
  logic [N-1:0]      h_q;
  logic [M-1:0]      v_q;
  logic              mem_re;
  logic [MAW-1:0]    mem_raddr;
  logic [CFG_W-1:0]  mem_rdata;

  global_cfg_mem #(.W(CFG_W), .DEPTH(MEM_DEPTH), .AW(MAW)) u_gmem (
    .clk, .rst_n, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata)
  );

  global_cfg_ctrl #(.N(N), .M(M), .MAW(MAW)) u_gctrl (
    .clk, .rst_n,
    .mask_we, .mask_h_in(mask_h), .mask_v_in(mask_v),
    .start(cfg_start), .start_addr(cfg_start_addr),
    .busy(cfg_busy), .done(cfg_done),
    .mem_re, .mem_raddr, .mem_rdata,
    .bus, .mask_h(h_q), .mask_v(v_q)
  );

  // ---- tiles ---------------------------------------------------------------
  link_t [N-1:0][M-1:0][ADJ_N-1:0] w_in;    // wrapper inputs (rows)
  link_t [N-1:0][M-1:0][ADJ_N-1:0] w_out;   // wrapper outputs (columns)

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < M; c++) begin : g_col
      logic              imem_we, icn_we, hold;
      logic [PC_W-1:0]   imem_waddr;
      logic [VLIW_W-1:0] imem_wdata;
      logic [4:0]        icn_idx;
      logic [7:0]        icn_val;
      link_t [NUM_FIFO-1:0] pe_in;
      link_t [NUM_OUT-1:0]  pe_out;

      // static grid links
      for (genvar k = 0; k < ICN_SIG; k++) begin : g_link
        if (r == 0) begin : g_n_edge
          assign w_in[r][c][IN_N+k] = north_in[c][k];
        end else begin : g_n_link
          assign w_in[r][c][IN_N+k] = w_out[r-1][c][IN_S+k];
        end
        if (r == N-1) begin : g_s_edge
          assign w_in[r][c][IN_S+k] = south_in[c][k];
        end else begin : g_s_link
          assign w_in[r][c][IN_S+k] = w_out[r+1][c][IN_N+k];
        end
        if (c == M-1) begin : g_e_edge
          assign w_in[r][c][IN_E+k] = east_in[r][k];
        end else begin : g_e_link
          assign w_in[r][c][IN_E+k] = w_out[r][c+1][IN_W+k];
        end
        if (c == 0) begin : g_w_edge
          assign w_in[r][c][IN_W+k] = west_in[r][k];
        end else begin : g_w_link
          assign w_in[r][c][IN_W+k] = w_out[r][c-1][IN_E+k];
        end
      end
      for (genvar k = 0; k < NUM_OUT; k++) begin : g_pout
        assign w_in[r][c][IN_P+k] = pe_out[k];
      end
      for (genvar k = 0; k < NUM_FIFO; k++) begin : g_pin
        if (k < ADJ_N - IN_P) begin : g_wired
          assign pe_in[k] = w_out[r][c][IN_P+k];
        end else begin : g_unwired
          assign pe_in[k] = '0;
        end
      end

      cfg_loader u_ld (
        .clk, .rst_n, .bus,
        .row_bit(h_q[N-1-r]), .col_bit(v_q[M-1-c]),
        .imem_we, .imem_waddr, .imem_wdata,
        .icn_we, .icn_idx, .icn_val, .hold
      );

      icn_wrapper #(.NR(ADJ_N), .NC(ADJ_N), .ADJ(ADJ_MTX[r][c]), .UNIFORM_SEL(UNIFORM_SEL)) u_icn (
        .clk, .rst_n, .in_sig(w_in[r][c]), .out_sig(w_out[r][c]),
        .cfg_we(icn_we), .cfg_idx(icn_idx), .cfg_val(icn_val)
      );

      wppe #(.NF(NUM_FIFO), .FIFO_DEPTH(FIFO_DEPTH), .IMEM_DEPTH(NUM_INSTR)) u_pe (
        .clk, .rst_n, .hold,
        .imem_we, .imem_waddr, .imem_wdata,
        .in_link(pe_in), .out_link(pe_out),
        .stall(pe_stall[r][c]), .fifo_overflow(pe_overflow[r][c]), .pc_o(pe_pc[r][c])
      );
      assign pe_hold[r][c] = hold;
    end
  end

  for (genvar c = 0; c < M; c++) begin : g_ns_edge
    assign north_out[c] = '{w_out[0][c][IN_N+1], w_out[0][c][IN_N]};
    assign south_out[c] = '{w_out[N-1][c][IN_S+1], w_out[N-1][c][IN_S]};
  end
  for (genvar r = 0; r < N; r++) begin : g_we_edge
    assign west_out[r] = '{w_out[r][0][IN_W+1], w_out[r][0][IN_W]};
    assign east_out[r] = '{w_out[r][M-1][IN_E+1], w_out[r][M-1][IN_E]};
  end
endmodule
