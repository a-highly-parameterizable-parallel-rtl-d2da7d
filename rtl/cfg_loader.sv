// cfg_loader: configuration loader of one WPPE.
//
// Listens to the global configuration bus, in step with the global
// configuration controller, and writes what is meant for its WPPE: VLIW
// words into the instruction memory and select values into the select
// registers of the interconnect wrapper. Whether a transfer is meant for it
// is decided by the multicast scheme (RoMultiC): the loader sees the bit of
// the row mask of its row (row_bit) and the bit of the column mask of its
// column (col_bit), and takes part only when both are set.
//
// FSM: IDLE -> (SELECT with both bits set) SELECTED -> (BEGIN) LOAD ->
// (END) IDLE. In LOAD every DATA word is one 32-bit slice of a VLIW word,
// least significant slice first; after WPI slices the assembled word is
// written at the current address and the address steps by one. hold is high
// in LOAD so the WPPE does not run a half-written program. ICN words are
// single-cycle writes taken whenever both mask bits are set. The document
// describes the loader as a small FSM-controlled component; the bus
// commands and word layout are this design's (see wppa_pkg).
module cfg_loader
  import wppa_pkg::*;
#(
  parameter int unsigned IW  = VLIW_W,
  parameter int unsigned BW  = CFG_W,
  parameter int unsigned WPI = WORDS_PER_INSTR
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_bus_t         bus,
  input  logic             row_bit,
  input  logic             col_bit,
  output logic             imem_we,
  output logic [PC_W-1:0]  imem_waddr,
  output logic [IW-1:0]    imem_wdata,
  output logic             icn_we,
  output logic [4:0]       icn_idx,
  output logic [7:0]       icn_val,
  output logic             hold
);
  typedef enum logic [1:0] {L_IDLE, L_SELECTED, L_LOAD} lstate_e;

  lstate_e                 state;
  logic [PC_W-1:0]         addr;
  logic [$clog2(WPI+1)-1:0] slice;
  logic [WPI*BW-1:0]       acc;
  logic [WPI*BW-1:0]       acc_next;
  logic                    hit;

  assign hit = row_bit & col_bit;

  always_comb begin
    acc_next = acc;
    acc_next[int'(slice)*BW +: BW] = bus.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= L_IDLE;
      addr       <= '0;
      slice      <= '0;
      acc        <= '0;
      imem_we    <= 1'b0;
      imem_waddr <= '0;
      imem_wdata <= '0;
      icn_we     <= 1'b0;
      icn_idx    <= '0;
      icn_val    <= '0;
    end else begin
      imem_we <= 1'b0;
      icn_we  <= 1'b0;
      if (bus.cmd == CB_ICN && hit) begin
        icn_we  <= 1'b1;
        icn_idx <= bus.data[28:24];
        icn_val <= bus.data[7:0];
      end
      unique case (state)
        L_IDLE:
          if (bus.cmd == CB_SELECT && hit) state <= L_SELECTED;
        L_SELECTED:
          if (bus.cmd == CB_BEGIN) begin
            state <= L_LOAD;
            addr  <= bus.data[PC_W-1:0];
            slice <= '0;
          end else if (bus.cmd == CB_END) state <= L_IDLE;
        L_LOAD:
          if (bus.cmd == CB_DATA) begin
            if (int'(slice) == WPI - 1) begin
              imem_we    <= 1'b1;
              imem_waddr <= addr;
              imem_wdata <= acc_next[IW-1:0];
              addr       <= addr + 1'b1;
              slice      <= '0;
            end else begin
              acc   <= acc_next;
              slice <= slice + 1'b1;
            end
          end else if (bus.cmd == CB_END) state <= L_IDLE;
        default: state <= L_IDLE;
      endcase
    end
  end

  assign hold = (state == L_LOAD) || imem_we;
endmodule
