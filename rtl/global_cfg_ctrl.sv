// global_cfg_ctrl: global configuration controller of the processor array.
//
// Holds the two multicast mask registers -- H, one bit per row, and V, one
// bit per column -- which the external control unit writes; together they
// are the multicast signature that picks the WPPEs a transfer is meant for.
// On start it reads a configuration from the global memory, beginning at
// start_addr, and puts it on the configuration bus, which all loaders see.
//
// Program transfer (first word is a program header with K VLIW words):
//   cycle 1 read header, 2 decode header, 3 SELECT (loaders latch the
//   signature), 4 BEGIN (first VLIW address), 5 read first data word,
//   then 3*K DATA cycles (the next word is read while one is sent), then
//   1 END cycle. That is 5 setup cycles + 3 per VLIW word + 1 end cycle:
//   18 cycles for a program of 4 words, as the document reports.
// Interconnect transfer (first word is an icn write): cycle 1 reads the
//   first word, and every following cycle sends one icn word while reading
//   the next; the word with the last bit ends it. 12 select writes take
//   1 + 12 = 13 cycles, as the document reports.
// Cycles are counted from the one in which start is high. The mask
// registers can only be written while the controller is idle. done is high
// in the last cycle of a transfer. The command and word formats are this
// design's; the cycle counts follow the document.
module global_cfg_ctrl
  import wppa_pkg::*;
#(
  parameter int unsigned N   = ARRAY_N,
  parameter int unsigned M   = ARRAY_M,
  parameter int unsigned MAW = 8,
  parameter int unsigned WPI = WORDS_PER_INSTR
) (
  input  logic            clk,
  input  logic            rst_n,
  // external control unit
  input  logic            mask_we,
  input  logic [N-1:0]    mask_h_in,
  input  logic [M-1:0]    mask_v_in,
  input  logic            start,
  input  logic [MAW-1:0]  start_addr,
  output logic            busy,
  output logic            done,
  // global configuration memory read port
  output logic            mem_re,
  output logic [MAW-1:0]  mem_raddr,
  input  logic [CFG_W-1:0] mem_rdata,
  // configuration bus and multicast lines
  output cfg_bus_t        bus,
  output logic [N-1:0]    mask_h,
  output logic [M-1:0]    mask_v
);
  typedef enum logic [2:0] {
    C_IDLE, C_FIRST, C_SELECT, C_BEGIN, C_FETCH, C_DATA, C_END
  } cstate_e;

  cstate_e          state;
  logic [MAW-1:0]   addr;
  logic [PC_W-1:0]  vaddr;
  logic [15:0]      remaining;

  always_comb begin
    mem_re    = 1'b0;
    mem_raddr = addr;
    bus.cmd   = CB_IDLE;
    bus.data  = '0;
    done      = 1'b0;
    unique case (state)
      C_IDLE: if (start) begin
        mem_re    = 1'b1;
        mem_raddr = start_addr;
      end
      C_FIRST: if (mem_rdata[31:30] == CW_ICN) begin
        bus.cmd  = CB_ICN;
        bus.data = mem_rdata;
        done     = mem_rdata[29];
        mem_re   = !mem_rdata[29];
      end else if (mem_rdata[31:30] != CW_PROG) begin
        done = 1'b1;
      end
      C_SELECT: bus.cmd = CB_SELECT;
      C_BEGIN: begin
        bus.cmd  = CB_BEGIN;
        bus.data = CFG_W'(vaddr);
      end
      C_FETCH: mem_re = 1'b1;
      C_DATA: begin
        bus.cmd  = CB_DATA;
        bus.data = mem_rdata;
        mem_re   = (remaining > 1);
      end
      C_END: begin
        bus.cmd = CB_END;
        done    = 1'b1;
      end
      default: ;
    endcase
  end

  assign busy = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      addr      <= '0;
      vaddr     <= '0;
      remaining <= '0;
      mask_h    <= '0;
      mask_v    <= '0;
    end else begin
      if (mem_re) addr <= mem_raddr + 1'b1;
      unique case (state)
        C_IDLE: begin
          if (mask_we) begin
            mask_h <= mask_h_in;
            mask_v <= mask_v_in;
          end
          if (start) state <= C_FIRST;
        end
        C_FIRST:
          if (mem_rdata[31:30] == CW_PROG) begin
            vaddr     <= mem_rdata[PC_W-1:0];
            remaining <= 16'(mem_rdata[15:8]) * 16'(WPI);
            state     <= (mem_rdata[15:8] == 0) ? C_END : C_SELECT;
          end else if (mem_rdata[31:30] == CW_ICN && !mem_rdata[29]) begin
            state <= C_FIRST;
          end else begin
            state <= C_IDLE;
          end
        C_SELECT: state <= C_BEGIN;
        C_BEGIN:  state <= C_FETCH;
        C_FETCH:  state <= C_DATA;
        C_DATA: begin
          remaining <= remaining - 1'b1;
          if (remaining == 1) state <= C_END;
        end
        C_END:    state <= C_IDLE;
        default:  state <= C_IDLE;
      endcase
    end
  end
endmodule
