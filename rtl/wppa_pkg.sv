// wppa_pkg: types and constants shared by the weakly programmable processor
// array (WPPA).
//
// The constants are the case-study configuration: a 4 x 4 array of
// processing elements (WPPEs), each with two adders, 16-bit registers,
// 5-bit immediates, 4-bit register addresses, 8 general purpose registers,
// 6 input FIFOs, an 8-bit VLIW address, 79-bit VLIW words, 4 VLIW words per
// program, 2 branch flags and a 32-bit configuration bus. Those numbers come
// from the published parameter tables. Everything else here -- the layout
// of the 79-bit instruction, the register address map, the configuration
// word formats and the configuration bus commands -- is this design's own
// choice, sized so that it fills exactly the published widths.
//
// VLIW word (79 bits, MSB first):
//   [78]     br.en      1 = multiway branch, 0 = fall through to pc+1
//   [77:75]  br.fsel[1] source of branch flag 1 (see flag_src_e)
//   [74:72]  br.fsel[0] source of branch flag 0
//   [71:40]  br.tgt[3:0] four 8-bit targets, chosen by {flag1, flag0}
//   [39:20]  add[1]     slot of adder 1: op(3) dst(4) srca(4) srcb(4) imm(5)
//   [19:0]   add[0]     slot of adder 0
//
// Register address map (4 bits): 0-7 general purpose r0-r7, 8-13 input
// FIFOs i0-i5 (reading pops), 14-15 output registers o0-o1 (writing sends).
//
// Configuration words (32 bits, as stored in the global memory):
//   program header  [31:30]=2'b01, [15:8]=number of VLIW words, [7:0]=first
//                   VLIW address; followed by 3 data words per VLIW word,
//                   least significant 32 bits first.
//   icn write       [31:30]=2'b10, [29]=last, [28:24]=select register index
//                   (= adjacency column), [7:0]=select value.
//   anything else   ends the command.
package wppa_pkg;

  // ---- Table V / VI numbers ------------------------------------------------
  localparam int unsigned DATA_W    = 16;  // n, register operand width
  localparam int unsigned IMM_W     = 5;   // m, immediate operand width
  localparam int unsigned RADDR_W   = 4;   // r, register address width
  localparam int unsigned NUM_GP    = 8;   // gamma, general purpose registers
  localparam int unsigned NUM_FIFO  = 6;   // phi, input FIFOs
  localparam int unsigned PC_W      = 8;   // a, VLIW memory address width
  localparam int unsigned VLIW_W    = 79;  // d, VLIW memory width
  localparam int unsigned NUM_INSTR = 4;   // VLIW words per WPPE
  localparam int unsigned NUM_FLAGS = 2;   // f, branch flags
  localparam int unsigned CFG_W     = 32;  // delta, configuration bus width
  localparam int unsigned NUM_ADD   = 2;   // x, adder modules
  localparam int unsigned NUM_OUT   = 2;   // WPPE output ports (adjacency matrix)
  localparam int unsigned ARRAY_N   = 4;   // WPPEs in vertical direction
  localparam int unsigned ARRAY_M   = 4;   // WPPEs in horizontal direction

  // Configuration words needed for one VLIW word: ceil(79/32) = 3.
  localparam int unsigned WORDS_PER_INSTR = (VLIW_W + CFG_W - 1) / CFG_W;

  // ---- interconnect ----------------------------------------------------------
  // A link carries one data word and a valid bit that marks the cycle in
  // which the word was produced.
  typedef struct packed {
    logic              valid;
    logic [DATA_W-1:0] data;
  } link_t;

  // Adjacency matrix of one interconnect wrapper: rows are wrapper inputs
  // N0 N1 E0 E1 S0 S1 W0 W1 followed by the WPPE outputs P0 P1; columns are
  // wrapper outputs N0 N1 E0 E1 S0 S1 W0 W1 followed by the WPPE inputs
  // P0 P1. adj[i][j] = 1 allows input i to drive output j.
  localparam int unsigned ICN_SIG = 2;                     // signals per side
  localparam int unsigned ADJ_N   = 4 * ICN_SIG + NUM_OUT; // 10
  typedef bit [0:ADJ_N-1][0:ADJ_N-1] adj_t;

  // The case-study matrix A_cs (mesh with a south-to-north pass).
  localparam adj_t A_CS = '{
    10'b0000000010,
    10'b0000000001,
    10'b0000000010,
    10'b0000000001,
    10'b1000000010,
    10'b0100000001,
    10'b0000000010,
    10'b0000000001,
    10'b1010101000,
    10'b0101010100
  };

  // ---- instruction format --------------------------------------------------
  typedef enum logic [2:0] {
    OP_NOP  = 3'd0,
    OP_ADD  = 3'd1,   // dst = A + B
    OP_SUB  = 3'd2,   // dst = A - B
    OP_ADDI = 3'd3,   // dst = A + sext(imm)
    OP_SUBI = 3'd4    // dst = A - sext(imm)
  } add_op_e;

  typedef struct packed {
    add_op_e            op;
    logic [RADDR_W-1:0] dst;
    logic [RADDR_W-1:0] srca;
    logic [RADDR_W-1:0] srcb;
    logic [IMM_W-1:0]   imm;
  } add_slot_t;  // 20 bits

  // Sources a branch flag can be taken from.
  typedef enum logic [2:0] {
    FS_A0_Z = 3'd0,  // adder 0 result was zero
    FS_A0_N = 3'd1,  // adder 0 result was negative
    FS_A0_C = 3'd2,  // adder 0 carry out / no borrow
    FS_A1_Z = 3'd3,
    FS_A1_N = 3'd4,
    FS_A1_C = 3'd5,
    FS_IN0  = 3'd6,  // input FIFO 0 holds data
    FS_IN1  = 3'd7   // input FIFO 1 holds data
  } flag_src_e;

  typedef struct packed {
    logic                                    en;
    flag_src_e [NUM_FLAGS-1:0]               fsel;
    logic [(1<<NUM_FLAGS)-1:0][PC_W-1:0]     tgt;
  } br_slot_t;  // 39 bits

  typedef struct packed {
    br_slot_t                  br;
    add_slot_t [NUM_ADD-1:0]   add;
  } vliw_t;

  // Status flags of one adder, kept in the flag register.
  typedef struct packed {
    logic c;
    logic n;
    logic z;
  } status_t;

  // ---- configuration bus -------------------------------------------------
  typedef enum logic [2:0] {
    CB_IDLE   = 3'd0,
    CB_SELECT = 3'd1,  // loaders latch row mask & column mask
    CB_BEGIN  = 3'd2,  // data[7:0] = first VLIW address
    CB_DATA   = 3'd3,  // one 32-bit slice of a VLIW word
    CB_END    = 3'd4,  // program transfer complete
    CB_ICN    = 3'd5   // interconnect select register write (icn word)
  } cb_cmd_e;

  typedef struct packed {
    cb_cmd_e            cmd;
    logic [CFG_W-1:0]   data;
  } cfg_bus_t;

  localparam logic [1:0] CW_PROG = 2'b01;
  localparam logic [1:0] CW_ICN  = 2'b10;

  // ceil(log2(x)) with log2(0) = log2(1) = 0, as in the cost model.
  function automatic int unsigned clog2z(int unsigned x);
    int unsigned r;
    r = 0;
    while ((1 << r) < x) r++;
    return r;
  endfunction

endpackage
