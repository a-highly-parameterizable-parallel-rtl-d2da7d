// wppe: weakly programmable processing element.
//
// A small VLIW processor: each 79-bit instruction word holds one slot per
// adder (two in the case study) and one multiway-branch slot, all executed
// in the same cycle. The parts are the ones the document draws: input
// FIFOs (regI), general purpose registers (regGP), output registers (regO),
// the functional units, a flag register (regFlags), the branch unit (BUnit),
// the program counter, the instruction memory and the instruction decoder.
//
// Execution is single-cycle and unpipelined, this design's choice: in every
// cycle the word at pc is read, its operands are taken from the register
// file or from the heads of the input FIFOs, the adders compute, results,
// status flags and the new pc are written at the clock edge, and the FIFOs
// that were read are popped. If a word reads an empty FIFO, nothing is
// written and pc holds (stall) until data arrives. Branch flags see the
// status flags written by earlier words, not by the word itself.
//
// While hold is high (the configuration loader is writing this WPPE's
// program) the WPPE does nothing and pc is forced to 0, so a newly loaded
// program starts at address 0. Input links: a valid word is pushed into the
// FIFO of that port. Output links: valid is high for one cycle after an
// output register was written. The FIFOs' full flags and the two evaluated
// branch flags (bflags) are not needed inside the WPPE; they are kept as
// named signals so that a testbench can observe them, and a linter reports
// them as unused.
module wppe
  import wppa_pkg::*;
#(
  parameter int unsigned NF         = NUM_FIFO,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned IMEM_DEPTH = NUM_INSTR
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                hold,
  // program memory write port (from the configuration loader)
  input  logic                imem_we,
  input  logic [PC_W-1:0]     imem_waddr,
  input  logic [VLIW_W-1:0]   imem_wdata,
  // data links
  input  link_t [NF-1:0]      in_link,
  output link_t [NUM_OUT-1:0] out_link,
  // status
  output logic                stall,
  output logic                fifo_overflow,
  output logic [PC_W-1:0]     pc_o
);
  localparam int unsigned NRP = 2 * NUM_ADD;

  logic [PC_W-1:0]   pc, next_pc;
  vliw_t             instr;
  logic [VLIW_W-1:0] instr_bits;
  logic              exec;       // the word at pc executes this cycle

  // input FIFOs
  logic [NF-1:0]             fifo_empty, fifo_full, fifo_ovf, fifo_pop;
  logic [NF-1:0][DATA_W-1:0] fifo_head;

  for (genvar k = 0; k < NF; k++) begin : g_fifo
    wppe_fifo #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(in_link[k].valid), .din(in_link[k].data),
      .pop(fifo_pop[k] & exec), .head(fifo_head[k]),
      .empty(fifo_empty[k]), .full(fifo_full[k]), .overflow(fifo_ovf[k])
    );
  end
  assign fifo_overflow = |fifo_ovf;

  wppe_imem #(.W(VLIW_W), .AW(PC_W), .DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .rst_n,
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .rd_addr(pc), .rd_data(instr_bits)
  );
  assign instr = vliw_t'(instr_bits);

  // decoder
  add_op_e   [NUM_ADD-1:0]              op;
  logic      [NUM_ADD-1:0][RADDR_W-1:0] srca, srcb, dst;
  logic      [NUM_ADD-1:0][IMM_W-1:0]   imm;
  logic                                 dec_stall;
  br_slot_t                             br;

  wppe_decoder #(.NA(NUM_ADD), .NF(NF), .NG(NUM_GP)) u_dec (
    .instr, .fifo_empty, .op, .srca, .srcb, .dst, .imm,
    .fifo_pop, .stall(dec_stall), .br
  );

  assign stall = dec_stall & ~hold;
  assign exec  = ~hold & ~dec_stall;

  // register file
  logic [NRP-1:0][RADDR_W-1:0]  raddr;
  logic [NRP-1:0][DATA_W-1:0]   rf_rdata, opnd;
  logic [NUM_ADD-1:0]           rf_we;
  logic [NUM_ADD-1:0][DATA_W-1:0] res;
  status_t [NUM_ADD-1:0]        st;
  logic [NUM_ADD-1:0]           fu_wr;
  logic [NUM_OUT-1:0][DATA_W-1:0] out_data;
  logic [NUM_OUT-1:0]           out_valid;

  always_comb begin
    for (int u = 0; u < NUM_ADD; u++) begin
      raddr[2*u]   = srca[u];
      raddr[2*u+1] = srcb[u];
    end
    // operand multiplexers: FIFO heads for the FIFO addresses
    for (int p = 0; p < NRP; p++) begin
      if (int'(raddr[p]) >= NUM_GP && int'(raddr[p]) < NUM_GP + NF)
        opnd[p] = fifo_head[int'(raddr[p]) - NUM_GP];
      else
        opnd[p] = rf_rdata[p];
    end
  end

  wppe_regfile #(.W(DATA_W), .AW(RADDR_W), .NGP(NUM_GP), .NO(NUM_OUT),
                 .NR(NRP), .NWR(NUM_ADD)) u_rf (
    .clk, .rst_n, .raddr, .rdata(rf_rdata),
    .we(rf_we), .waddr(dst), .wdata(res),
    .out_data, .out_valid
  );

  for (genvar u = 0; u < NUM_ADD; u++) begin : g_add
    wppe_adder #(.W(DATA_W), .IW(IMM_W)) u_add (
      .op(op[u]), .a(opnd[2*u]), .b(opnd[2*u+1]), .imm(imm[u]),
      .res(res[u]), .st(st[u]), .wr(fu_wr[u])
    );
  end
  assign rf_we = fu_wr & {NUM_ADD{exec}};

  // flag register and branch unit
  status_t [NUM_ADD-1:0] flags_q;
  logic [7:0]            flag_src;
  logic [NUM_FLAGS-1:0]  bflags;

  always_comb begin
    flag_src = '0;
    flag_src[FS_A0_Z] = flags_q[0].z;
    flag_src[FS_A0_N] = flags_q[0].n;
    flag_src[FS_A0_C] = flags_q[0].c;
    flag_src[FS_A1_Z] = flags_q[NUM_ADD-1].z;
    flag_src[FS_A1_N] = flags_q[NUM_ADD-1].n;
    flag_src[FS_A1_C] = flags_q[NUM_ADD-1].c;
    flag_src[FS_IN0]  = ~fifo_empty[0];
    flag_src[FS_IN1]  = ~fifo_empty[(NF > 1) ? 1 : 0];
  end

  wppe_branch_unit #(.AW(PC_W), .F(NUM_FLAGS), .NSRC(8), .SELW(3),
                     .LAST(IMEM_DEPTH - 1)) u_bu (
    .en(br.en), .fsel(br.fsel), .tgt(br.tgt), .flag_src,
    .pc, .flags(bflags), .next_pc
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      flags_q <= '0;
    end else if (hold) begin
      pc      <= '0;
    end else if (exec) begin
      pc <= next_pc;
      for (int u = 0; u < NUM_ADD; u++)
        if (fu_wr[u]) flags_q[u] <= st[u];
    end
  end

  always_comb
    for (int k = 0; k < NUM_OUT; k++) begin
      out_link[k].valid = out_valid[k];
      out_link[k].data  = out_data[k];
    end

  assign pc_o = pc;
endmodule
