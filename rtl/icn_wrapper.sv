// icn_wrapper: dynamically reconfigurable interconnect wrapper.
//
// Every WPPE sits inside one of these. The wrapper's inputs from the four
// neighbours (two signals per side) and the WPPE's outputs form the rows of
// an adjacency matrix ADJ; the wrapper's outputs to the four neighbours and
// the WPPE's inputs form its columns. ADJ[i][j] = 1 means input i may drive
// output j. Following the document, for every column j the wrapper builds a
// t_j-to-1 multiplexer over the t_j inputs allowed in that column, and the
// select of that multiplexer is a configuration register of
// s_j = ceil(log2 t_j) bits that can be rewritten at run time. A column
// with one driver is a plain wire, a column with none is driven with zeros;
// neither has a register. This is the minimal-width register file of the
// cost model (C_ff(|s|)), and the default.
//
// With UNIFORM_SEL = 1 the wrapper instead gives every column a register of
// the same width kappa = max_j s_j, the equal-width alternative the cost
// model also describes (l * C_ff(kappa)). A one-driver column then becomes
// a mux as well: select 0 passes its driver, any other value drives zeros.
//
// Select value k picks the k-th allowed input of the column, counting rows
// from 0 upward; values >= t_j drive zeros. Registers reset to 0. A
// register is written with cfg_we, cfg_idx = column number, cfg_val = new
// select value, and the new routing is in effect from the next cycle.
// Select numbering, reset value and write port are this design's choices.
// Signals are links (valid + 16-bit data); the mux is combinational.
module icn_wrapper
  import wppa_pkg::*;
#(
  parameter int unsigned NR  = ADJ_N,
  parameter int unsigned NC  = ADJ_N,
  parameter bit [0:NR-1][0:NC-1] ADJ = A_CS,
  parameter bit                  UNIFORM_SEL = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  link_t [NR-1:0]   in_sig,
  output link_t [NC-1:0]   out_sig,
  input  logic             cfg_we,
  input  logic [4:0]       cfg_idx,
  input  logic [7:0]       cfg_val
);
  function automatic int unsigned drivers(int unsigned j);
    int unsigned t;
    t = 0;
    for (int unsigned i = 0; i < NR; i++) if (ADJ[i][j]) t++;
    return t;
  endfunction

  function automatic int unsigned max_sel();
    int unsigned m;
    m = 0;
    for (int unsigned j = 0; j < NC; j++) if (clog2z(drivers(j)) > m) m = clog2z(drivers(j));
    return m;
  endfunction

  localparam int unsigned KAPPA = max_sel();

  for (genvar j = 0; j < NC; j++) begin : g_col
    localparam int unsigned T = drivers(j);
    localparam int unsigned S = UNIFORM_SEL ? KAPPA : clog2z(T);

    if (S == 0 && T == 0) begin : g_none
      assign out_sig[j] = '0;
    end else if (S == 0) begin : g_wire
      always_comb begin
        out_sig[j] = '0;
        for (int unsigned i = 0; i < NR; i++)
          if (ADJ[i][j]) out_sig[j] = in_sig[i];
      end
    end else begin : g_mux
      logic [S-1:0] sel_q;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                                     sel_q <= '0;
        else if (cfg_we && int'(cfg_idx) == int'(j))    sel_q <= cfg_val[S-1:0];
      end
      always_comb begin
        int unsigned k;
        k = 0;
        out_sig[j] = '0;
        for (int unsigned i = 0; i < NR; i++) begin
          if (ADJ[i][j]) begin
            if (k == int'(sel_q)) out_sig[j] = in_sig[i];
            k++;
          end
        end
      end
    end
  end
endmodule
