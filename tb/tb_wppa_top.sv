// tb_wppa_top: end-to-end test of the 4 x 4 processor array at its default
// parameters. The testbench plays the external control unit: it fills the
// global configuration memory, sets multicast signatures and starts
// transfers, then streams data through the array.
//
// Configurations in the memory:
//   0   P_inc, 4 VLIW words: o0 = i0 + 1, loop at word 0
//   16  P_dbl, 4 VLIW words: word 0 is a two-way branch on "input 0 holds
//       data" (go to 1, else stay), word 1 does o0 = i0 + i0 and returns
//   40  icn scheme, 12 writes: WPPE inputs 0/1 take the west inputs,
//       north outputs take the pass-through from the south
//   60  icn scheme, 1 write: north output 0 takes the WPPE output
// Steps and what is checked:
//   1 before any configuration, south inputs pass straight up to the
//     north outputs (reset routing);
//   2 P_inc to all 16 WPPEs with one multicast transfer: 18 cycles;
//   3 P_inc to each WPPE on its own, 16 transfers: 288 cycles in all, and
//     only the addressed WPPE is held each time;
//   4 icn scheme to all: 13 cycles; each row then adds 4 to the stream
//     fed at its west edge;
//   5 partial reconfiguration: the bottom row gets P_dbl while rows 0-2
//     keep streaming without loss; data fed to the bottom row meanwhile
//     overflows its first FIFO; afterwards the bottom row multiplies by 16;
//   6 the north output of row 0 is switched from pass-through to WPPE
//     output by a one-word icn transfer.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_wppa_top;
  import wppa_pkg::*;
  import wppa_tb_pkg::*;

  localparam int N = 4, M = 4;
  logic clk = 0, rst_n = 0;
  logic mem_we = 0, mask_we = 0, cfg_start = 0, cfg_busy, cfg_done;
  logic [7:0] mem_waddr = 0, cfg_start_addr = 0;
  logic [31:0] mem_wdata = 0;
  logic [N-1:0] mask_h = 0;
  logic [M-1:0] mask_v = 0;
  link_t [M-1:0][1:0] north_in, north_out, south_in, south_out;
  link_t [N-1:0][1:0] west_in, west_out, east_in, east_out;
  logic [N-1:0][M-1:0] pe_stall, pe_overflow, pe_hold;
  logic [N-1:0][M-1:0][7:0] pe_pc;

  wppa_top dut (
    .clk, .rst_n, .mem_we, .mem_waddr, .mem_wdata, .mask_we, .mask_h, .mask_v,
    .cfg_start, .cfg_start_addr, .cfg_busy, .cfg_done,
    .north_in, .north_out, .south_in, .south_out, .west_in, .west_out, .east_in, .east_out,
    .pe_stall, .pe_overflow, .pe_hold, .pe_pc);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pass = 0, n_multicast = 0, n_single = 0, n_icn = 0, n_stall = 0;
  int n_partial = 0, n_overflow = 0, n_br_taken = 0, n_br_wait = 0, n_mode = 0;

  logic [15:0] feed_q [N][$];
  logic [15:0] out_q  [N][$];
  logic        feeding [N];
  logic [15:0] north_q [M][$];
  int          north_t [M][$];
  int          cyc = 0;

  always #5 clk = ~clk;

  // stream driver and collector at the west/east edges
  always @(negedge clk) begin
    for (int r = 0; r < N; r++) begin
      west_in[r] = '0;
      if (feeding[r] && feed_q[r].size() > 0) west_in[r][0] = '{valid: 1'b1, data: feed_q[r].pop_front()};
    end
  end
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int r = 0; r < N; r++) if (east_out[r][0].valid) out_q[r].push_back(east_out[r][0].data);
    for (int c = 0; c < M; c++)
      if (north_out[c][0].valid) begin north_q[c].push_back(north_out[c][0].data); north_t[c].push_back(cyc); end
    n_stall += $countones(pe_stall);
    if (pe_pc[N-1][0] == 8'd1) n_br_taken++;
    if (pe_pc[N-1][0] == 8'd0 && !pe_hold[N-1][0] && pe_stall[N-1][0] == 1'b0) n_br_wait++;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic mem_write(int a, logic [31:0] d);
    @(negedge clk); mem_we = 1; mem_waddr = 8'(a); mem_wdata = d;
    @(negedge clk); mem_we = 0;
  endtask

  task automatic set_mask(logic [N-1:0] h, logic [M-1:0] v);
    @(negedge clk); mask_we = 1; mask_h = h; mask_v = v;
    @(negedge clk); mask_we = 0;
  endtask

  // start a transfer and count its cycles, start cycle to done cycle
  task automatic run_cfg(int a, output int n);
    @(negedge clk); cfg_start = 1; cfg_start_addr = 8'(a);
    n = 0;
    forever begin
      @(posedge clk);
      n++;
      if (cfg_done) break;
      #1 cfg_start = 0;
    end
    #1 cfg_start = 0;
  endtask

  task automatic store_prog(int a, vliw_t p [4]);
    mem_write(a, prog_header(4, 0));
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 3; k++) mem_write(a + 1 + 3*i + k, slice(p[i], k));
  endtask

  task automatic feed_rows(int first_row, int last_row, int count, int base);
    for (int r = first_row; r <= last_row; r++)
      for (int i = 0; i < count; i++) feed_q[r].push_back(16'(base + 97*i + 13*r));
  endtask

  function automatic bit stream_ok(int r, int count, int base, int mul, int add);
    if (out_q[r].size() != count) return 0;
    for (int i = 0; i < count; i++)
      if (out_q[r][i] !== 16'((base + 97*i + 13*r) * mul + add)) return 0;
    return 1;
  endfunction

  initial begin
    vliw_t p_inc [4], p_dbl [4];
    int n, total;
    logic [N-1:0][M-1:0] held;

    north_in = '0; south_in = '0; east_in = '0;
    for (int r = 0; r < N; r++) feeding[r] = 0;

    p_inc[0] = word(branch(1, FS_A0_Z, FS_A0_Z, 0, 0, 0, 0), nop(), slot(OP_ADDI, 14, 8, 0, 1));
    p_dbl[0] = word(branch(1, FS_IN0, FS_IN0, 1, 0, 0, 0), nop(), nop());
    p_dbl[1] = word(branch(1, FS_A0_Z, FS_A0_Z, 0, 0, 0, 0), nop(), slot(OP_ADD, 14, 8, 8, 0));
    for (int i = 1; i < 4; i++) p_inc[i] = word(no_branch(), nop(), nop());
    for (int i = 2; i < 4; i++) p_dbl[i] = word(no_branch(), nop(), nop());

    repeat (3) @(posedge clk);
    rst_n = 1;
    store_prog(0, p_inc);
    store_prog(16, p_dbl);
    for (int i = 0; i < 12; i++) begin
      int col;
      col = (i % 4 == 0) ? 8 : (i % 4 == 1) ? 9 : (i % 4 == 2) ? 0 : 1;
      mem_write(40 + i, icn_word(i == 11, col, (col >= 8) ? 3 : 0));
    end
    mem_write(60, icn_word(1, 0, 1));

    // 1: reset routing passes south inputs to the north outputs
    @(negedge clk);
    for (int c = 0; c < M; c++) south_in[c][0] = '{valid: 1'b1, data: 16'(16'hA0 + c)};
    #1;
    for (int c = 0; c < M; c++) begin
      check(north_out[c][0] == '{valid: 1'b1, data: 16'(16'hA0 + c)}, "pass-through at reset");
      if (north_out[c][0].valid) n_pass++;
    end
    @(negedge clk); south_in = '0;

    // 2: multicast program to the whole array
    set_mask('1, '1);
    run_cfg(0, n);
    check(n == 18, $sformatf("multicast program took %0d cycles, expected 18", n));
    n_multicast++;

    // 3: each WPPE on its own
    total = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++) begin
        set_mask(N'(1) << (N-1-r), M'(1) << (M-1-c));
        held = '0;
        fork
          run_cfg(0, n);
          repeat (16) begin @(posedge clk); held |= pe_hold; end
        join
        total += n;
        check(held[r][c] && $countones(held) == 1, $sformatf("single WPPE (%0d,%0d) addressed", r, c));
        if (held[r][c] && $countones(held) == 1) n_single++;
      end
    check(total == 288, $sformatf("16 single transfers took %0d cycles, expected 288", total));

    // 4: interconnect scheme to all, then a +4 stream on every row
    set_mask('1, '1);
    run_cfg(40, n);
    check(n == 13, $sformatf("icn transfer took %0d cycles, expected 13", n));
    n_icn++;
    for (int r = 0; r < N; r++) begin out_q[r].delete(); feeding[r] = 1; end
    feed_rows(0, N-1, 10, 100);
    repeat (40) @(posedge clk);
    for (int r = 0; r < N; r++) check(stream_ok(r, 10, 100, 1, 4), $sformatf("row %0d adds 4", r));

    // 5: reprogram the bottom row while rows 0-2 stream
    for (int r = 0; r < N; r++) out_q[r].delete();
    set_mask(N'(1), '1);
    feed_rows(0, N-2, 40, 500);
    feed_rows(N-1, N-1, 30, 900);
    repeat (3) @(posedge clk);
    run_cfg(16, n);
    check(n == 18, $sformatf("row program took %0d cycles", n));
    repeat (60) @(posedge clk);
    for (int r = 0; r < N-1; r++) check(stream_ok(r, 40, 500, 1, 4), $sformatf("row %0d kept running", r));
    if (stream_ok(0, 40, 500, 1, 4)) n_partial++;
    check(pe_overflow[N-1][0] == 1'b1 && pe_overflow[0][0] == 1'b0, "overflow only in the held row");
    if (pe_overflow[N-1][0]) n_overflow++;
    out_q[N-1].delete();
    feed_rows(N-1, N-1, 4, 7);  // P_dbl takes 2 cycles per word: 4 fit the FIFO
    repeat (60) @(posedge clk);
    check(stream_ok(N-1, 4, 7, 16, 0), "bottom row multiplies by 16");
    if (!stream_ok(N-1, 4, 7, 16, 0))
      foreach (out_q[N-1][i]) $display("  bottom row out %0d: %0d", i, out_q[N-1][i]);

    // 6: switch the north output of row 0 from pass-through to WPPE output
    for (int r = 0; r < N; r++) feeding[r] = 0;
    set_mask(N'(1) << (N-1), '1);
    run_cfg(60, n);
    check(n == 2, $sformatf("one-word icn transfer took %0d cycles", n));
    @(posedge clk);  // the loader's write reaches the select register
    @(negedge clk);
    for (int c = 0; c < M; c++) south_in[c][0] = '{valid: 1'b1, data: 16'h5555};
    #1;
    for (int c = 0; c < M; c++) check(north_out[c][0].valid == 1'b0, "pass-through switched off");
    @(negedge clk); south_in = '0;
    for (int c = 0; c < M; c++) begin north_q[c].delete(); north_t[c].delete(); end
    feeding[0] = 1;
    feed_q[0].push_back(16'd1000);
    repeat (20) @(posedge clk);
    // WPPE (0,c) sees the word 2c cycles after WPPE (0,0) and adds 1
    for (int c = 0; c < M; c++) begin
      check(north_q[c].size() == 1 && north_q[c][0] == 16'(1000 + c + 1),
            $sformatf("north output %0d carries the WPPE result", c));
      if (c > 0 && north_q[c].size() == 1 && north_q[c-1].size() == 1)
        check(north_t[c][0] - north_t[c-1][0] == 2, "two cycles per hop");
      if (north_q[c].size() == 1) n_mode++;
    end

    // every mechanism must have happened
    check(n_pass > 0, "pass-through never seen");
    check(n_multicast > 0, "multicast never seen");
    check(n_single == N*M, "single-WPPE addressing");
    check(n_icn > 0, "icn reconfiguration never seen");
    check(n_stall > 0, "stall never seen");
    check(n_partial > 0, "partial reconfiguration never seen");
    check(n_overflow > 0, "overflow never seen");
    check(n_br_taken > 0 && n_br_wait > 0, "multiway branch did not take both ways");
    check(n_mode == M, "output mode switch");
    $display("mechanisms: pass=%0d multicast=%0d single=%0d icn=%0d stall=%0d partial=%0d overflow=%0d br_taken=%0d br_wait=%0d mode=%0d",
             n_pass, n_multicast, n_single, n_icn, n_stall, n_partial, n_overflow, n_br_taken, n_br_wait, n_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
