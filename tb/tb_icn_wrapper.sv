// tb_icn_wrapper: self-checking test of the interconnect wrapper.
// Instance 1 uses the case-study mesh matrix; the expected drivers of each
// column are listed here by hand from that matrix. Random select values are
// written and random link values driven, and every output is compared with
// the driver the select names. Instance 2 uses a small 3 x 3 matrix with a
// three-driver column (select 3 must give zeros), a wire column and an
// undriven column. Instance 3 is the same small matrix built with
// equal-width (2-bit) select registers, where the one-driver column also
// gets a register and any select other than 0 blanks it.
module tb_icn_wrapper;
  import wppa_pkg::*;
  logic clk = 0, rst_n = 0;
  link_t [9:0] in_sig, out_sig;
  logic cfg_we = 0;
  logic [4:0] cfg_idx = 0;
  logic [7:0] cfg_val = 0;
  int checks = 0, failures = 0;
  int sel_model [10];
  int drv [10][$];
  int val_q3 = 0;
  int val_u1 = 0;

  icn_wrapper dut (.clk, .rst_n, .in_sig, .out_sig, .cfg_we, .cfg_idx, .cfg_val);

  localparam bit [0:2][0:2] ADJ3 = '{3'b110, 3'b100, 3'b100};
  link_t [2:0] in3, out3;
  logic we3 = 0;
  logic [4:0] idx3 = 0;
  logic [7:0] val3 = 0;
  icn_wrapper #(.NR(3), .NC(3), .ADJ(ADJ3)) dut3 (
    .clk, .rst_n, .in_sig(in3), .out_sig(out3), .cfg_we(we3), .cfg_idx(idx3), .cfg_val(val3));
  link_t [2:0] out3u;
  icn_wrapper #(.NR(3), .NC(3), .ADJ(ADJ3), .UNIFORM_SEL(1'b1)) dut3u (
    .clk, .rst_n, .in_sig(in3), .out_sig(out3u), .cfg_we(we3), .cfg_idx(idx3), .cfg_val(val3));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    drv[0] = '{4, 8};       drv[1] = '{5, 9};
    drv[2] = '{8};          drv[3] = '{9};
    drv[4] = '{8};          drv[5] = '{9};
    drv[6] = '{8};          drv[7] = '{9};
    drv[8] = '{0, 2, 4, 6}; drv[9] = '{1, 3, 5, 7};
    for (int j = 0; j < 10; j++) sel_model[j] = 0;
    in_sig = '0; in3 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int i = 0; i < 10; i++) in_sig[i] = link_t'(17'($urandom));
      for (int i = 0; i < 3; i++)  in3[i]    = link_t'(17'($urandom));
      #1;
      for (int j = 0; j < 10; j++) begin
        link_t e;
        e = (sel_model[j] < drv[j].size()) ? in_sig[drv[j][sel_model[j]]] : '0;
        checks++;
        if (out_sig[j] !== e) begin
          failures++; $display("FAIL col %0d sel %0d got %h exp %h", j, sel_model[j], out_sig[j], e);
        end
      end
      begin
        link_t e0;
        e0 = (val_q3 == 0) ? in3[0] : (val_q3 == 1) ? in3[1] : (val_q3 == 2) ? in3[2] : '0;
        checks++;
        if (out3[0] !== e0 || out3[1] !== in3[0] || out3[2] !== '0) begin
          failures++; $display("FAIL small matrix sel=%0d", val_q3);
        end
        checks++;
        if (out3u[0] !== e0 || out3u[1] !== ((val_u1 == 0) ? in3[0] : '0) || out3u[2] !== '0) begin
          failures++; $display("FAIL uniform-width matrix sel=%0d/%0d", val_q3, val_u1);
        end
      end
      cfg_we  = 1'($urandom);
      cfg_idx = 5'($urandom_range(0, 11));
      cfg_val = 8'($urandom_range(0, 3));
      we3  = 1'($urandom);
      idx3 = 5'($urandom_range(0, 2));
      val3 = 8'($urandom_range(0, 3));
      @(posedge clk);
      if (cfg_we && cfg_idx < 10 && drv[cfg_idx].size() > 1)
        sel_model[cfg_idx] = (drv[cfg_idx].size() == 2) ? int'(cfg_val[0]) : int'(cfg_val[1:0]);
      if (we3 && idx3 == 0) val_q3 = int'(val3[1:0]);
      if (we3 && idx3 == 1) val_u1 = int'(val3[1:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
