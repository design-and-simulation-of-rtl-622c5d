// tb_input_module: input module 1 with random packets, some carrying a wrong
// sender address. Each cycle the link to central module j must carry the
// packet of input i with (i + 1 + t) mod 4 == j, valid only if that packet
// passed ID matching; refused packets must raise reject_o.
//
// The stimulus and the reference model are this testbench's own.
`timescale 1ns/1ps
module tb_input_module;
  import clos_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  iv [N_IN], rj [N_IN], cv [M_MID];
  cell_t ic [N_IN], cc [M_MID];
  int    n_rej = 0;

  input_module #(.MOD_ID(1)) dut (.clk, .rst_n, .in_valid_i(iv), .in_cell_i(ic), .reject_o(rj),
                                  .cm_valid_o(cv), .cm_cell_o(cc));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_IN; i++) begin iv[i] = 0; ic[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      if (t > 0) @(negedge clk);
      for (int i = 0; i < N_IN; i++) begin
        iv[i] = ($urandom % 100) < 70;
        ic[i] = cell_t'($urandom);
        ic[i].src = (($urandom % 100) < 85) ? addr_t'(N_IN + i) : addr_t'($urandom);
      end
      #1;
      for (int i = 0; i < N_IN; i++) begin
        bit ok;
        int j;
        ok = iv[i] && ic[i].src == addr_t'(N_IN + i);
        j  = (i + 1 + t) % M_MID;
        checks += 2;
        if (rj[i] != (iv[i] && !ok)) begin failures++; $display("FAIL reject t=%0d i=%0d", t, i); end
        if (rj[i]) n_rej++;
        if (cv[j] != ok || (ok && cc[j] != ic[i])) begin
          failures++; $display("FAIL link t=%0d input %0d -> cm %0d", t, i, j);
        end
      end
    end
    checks++;
    if (n_rej == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
