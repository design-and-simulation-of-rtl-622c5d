// tb_dsrr_ctrl: checks the DSRR pattern of two input modules (IDs 0 and 2)
// for 40 slots: input i goes to central module (i + ID + t) mod 4 in slot t,
// the mapping is one-to-one, src_o is its inverse, and over 4 slots every
// input visits every central module once.
//
// The stimulus and the reference model are this testbench's own.
`timescale 1ns/1ps
module tb_dsrr_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] conn0 [4], conn2 [4], src0 [4], src2 [4], slot0, slot2;
  logic       sv0 [4], sv2 [4];
  int         visits [4][4];

  dsrr_ctrl              u0 (.clk, .rst_n, .conn_o(conn0), .src_o(src0), .src_vld_o(sv0), .slot_o(slot0));
  dsrr_ctrl #(.MOD_ID(2)) u2 (.clk, .rst_n, .conn_o(conn2), .src_o(src2), .src_vld_o(sv2), .slot_o(slot2));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) visits[i][j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      if (t > 0) @(negedge clk);
      #1;
      for (int i = 0; i < 4; i++) begin
        chk(int'(conn0[i]) == (i + t) % 4, $sformatf("module 0 slot %0d input %0d -> %0d", t, i, conn0[i]));
        chk(int'(conn2[i]) == (i + 2 + t) % 4, $sformatf("module 2 slot %0d input %0d -> %0d", t, i, conn2[i]));
        chk(int'(src0[conn0[i]]) == i && sv0[conn0[i]], "inverse map, module 0");
        chk(int'(src2[conn2[i]]) == i && sv2[conn2[i]], "inverse map, module 2");
        for (int k = 0; k < i; k++) chk(conn0[k] != conn0[i], "one-to-one");
        if (t < 4) visits[i][conn0[i]]++;
      end
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      chk(visits[i][j] == 1, "each input visits each central module once per round");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
