// tb_id_match: exhaustive test of the ID comparator for 2-bit and 4-bit IDs.
//
// The stimulus and the reference model are this testbench's own.
`timescale 1ns/1ps
module tb_id_match;
  int checks = 0, failures = 0;
  logic       v;
  logic [1:0] a2, b2;
  logic [3:0] a4, b4;
  logic       p2, r2, p4, r4;

  id_match               u2 (.valid_i(v), .pkt_id_i(a2), .my_id_i(b2), .pass_o(p2), .reject_o(r2));
  id_match #(.ID_W(4))   u4 (.valid_i(v), .pkt_id_i(a4), .my_id_i(b4), .pass_o(p4), .reject_o(r4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vv = 0; vv < 2; vv++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          v = vv[0]; a4 = x[3:0]; b4 = y[3:0]; a2 = x[1:0]; b2 = y[1:0];
          #1;
          checks += 4;
          if (p4 !== (vv == 1 && x == y)) failures++;
          if (r4 !== (vv == 1 && x != y)) failures++;
          if (p2 !== (vv == 1 && x % 4 == y % 4)) failures++;
          if (r2 !== (vv == 1 && x % 4 != y % 4)) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
