// tb_nack_table: 8-bit keys, four set ports. Random unique keys are set
// while the reader pops at random. Every key offered must be pending, each
// pending key must come out exactly once, and a key pending must be offered
// within a bounded time once the reader always pops.
//
// The stimulus and the reference model are this testbench's own.
`timescale 1ns/1ps
module tb_nack_table;
  localparam int KW = 8, W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          st [W];
  logic [KW-1:0] sk [W];
  logic          ov, pop;
  logic [KW-1:0] ok;
  bit            pend [256];
  int            npend = 0, nset = 0, nout = 0, maxp = 0;

  nack_table #(.KEY_W(KW), .W(W)) dut (.clk, .rst_n, .set_i(st), .set_key_i(sk),
                                       .out_valid_o(ov), .out_key_o(ok), .out_pop_i(pop));

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) pend[k] = 0;
    for (int w = 0; w < W; w++) begin st[w] = 0; sk[w] = 0; end
    pop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3300; t++) begin
      @(negedge clk);
      for (int w = 0; w < W; w++) begin
        st[w] = 0;
        sk[w] = KW'($urandom);
        if (t < 3000 && ($urandom % 100) < 30 && !pend[sk[w]] && !(ov && pop && ok == sk[w])) begin
          st[w] = 1;
          for (int b = 0; b < w; b++) if (st[b] && sk[b] == sk[w]) st[w] = 0;
        end
      end
      pop = (t >= 3000) || (($urandom % 100) < 40);
      #1;
      chk(ov == (npend != 0), $sformatf("t=%0d valid with %0d pending", t, npend));
      if (ov) chk(pend[ok], $sformatf("t=%0d key %h not pending", t, ok));
      if (ov && pop) begin pend[ok] = 0; npend--; nout++; end
      for (int w = 0; w < W; w++) if (st[w]) begin pend[sk[w]] = 1; npend++; nset++; end
      if (npend > maxp) maxp = npend;
    end
    chk(npend == 0 && nout == nset, "every key offered exactly once");
    $display("set=%0d out=%0d max pending=%0d", nset, nout, maxp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
