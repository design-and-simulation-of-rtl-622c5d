// tb_ack_return: 20 producers hold random answers until taken. Checks that a
// source receives only answers addressed to it, at most one per cycle, that
// ready goes exactly to the producer whose answer was delivered, that the
// words arrive unchanged, and that no producer waits more than 19 grants of
// its source (round-robin fairness). Contention must occur.
//
// The stimulus and the reference model are this testbench's own.
`timescale 1ns/1ps
module tb_ack_return;
  import clos_pkg::*;
  localparam int NOP = N_PORTS + M_MID;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ov [NOP], orr [NOP], sv [N_PORTS];
  ack_t oa [NOP], sa [N_PORTS];
  int   waitc [NOP];
  bit   taken [NOP];
  int   n_cont = 0;

  ack_return dut (.clk, .rst_n, .op_valid_i(ov), .op_ack_i(oa), .op_ready_o(orr),
                  .src_valid_o(sv), .src_ack_o(sa));

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
    for (int d = 0; d < NOP; d++) begin ov[d] = 0; oa[d] = '0; waitc[d] = 0; taken[d] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // answers taken at the last clock edge leave their producers
      for (int d = 0; d < NOP; d++) if (taken[d]) begin ov[d] = 0; taken[d] = 0; end
      for (int d = 0; d < NOP; d++)
        if (!ov[d] && ($urandom % 100) < 50) begin
          ov[d] = 1;
          oa[d] = ack_t'($urandom);
          // crowd the answers onto a few sources half of the time
          if ((t / 500) % 2) oa[d].src = addr_t'($urandom % 3);
        end
      #1;
      for (int s = 0; s < N_PORTS; s++) begin
        automatic int nreq = 0, ntaken = 0;
        for (int d = 0; d < NOP; d++)
          if (ov[d] && int'(oa[d].src) == s) begin
            nreq++;
            if (orr[d]) begin
              ntaken++;
              chk(sv[s] && sa[s] == oa[d], $sformatf("source %0d gets producer %0d word", s, d));
            end
          end
        if (nreq > 1) n_cont++;
        chk(ntaken == (nreq > 0 ? 1 : 0) && sv[s] == (nreq > 0), $sformatf("source %0d: %0d of %0d taken", s, ntaken, nreq));
      end
      for (int d = 0; d < NOP; d++) begin
        if (!ov[d]) chk(!orr[d], "ready without answer");
        if (ov[d] && orr[d]) begin taken[d] = 1; waitc[d] = 0; end
        else if (ov[d]) begin
          waitc[d]++;
          chk(waitc[d] < NOP, $sformatf("producer %0d starved", d));
        end
      end
    end
    chk(n_cont > 0, "contention happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
