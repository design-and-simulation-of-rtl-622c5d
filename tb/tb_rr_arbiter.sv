// tb_rr_arbiter: random requests against a reference round-robin pointer;
// also checks that a steady requester waits at most N-1 grants.
//
// The stimulus and the reference model are this testbench's own.
`timescale 1ns/1ps
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [N-1:0] req, gnt;
  logic [2:0]   idx;
  logic         gv, en;
  int           ptr, wait_n [N];

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req_i(req), .en_i(en), .gnt_o(gnt), .gnt_idx_o(idx), .gnt_valid_o(gv));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_i;
    ptr = 0; req = '0; en = 0;
    for (int i = 0; i < N; i++) wait_n[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req = (t < 1000) ? N'($urandom) : '1;
      en  = ($urandom % 4) != 0;
      #1;
      exp_i = -1;
      for (int o = 0; o < N; o++)
        if (exp_i < 0 && req[(ptr + o) % N]) exp_i = (ptr + o) % N;
      checks++;
      if (exp_i < 0) begin
        if (gv || gnt != '0) failures++;
      end else begin
        if (!gv || int'(idx) != exp_i || gnt != (N'(1) << exp_i)) begin
          failures++;
          $display("FAIL t=%0d req=%b ptr=%0d gnt=%b", t, req, ptr, gnt);
        end
        if (en) ptr = (exp_i + 1) % N;
      end
      if (t >= 1000 && en) begin
        for (int i = 0; i < N; i++) wait_n[i] = (i == exp_i) ? 0 : wait_n[i] + 1;
        for (int i = 0; i < N; i++) begin checks++; if (wait_n[i] > N - 1) failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
