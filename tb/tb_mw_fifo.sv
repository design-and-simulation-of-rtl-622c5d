// tb_mw_fifo: random multi-port writes and pops against a queue model
// (W=4, DEPTH=8, 8-bit entries). Checks accept flags, read data, count.
//
// The stimulus and the reference model are this testbench's own.
`timescale 1ns/1ps
module tb_mw_fifo;
  localparam int W = 4, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we [W], ok [W];
  logic [7:0] wd [W];
  logic       rv, pop;
  logic [7:0] rd;
  logic [3:0] cnt;
  logic [7:0] q [$];
  int         full_seen = 0;

  mw_fifo #(.T(logic [7:0]), .W(W), .DEPTH(D)) dut (
    .clk, .rst_n, .wr_en_i(we), .wr_data_i(wd), .wr_ok_o(ok),
    .rd_valid_o(rv), .rd_data_o(rd), .rd_pop_i(pop), .count_o(cnt));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, c0;
    for (int w = 0; w < W; w++) begin we[w] = 0; wd[w] = 0; end
    pop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int w = 0; w < W; w++) begin
        we[w] = ($urandom % 100) < ((t / 500) % 2 ? 60 : 15);
        wd[w] = 8'($urandom);
      end
      pop = ($urandom % 100) < 50;
      #1;
      c0 = q.size();
      checks++;
      if (int'(cnt) != c0 || rv != (c0 != 0)) begin failures++; $display("FAIL count %0d vs %0d", cnt, c0); end
      if (c0 != 0) begin
        checks++;
        if (rd != q[0]) begin failures++; $display("FAIL data %h vs %h", rd, q[0]); end
      end
      n = 0;
      for (int w = 0; w < W; w++) begin
        bit e;
        e = we[w] && (c0 + n < D);
        checks++;
        if (ok[w] != e) begin failures++; $display("FAIL ok[%0d] t=%0d we=%b c0=%0d n=%0d", w, t, we[w], c0, n); end
        if (we[w] && !e) full_seen++;
        if (e) n++;
      end
      if (pop && c0 != 0) void'(q.pop_front());
      for (int w = 0; w < W; w++) if (we[w] && ok[w]) q.push_back(wd[w]);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
