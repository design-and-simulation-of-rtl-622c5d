// tb_oqmb_throughput: the whole switch at default parameters under heavy
// admissible load. Run 1: every source offers a packet in every cycle and
// the destinations form a permutation that changes every 64 cycles
// (d = s + c, c rotating through 1..15), so no input or output is loaded
// above one packet per slot. Run 2: each source offers a packet with
// probability LOAD2 % to a uniformly random destination. Sources keep and
// resend packets as the end-to-end test does and keep at most WIN packets of
// a flow unanswered; destinations are always ready. Measured over 3000
// cycles after a warm-up. Checks: every flow complete and in order; run 1
// delivers at least 95 % of the line rate (delivered / (16 x cycles)); run 2
// delivers at least 95 % of what was offered.
//
// The traffic patterns and thresholds are this testbench's own; the OQMB
// description claims full throughput under admissible traffic but gives
// no measured pattern.
`timescale 1ns/1ps
module tb_oqmb_throughput;
  import clos_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid  [N_PORTS];
  cell_t in_cell   [N_PORTS];
  logic  reject    [N_PORTS];
  logic  out_valid [N_PORTS];
  cell_t out_cell  [N_PORTS];
  logic  out_ready [N_PORTS];
  logic  ack_valid [N_PORTS];
  ack_t  ack       [N_PORTS];
  logic  cm_drop   [M_MID][P_MOD];

  oqmb_clos dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_cell_i(in_cell), .reject_o(reject),
    .out_valid_o(out_valid), .out_cell_o(out_cell), .out_ready_i(out_ready),
    .ack_valid_o(ack_valid), .ack_o(ack), .cm_drop_o(cm_drop)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nseq [N_PORTS][N_PORTS], exp_d [N_PORTS][N_PORTS], fout [N_PORTS][N_PORTS];
  data_t sdata [N_PORTS][N_PORTS][16];
  cell_t rq [N_PORTS][$];
  localparam int WIN = 8, LOAD2 = 80;
  int  t = 0, pattern = 0, offering = 0, measuring = 0, delivered = 0, offered = 0, n_drop = 0;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  always @(negedge clk) if (rst_n) begin
    t++;
    for (int s = 0; s < N_PORTS; s++) begin
      in_valid[s] = 1'b0;
      out_ready[s] = 1'b1;
      if (rq[s].size() > 0) begin
        in_valid[s] = 1'b1;
        in_cell[s] = rq[s].pop_front();
      end else if (offering && (pattern == 0 || ($urandom % 100) < LOAD2)) begin
        automatic int d = (pattern == 0) ? (s + 1 + (t / 64) % 15) % N_PORTS : int'($urandom % N_PORTS);
        if (fout[s][d] < WIN) begin
          in_valid[s] = 1'b1;
          in_cell[s].src = addr_t'(s); in_cell[s].dst = addr_t'(d);
          in_cell[s].seq = seq_t'(nseq[s][d]); in_cell[s].data = data_t'($urandom);
          sdata[s][d][nseq[s][d]] = in_cell[s].data;
          nseq[s][d] = (nseq[s][d] + 1) % 16;
          fout[s][d]++;
        end
        if (measuring) offered++;
      end
    end
    #1;
    for (int s = 0; s < N_PORTS; s++) begin
      if (out_valid[s] && out_ready[s]) begin
        automatic int so = int'(out_cell[s].src);
        chk(int'(out_cell[s].seq) == exp_d[so][s] && out_cell[s].data == sdata[so][s][exp_d[so][s]],
            $sformatf("flow %0d->%0d order/data", so, s));
        exp_d[so][s] = (exp_d[so][s] + 1) % 16;
        if (measuring) delivered++;
      end
      if (ack_valid[s]) begin
        automatic int d = int'(ack[s].from);
        if (ack[s].code == ACK_OK) fout[s][d]--;
        else begin
          cell_t c;
          c.src = addr_t'(s); c.dst = addr_t'(d); c.seq = ack[s].seq; c.data = sdata[s][d][ack[s].seq];
          rq[s].push_back(c);
        end
      end
    end
    for (int j = 0; j < M_MID; j++) for (int k = 0; k < P_MOD; k++) if (cm_drop[j][k]) n_drop++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int pat, int pct_min);
    int c0;
    real thr;
    pattern = pat; delivered = 0; offered = 0; n_drop = 0;
    offering = 1;
    repeat (300) @(posedge clk);
    measuring = 1;
    repeat (3000) @(posedge clk);
    measuring = 0;
    offering = 0;
    c0 = 0;
    while (c0 < 2000) begin
      automatic int busy = 0;
      for (int s = 0; s < N_PORTS; s++) for (int d = 0; d < N_PORTS; d++) busy += fout[s][d];
      if (busy == 0) break;
      @(posedge clk); c0++;
    end
    thr = 100.0 * delivered / (16.0 * 3000);
    $display("pattern %0d: throughput %0.1f %% (offered %0d, delivered %0d, central drops %0d)",
             pat, thr, offered, delivered, n_drop);
    if (pat == 0) chk(thr >= pct_min, $sformatf("throughput %0.1f %% below %0d %%", thr, pct_min));
    else chk(100.0 * delivered >= pct_min * offered,
             $sformatf("delivered %0d of %0d offered, below %0d %%", delivered, offered, pct_min));
    for (int s = 0; s < N_PORTS; s++) for (int d = 0; d < N_PORTS; d++)
      chk(exp_d[s][d] == nseq[s][d] && fout[s][d] == 0, $sformatf("flow %0d->%0d complete", s, d));
  endtask

  initial begin
    for (int s = 0; s < N_PORTS; s++) begin
      in_valid[s] = 0; in_cell[s] = '0; out_ready[s] = 1;
      for (int d = 0; d < N_PORTS; d++) begin nseq[s][d] = 0; exp_d[s][d] = 0; fout[s][d] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 95);
    run(1, 95);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
