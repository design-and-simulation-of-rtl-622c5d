// tb_central_module: random arrivals on the four input links against a model
// of four FIFO output queues (depth 8, writes in link order, room judged at
// the start of the cycle). Checks the cells leaving on every output link and
// the drop flags, and that NACKs come out exactly once for every dropped
// cell and for nothing else.
//
// The stimulus and the reference model are this testbench's own.
`timescale 1ns/1ps
module tb_central_module;
  import clos_pkg::*;
  localparam int QD = 8, ND = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  iv [P_MOD], ov [P_MOD], dr [P_MOD];
  cell_t ic [P_MOD], oc [P_MOD];
  logic [3:0] qc [P_MOD];
  logic  nv, nr;
  ack_t  na;
  cell_t q [P_MOD][$];
  bit    pend [N_PORTS][N_PORTS][16];
  int    npend = 0;
  int    n_drop = 0, n_nack = 0;

  central_module dut (.clk, .rst_n, .im_valid_i(iv), .im_cell_i(ic), .om_valid_o(ov), .om_cell_o(oc),
                      .drop_o(dr), .qcount_o(qc), .nack_valid_o(nv), .nack_o(na), .nack_ready_i(nr));

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
    int hot;
    for (int a = 0; a < N_PORTS; a++) for (int b = 0; b < N_PORTS; b++) for (int c = 0; c < 16; c++)
      pend[a][b][c] = 0;
    for (int j = 0; j < P_MOD; j++) begin iv[j] = 0; ic[j] = '0; end
    nr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 7000; t++) begin
      int sz [P_MOD];
      bit d  [P_MOD];
      bit lostj [P_MOD];
      @(negedge clk);
      hot = (t / 400) % 2;   // alternate light uniform load and a hot spot on queue 2
      for (int j = 0; j < P_MOD; j++) begin
        iv[j] = t < 4000 && ($urandom % 100) < (hot ? 90 : 40);
        ic[j] = cell_t'($urandom);
        if (hot) ic[j].dst = addr_t'({2'd2, 2'($urandom)});
        // a dropped packet is not resent here, so keep keys unique
        if (pend[ic[j].src][ic[j].dst][ic[j].seq]) iv[j] = 0;
        for (int b = 0; b < j; b++) if (iv[b] && ic[b][15:4] == ic[j][15:4]) iv[j] = 0;
      end
      nr = (t >= 4000) || (($urandom % 100) < 60);
      #1;
      for (int k = 0; k < P_MOD; k++) begin
        sz[k] = q[k].size();
        d[k] = 0;
        chk(ov[k] == (sz[k] != 0), $sformatf("t=%0d output %0d valid", t, k));
        if (sz[k] != 0) chk(oc[k] == q[k][0], $sformatf("t=%0d output %0d cell", t, k));
        chk(int'(qc[k]) == sz[k], "queue count");
      end
      chk(nv == (npend != 0), $sformatf("t=%0d nack valid %b pending %0d", t, nv, npend));
      if (nv) chk(na.code == ACK_NACK && na.hdr == na.seq[1:0] && pend[na.src][na.from][na.seq],
                  $sformatf("t=%0d NACK %0d->%0d seq %0d not pending", t, na.src, na.from, na.seq));
      // model update: pops, then writes in link order
      for (int k = 0; k < P_MOD; k++) if (sz[k] != 0) void'(q[k].pop_front());
      if (nr && nv) begin pend[na.src][na.from][na.seq] = 0; npend--; n_nack++; end
      for (int j = 0; j < P_MOD; j++) begin
        int k;
        lostj[j] = 0;
        if (!iv[j]) continue;
        k = int'(ic[j].dst[3:2]);
        if (sz[k] < QD) begin q[k].push_back(ic[j]); sz[k]++; end
        else begin d[k] = 1; lostj[j] = 1; n_drop++; end
      end
      for (int j = 0; j < P_MOD; j++)
        if (lostj[j]) begin pend[ic[j].src][ic[j].dst][ic[j].seq] = 1; npend++; end
      for (int k = 0; k < P_MOD; k++) chk(dr[k] == d[k], $sformatf("t=%0d drop flag %0d", t, k));
    end
    chk(n_drop > 0 && n_nack == n_drop && npend == 0, "every drop NACKed once");
    $display("drops=%0d nacks=%0d", n_drop, n_nack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
