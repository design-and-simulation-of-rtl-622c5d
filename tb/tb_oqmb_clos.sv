// tb_oqmb_clos: end-to-end test of the 16x16 OQMB Clos switch at its default
// parameters.
//
// The testbench plays the 16 sources and 16 destinations. A source numbers
// its packets per destination, keeps every packet until it is answered, and
// sends a packet again (same number) when a NACK comes back. Destinations
// check that every flow arrives complete, in order and with the data that was
// sent. Phases:
//   1. one packet 0 -> 3 with data 1111: delivered after 3 cycles, ACK word
//      00000100 back at source 0 after 3 cycles;
//   2. three simultaneous packets 0->8 (1111), 5->0 (1110), 11->7 (0000);
//   3. a packet whose sender address does not match its port: refused;
//   4. uniform random traffic with all destinations ready;
//   5. hot-spot traffic into output module 0 with slow destinations, which
//      overflows central queues (NACK and resend);
//   6. a blocked destination, which overflows a resequencing window.
// Each mechanism (ID reject, DSRR spreading over all central modules,
// out-of-order arrival and resequencing, central-queue drop, both kinds of
// NACK, retransmission, destination backpressure, answer contention) is
// counted and must occur at least once.
//
// Phases 1 and 2 replay the packet examples of the OQMB description (the
// words 00111111 and 00000100, the three simultaneous packets); the other
// traffic, the source model and the checks are this testbench's own.
`timescale 1ns/1ps
module tb_oqmb_clos;
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
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // source state
  int     nseq   [N_PORTS][N_PORTS];
  bit     pend   [N_PORTS][N_PORTS][16];
  data_t  sdata  [N_PORTS][N_PORTS][16];
  int     flow_out[N_PORTS][N_PORTS];
  int     outst  [N_PORTS];
  cell_t  rq     [N_PORTS][$];
  // destination state
  int     exp_d  [N_PORTS][N_PORTS];
  // observed arrival order at the output stage
  int     max_seen[N_PORTS][N_PORTS];
  bit     cm_used [M_MID];

  // mechanism counters
  int n_reject = 0, n_ooo = 0, n_cmdrop = 0, n_nack_om = 0, n_nack_cm = 0;
  int n_resend = 0, n_bp = 0, n_ackcont = 0, n_deliv = 0, n_ack = 0;

  // stimulus control
  int  mode = 0;          // 0 idle, 4 uniform, 5 hotspot
  int  load_pct = 0;
  int  ready_pct = 100;
  int  max_out = 4;
  int  max_flow = 8;
  int  blocked_port = -1;
  int  new_left = 0;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  function automatic cell_t mk(int s, int d, int sq, data_t dat);
    cell_t c;
    c.seq = seq_t'(sq); c.src = addr_t'(s); c.dst = addr_t'(d); c.data = dat;
    return c;
  endfunction

  // a new packet leaves source s for destination d
  function automatic cell_t new_pkt(int s, int d, data_t dat);
    int sq = nseq[s][d];
    nseq[s][d] = (sq + 1) % 16;
    pend[s][d][sq] = 1'b1;
    sdata[s][d][sq] = dat;
    flow_out[s][d]++;
    outst[s]++;
    return mk(s, d, sq, dat);
  endfunction

  // forced stimulus for directed phases
  bit    f_valid [N_PORTS];
  cell_t f_cell  [N_PORTS];

  // ---------------------------------------------------------------- driver
  always @(negedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < N_PORTS; s++) begin
        in_valid[s] = 1'b0;
        in_cell[s]  = '0;
        if (f_valid[s]) begin
          in_valid[s] = 1'b1;
          in_cell[s]  = f_cell[s];
          f_valid[s]  = 1'b0;
        end else if (rq[s].size() > 0) begin
          in_valid[s] = 1'b1;
          in_cell[s]  = rq[s].pop_front();
          n_resend++;
        end else if (mode != 0 && new_left > 0 && outst[s] < max_out &&
                     ($urandom % 100) < load_pct) begin
          int d;
          d = (mode == 5) ? int'($urandom % N_IN) : int'($urandom % N_PORTS);
          if (flow_out[s][d] < max_flow) begin
            in_valid[s] = 1'b1;
            in_cell[s]  = new_pkt(s, d, data_t'($urandom));
            new_left--;
          end
        end
        out_ready[s] = (($urandom % 100) < ready_pct) && (s != blocked_port);
      end
      #1;
      monitor();
    end
  end

  // ---------------------------------------------------------------- monitor
  task automatic monitor();
    int nack_this [N_PORTS];
    for (int s = 0; s < N_PORTS; s++) begin
      if (reject[s]) n_reject++;
      // destination side
      if (out_valid[s] && !out_ready[s]) n_bp++;
      if (out_valid[s] && out_ready[s]) begin
        cell_t c = out_cell[s];
        int so = int'(c.src);
        chk(int'(c.dst) == s, $sformatf("port %0d got packet for %0d", s, c.dst));
        chk(int'(c.seq) == exp_d[so][s],
            $sformatf("flow %0d->%0d: seq %0d, expected %0d", so, s, c.seq, exp_d[so][s]));
        chk(c.data == sdata[so][s][c.seq],
            $sformatf("flow %0d->%0d seq %0d: data %h", so, s, c.seq, c.data));
        exp_d[so][s] = (exp_d[so][s] + 1) % 16;
        n_deliv++;
      end
      // source side
      if (ack_valid[s]) begin
        ack_t a = ack[s];
        int d = int'(a.from);
        chk(int'(a.src) == s, "answer delivered to wrong source");
        chk(a.hdr == a.seq[1:0], "answer header");
        chk(pend[s][d][a.seq], $sformatf("answer %0d->%0d seq %0d not pending", s, d, a.seq));
        if (a.code == ACK_OK) begin
          pend[s][d][a.seq] = 1'b0;
          flow_out[s][d]--;
          outst[s]--;
          n_ack++;
        end else begin
          chk(a.code == ACK_NACK, "answer code");
          rq[s].push_back(mk(s, d, int'(a.seq), sdata[s][d][a.seq]));
        end
      end
    end
    // internal observation: answer contention, NACK origin, CM drops
    for (int s = 0; s < N_PORTS; s++) begin
      int n = 0;
      for (int p = 0; p < N_PORTS + M_MID; p++)
        if (dut.op_ack_valid[p] && int'(dut.op_ack[p].src) == s) n++;
      if (n > 1) n_ackcont++;
    end
    for (int p = 0; p < N_PORTS + M_MID; p++)
      if (dut.op_ack_valid[p] && dut.op_ack_ready[p] && dut.op_ack[p].code == ACK_NACK) begin
        if (p < N_PORTS) n_nack_om++; else n_nack_cm++;
      end
    for (int j = 0; j < M_MID; j++) begin
      for (int k = 0; k < P_MOD; k++) if (cm_drop[j][k]) n_cmdrop++;
      if (dut.l1_valid[0][j] && dut.l1_cell[0][j].src == '0) cm_used[j] = 1'b1;
      for (int k = 0; k < P_MOD; k++)
        if (dut.l2_valid[j][k]) begin
          int so = int'(dut.l2_cell[j][k].src), dd = int'(dut.l2_cell[j][k].dst);
          int sq = int'(dut.l2_cell[j][k].seq);
          // window-relative comparison of packet numbers
          if (max_seen[so][dd] >= 0 && ((sq - max_seen[so][dd] + 16) % 16) > 8) n_ooo++;
          else max_seen[so][dd] = sq;
        end
    end
  endtask

  function automatic int total_out();
    int t = 0;
    for (int s = 0; s < N_PORTS; s++) t += outst[s];
    return t;
  endfunction

  task automatic drain(int limit);
    int k = 0;
    while ((total_out() != 0 || new_left != 0) && k < limit) begin
      @(posedge clk); k++;
    end
    chk(total_out() == 0, $sformatf("%0d packets still unanswered after drain", total_out()));
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- phases
  initial begin
    int t0, t_out, t_ack;
    for (int s = 0; s < N_PORTS; s++) begin
      in_valid[s] = 1'b0; in_cell[s] = '0; out_ready[s] = 1'b1;
      f_valid[s] = 1'b0; f_cell[s] = '0; outst[s] = 0;
      for (int d = 0; d < N_PORTS; d++) begin
        nseq[s][d] = 0; exp_d[s][d] = 0; flow_out[s][d] = 0; max_seen[s][d] = -1;
        for (int q = 0; q < 16; q++) begin pend[s][d][q] = 0; sdata[s][d][q] = '0; end
      end
    end
    for (int j = 0; j < M_MID; j++) cm_used[j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // phase 1: 0 -> 3, data 1111; the paper's input word is 0011_1111
    @(posedge clk);
    f_cell[0] = new_pkt(0, 3, 4'b1111);
    f_valid[0] = 1'b1;
    @(negedge clk); t0 = cyc;
    chk({f_cell[0].dst, f_cell[0].data} == 8'b0011_1111, "input word 00111111");
    t_out = -1; t_ack = -1;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk); #2;
      if (out_valid[3] && t_out < 0) begin
        t_out = cyc - t0;
        chk(out_cell[3].data == 4'b1111 && out_cell[3].src == 4'd0, "port 3 receives 1111 from port 0");
      end
      if (ack_valid[0] && t_ack < 0) begin
        t_ack = cyc - t0;
        chk({ack[0].src, ack[0].code, ack[0].hdr} == 8'b0000_01_00, "ACK word 00000100");
      end
    end
    chk(t_out == 3, $sformatf("delivery latency %0d, expected 3", t_out));
    chk(t_ack == 3, $sformatf("ACK latency %0d, expected 3", t_ack));
    drain(100);

    // phase 2: three simultaneous packets
    @(posedge clk);
    f_cell[0]  = new_pkt(0, 8, 4'b1111);  f_valid[0]  = 1'b1;
    f_cell[5]  = new_pkt(5, 0, 4'b1110);  f_valid[5]  = 1'b1;
    f_cell[11] = new_pkt(11, 7, 4'b0000); f_valid[11] = 1'b1;
    drain(100);
    chk(exp_d[0][8] == 1 && exp_d[5][0] == 1 && exp_d[11][7] == 1, "three packets delivered");

    // phase 3: unauthorised sender: port 2 claims to be 5
    @(posedge clk);
    f_cell[2] = mk(5, 9, 0, 4'b1010); f_valid[2] = 1'b1;
    repeat (20) @(posedge clk);
    chk(n_reject == 1, $sformatf("one refused packet, saw %0d", n_reject));
    chk(exp_d[5][9] == 0, "refused packet not delivered");

    // phase 4: uniform random traffic
    mode = 4; load_pct = 60; ready_pct = 100; max_out = 6; new_left = 3000;
    drain(20000);
    mode = 0;

    // phase 5: hot spot into output module 0, slow destinations
    mode = 5; load_pct = 90; ready_pct = 30; max_out = 8; max_flow = 8; new_left = 1500;
    drain(60000);
    mode = 0; ready_pct = 100;
    repeat (20) @(posedge clk);

    // phase 6: destination 2 stops reading while source 1 sends 15 packets
    // to it; output queue (4) and resequencing window (8) fill, the rest is
    // NACKed and sent again once the destination reads
    blocked_port = 2;
    for (int k = 0; k < 15; k++) begin
      @(posedge clk);
      f_cell[1] = new_pkt(1, 2, data_t'(k)); f_valid[1] = 1'b1;
    end
    repeat (30) @(posedge clk);
    blocked_port = -1;
    drain(2000);
    // an ACK can reach its source before the packet leaves a backed-up
    // output queue: let the queues empty
    repeat (20) @(posedge clk);

    $display("delivered=%0d acked=%0d rejects=%0d out_of_order=%0d cm_drops=%0d nack_om=%0d nack_cm=%0d resends=%0d backpressure=%0d ack_contention=%0d",
             n_deliv, n_ack, n_reject, n_ooo, n_cmdrop, n_nack_om, n_nack_cm, n_resend, n_bp, n_ackcont);
    chk(n_deliv == n_ack, "every delivered packet acknowledged once");
    chk(cm_used[0] && cm_used[1] && cm_used[2] && cm_used[3], "DSRR spread source 0 over all central modules");
    chk(n_ooo > 0, "out-of-order arrival at output stage happened");
    chk(n_cmdrop > 0, "central queue overflow happened");
    chk(n_nack_om > 0, "resequencing-window NACK happened");
    chk(n_nack_cm > 0, "central-queue NACK happened");
    chk(n_resend > 0, "retransmission happened");
    chk(n_bp > 0, "destination backpressure happened");
    chk(n_ackcont > 0, "answer contention happened");
    for (int s = 0; s < N_PORTS; s++)
      for (int d = 0; d < N_PORTS; d++)
        chk(exp_d[s][d] == nseq[s][d], $sformatf("flow %0d->%0d complete", s, d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
