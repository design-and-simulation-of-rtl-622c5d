// tb_output_module: output module 1 (ports 4..7) fed on its four central
// links from a bag of packets taken in random order, so packets of a flow
// arrive out of order. NACKed packets go back into the bag. Destinations and
// the answer side are ready at random. Checks: every port delivers each flow
// complete, in order and with its data; every packet is ACKed exactly once,
// in flow order, by the port that delivered it; answers carry header = low
// packet-number bits; NACKs, out-of-order arrival and backpressure occur.
//
// The stimulus and the reference model are this testbench's own.
`timescale 1ns/1ps
module tb_output_module;
  import clos_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  cv [M_MID], ov [N_IN], orr [N_IN], av [N_IN], ar [N_IN];
  cell_t cc [M_MID], oc [N_IN];
  ack_t  ak [N_IN];

  output_module #(.MOD_ID(1)) dut (.clk, .rst_n, .cm_valid_i(cv), .cm_cell_i(cc),
    .out_valid_o(ov), .out_cell_o(oc), .out_ready_i(orr),
    .ack_valid_o(av), .ack_o(ak), .ack_ready_i(ar));

  cell_t bag [$];
  int    nseq [N_PORTS][N_IN], exp_o [N_PORTS][N_IN], exp_a [N_PORTS][N_IN], fout [N_PORTS][N_IN];
  int    n_nack = 0, n_bp = 0, n_ack = 0, n_del = 0, n_lost = 0, new_left = 3000;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  function automatic data_t dat(int s, int p, int q);
    return data_t'(s * 5 + p * 3 + q);
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N_PORTS; s++) for (int p = 0; p < N_IN; p++) begin
      nseq[s][p] = 0; exp_o[s][p] = 0; exp_a[s][p] = 0; fout[s][p] = 0;
    end
    for (int j = 0; j < M_MID; j++) begin cv[j] = 0; cc[j] = '0; end
    for (int p = 0; p < N_IN; p++) begin orr[p] = 0; ar[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000 && (new_left > 0 || bag.size() > 0 || n_ack < n_del || n_del < 3000); t++) begin
      @(negedge clk);
      // refill the bag
      repeat (2) if (new_left > 0) begin
        automatic int s = int'($urandom % 4) * 4 + 1;
        automatic int p = int'($urandom % 3);
        if (fout[s][p] < 14) begin
          cell_t c;
          c.src = addr_t'(s); c.dst = addr_t'(N_IN + p); c.seq = seq_t'(nseq[s][p]);
          c.data = dat(s, p, nseq[s][p]);
          nseq[s][p] = (nseq[s][p] + 1) % 16;
          fout[s][p]++;
          bag.push_back(c);
          new_left--;
        end
      end
      for (int j = 0; j < M_MID; j++) begin
        cv[j] = 0; cc[j] = '0;
        if (bag.size() > 0 && ($urandom % 100) < 70) begin
          automatic int k = int'($urandom % bag.size());
          cv[j] = 1; cc[j] = bag[k]; bag.delete(k);
        end
      end
      for (int p = 0; p < N_IN; p++) begin
        orr[p] = ($urandom % 100) < ((t / 300) % 2 ? 10 : 90);
        ar[p]  = ($urandom % 100) < 70;
      end
      #1;
      for (int p = 0; p < N_IN; p++) begin
        if (ov[p] && !orr[p]) n_bp++;
        if (ov[p] && orr[p]) begin
          automatic int s = int'(oc[p].src);
          chk(int'(oc[p].dst) == N_IN + p, "destination");
          chk(int'(oc[p].seq) == exp_o[s][p] && oc[p].data == dat(s, p, exp_o[s][p]),
              $sformatf("port %0d flow from %0d: seq %0d expected %0d", p, s, oc[p].seq, exp_o[s][p]));
          exp_o[s][p] = (exp_o[s][p] + 1) % 16;
          n_del++;
        end
        if (av[p] && ar[p]) begin
          automatic int s = int'(ak[p].src);
          chk(int'(ak[p].from) == N_IN + p && ak[p].hdr == ak[p].seq[1:0], "answer fields");
          if (ak[p].code == ACK_OK) begin
            chk(int'(ak[p].seq) == exp_a[s][p], $sformatf("ACK order port %0d src %0d", p, s));
            exp_a[s][p] = (exp_a[s][p] + 1) % 16;
            fout[s][p]--;
            n_ack++;
          end else begin
            cell_t c;
            chk(ak[p].code == ACK_NACK, "answer code");
            c.src = ak[p].src; c.dst = addr_t'(N_IN + p); c.seq = ak[p].seq;
            c.data = dat(s, p, int'(ak[p].seq));
            bag.push_back(c);
            n_nack++;
          end
        end
      end
    end
    for (int s = 0; s < N_PORTS; s++) for (int p = 0; p < N_IN; p++)
      chk(exp_o[s][p] == nseq[s][p] && exp_a[s][p] == nseq[s][p], $sformatf("flow %0d->%0d complete", s, p));
    chk(n_nack > 0 && n_bp > 0 && n_lost == 0, "NACK and backpressure seen, no NACK lost");
    $display("delivered=%0d acked=%0d nacks=%0d backpressure=%0d lost=%0d", n_del, n_ack, n_nack, n_bp, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
