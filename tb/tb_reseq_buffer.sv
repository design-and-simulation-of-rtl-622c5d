// tb_reseq_buffer: up to four arrivals per cycle from five sources, each
// picking a packet number at random among the next twelve not yet stored, so
// packets come out of order and some fall outside the 8-entry window. A
// model of the window, expected numbers and round-robin choice predicts
// every NACK and every packet delivered; each source's packets must leave in
// number order with their data. Destination readiness is random.
//
// The stimulus and the reference model are this testbench's own.
`timescale 1ns/1ps
module tb_reseq_buffer;
  import clos_pkg::*;
  localparam int WIN = 8, NS = 16, NA = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  iv [NA], nk [NA], dv, dr;
  cell_t ic [NA], dc;

  reseq_buffer dut (.clk, .rst_n, .in_valid_i(iv), .in_cell_i(ic), .nack_o(nk),
                    .deq_valid_o(dv), .deq_cell_o(dc), .deq_ready_i(dr));

  bit    mvld [NS][WIN];
  int    mexp [NS];
  int    st   [NS][16];    // 0 not stored, 1 stored in window
  int    ptr = 0;
  int    n_nack = 0, n_ooo = 0, n_del = 0;

  function automatic data_t dat(int s, int q);
    return data_t'(s * 7 + q * 3 + 1);
  endfunction

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NA; a++) begin iv[a] = 0; ic[a] = '0; end
    dr = 0;
    for (int s = 0; s < NS; s++) begin
      mexp[s] = 0;
      for (int w = 0; w < WIN; w++) mvld[s][w] = 0;
      for (int q = 0; q < 16; q++) st[s][q] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      int sel;
      bit acc [NA];
      @(negedge clk);
      for (int a = 0; a < NA; a++) begin
        int s, q;
        iv[a] = 0; ic[a] = '0;
        if (($urandom % 100) < 60) begin
          s = 2 + int'($urandom % 5);
          q = (mexp[s] + int'($urandom % 12)) % 16;
          iv[a] = (st[s][q] == 0);
          for (int b = 0; b < a; b++) if (iv[b] && int'(ic[b].src) == s && int'(ic[b].seq) == q) iv[a] = 0;
          ic[a].src = addr_t'(s); ic[a].seq = seq_t'(q); ic[a].data = dat(s, q);
          ic[a].dst = 4'd9;
        end
      end
      dr = ($urandom % 100) < 70;
      #1;
      // model: admission
      for (int a = 0; a < NA; a++) begin
        automatic int s = int'(ic[a].src);
        automatic int q = int'(ic[a].seq);
        automatic int off = (q - mexp[s] + 16) % 16;
        acc[a] = iv[a] && off < WIN && !mvld[s][q % WIN];
        chk(nk[a] == (iv[a] && !acc[a]), $sformatf("t=%0d nack %0d iv=%b s=%0d q=%0d exp=%0d nk=%b", t, a, iv[a], s, q, mexp[s], nk[a]));
        if (iv[a] && !acc[a]) n_nack++;
        if (acc[a] && off != 0) n_ooo++;
      end
      // model: delivery choice
      sel = -1;
      for (int o = 0; o < NS; o++) begin
        automatic int s = (ptr + o) % NS;
        if (sel < 0 && mvld[s][mexp[s] % WIN]) sel = s;
      end
      chk(dv == (sel >= 0), $sformatf("t=%0d deq valid", t));
      if (sel >= 0) begin
        chk(int'(dc.src) == sel && int'(dc.seq) == mexp[sel] && dc.data == dat(sel, mexp[sel]),
            $sformatf("t=%0d deq src %0d seq %0d, expected %0d/%0d", t, dc.src, dc.seq, sel, mexp[sel]));
        if (dr) begin
          mvld[sel][mexp[sel] % WIN] = 0;
          st[sel][mexp[sel]] = 0;
          mexp[sel] = (mexp[sel] + 1) % 16;
          ptr = (sel + 1) % NS;
          n_del++;
        end
      end
      for (int a = 0; a < NA; a++)
        if (acc[a]) begin
          mvld[int'(ic[a].src)][int'(ic[a].seq) % WIN] = 1;
          st[int'(ic[a].src)][int'(ic[a].seq)] = 1;
        end
    end
    chk(n_nack > 0 && n_ooo > 0 && n_del > 1000, "out-of-order, NACK and delivery all happened");
    $display("delivered=%0d nacks=%0d out_of_order=%0d", n_del, n_nack, n_ooo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
