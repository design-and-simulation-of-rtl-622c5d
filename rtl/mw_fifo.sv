// mw_fifo: first-in first-out queue that takes up to W writes per cycle.
//
// Used wherever several cells can reach one queue in the same slot: the
// output queues of a central module (one write per input module), and the
// acknowledgement queue of an output port. Writes requested in one cycle are
// stored in port order (port 0 first) and each is accepted while there is
// room, judged on the occupancy at the start of the cycle, so a read in the
// same cycle does not make room for a write. wr_ok_o[w] tells whether write w
// was taken; a refused write is lost and the caller decides what that means.
//
// Read side is first-word-fall-through: rd_valid_o/rd_data_o show the oldest
// entry and rd_pop_i removes it at the clock edge. DEPTH must be a power of
// two. Reset empties the queue (contents are not cleared).
//
// Origin: FIFO queuing is what the OQMB design uses in its buffered stages.
// Accepting several writes per cycle in port order, first-word-fall-through
// reads and judging room on the count at the start of the cycle are choices
// of this implementation.
module mw_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en_i   [W],
  input  T                       wr_data_i [W],
  output logic                   wr_ok_o   [W],
  output logic                   rd_valid_o,
  output T                       rd_data_o,
  input  logic                   rd_pop_i,
  output logic [$clog2(DEPTH):0] count_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  T                mem [DEPTH];
  logic [AW-1:0]   rptr_q, wptr_q;
  logic [AW:0]     cnt_q;
  logic [AW-1:0]   waddr [W];
  logic [AW:0]     nwr;
  logic            pop;

  always_comb begin
    nwr = '0;
    for (int w = 0; w < W; w++) begin
      waddr[w]   = wptr_q + AW'(nwr);
      wr_ok_o[w] = wr_en_i[w] && ((cnt_q + nwr) < (AW+1)'(DEPTH));
      if (wr_ok_o[w]) nwr = nwr + 1'b1;
    end
  end

  assign pop        = rd_pop_i && (cnt_q != '0);
  assign rd_valid_o = (cnt_q != '0);
  assign rd_data_o  = mem[rptr_q];
  assign count_o    = cnt_q;

  always_ff @(posedge clk) begin
    for (int w = 0; w < W; w++)
      if (wr_ok_o[w]) mem[waddr[w]] <= wr_data_i[w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr_q <= '0;
      wptr_q <= '0;
      cnt_q  <= '0;
    end else begin
      wptr_q <= wptr_q + AW'(nwr);
      rptr_q <= rptr_q + AW'(pop);
      cnt_q  <= cnt_q + nwr - (AW+1)'(pop);
    end
  end

  initial begin
    assert (DEPTH == (1 << AW)) else $error("mw_fifo DEPTH must be a power of two");
  end
endmodule
