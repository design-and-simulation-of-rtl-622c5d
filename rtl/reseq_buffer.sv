// reseq_buffer: resequencing buffer of one output port.
//
// Successive packets of one source to this port are spread over different
// central modules by the DSRR pattern and can arrive out of order. Each
// packet carries its packet number; for every source the buffer keeps the
// number it expects next and a window of WIN slots, indexed by the low bits
// of the packet number. Up to M packets (one per central module) arrive per
// cycle. A packet whose number lies in the window [expected, expected+WIN-1]
// is stored; a packet outside the window, or whose slot is taken, is not
// stored and nack_o is raised for it so that the source sends it again.
//
// A source is ready when the slot of its expected number holds a packet. A
// round-robin arbiter picks one ready source per cycle; its packet is shown
// on deq_* and is removed, advancing that source's expected number, at the
// clock edge where deq_ready_i is high. Packets of each source thus leave in
// packet-number order.
//
// Timing: a packet stored at the end of cycle t can leave in cycle t+1.
// Reset sets every expected number to 0 and empties the window.
//
// Origin: the OQMB design puts small resequencing buffers at the output to
// undo the reordering caused by spreading a flow over the central modules.
// The per-source window, its size (WIN = 8 by default) and NACKing packets
// outside it are choices of this implementation. The packet number is 4
// bits, so WIN must stay at or below 8.
module reseq_buffer
  import clos_pkg::*;
#(
  parameter int unsigned WIN   = 8,   // window per source, power of two
  parameter int unsigned N_SRC = N_PORTS,
  parameter int unsigned N_ARR = M_MID
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid_i [N_ARR],
  input  cell_t in_cell_i  [N_ARR],
  output logic  nack_o     [N_ARR],
  output logic  deq_valid_o,
  output cell_t deq_cell_o,
  input  logic  deq_ready_i
);
  localparam int unsigned WW = $clog2(WIN);
  localparam int unsigned SW = $clog2(N_SRC);

  cell_t          mem   [N_SRC][WIN];
  logic [WIN-1:0] vld_q [N_SRC];
  seq_t           exp_q [N_SRC];

  logic           acc   [N_ARR];
  logic [N_SRC-1:0] ready;
  logic [N_SRC-1:0] gnt;
  logic [SW-1:0]  sel;
  logic           sel_vld;

  initial begin
    assert ((1 << WW) == WIN && WIN <= (1 << (SEQ_W - 1)))
      else $error("WIN must be a power of two and at most half the packet-number range");
  end

  // admission of arrivals
  always_comb begin
    seq_t          off;
    logic [SW-1:0] s;
    logic [WW-1:0] slot;
    for (int a = 0; a < N_ARR; a++) begin
      s    = SW'(in_cell_i[a].src);
      slot = in_cell_i[a].seq[WW-1:0];
      off  = in_cell_i[a].seq - exp_q[s];
      acc[a] = in_valid_i[a] && (off < seq_t'(WIN)) && !vld_q[s][slot];
      for (int b = 0; b < a; b++)
        if (acc[b] && SW'(in_cell_i[b].src) == s &&
            in_cell_i[b].seq[WW-1:0] == slot) acc[a] = 1'b0;
      nack_o[a] = in_valid_i[a] && !acc[a];
    end
  end

  // sources whose next packet is present
  always_comb begin
    for (int s = 0; s < N_SRC; s++)
      ready[s] = vld_q[s][exp_q[s][WW-1:0]];
  end

  rr_arbiter #(.N(N_SRC)) u_arb (
    .clk, .rst_n, .req_i(ready), .en_i(deq_ready_i),
    .gnt_o(gnt), .gnt_idx_o(sel), .gnt_valid_o(sel_vld)
  );

  assign deq_valid_o = sel_vld;
  assign deq_cell_o  = mem[sel][exp_q[sel][WW-1:0]];

  always_ff @(posedge clk) begin
    for (int a = 0; a < N_ARR; a++)
      if (acc[a]) mem[SW'(in_cell_i[a].src)][in_cell_i[a].seq[WW-1:0]] <= in_cell_i[a];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SRC; s++) begin
        vld_q[s] <= '0;
        exp_q[s] <= '0;
      end
    end else begin
      for (int a = 0; a < N_ARR; a++)
        if (acc[a]) vld_q[SW'(in_cell_i[a].src)][in_cell_i[a].seq[WW-1:0]] <= 1'b1;
      if (sel_vld && deq_ready_i) begin
        vld_q[sel][exp_q[sel][WW-1:0]] <= 1'b0;
        exp_q[sel] <= exp_q[sel] + 1'b1;
      end
    end
  end
endmodule
