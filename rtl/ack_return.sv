// ack_return: path that carries acknowledgements back to the sources.
//
// N_OP producers offer at most one answer each per cycle (valid/ready): the
// acknowledgement queues of the output ports (ACKs and NACKs) followed by the
// NACK queues of the central modules. The source address field of an answer
// selects the source port it goes to. Each source port has a round-robin
// arbiter over the producers that address it and takes one answer per cycle;
// the others wait in their producer's queue. The source side always accepts.
//
// Timing: combinational; an answer granted in cycle t is on src_* in cycle t
// and its ready is high in the same cycle.
//
// Origin: that the third stage answers each packet with ACK 01 or NACK 11
// and that the source resends on NACK is the OQMB design's own. The return
// path itself (a crossbar with one round-robin arbiter per source, answers
// also coming from the central modules) is a choice of this implementation.
module ack_return
  import clos_pkg::*;
#(
  parameter int unsigned N_OP = N_PORTS + M_MID
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op_valid_i [N_OP],
  input  ack_t op_ack_i   [N_OP],
  output logic op_ready_o [N_OP],
  output logic src_valid_o [N_PORTS],
  output ack_t src_ack_o   [N_PORTS]
);
  localparam int unsigned IW = $clog2(N_OP);
  logic [N_OP-1:0] req [N_PORTS];
  logic [N_OP-1:0] gnt [N_PORTS];
  logic [IW-1:0]      idx [N_PORTS];

  for (genvar s = 0; s < N_PORTS; s++) begin : g_src
    always_comb
      for (int d = 0; d < N_OP; d++)
        req[s][d] = op_valid_i[d] && (op_ack_i[d].src == addr_t'(s));

    rr_arbiter #(.N(N_OP)) u_arb (
      .clk, .rst_n, .req_i(req[s]), .en_i(1'b1),
      .gnt_o(gnt[s]), .gnt_idx_o(idx[s]), .gnt_valid_o(src_valid_o[s])
    );
    assign src_ack_o[s] = op_ack_i[idx[s]];
  end

  always_comb
    for (int d = 0; d < N_OP; d++) begin
      op_ready_o[d] = 1'b0;
      for (int s = 0; s < N_PORTS; s++)
        if (gnt[s][d]) op_ready_o[d] = 1'b1;
    end
endmodule
