// central_module: buffered middle-stage switch of the OQMB Clos network.
//
// Cells arrive from the P input modules, at most one per link and slot. The
// module-ID field of the destination address (its upper bits) is matched
// against the ID of each output module; the cell is written into the output
// queue of the matching output module. Each output queue is a FIFO that can
// take all P arrivals of a slot (output queuing), so cells leaving towards
// one output module keep the order in which they arrived. Every cycle each
// non-empty queue sends its oldest cell to its output module, which always
// accepts it.
//
// A cell that finds its queue full is dropped and drop_o of that queue is
// high for the cycle. Every dropped cell is recorded in a NACK table keyed by
// source, destination and packet number (it cannot overflow); the pending
// NACKs (code 11) leave one per cycle through nack_valid_o/nack_ready_i
// towards the acknowledgement return path, so the source sends the packet
// again.
//
// Timing: a cell written at the end of cycle t is on om_* from cycle t+1;
// a NACK for a cell dropped in cycle t can be on nack_* from cycle t+1.
//
// Origin: the buffered central stage, its FIFO output queues and matching on
// the output-module ID follow the OQMB design, which asks only for small
// central buffers. The queue depth, the several-writes-per-cycle queue, and
// dropping plus NACKing a cell at a full queue are choices of this
// implementation.
module central_module
  import clos_pkg::*;
#(
  parameter int unsigned QDEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  im_valid_i [P_MOD],
  input  cell_t im_cell_i  [P_MOD],
  output logic  om_valid_o [P_MOD],
  output cell_t om_cell_o  [P_MOD],
  output logic  drop_o     [P_MOD],
  output logic [$clog2(QDEPTH):0] qcount_o [P_MOD],
  output logic  nack_valid_o,
  output ack_t  nack_o,
  input  logic  nack_ready_i
);
  localparam int unsigned KW = 2 * ADDR_W + SEQ_W;

  // we_a[k][j]: the cell on input link j is for output module k
  // ok_a[k][j]: output queue k took it
  logic we_a [P_MOD][P_MOD];
  logic ok_a [P_MOD][P_MOD];
  logic rej_a [P_MOD][P_MOD];

  for (genvar k = 0; k < P_MOD; k++) begin : g_oq
    for (genvar j = 0; j < P_MOD; j++) begin : g_id
      id_match #(.ID_W(MOD_W)) u_id (
        .valid_i(im_valid_i[j]), .pkt_id_i(mod_of(im_cell_i[j].dst)),
        .my_id_i(MOD_W'(k)), .pass_o(we_a[k][j]), .reject_o(rej_a[k][j])
      );
    end

    mw_fifo #(.T(cell_t), .W(P_MOD), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n,
      .wr_en_i(we_a[k]), .wr_data_i(im_cell_i), .wr_ok_o(ok_a[k]),
      .rd_valid_o(om_valid_o[k]), .rd_data_o(om_cell_o[k]), .rd_pop_i(1'b1),
      .count_o(qcount_o[k])
    );
  end

  // NACKs for dropped cells; each input link loses at most one cell a cycle
  logic          nt_set [P_MOD];
  logic [KW-1:0] nt_key [P_MOD];
  logic [KW-1:0] nt_head;

  always_comb begin
    for (int k = 0; k < P_MOD; k++) drop_o[k] = 1'b0;
    for (int j = 0; j < P_MOD; j++) begin
      nt_set[j] = 1'b0;
      for (int k = 0; k < P_MOD; k++)
        if (we_a[k][j] && !ok_a[k][j]) begin
          nt_set[j] = 1'b1;
          drop_o[k] = 1'b1;
        end
      nt_key[j] = {im_cell_i[j].src, im_cell_i[j].dst, im_cell_i[j].seq};
    end
  end

  nack_table #(.KEY_W(KW), .W(P_MOD)) u_nt (
    .clk, .rst_n, .set_i(nt_set), .set_key_i(nt_key),
    .out_valid_o(nack_valid_o), .out_key_o(nt_head), .out_pop_i(nack_ready_i)
  );

  assign nack_o = '{src:  addr_t'(nt_head[KW-1 -: ADDR_W]),
                    code: ACK_NACK,
                    hdr:  nt_head[1:0],
                    seq:  seq_t'(nt_head[SEQ_W-1:0]),
                    from: addr_t'(nt_head[SEQ_W +: ADDR_W])};
endmodule
