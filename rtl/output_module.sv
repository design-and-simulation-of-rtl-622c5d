// output_module: buffered third-stage switch of the OQMB Clos network.
//
// Cells arrive from the M central modules, at most one per link and slot.
// For each of the N_IN output ports, ID matching compares the port field of
// the destination address with the port's ID and hands matching cells to
// the port's resequencing buffer, which restores the packet order of every
// source. From there packets go, one per cycle, into the port's output
// queue, a FIFO read by the destination with a valid/ready handshake.
//
// Acknowledgements: when a packet enters the output queue the port writes an
// ACK (code 01) for its source into the port's ACK queue; a packet moves on
// only when both the output queue and the ACK queue have room. When the
// resequencing buffer cannot take an arriving packet, the port records a
// NACK (code 11) for it in a NACK table keyed by source and packet number,
// which cannot overflow. The port offers one answer per cycle on
// ack_valid_o/ack_o, taken with ack_ready_i, alternating between ACK queue
// and NACK table when both have one.
//
// Timing: a cell on cm_* in cycle t is in the resequencing buffer at the end
// of t, in the output queue at the end of t+1 (if it is the next in order
// and wins arbitration) and on out_* from cycle t+2. Its ACK is on ack_*
// from cycle t+2 at the earliest; a NACK from cycle t+1.
//
// Origin: the buffered output stage, matching on the port ID, resequencing
// before the output FIFO and the ACK 01 / NACK 11 answers follow the OQMB
// design. Where the ACK is generated, the queue depths, the valid/ready
// handshake and the answer alternation are choices of this implementation.
module output_module
  import clos_pkg::*;
#(
  parameter int unsigned MOD_ID   = 0,
  parameter int unsigned WIN      = 8,
  parameter int unsigned OQ_DEPTH = 4,
  parameter int unsigned AQ_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cm_valid_i  [M_MID],
  input  cell_t cm_cell_i   [M_MID],
  output logic  out_valid_o [N_IN],
  output cell_t out_cell_o  [N_IN],
  input  logic  out_ready_i [N_IN],
  output logic  ack_valid_o [N_IN],
  output ack_t  ack_o       [N_IN],
  input  logic  ack_ready_i [N_IN]
);
  localparam int unsigned KW = ADDR_W + SEQ_W;

  for (genvar p = 0; p < N_IN; p++) begin : g_port
    localparam addr_t MY_ADDR = addr_t'(MOD_ID * N_IN + p);
    logic  hit  [M_MID];
    logic  miss [M_MID];
    logic  nack [M_MID];
    logic  dq_valid, dq_ready;
    cell_t dq_cell;
    logic  oq_we [1], oq_ok [1];
    cell_t oq_wd [1];
    logic [$clog2(OQ_DEPTH):0] oq_cnt;
    logic  aq_we [1], aq_ok [1];
    ack_t  aq_wd [1];
    logic  aq_valid, aq_pop;
    ack_t  aq_head;
    logic [$clog2(AQ_DEPTH):0] aq_cnt;
    logic [KW-1:0] nt_key [M_MID];
    logic          nt_valid, nt_pop;
    logic [KW-1:0] nt_head;
    logic          pri_q;     // 1: NACK table has priority this cycle
    logic          take_nack;

    for (genvar j = 0; j < M_MID; j++) begin : g_id
      id_match #(.ID_W(LOC_W)) u_id (
        .valid_i(cm_valid_i[j]), .pkt_id_i(loc_of(cm_cell_i[j].dst)),
        .my_id_i(LOC_W'(p)), .pass_o(hit[j]), .reject_o(miss[j])
      );
      assign nt_key[j] = {cm_cell_i[j].src, cm_cell_i[j].seq};
    end

    reseq_buffer #(.WIN(WIN)) u_rsq (
      .clk, .rst_n,
      .in_valid_i(hit), .in_cell_i(cm_cell_i), .nack_o(nack),
      .deq_valid_o(dq_valid), .deq_cell_o(dq_cell), .deq_ready_i(dq_ready)
    );

    assign dq_ready = (oq_cnt < ($clog2(OQ_DEPTH)+1)'(OQ_DEPTH)) &&
                      (aq_cnt < ($clog2(AQ_DEPTH)+1)'(AQ_DEPTH));
    assign oq_we[0] = dq_valid && dq_ready;
    assign oq_wd[0] = dq_cell;
    assign aq_we[0] = oq_we[0];
    assign aq_wd[0] = '{src: dq_cell.src, code: ACK_OK, hdr: dq_cell.seq[1:0],
                        seq: dq_cell.seq, from: MY_ADDR};

    mw_fifo #(.T(cell_t), .W(1), .DEPTH(OQ_DEPTH)) u_oq (
      .clk, .rst_n,
      .wr_en_i(oq_we), .wr_data_i(oq_wd), .wr_ok_o(oq_ok),
      .rd_valid_o(out_valid_o[p]), .rd_data_o(out_cell_o[p]),
      .rd_pop_i(out_ready_i[p]), .count_o(oq_cnt)
    );

    mw_fifo #(.T(ack_t), .W(1), .DEPTH(AQ_DEPTH)) u_aq (
      .clk, .rst_n,
      .wr_en_i(aq_we), .wr_data_i(aq_wd), .wr_ok_o(aq_ok),
      .rd_valid_o(aq_valid), .rd_data_o(aq_head), .rd_pop_i(aq_pop),
      .count_o(aq_cnt)
    );

    nack_table #(.KEY_W(KW), .W(M_MID)) u_nt (
      .clk, .rst_n, .set_i(nack), .set_key_i(nt_key),
      .out_valid_o(nt_valid), .out_key_o(nt_head), .out_pop_i(nt_pop)
    );

    // answer selection: alternate between ACK queue and NACK table
    always_comb begin
      take_nack   = nt_valid && (!aq_valid || pri_q);
      ack_valid_o[p] = aq_valid || nt_valid;
      if (take_nack)
        ack_o[p] = '{src: addr_t'(nt_head[KW-1 -: ADDR_W]), code: ACK_NACK,
                     hdr: nt_head[1:0], seq: seq_t'(nt_head[SEQ_W-1:0]), from: MY_ADDR};
      else
        ack_o[p] = aq_head;
      nt_pop = ack_ready_i[p] && take_nack;
      aq_pop = ack_ready_i[p] && aq_valid && !take_nack;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) pri_q <= 1'b0;
      else if (ack_ready_i[p] && aq_valid && nt_valid) pri_q <= !pri_q;
    end
  end
endmodule
