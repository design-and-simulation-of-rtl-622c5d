// oqmb_clos: 16x16 output-queued, middle-stage-buffered (OQMB) Clos packet
// switch, topology C(4, 4, 4).
//
// Stage 1, four bufferless input modules: each checks the sender address of
// every packet against the port it arrives on (ID matching) and sends it at
// once to a central module chosen by a desynchronized static round-robin
// (DSRR) pattern, so the input stage has no contention and needs no
// scheduler. Stage 2, four central modules: each keeps one FIFO output queue
// per output module. Stage 3, four output modules: per port a resequencing
// buffer restores per-source order, then a FIFO output queue drives the
// port. Output ports answer every packet with an ACK, or with a NACK when
// they cannot hold it; central modules answer a cell they had to drop with
// a NACK. The answers travel back to the sources through the
// acknowledgement return path, and a source that gets a NACK sends the
// packet again with the same packet number.
//
// Links: input module k output j -> central module j input k; central module
// j output k -> output module k input j.
//
// Interface per port s: in_valid_i/in_cell_i (no backpressure; a packet
// whose sender address is not s is refused with reject_o), out_valid_o/
// out_cell_o/out_ready_i to the destination, ack_valid_o/ack_o to the source
// (always accepted). cm_drop_o[j][k] flags a cell dropped at the full
// queue of central module j towards output module k; it is NACKed. No
// answer is ever lost, so every packet is eventually delivered as long as
// sources resend on NACK and destinations keep reading.
//
// Latency of an uncontended packet: presented in cycle t, on out_* in cycle
// t+3, its ACK on ack_* in cycle t+3.
//
// Origin: the C(4, 4, 4) topology, module IDs 00..11, the bufferless /
// buffered / buffered stages, DSRR, ID matching, resequencing and ACK/NACK
// with resending follow the OQMB design. The buffer depths, the 3-cycle
// pipeline, the answer return path and central-queue drops are choices of
// this implementation.
module oqmb_clos
  import clos_pkg::*;
#(
  parameter int unsigned CM_QDEPTH = 8,
  parameter int unsigned WIN       = 8,
  parameter int unsigned OQ_DEPTH  = 4,
  parameter int unsigned AQ_DEPTH  = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid_i  [N_PORTS],
  input  cell_t in_cell_i   [N_PORTS],
  output logic  reject_o    [N_PORTS],
  output logic  out_valid_o [N_PORTS],
  output cell_t out_cell_o  [N_PORTS],
  input  logic  out_ready_i [N_PORTS],
  output logic  ack_valid_o [N_PORTS],
  output ack_t  ack_o       [N_PORTS],
  output logic  cm_drop_o   [M_MID][P_MOD]
);
  // stage 1 -> stage 2 links, indexed [input module][central module]
  logic  l1_valid [P_MOD][M_MID];
  cell_t l1_cell  [P_MOD][M_MID];
  // stage 2 -> stage 3 links, indexed [central module][output module]
  logic  l2_valid [M_MID][P_MOD];
  cell_t l2_cell  [M_MID][P_MOD];

  // answer producers: output ports 0..15, then central-module NACK queues
  localparam int unsigned N_OP = N_PORTS + M_MID;
  logic  op_ack_valid [N_OP];
  ack_t  op_ack       [N_OP];
  logic  op_ack_ready [N_OP];

  for (genvar k = 0; k < P_MOD; k++) begin : g_im
    logic  iv [N_IN];
    cell_t ic [N_IN];
    logic  rj [N_IN];
    for (genvar i = 0; i < N_IN; i++) begin : g_p
      assign iv[i] = in_valid_i[k*N_IN + i];
      assign ic[i] = in_cell_i[k*N_IN + i];
      assign reject_o[k*N_IN + i] = rj[i];
    end
    input_module #(.MOD_ID(k)) u_im (
      .clk, .rst_n, .in_valid_i(iv), .in_cell_i(ic), .reject_o(rj),
      .cm_valid_o(l1_valid[k]), .cm_cell_o(l1_cell[k])
    );
  end

  for (genvar j = 0; j < M_MID; j++) begin : g_cm
    logic  cv [P_MOD];
    cell_t cc [P_MOD];
    logic [$clog2(CM_QDEPTH):0] qc [P_MOD];
    for (genvar k = 0; k < P_MOD; k++) begin : g_l
      assign cv[k] = l1_valid[k][j];
      assign cc[k] = l1_cell[k][j];
    end
    central_module #(.QDEPTH(CM_QDEPTH)) u_cm (
      .clk, .rst_n, .im_valid_i(cv), .im_cell_i(cc),
      .om_valid_o(l2_valid[j]), .om_cell_o(l2_cell[j]),
      .drop_o(cm_drop_o[j]), .qcount_o(qc),
      .nack_valid_o(op_ack_valid[N_PORTS + j]), .nack_o(op_ack[N_PORTS + j]),
      .nack_ready_i(op_ack_ready[N_PORTS + j])
    );
  end

  for (genvar k = 0; k < P_MOD; k++) begin : g_om
    logic  ov [M_MID];
    cell_t oc [M_MID];
    logic  pv [N_IN], pr [N_IN], av [N_IN], ar [N_IN];
    cell_t pc [N_IN];
    ack_t  ak [N_IN];
    for (genvar j = 0; j < M_MID; j++) begin : g_l
      assign ov[j] = l2_valid[j][k];
      assign oc[j] = l2_cell[j][k];
    end
    for (genvar p = 0; p < N_IN; p++) begin : g_p
      assign out_valid_o[k*N_IN + p]  = pv[p];
      assign out_cell_o[k*N_IN + p]   = pc[p];
      assign pr[p]                    = out_ready_i[k*N_IN + p];
      assign op_ack_valid[k*N_IN + p] = av[p];
      assign op_ack[k*N_IN + p]       = ak[p];
      assign ar[p]                    = op_ack_ready[k*N_IN + p];
    end
    output_module #(.MOD_ID(k), .WIN(WIN), .OQ_DEPTH(OQ_DEPTH), .AQ_DEPTH(AQ_DEPTH)) u_om (
      .clk, .rst_n, .cm_valid_i(ov), .cm_cell_i(oc),
      .out_valid_o(pv), .out_cell_o(pc), .out_ready_i(pr),
      .ack_valid_o(av), .ack_o(ak), .ack_ready_i(ar)
    );
  end

  ack_return #(.N_OP(N_OP)) u_ack (
    .clk, .rst_n, .op_valid_i(op_ack_valid), .op_ack_i(op_ack), .op_ready_o(op_ack_ready),
    .src_valid_o(ack_valid_o), .src_ack_o(ack_o)
  );
endmodule
