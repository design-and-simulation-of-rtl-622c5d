// input_module: bufferless first-stage switch of the OQMB Clos network.
//
// Each of the N inputs first goes through ID matching: the sender address of
// the packet must equal the address of the port it arrives on, {MOD_ID, i};
// a packet that fails is refused (reject_o pulses) and goes no further. A
// packet that passes is sent, in the same cycle, to the central module the
// DSRR pattern connects its input to. The module stores nothing: at most one
// cell arrives per input and slot and the DSRR pattern gives every input its
// own link, so no cell ever waits here.
//
// Timing: combinational from in_* to cm_*; the DSRR slot counter is the only
// state. cm_valid_o[j]/cm_cell_o[j] drive the link to central module j.
//
// Origin: the bufferless first stage, ID matching of users against ports and
// DSRR dispatch follow the OQMB design. Dropping a refused packet without an
// answer is a choice of this implementation.
module input_module
  import clos_pkg::*;
#(
  parameter int unsigned MOD_ID = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid_i [N_IN],
  input  cell_t in_cell_i  [N_IN],
  output logic  reject_o   [N_IN],
  output logic  cm_valid_o [M_MID],
  output cell_t cm_cell_o  [M_MID]
);
  logic [$clog2(M_MID)-1:0] conn   [N_IN];
  logic [$clog2(N_IN)-1:0]  src    [M_MID];
  logic                     src_vld[M_MID];
  logic [$clog2(M_MID)-1:0] slot;
  logic                     pass   [N_IN];

  dsrr_ctrl #(.N(N_IN), .M(M_MID), .MOD_ID(MOD_ID)) u_dsrr (
    .clk, .rst_n, .conn_o(conn), .src_o(src), .src_vld_o(src_vld), .slot_o(slot)
  );

  for (genvar i = 0; i < N_IN; i++) begin : g_id
    localparam logic [ADDR_W-1:0] PORT_ID = ADDR_W'(MOD_ID * N_IN + i);
    id_match #(.ID_W(ADDR_W)) u_id (
      .valid_i(in_valid_i[i]), .pkt_id_i(in_cell_i[i].src), .my_id_i(PORT_ID),
      .pass_o(pass[i]), .reject_o(reject_o[i])
    );
  end

  always_comb begin
    for (int j = 0; j < M_MID; j++) begin
      cm_valid_o[j] = src_vld[j] && pass[src[j]];
      cm_cell_o[j]  = in_cell_i[src[j]];
    end
  end
endmodule
