// dsrr_ctrl: desynchronized static round-robin (DSRR) connection pattern of
// one input module.
//
// Each input of the module is connected to every central module in turn, one
// time slot (one clock cycle here) each. Input i of input module MOD_ID is
// connected in slot t to central module (i + MOD_ID + t) mod M. Inside one
// module the inputs therefore map one-to-one onto central modules in every
// slot (needs M >= N), so no two cells of a module ever compete for a link;
// the MOD_ID term gives each module a different starting pattern, which is
// the "desynchronized" part. No scheduler and no request/grant is involved.
//
// conn_o[i] is the central module of input i in the current slot; src_o[j]
// is the input connected to central module j and src_vld_o[j] says whether
// one is (always true when M == N). The slot counter starts at 0 at reset and
// advances every cycle.
//
// Origin: the bufferless input stage with a desynchronized static
// round-robin pattern, injective in every slot, follows the OQMB design. The
// formula (i + MOD_ID + slot) mod M and one slot per clock are choices of
// this implementation.
module dsrr_ctrl #(
  parameter int unsigned N      = 4,   // inputs of the module
  parameter int unsigned M      = 4,   // central modules
  parameter int unsigned MOD_ID = 0    // ID of this input module
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [$clog2(M)-1:0] conn_o    [N],
  output logic [$clog2(N)-1:0] src_o     [M],
  output logic                 src_vld_o [M],
  output logic [$clog2(M)-1:0] slot_o
);
  localparam int unsigned MW = $clog2(M);
  logic [MW-1:0] slot_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   slot_q <= '0;
    else if (slot_q == MW'(M - 1)) slot_q <= '0;
    else                           slot_q <= slot_q + 1'b1;
  end

  always_comb begin
    for (int j = 0; j < M; j++) begin
      src_o[j]     = '0;
      src_vld_o[j] = 1'b0;
    end
    for (int i = 0; i < N; i++) begin
      conn_o[i] = MW'((i + MOD_ID + int'(slot_q)) % M);
      src_o[conn_o[i]]     = ($clog2(N))'(i);
      src_vld_o[conn_o[i]] = 1'b1;
    end
  end

  assign slot_o = slot_q;

  initial begin
    assert (M >= N) else $error("DSRR needs M >= N for a contention-free input stage");
  end
endmodule
