// nack_table: lossless store of pending NACKs.
//
// A packet that has to be refused is identified by a key made of its
// source address, packet number and, where needed, destination. Because a
// source sends a packet again only after its NACK came back, a key is never
// pending twice, so one bit per possible key is enough and the table can
// never overflow, however many refusals arrive in a cycle. Up to W keys are
// set per cycle. The table offers one pending key per cycle: a round-robin
// arbiter picks a 16-key group with a pending bit, and a second round-robin
// arbiter, shared by all groups, picks a pending bit in that group, so a key
// that is set again and again cannot starve the others. The offered key is
// on out_key_o; its bit is cleared at the clock edge where out_pop_i is high.
//
// Timing: a key set at the end of cycle t can be offered from cycle t+1.
// Reset clears the table.
//
// Origin: the NACK (code 11) and resending on it follow the OQMB design. How
// NACKs are stored and sent (one bit per key, two-level round robin) is a
// choice of this implementation, made so that no NACK can be lost.
module nack_table #(
  parameter int unsigned KEY_W = 8,
  parameter int unsigned W     = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             set_i     [W],
  input  logic [KEY_W-1:0] set_key_i [W],
  output logic             out_valid_o,
  output logic [KEY_W-1:0] out_key_o,
  input  logic             out_pop_i
);
  localparam int unsigned NG = (1 << KEY_W) / 16;   // groups of 16 keys
  localparam int unsigned GW = (NG > 1) ? $clog2(NG) : 1;

  logic [15:0]   bits_q [NG];
  logic [15:0]   bits_d [NG];
  logic [NG-1:0] gany;
  logic [NG-1:0] ggnt;
  logic [GW-1:0] gsel;
  logic          gvld;
  logic [3:0]    bsel;
  logic [15:0]   bgnt;
  logic          bvld;

  always_comb
    for (int g = 0; g < NG; g++) gany[g] = |bits_q[g];

  rr_arbiter #(.N(NG)) u_arb (
    .clk, .rst_n, .req_i(gany), .en_i(out_pop_i),
    .gnt_o(ggnt), .gnt_idx_o(gsel), .gnt_valid_o(gvld)
  );

  rr_arbiter #(.N(16)) u_bit (
    .clk, .rst_n, .req_i(bits_q[gsel]), .en_i(out_pop_i),
    .gnt_o(bgnt), .gnt_idx_o(bsel), .gnt_valid_o(bvld)
  );

  assign out_valid_o = gvld;
  assign out_key_o   = KEY_W'({gsel, bsel});

  // next state: clear the key taken, then set the new ones
  always_comb begin
    for (int g = 0; g < NG; g++) begin
      bits_d[g] = bits_q[g];
      if (gvld && out_pop_i && gsel == GW'(g)) bits_d[g][bsel] = 1'b0;
      for (int w = 0; w < W; w++)
        if (set_i[w] && set_key_i[w][KEY_W-1:4] == GW'(g))
          bits_d[g][set_key_i[w][3:0]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NG; g++) bits_q[g] <= '0;
    end else begin
      for (int g = 0; g < NG; g++) bits_q[g] <= bits_d[g];
    end
  end

  initial begin
    assert (KEY_W >= 5) else $error("nack_table needs at least two groups of 16 keys");
  end
endmodule
