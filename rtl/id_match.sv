// id_match: ID matching section.
//
// A packet is let through only when the ID it carries equals the ID of the
// switch or port that checks it. The input stage uses it to compare the
// sender address of a packet with the address of the port it arrives on
// (unauthorised users are refused); the central and output stages use it to
// compare the module and port fields of the destination address with their
// own ID, which selects the output a packet goes to.
//
// Purely combinational. pass_o = valid_i and a match; reject_o = valid_i and
// no match.
//
// Origin: comparing a user or packet ID with the switch or port ID, and
// passing only matching packets, follows the OQMB design. The combinational
// form and the separate reject output are choices of this implementation.
module id_match #(
  parameter int unsigned ID_W = 2
) (
  input  logic            valid_i,
  input  logic [ID_W-1:0] pkt_id_i,   // ID carried by the packet
  input  logic [ID_W-1:0] my_id_i,    // ID of this switch or port
  output logic            pass_o,
  output logic            reject_o
);
  logic match;
  always_comb begin
    match    = (pkt_id_i == my_id_i);
    pass_o   = valid_i && match;
    reject_o = valid_i && !match;
  end
endmodule
