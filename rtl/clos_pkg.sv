// clos_pkg: shared geometry and word formats of the 16x16 OQMB Clos switch.
//
// The switch is a three-stage Clos network C(n, m, p) = C(4, 4, 4): four
// bufferless input modules (IM) of four ports each, four buffered central
// modules (CM) and four buffered output modules (OM). A port address is four
// bits: the upper two bits are the ID of the module (00, 01, 10, 11) and the
// lower two the port inside it.
//
// A packet carries a 4-bit destination address and 4 bits of data, the 8-bit
// word {dst, data} of the original design, plus the sender's address and a
// packet number. The packet number counts the packets of one source to one
// destination; the output stage uses it to restore their order. Its width is
// a choice of this implementation.
//
// An acknowledgement word is {src, code, hdr}: the address of the source it
// goes back to, 01 for ACK or 11 for NACK, and a 2-bit header. Here the
// header holds the two low bits of the packet number; the full packet number
// and the answering port travel with it.
package clos_pkg;

  localparam int unsigned N_IN   = 4;              // n: ports per input module
  localparam int unsigned M_MID  = 4;              // m: central modules
  localparam int unsigned P_MOD  = 4;              // p: input (and output) modules
  localparam int unsigned N_PORTS = N_IN * P_MOD;  // 16 ports

  localparam int unsigned ADDR_W = $clog2(N_PORTS); // 4
  localparam int unsigned MOD_W  = $clog2(P_MOD);   // 2: module ID
  localparam int unsigned LOC_W  = $clog2(N_IN);    // 2: port within module
  localparam int unsigned DATA_W = 4;
  localparam int unsigned SEQ_W  = 4;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [SEQ_W-1:0]  seq_t;

  typedef struct packed {
    seq_t  seq;   // packet number of this source->destination flow
    addr_t src;   // sender (user) address, checked by the input stage
    addr_t dst;   // destination port address
    data_t data;  // payload
  } cell_t;

  typedef enum logic [1:0] {
    ACK_NONE = 2'b00,
    ACK_OK   = 2'b01,
    ACK_NACK = 2'b11
  } ack_code_e;

  typedef struct packed {
    addr_t     src;   // source the answer goes back to
    ack_code_e code;  // ACK (01) or NACK (11)
    logic [1:0] hdr;  // header: low bits of the packet number
    seq_t      seq;   // packet number being answered
    addr_t     from;  // output port that answers
  } ack_t;

  function automatic logic [MOD_W-1:0] mod_of(addr_t a);
    return a[ADDR_W-1 -: MOD_W];
  endfunction

  function automatic logic [LOC_W-1:0] loc_of(addr_t a);
    return a[LOC_W-1:0];
  endfunction

endpackage
