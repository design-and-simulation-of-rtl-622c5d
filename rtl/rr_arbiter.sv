// rr_arbiter: round-robin arbiter.
//
// Grants one of N requests, searching from the position after the last
// granted one, so every steady requester is served within N grants. The
// search is done as two fixed-priority picks: the lowest request at or above
// the pointer, else the lowest request overall. The pointer moves only in a
// cycle where en_i is high and a grant is given (the grant was used). Grant
// is combinational from req_i.
//
// Origin: the OQMB design has no scheduler and names no arbiter; this helper
// only shares single resources (one delivery or one answer per cycle) and is
// a choice of this implementation.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req_i,
  input  logic                 en_i,
  output logic [N-1:0]         gnt_o,
  output logic [$clog2(N)-1:0] gnt_idx_o,
  output logic                 gnt_valid_o
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] ptr_q;   // highest priority position
  logic [N-1:0]  upper;   // requests at or above the pointer
  logic          hit_hi, hit_lo;
  logic [IW-1:0] idx_hi, idx_lo;

  always_comb begin
    hit_hi = 1'b0;
    hit_lo = 1'b0;
    idx_hi = '0;
    idx_lo = '0;
    for (int i = N - 1; i >= 0; i--) begin
      upper[i] = req_i[i] && (IW'(i) >= ptr_q);
      if (upper[i]) begin hit_hi = 1'b1; idx_hi = IW'(i); end
      if (req_i[i]) begin hit_lo = 1'b1; idx_lo = IW'(i); end
    end
    gnt_valid_o = hit_lo;
    gnt_idx_o   = hit_hi ? idx_hi : idx_lo;
    gnt_o       = '0;
    if (hit_lo) gnt_o[gnt_idx_o] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else if (en_i && gnt_valid_o)
      ptr_q <= (gnt_idx_o == IW'(N - 1)) ? '0 : gnt_idx_o + 1'b1;
  end
endmodule
