// Weighted polling choice of the receive buffer to serve next.
//
// Among the requesting buffers (req):
//   1. If any is full, choose a full one; with several, poll: the first at or
//      after the round-robin pointer rr.
//   2. Otherwise prefer the one with the least free space. Buffers whose free
//      space is within TOL words of the least count as equal and are polled
//      the same way.
// Purely combinational; the caller moves rr past the buffer it served.
//
// The rule order follows the design. "Almost equal" is made concrete as
// TOL = 32 words (128 bytes, one header), this design's choice.
module rx_priority_arbiter #(
  parameter int unsigned N    = 4,
  parameter int unsigned FW   = 11,  // width of a free-space count
  parameter int unsigned TOL  = 32,
  localparam int unsigned PW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]    req,
  input  logic [N-1:0]    full,
  input  logic [FW-1:0]   free_words [N],
  input  logic [PW-1:0]   rr,
  output logic            grant_valid,
  output logic [PW-1:0]   grant,
  output logic            grant_full    // the choice was made by rule 1
);
  logic [N-1:0]  full_req, near_min;
  logic [FW-1:0] min_free;
  logic          found;

  always_comb begin
    full_req = req & full;
    // least free space among requesters
    min_free = '1;
    for (int i = 0; i < N; i++)
      if (req[i] && free_words[i] < min_free) min_free = free_words[i];
    for (int i = 0; i < N; i++)
      near_min[i] = req[i] && (32'(free_words[i]) <= 32'(min_free) + TOL);
    // polling from rr over the chosen class
    grant       = '0;
    found       = 1'b0;
    grant_full  = |full_req;
    for (int k = 0; k < N; k++) begin
      logic [PW-1:0] idx;
      idx = PW'((32'(rr) + k) % N);
      if (!found && ((|full_req) ? full_req[idx] : near_min[idx])) begin
        found = 1'b1;
        grant = PW'(idx);
      end
    end
    grant_valid = |req;
  end
endmodule
