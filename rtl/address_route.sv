// Function module "address route": decides the export port(s) of a packet.
//
// It keeps a table of ENTRIES learned station addresses. For each request
// it first learns: the source MAC address is entered (or refreshed) with
// the port it arrived on, replacing entries round-robin when the table is
// full; group (multicast/broadcast) source addresses are not learned. It
// then looks up the destination: a known unicast address on another port
// gives that port alone; on the arrival port itself the packet is filtered
// (empty mask); an unknown or group destination goes to all ports except
// the arrival port. The answer carries the slot and length through.
//
// Timing: one request at a time, valid/ready. The request is registered at
// the edge that accepts it; the answer (res_valid, one-clock pulse) is
// registered at the next edge. That is far inside the 40-clock budget a
// function module has per packet. The table search is a parallel
// compare over all entries.
//
// That the router returns the export for the sending controller follows
// the design; the learning-bridge behaviour is this design's choice, since
// the route function itself is not specified.
module address_route #(
  parameter int unsigned N       = 4,
  parameter int unsigned SLOTS   = 64,
  parameter int unsigned ENTRIES = 16,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned EW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          rq_valid,
  output logic          rq_ready,
  input  logic [SW-1:0] rq_slot,
  input  logic [PW-1:0] rq_port,
  input  logic [15:0]   rq_len,
  input  logic [47:0]   rq_dst,
  input  logic [47:0]   rq_src,
  output logic          res_valid,
  output logic [SW-1:0] res_slot,
  output logic [N-1:0]  res_mask,
  output logic [15:0]   res_len,
  output logic          ev_hit       // pulse with res_valid: destination known
);
  typedef struct packed {
    logic          valid;
    logic [47:0]   mac;
    logic [PW-1:0] port;
  } entry_t;
  entry_t tbl [ENTRIES];

  logic [EW-1:0] repl;
  logic          busy;           // stage 1 holds a request
  logic [SW-1:0] s_slot;
  logic [PW-1:0] s_port;
  logic [15:0]   s_len;
  logic [47:0]   s_dst, s_src;

  assign rq_ready = !busy;

  // stage 1: search for source and destination
  logic          src_hit, dst_hit;
  logic [EW-1:0] src_idx;
  logic [PW-1:0] dst_port;
  always_comb begin
    src_hit = 1'b0; src_idx = '0; dst_hit = 1'b0; dst_port = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (tbl[i].valid && tbl[i].mac == s_src) begin src_hit = 1'b1; src_idx = EW'(i); end
      if (tbl[i].valid && tbl[i].mac == s_dst) begin dst_hit = 1'b1; dst_port = tbl[i].port; end
    end
  end

  logic          dst_group, src_group;
  assign dst_group = s_dst[40];      // I/G bit of the first address byte
  assign src_group = s_src[40];

  logic [N-1:0] all_but_src;
  assign all_but_src = ~(N'(1) << s_port);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      repl      <= '0;
      res_valid <= 1'b0;
      res_slot  <= '0;
      res_mask  <= '0;
      res_len   <= '0;
      ev_hit    <= 1'b0;
      s_slot <= '0; s_port <= '0; s_len <= '0; s_dst <= '0; s_src <= '0;
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else begin
      res_valid <= 1'b0;
      ev_hit    <= 1'b0;
      if (rq_valid && rq_ready) begin
        busy   <= 1'b1;
        s_slot <= rq_slot; s_port <= rq_port; s_len <= rq_len;
        s_dst  <= rq_dst;  s_src  <= rq_src;
      end
      if (busy) begin
        busy      <= 1'b0;
        res_valid <= 1'b1;
        res_slot  <= s_slot;
        res_len   <= s_len;
        if (dst_group || !dst_hit) res_mask <= all_but_src;
        else if (dst_port == s_port) res_mask <= '0;
        else res_mask <= N'(1) << dst_port;
        ev_hit <= !dst_group && dst_hit;
        if (!src_group) begin
          if (src_hit) tbl[src_idx].port <= s_port;
          else begin
            tbl[repl] <= '{valid: 1'b1, mac: s_src, port: s_port};
            repl      <= (32'(repl) == ENTRIES - 1) ? '0 : repl + 1'b1;
          end
        end
      end
    end
  end
endmodule
