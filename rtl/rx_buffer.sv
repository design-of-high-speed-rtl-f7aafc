// Receive buffer of one port.
//
// Bytes from the MAC (8 bits) are packed into 32-bit words, first byte in
// bits 7:0, and written into a block-RAM ring. Every packet is stored whole:
// one descriptor word (length in bytes) followed by ceil(len/4) data words.
// The unused bytes of the last word are simply wasted; packets are never
// packed across a word boundary, which keeps the scheduler side simple and
// costs at most 3 bytes per packet (a 65-byte packet uses 18 words).
//
// Write side: mac_valid/mac_data/mac_last, one byte per clock, no
// backpressure. The descriptor is written in the clock after mac_last, so
// the next packet must start at least one clock after mac_last (Ethernet's
// inter-frame gap gives twenty). A packet is dropped, and its space given
// back, when it would overflow the ring, is longer than MAX_PKT_BYTES or
// shorter than MIN_PKT_BYTES; rx_drop pulses.
//
// Read side: when a committed packet is at the head, head_valid is high and
// head_len gives its length. Each pop reads one data word; it appears on
// rd_data with rd_valid one clock later. After the last word is popped the
// next descriptor is fetched (head_valid returns three clocks later).
// free_words and full (less space than one maximum-size packet plus its
// descriptor) feed the scheduler's priority rule.
//
// The one-descriptor-word format, the drop rules and the full threshold are
// this design's choices; whole-packet storage in block RAM, the 8-to-32-bit
// widening and wasting the tail of the last word follow the design.
module rx_buffer
  import gbuf_pkg::*;
#(
  parameter int unsigned DEPTH_WORDS = 1024,
  parameter int unsigned MAX_BYTES   = MAX_PKT_BYTES,
  parameter int unsigned MIN_BYTES   = MIN_PKT_BYTES,
  localparam int unsigned AW = $clog2(DEPTH_WORDS)
) (
  input  logic        clk,
  input  logic        rst,
  // MAC receive stream
  input  logic        mac_valid,
  input  logic [7:0]  mac_data,
  input  logic        mac_last,
  output logic        rx_commit,   // pulse: a packet was stored
  output logic        rx_drop,     // pulse: a packet was thrown away
  // scheduler side
  output logic        head_valid,
  output len_t        head_len,
  input  logic        pop,
  output word_t       rd_data,
  output logic        rd_valid,
  output logic [AW:0] free_words,
  output logic        full
);
  localparam int unsigned FULL_WORDS = (MAX_BYTES + 3) / 4 + 1;

  word_t mem [DEPTH_WORDS];

  // ---------------- write side ----------------
  logic [AW:0] wptr, wcommit, rptr;
  logic [AW-1:0] pkt_base;
  logic        in_pkt, dropping, desc_pend;
  logic [1:0]  bidx;
  word_t       acc;
  len_t        len_cnt, desc_len;

  logic        mem_we;
  logic [AW-1:0] mem_waddr;
  word_t       mem_wdata;

  logic [AW:0] used_w;
  assign used_w = wptr - rptr;

  // byte being accepted and the word it completes
  word_t       acc_next;
  logic        word_done, first_byte, no_room, too_long;
  logic [AW:0] wr_pos;    // where the data word of this byte goes
  always_comb begin
    first_byte = mac_valid && !in_pkt;
    acc_next   = first_byte ? '0 : acc;
    acc_next[8*bidx +: 8] = mac_data;
    word_done  = mac_valid && (bidx == 2'd3 || mac_last);
    // the first byte of a packet reserves the descriptor word at wcommit
    wr_pos     = first_byte ? wcommit + 1'b1 : wptr;
    no_room    = (wr_pos - rptr) >= (AW+1)'(DEPTH_WORDS);
    too_long   = (first_byte ? len_t'(1) : len_cnt + 1'b1) > len_t'(MAX_BYTES);
  end

  logic drop_now, short_pkt;
  assign short_pkt = mac_last && ((first_byte ? len_t'(1) : len_cnt + 1'b1) < len_t'(MIN_BYTES));
  assign drop_now  = mac_valid && !(in_pkt && dropping) &&
                     ((word_done && no_room) || too_long || short_pkt);

  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = wr_pos[AW-1:0];
    mem_wdata = acc_next;
    if (desc_pend) begin
      mem_we    = 1'b1;
      mem_waddr = pkt_base;
      mem_wdata = make_desc(desc_len);
    end else if (word_done && !drop_now && !(in_pkt && dropping)) begin
      mem_we = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_waddr] <= mem_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr      <= '0;
      wcommit   <= '0;
      pkt_base  <= '0;
      in_pkt    <= 1'b0;
      dropping  <= 1'b0;
      desc_pend <= 1'b0;
      bidx      <= '0;
      acc       <= '0;
      len_cnt   <= '0;
      desc_len  <= '0;
      rx_commit <= 1'b0;
      rx_drop   <= 1'b0;
    end else begin
      rx_commit <= 1'b0;
      rx_drop   <= 1'b0;
      if (desc_pend) begin
        desc_pend <= 1'b0;
        wcommit   <= wptr;
        rx_commit <= 1'b1;
      end
      if (mac_valid) begin
        if (first_byte) pkt_base <= wcommit[AW-1:0];
        in_pkt  <= !mac_last;
        len_cnt <= first_byte ? len_t'(1) : len_cnt + 1'b1;
        if ((in_pkt && dropping) || drop_now) begin
          dropping <= !mac_last;
          bidx     <= '0;
          wptr     <= wcommit;
          if (drop_now) rx_drop <= 1'b1;
        end else begin
          dropping <= 1'b0;
          acc      <= acc_next;
          bidx     <= mac_last ? 2'd0 : bidx + 1'b1;
          if (word_done) wptr <= wr_pos + 1'b1;
          else if (first_byte) wptr <= wr_pos;
          if (mac_last) begin
            desc_pend <= 1'b1;
            desc_len  <= first_byte ? len_t'(1) : len_cnt + 1'b1;
          end
        end
      end
    end
  end

  // ---------------- read side ----------------
  logic  fetch_q, issue_fetch;
  len_t  rem;
  word_t rdata_q;

  assign issue_fetch = !head_valid && !fetch_q && (rptr != wcommit);

  always_ff @(posedge clk) begin
    if (issue_fetch || pop) rdata_q <= mem[rptr[AW-1:0]];
  end
  assign rd_data = rdata_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      rptr       <= '0;
      fetch_q    <= 1'b0;
      rd_valid   <= 1'b0;
      head_valid <= 1'b0;
      head_len   <= '0;
      rem        <= '0;
    end else begin
      fetch_q  <= issue_fetch;
      rd_valid <= pop;
      if (issue_fetch || pop) rptr <= rptr + 1'b1;
      if (fetch_q) begin
        head_valid <= 1'b1;
        head_len   <= rdata_q[LEN_W-1:0];
        rem        <= words_of(rdata_q[LEN_W-1:0]);
      end else if (pop) begin
        rem <= rem - 1'b1;
        if (rem == len_t'(1)) head_valid <= 1'b0;
      end
    end
  end

  assign free_words = (AW+1)'(DEPTH_WORDS) - used_w;
  assign full       = free_words < (AW+1)'(FULL_WORDS);

  a_pop_only_head: assert property (@(posedge clk) disable iff (rst) pop |-> head_valid && !fetch_q);
  a_gap_after_last: assert property (@(posedge clk) disable iff (rst) desc_pend |-> !mac_valid);
endmodule
