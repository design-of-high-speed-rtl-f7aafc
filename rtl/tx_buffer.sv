// Send buffer of one port.
//
// The sending controller writes a packet as a start strobe carrying its
// length (stored as a descriptor word) followed by ceil(len/4) 32-bit data
// words, at most one word per clock. The packet becomes visible to the MAC
// side when its last word is written. free_words tells the controller how
// much room is left; it must not start a packet that does not fit (checked
// by an assertion).
//
// MAC side: the buffer unpacks words into bytes, bits 7:0 first, and offers
// them with mac_valid/mac_data/mac_last; a byte moves on each clock that
// mac_ready is high, so a packet leaves at one byte per clock. A two-word
// prefetch queue hides the block-RAM read latency. Reading a descriptor
// costs two clocks between packets.
//
// Same block-RAM organisation and word format as the receive buffer; the
// start/length write protocol and the prefetch queue are this design's own.
module tx_buffer
  import gbuf_pkg::*;
#(
  parameter int unsigned DEPTH_WORDS = 1024,
  localparam int unsigned AW = $clog2(DEPTH_WORDS)
) (
  input  logic        clk,
  input  logic        rst,
  // sending controller side
  input  logic        wr_start,
  input  len_t        wr_len,
  input  logic        wr_en,
  input  word_t       wr_data,
  output logic [AW:0] free_words,
  // MAC transmit stream
  output logic        mac_valid,
  output logic [7:0]  mac_data,
  output logic        mac_last,
  input  logic        mac_ready
);
  word_t mem [DEPTH_WORDS];

  // ---------------- write side ----------------
  logic [AW:0] wptr, wcommit, rptr;
  len_t        wr_left;

  always_ff @(posedge clk) begin
    if (wr_start)   mem[wptr[AW-1:0]] <= make_desc(wr_len);
    else if (wr_en) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr    <= '0;
      wcommit <= '0;
      wr_left <= '0;
    end else if (wr_start) begin
      wptr    <= wptr + 1'b1;
      wr_left <= words_of(wr_len);
    end else if (wr_en) begin
      wptr    <= wptr + 1'b1;
      wr_left <= wr_left - 1'b1;
      if (wr_left == len_t'(1)) wcommit <= wptr + 1'b1;
    end
  end

  assign free_words = (AW+1)'(DEPTH_WORDS) - (wptr - rptr);

  // ---------------- read side ----------------
  typedef enum logic [1:0] {R_IDLE, R_DESC, R_STREAM} rstate_t;
  rstate_t     rstate;
  word_t       rdata_q;
  logic        rd_issue, rd_is_data_q;
  len_t        words_left, bytes_left;
  logic [1:0]  bidx;
  word_t       q [2];
  logic [1:0]  q_cnt;
  logic        q_head;          // index of the oldest queued word
  logic [1:0]  inflight;        // data reads whose word is not yet queued

  logic take;                   // a byte leaves this clock
  logic word_pop;               // the head word is used up
  logic fetch_data;

  assign mac_valid  = (rstate == R_STREAM) && (q_cnt != 0);
  assign mac_data   = q[q_head][8*bidx +: 8];
  assign mac_last   = (bytes_left == len_t'(1));
  assign take       = mac_valid && mac_ready;
  assign word_pop   = take && (bidx == 2'd3 || mac_last);
  assign fetch_data = (rstate == R_STREAM) && (words_left != 0) &&
                      ({1'b0, q_cnt} + {1'b0, inflight} < 3'd2 || (word_pop && {1'b0, q_cnt} + {1'b0, inflight} == 3'd2));
  assign rd_issue   = fetch_data || (rstate == R_IDLE && rptr != wcommit);

  always_ff @(posedge clk) begin
    if (rd_issue) rdata_q <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rstate       <= R_IDLE;
      rptr         <= '0;
      rd_is_data_q <= 1'b0;
      words_left   <= '0;
      bytes_left   <= '0;
      bidx         <= '0;
      q_cnt        <= '0;
      q_head       <= 1'b0;
      inflight     <= '0;
    end else begin
      rd_is_data_q <= fetch_data;
      if (rd_issue) rptr <= rptr + 1'b1;
      case (rstate)
        R_IDLE: if (rd_issue) rstate <= R_DESC;
        R_DESC: begin
          bytes_left <= rdata_q[LEN_W-1:0];
          words_left <= words_of(rdata_q[LEN_W-1:0]);
          bidx       <= '0;
          rstate     <= R_STREAM;
        end
        R_STREAM: begin
          if (fetch_data) words_left <= words_left - 1'b1;
          if (take) begin
            bytes_left <= bytes_left - 1'b1;
            bidx       <= word_pop ? 2'd0 : bidx + 1'b1;
            if (mac_last) rstate <= R_IDLE;
          end
        end
        default: rstate <= R_IDLE;
      endcase
      // prefetch queue bookkeeping
      if (rd_is_data_q) q[q_head ^ q_cnt[0]] <= rdata_q;
      if (word_pop) q_head <= ~q_head;
      q_cnt    <= q_cnt + (rd_is_data_q ? 2'd1 : 2'd0) - (word_pop ? 2'd1 : 2'd0);
      inflight <= inflight + (fetch_data ? 2'd1 : 2'd0) - (rd_is_data_q ? 2'd1 : 2'd0);
    end
  end

  a_fits: assert property (@(posedge clk) disable iff (rst)
                           wr_start |-> 32'(free_words) >= 32'(words_of(wr_len)) + 1);
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) wr_en |-> wr_left != 0);
endmodule
