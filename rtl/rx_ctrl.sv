// Receiving controller of the scheduler.
//
// In IDLE it looks at the head packet of every receive buffer and picks one
// with rx_priority_arbiter (full buffers first, then least free space, polling
// among equals). It also needs a free header slot. A packet of at most
// HDR_BYTES lives entirely in its header slot. A longer one also needs the
// external ZBT SRAM, so the controller asks for the SRAM lock in the same
// clock:
//   - lock granted: move the packet, first HDR_WORDS words to the header
//     slot, the rest to the slot's ZBT region (slot*ZBT_SLOT_WORDS + k).
//   - lock refused (the sending controller holds it): take instead the best
//     head packet that is small enough to need no SRAM, if there is one
//     (ev_bypass); otherwise wait and ask again next clock (ev_lock_wait).
// COPY pops one word per clock from the chosen buffer; words come back one
// clock later and are written straight on. The first three words carry the
// destination and source MAC addresses, which are kept for the function
// module. DONE hands {slot, port, length, addresses} to the function module
// with a valid/ready handshake and returns to IDLE.
//
// Timing: a packet of W words takes W+3 clocks from the IDLE decision to
// the next IDLE. The ZBT lock is held from the decision until the last
// word is written.
//
// The selection rule, the lock attempt and the fall-back to a small packet
// follow the design's parallel schedule algorithm; the fixed per-slot SRAM
// region and the handshake are this design's choices.
module rx_ctrl
  import gbuf_pkg::*;
#(
  parameter int unsigned N              = 4,
  parameter int unsigned SLOTS          = 64,
  parameter int unsigned ZBT_AW         = 18,
  parameter int unsigned ZBT_SLOT_WORDS = 512,
  parameter int unsigned FW             = 11,
  parameter int unsigned TOL            = 32,
  localparam int unsigned PW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW   = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned HBAW = $clog2(SLOTS * HDR_WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  // receive buffers
  input  logic [N-1:0]      head_valid,
  input  len_t              head_len   [N],
  input  logic [FW-1:0]     rx_free    [N],
  input  logic [N-1:0]      rx_full,
  output logic [N-1:0]      pop,
  input  word_t             rd_data    [N],
  input  logic [N-1:0]      rd_valid,
  // header slot allocator
  input  logic              slot_avail,
  input  logic [SW-1:0]     slot_id,
  output logic              slot_take,
  // header buffer write port
  output logic              hb_we,
  output logic [HBAW-1:0]   hb_addr,
  output word_t             hb_wdata,
  // ZBT SRAM lock and writes
  output logic              zbt_req,
  input  logic              zbt_gnt,
  output logic              zbt_cmd_valid,
  output logic [ZBT_AW-1:0] zbt_cmd_addr,
  output word_t             zbt_cmd_wdata,
  // request to the function module
  output logic              rq_valid,
  input  logic              rq_ready,
  output logic [SW-1:0]     rq_slot,
  output logic [PW-1:0]     rq_port,
  output len_t              rq_len,
  output logic [47:0]       rq_dst,
  output logic [47:0]       rq_src,
  // events, one-clock pulses
  output logic              ev_big,       // a packet went partly to ZBT SRAM
  output logic              ev_bypass,    // small packet taken, SRAM locked
  output logic              ev_lock_wait, // nothing to do but wait for SRAM
  output logic              ev_full_pick  // choice made by the full rule
);
  typedef enum logic [1:0] {S_IDLE, S_COPY, S_DONE} state_t;
  state_t state;

  logic [PW-1:0] rr, cur;
  logic          cur_big;
  logic [SW-1:0] cur_slot;
  len_t          cur_len, n_words, issued, recvd;
  word_t         w0, w1, w2;

  // ---------------- choice ----------------
  logic [N-1:0]  is_small;
  logic          a_valid, a_full, b_valid, b_full;
  logic [PW-1:0] a_grant, b_grant;
  always_comb
    for (int i = 0; i < N; i++)
      is_small[i] = head_valid[i] && (head_len[i] <= len_t'(HDR_BYTES));

  rx_priority_arbiter #(.N(N), .FW(FW), .TOL(TOL)) u_arb_all (
    .req(head_valid), .full(rx_full), .free_words(rx_free), .rr(rr),
    .grant_valid(a_valid), .grant(a_grant), .grant_full(a_full));
  rx_priority_arbiter #(.N(N), .FW(FW), .TOL(TOL)) u_arb_small (
    .req(is_small), .full(rx_full), .free_words(rx_free), .rr(rr),
    .grant_valid(b_valid), .grant(b_grant), .grant_full(b_full));

  logic          want_big, start, start_big;
  logic [PW-1:0] start_port;
  always_comb begin
    want_big   = (state == S_IDLE) && slot_avail && a_valid && !is_small[a_grant];
    start      = 1'b0;
    start_big  = 1'b0;
    start_port = a_grant;
    ev_bypass    = 1'b0;
    ev_lock_wait = 1'b0;
    ev_full_pick = 1'b0;
    if (state == S_IDLE && slot_avail && a_valid) begin
      if (is_small[a_grant]) begin
        start = 1'b1;
        ev_full_pick = a_full;
      end else if (zbt_gnt) begin
        start     = 1'b1;
        start_big = 1'b1;
        ev_full_pick = a_full;
      end else if (b_valid) begin
        start      = 1'b1;
        start_port = b_grant;
        ev_bypass  = 1'b1;
        ev_full_pick = b_full;
      end else begin
        ev_lock_wait = 1'b1;
      end
    end
  end
  assign ev_big    = start_big;
  assign slot_take = start;
  assign zbt_req   = want_big || (state == S_COPY && cur_big);

  // ---------------- copy ----------------
  word_t cur_data;
  logic  cur_valid;
  assign cur_data  = rd_data[cur];
  assign cur_valid = rd_valid[cur] && (state == S_COPY);

  always_comb begin
    pop = '0;
    if (state == S_COPY && issued != n_words) pop[cur] = 1'b1;
  end

  logic in_hdr;
  assign in_hdr   = recvd < len_t'(HDR_WORDS);
  assign hb_we    = cur_valid && in_hdr;
  assign hb_addr  = HBAW'(32'(cur_slot) * HDR_WORDS + 32'(recvd));
  assign hb_wdata = cur_data;
  assign zbt_cmd_valid = cur_valid && !in_hdr;
  assign zbt_cmd_addr  = ZBT_AW'(32'(cur_slot) * ZBT_SLOT_WORDS + 32'(recvd) - HDR_WORDS);
  assign zbt_cmd_wdata = cur_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      rr       <= '0;
      cur      <= '0;
      cur_big  <= 1'b0;
      cur_slot <= '0;
      cur_len  <= '0;
      n_words  <= '0;
      issued   <= '0;
      recvd    <= '0;
      w0 <= '0; w1 <= '0; w2 <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state    <= S_COPY;
          cur      <= start_port;
          cur_big  <= start_big;
          cur_slot <= slot_id;
          cur_len  <= head_len[start_port];
          n_words  <= words_of(head_len[start_port]);
          issued   <= '0;
          recvd    <= '0;
        end
        S_COPY: begin
          if (issued != n_words) issued <= issued + 1'b1;
          if (cur_valid) begin
            recvd <= recvd + 1'b1;
            if (recvd == 0) w0 <= cur_data;
            if (recvd == 1) w1 <= cur_data;
            if (recvd == 2) w2 <= cur_data;
            if (recvd + 1'b1 == n_words) state <= S_DONE;
          end
        end
        S_DONE: if (rq_ready) begin
          state <= S_IDLE;
          rr    <= (32'(cur) == N - 1) ? '0 : cur + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // MAC addresses: byte 0 of the packet is the most significant byte
  assign rq_valid = (state == S_DONE);
  assign rq_slot  = cur_slot;
  assign rq_port  = cur;
  assign rq_len   = cur_len;
  assign rq_dst   = {w0[7:0], w0[15:8], w0[23:16], w0[31:24], w1[7:0], w1[15:8]};
  assign rq_src   = {w1[23:16], w1[31:24], w2[7:0], w2[15:8], w2[23:16], w2[31:24]};

  a_lock_held: assert property (@(posedge clk) disable iff (rst) zbt_cmd_valid |-> zbt_gnt);
endmodule
