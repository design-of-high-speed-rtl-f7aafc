// Sending controller of the scheduler.
//
// It takes routed packets in order from the scheduler's queue: header slot,
// length and the export port mask returned by the function module. For each
// port in the mask, lowest first, it waits until that port's send buffer
// has room for the whole packet (descriptor plus ceil(len/4) words) and,
// for a packet longer than HDR_BYTES, until it holds the ZBT SRAM lock. It
// then writes the descriptor and copies the packet: words 0..HDR_WORDS-1
// from the header buffer (read latency 1), the rest from the slot's ZBT
// region (read latency LAT+2). One read is issued per clock; since the SRAM
// reads follow the header reads and take longer, words arrive in order and
// are written to the send buffer as they arrive. When every port in the
// mask has its copy the header slot is freed. An empty mask (the function
// module filtered the packet) frees the slot at once.
//
// The SRAM lock is asked for only once the send buffer has room, so a full
// send buffer never keeps the receiving side out of the SRAM. The lock
// request of the sending side wins over the receiving side's
// (zbt_controller). Taking the export from the function module's answer
// and reading from header buffer or ZBT SRAM follow the design; sending a
// multi-port mask one port after another is this design's choice.
module tx_ctrl
  import gbuf_pkg::*;
#(
  parameter int unsigned N              = 4,
  parameter int unsigned SLOTS          = 64,
  parameter int unsigned ZBT_AW         = 18,
  parameter int unsigned ZBT_SLOT_WORDS = 512,
  parameter int unsigned FW             = 11,
  localparam int unsigned PW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW   = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned HBAW = $clog2(SLOTS * HDR_WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  // queue of routed packets
  input  logic              q_valid,
  input  logic [SW-1:0]     q_slot,
  input  logic [N-1:0]      q_mask,
  input  len_t              q_len,
  output logic              q_pop,
  // send buffers
  input  logic [FW-1:0]     tx_free [N],
  output logic [N-1:0]      wr_start,
  output len_t              wr_len,
  output logic [N-1:0]      wr_en,
  output word_t             wr_data,
  // header buffer read port
  output logic              hb_en,
  output logic [HBAW-1:0]   hb_addr,
  input  word_t             hb_rdata,
  // ZBT SRAM lock and reads
  output logic              zbt_req,
  input  logic              zbt_gnt,
  output logic              zbt_cmd_valid,
  output logic [ZBT_AW-1:0] zbt_cmd_addr,
  input  logic              zbt_rvalid,
  input  word_t             zbt_rdata,
  // slot release
  output logic              slot_free,
  output logic [SW-1:0]     slot_free_id,
  // events
  output logic              ev_sent,       // one copy finished
  output logic              ev_space_wait, // send buffer too full, waiting
  output logic              ev_lock_wait,  // waiting for the SRAM lock
  output logic              ev_filtered    // packet with empty mask
);
  typedef enum logic [1:0] {T_IDLE, T_PICK, T_WAIT, T_COPY} state_t;
  state_t state;

  logic [SW-1:0] slot;
  logic [N-1:0]  mask;
  len_t          len, n_words, issued, recvd;
  logic [PW-1:0] port;
  logic          big, hb_pend, any_sent;

  assign big     = len > len_t'(HDR_BYTES);
  assign n_words = words_of(len);

  logic [PW-1:0] low_port;
  always_comb begin
    low_port = '0;
    for (int i = N - 1; i >= 0; i--) if (mask[i]) low_port = PW'(i);
  end

  logic room;
  assign room = 32'(tx_free[port]) >= 32'(n_words) + 1;

  logic go;
  assign go            = (state == T_WAIT) && room && (!big || zbt_gnt);
  assign zbt_req       = big && ((state == T_WAIT && room) || state == T_COPY);
  assign ev_space_wait = (state == T_WAIT) && !room;
  assign ev_lock_wait  = (state == T_WAIT) && room && big && !zbt_gnt;
  assign q_pop         = (state == T_IDLE) && q_valid;

  assign wr_len   = len;
  assign wr_start = go ? (N'(1) << port) : '0;

  logic issue, issue_hdr;
  assign issue     = (state == T_COPY) && (issued != n_words);
  assign issue_hdr = issued < len_t'(HDR_WORDS);
  assign hb_en         = issue && issue_hdr;
  assign hb_addr       = HBAW'(32'(slot) * HDR_WORDS + 32'(issued));
  assign zbt_cmd_valid = issue && !issue_hdr;
  assign zbt_cmd_addr  = ZBT_AW'(32'(slot) * ZBT_SLOT_WORDS + 32'(issued) - HDR_WORDS);

  logic  data_valid;
  assign data_valid = (state == T_COPY) && (hb_pend || zbt_rvalid);
  assign wr_data    = hb_pend ? hb_rdata : zbt_rdata;
  assign wr_en      = data_valid ? (N'(1) << port) : '0;

  assign slot_free    = (state == T_PICK) && (mask == '0);
  assign slot_free_id = slot;
  assign ev_filtered  = slot_free && !any_sent;
  assign ev_sent      = data_valid && (recvd + 1'b1 == n_words);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= T_IDLE;
      slot     <= '0;
      mask     <= '0;
      len      <= '0;
      port     <= '0;
      issued   <= '0;
      recvd    <= '0;
      hb_pend  <= 1'b0;
      any_sent <= 1'b0;
    end else begin
      hb_pend <= hb_en;
      case (state)
        T_IDLE: if (q_valid) begin
          slot     <= q_slot;
          mask     <= q_mask;
          len      <= q_len;
          any_sent <= 1'b0;
          state    <= T_PICK;
        end
        T_PICK: if (mask == '0) state <= T_IDLE;
                else begin
                  port  <= low_port;
                  state <= T_WAIT;
                end
        T_WAIT: if (go) begin
          issued <= '0;
          recvd  <= '0;
          state  <= T_COPY;
        end
        T_COPY: begin
          if (issue) issued <= issued + 1'b1;
          if (data_valid) begin
            recvd <= recvd + 1'b1;
            if (recvd + 1'b1 == n_words) begin
              mask[port] <= 1'b0;
              any_sent   <= 1'b1;
              state      <= T_PICK;
            end
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  a_in_order: assert property (@(posedge clk) disable iff (rst) !(hb_pend && zbt_rvalid));
endmodule
