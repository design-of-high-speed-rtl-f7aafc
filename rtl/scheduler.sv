// Scheduler: the core of the multi-level buffer.
//
// It runs the receiving controller (rx_ctrl) and the sending controller
// (tx_ctrl) side by side, so one packet can come in from a receive buffer
// while another goes out to a send buffer. Both reach the shared ZBT SRAM
// through zbt_controller's lock, the sending side first; the header buffer
// is dual-ported and needs no arbitration.
//
// Besides the two controllers it owns:
//   - the header slot allocator: a busy bit per slot; the receiving
//     controller takes the lowest free slot, the sending controller frees
//     it when the last copy has been written;
//   - the function module interface: the receiving controller's request
//     (slot, arrival port, length, MAC addresses) goes out on fm_rq_*; the
//     answer (slot, export mask, length) comes back on fm_res_* and is
//     queued, in order, for the sending controller. The queue has one entry
//     per slot and so cannot overflow.
//
// The split into receiving and sending controllers working in parallel,
// with the header buffer in between and the function module consulted for
// the export, follows the design; slots and the queue are this design's.
module scheduler
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
  input  logic [N-1:0]      rxb_head_valid,
  input  len_t              rxb_head_len [N],
  input  logic [FW-1:0]     rxb_free     [N],
  input  logic [N-1:0]      rxb_full,
  output logic [N-1:0]      rxb_pop,
  input  word_t             rxb_rd_data  [N],
  input  logic [N-1:0]      rxb_rd_valid,
  // send buffers
  input  logic [FW-1:0]     txb_free     [N],
  output logic [N-1:0]      txb_wr_start,
  output len_t              txb_wr_len,
  output logic [N-1:0]      txb_wr_en,
  output word_t             txb_wr_data,
  // header buffer
  output logic              hb_we,
  output logic [HBAW-1:0]   hb_waddr,
  output word_t             hb_wdata,
  output logic              hb_re,
  output logic [HBAW-1:0]   hb_raddr,
  input  word_t             hb_rdata,
  // ZBT controller, receiving side
  output logic              zr_req,
  input  logic              zr_gnt,
  output logic              zr_cmd_valid,
  output logic [ZBT_AW-1:0] zr_cmd_addr,
  output word_t             zr_cmd_wdata,
  // ZBT controller, sending side
  output logic              zt_req,
  input  logic              zt_gnt,
  output logic              zt_cmd_valid,
  output logic [ZBT_AW-1:0] zt_cmd_addr,
  input  logic              zt_rvalid,
  input  word_t             zt_rdata,
  // function module
  output logic              fm_rq_valid,
  input  logic              fm_rq_ready,
  output logic [SW-1:0]     fm_rq_slot,
  output logic [PW-1:0]     fm_rq_port,
  output len_t              fm_rq_len,
  output logic [47:0]       fm_rq_dst,
  output logic [47:0]       fm_rq_src,
  input  logic              fm_res_valid,
  input  logic [SW-1:0]     fm_res_slot,
  input  logic [N-1:0]      fm_res_mask,
  input  len_t              fm_res_len,
  // events
  output logic              ev_rx_big,
  output logic              ev_rx_bypass,
  output logic              ev_rx_lock_wait,
  output logic              ev_rx_full_pick,
  output logic              ev_tx_sent,
  output logic              ev_tx_space_wait,
  output logic              ev_tx_lock_wait,
  output logic              ev_tx_filtered,
  output logic              ev_slots_empty   // a packet waits for a header slot
);
  // ---------------- header slot allocator ----------------
  logic [SLOTS-1:0] busy;
  logic             slot_avail, slot_take, slot_free;
  logic [SW-1:0]    slot_id, slot_free_id;

  always_comb begin
    slot_avail = 1'b0;
    slot_id    = '0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (!busy[i]) begin slot_avail = 1'b1; slot_id = SW'(i); end
  end

  always_ff @(posedge clk) begin
    if (rst) busy <= '0;
    else begin
      if (slot_free) busy[slot_free_id] <= 1'b0;
      if (slot_take) busy[slot_id]      <= 1'b1;
    end
  end

  assign ev_slots_empty = !slot_avail && (|rxb_head_valid);

  // ---------------- receiving controller ----------------
  rx_ctrl #(.N(N), .SLOTS(SLOTS), .ZBT_AW(ZBT_AW), .ZBT_SLOT_WORDS(ZBT_SLOT_WORDS),
            .FW(FW), .TOL(TOL)) u_rx (
    .clk, .rst,
    .head_valid(rxb_head_valid), .head_len(rxb_head_len), .rx_free(rxb_free),
    .rx_full(rxb_full), .pop(rxb_pop), .rd_data(rxb_rd_data), .rd_valid(rxb_rd_valid),
    .slot_avail, .slot_id, .slot_take,
    .hb_we, .hb_addr(hb_waddr), .hb_wdata,
    .zbt_req(zr_req), .zbt_gnt(zr_gnt), .zbt_cmd_valid(zr_cmd_valid),
    .zbt_cmd_addr(zr_cmd_addr), .zbt_cmd_wdata(zr_cmd_wdata),
    .rq_valid(fm_rq_valid), .rq_ready(fm_rq_ready), .rq_slot(fm_rq_slot),
    .rq_port(fm_rq_port), .rq_len(fm_rq_len), .rq_dst(fm_rq_dst), .rq_src(fm_rq_src),
    .ev_big(ev_rx_big), .ev_bypass(ev_rx_bypass), .ev_lock_wait(ev_rx_lock_wait),
    .ev_full_pick(ev_rx_full_pick));

  // ---------------- routed-packet queue ----------------
  typedef struct packed {
    logic [SW-1:0] slot;
    logic [N-1:0]  mask;
    len_t          len;
  } route_t;

  route_t q_in, q_out;
  logic   q_empty, q_full, q_pop;
  assign q_in = '{slot: fm_res_slot, mask: fm_res_mask, len: fm_res_len};

  sync_fifo #(.WIDTH($bits(route_t)), .DEPTH(SLOTS)) u_q (
    .clk, .rst, .wr_en(fm_res_valid), .wr_data(q_in), .rd_en(q_pop),
    .rd_data(q_out), .empty(q_empty), .full(q_full));

  // ---------------- sending controller ----------------
  tx_ctrl #(.N(N), .SLOTS(SLOTS), .ZBT_AW(ZBT_AW), .ZBT_SLOT_WORDS(ZBT_SLOT_WORDS),
            .FW(FW)) u_tx (
    .clk, .rst,
    .q_valid(!q_empty), .q_slot(q_out.slot), .q_mask(q_out.mask), .q_len(q_out.len),
    .q_pop,
    .tx_free(txb_free), .wr_start(txb_wr_start), .wr_len(txb_wr_len),
    .wr_en(txb_wr_en), .wr_data(txb_wr_data),
    .hb_en(hb_re), .hb_addr(hb_raddr), .hb_rdata,
    .zbt_req(zt_req), .zbt_gnt(zt_gnt), .zbt_cmd_valid(zt_cmd_valid),
    .zbt_cmd_addr(zt_cmd_addr), .zbt_rvalid(zt_rvalid), .zbt_rdata(zt_rdata),
    .slot_free, .slot_free_id,
    .ev_sent(ev_tx_sent), .ev_space_wait(ev_tx_space_wait),
    .ev_lock_wait(ev_tx_lock_wait), .ev_filtered(ev_tx_filtered));

  a_queue_room: assert property (@(posedge clk) disable iff (rst) fm_res_valid |-> !q_full);
  a_slot_take_free: assert property (@(posedge clk) disable iff (rst) slot_take |-> slot_avail);
endmodule
