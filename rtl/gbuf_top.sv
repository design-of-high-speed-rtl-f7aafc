// Multi-level packet buffer for an N-port gigabit exchange device.
//
// Packets from each port's MAC (8-bit byte stream) are stored whole in that
// port's receive buffer. The scheduler moves them on: the first 128 bytes
// of every packet go into a slot of the on-chip header buffer, anything
// beyond into the external ZBT SRAM. The function module (address_route)
// reads the addresses kept from the header and returns the export port(s);
// the scheduler then copies the packet from header buffer and SRAM into the
// send buffer of each export port, from which the MAC takes it byte by
// byte. Receiving and sending run in parallel; only the SRAM is shared, by
// a lock that the sending side gets first. When the SRAM is locked, the
// receiving side carries on with packets short enough to need none of it.
//
// Interface: per port, mac_rx_* (one byte per clock, no backpressure) and
// mac_tx_* (valid/ready, one byte per clock); the ZBT SRAM pins, with the
// bidirectional data bus split into dq_o/dq_oe/dq_i; per-port pulses for
// stored and dropped packets; and event pulses for observing the scheduler.
// One clock domain (125 MHz for gigabit ports). Synchronous active-high
// reset.
//
// The block structure, 8/32-bit widths, 128-byte headers, four ports and
// equal receive and send buffer sizes follow the design. Buffer depths,
// slot count, SRAM size and layout are this design's choices.
module gbuf_top
  import gbuf_pkg::*;
#(
  parameter int unsigned N              = 4,     // ports
  parameter int unsigned BUF_WORDS      = 1024,  // each receive and each send buffer
  parameter int unsigned SLOTS          = 64,    // header buffer slots
  parameter int unsigned ZBT_AW         = 18,    // ZBT SRAM word address width
  parameter int unsigned ZBT_SLOT_WORDS = 512,   // SRAM region per header slot
  parameter int unsigned ZBT_LAT        = 2,     // pipelined ZBT latency
  parameter int unsigned ROUTE_ENTRIES  = 16,    // learned addresses
  parameter int unsigned TOL            = 32,    // "almost equal" free space, words
  localparam int unsigned FW   = $clog2(BUF_WORDS) + 1,
  localparam int unsigned PW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW   = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned HBAW = $clog2(SLOTS * HDR_WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  // MAC receive streams
  input  logic [N-1:0]      mac_rx_valid,
  input  logic [7:0]        mac_rx_data [N],
  input  logic [N-1:0]      mac_rx_last,
  // MAC transmit streams
  output logic [N-1:0]      mac_tx_valid,
  output logic [7:0]        mac_tx_data [N],
  output logic [N-1:0]      mac_tx_last,
  input  logic [N-1:0]      mac_tx_ready,
  // ZBT SRAM
  output logic              zbt_cs_n,
  output logic              zbt_we_n,
  output logic [ZBT_AW-1:0] zbt_addr,
  output word_t             zbt_dq_o,
  output logic              zbt_dq_oe,
  input  word_t             zbt_dq_i,
  // status
  output logic [N-1:0]      rx_commit,
  output logic [N-1:0]      rx_drop,
  output logic              ev_rx_big,
  output logic              ev_rx_bypass,
  output logic              ev_rx_lock_wait,
  output logic              ev_rx_full_pick,
  output logic              ev_tx_sent,
  output logic              ev_tx_space_wait,
  output logic              ev_tx_lock_wait,
  output logic              ev_tx_filtered,
  output logic              ev_slots_empty,
  output logic              ev_route_hit
);
  // receive buffers
  logic [N-1:0]  rxb_head_valid, rxb_full, rxb_pop, rxb_rd_valid;
  len_t          rxb_head_len [N];
  logic [FW-1:0] rxb_free [N];
  word_t         rxb_rd_data [N];
  // send buffers
  logic [FW-1:0] txb_free [N];
  logic [N-1:0]  txb_wr_start, txb_wr_en;
  len_t          txb_wr_len;
  word_t         txb_wr_data;

  for (genvar p = 0; p < N; p++) begin : g_port
    rx_buffer #(.DEPTH_WORDS(BUF_WORDS)) u_rxb (
      .clk, .rst,
      .mac_valid(mac_rx_valid[p]), .mac_data(mac_rx_data[p]), .mac_last(mac_rx_last[p]),
      .rx_commit(rx_commit[p]), .rx_drop(rx_drop[p]),
      .head_valid(rxb_head_valid[p]), .head_len(rxb_head_len[p]),
      .pop(rxb_pop[p]), .rd_data(rxb_rd_data[p]), .rd_valid(rxb_rd_valid[p]),
      .free_words(rxb_free[p]), .full(rxb_full[p]));

    tx_buffer #(.DEPTH_WORDS(BUF_WORDS)) u_txb (
      .clk, .rst,
      .wr_start(txb_wr_start[p]), .wr_len(txb_wr_len), .wr_en(txb_wr_en[p]),
      .wr_data(txb_wr_data), .free_words(txb_free[p]),
      .mac_valid(mac_tx_valid[p]), .mac_data(mac_tx_data[p]), .mac_last(mac_tx_last[p]),
      .mac_ready(mac_tx_ready[p]));
  end

  // header buffer
  logic            hb_we, hb_re;
  logic [HBAW-1:0] hb_waddr, hb_raddr;
  word_t           hb_wdata, hb_rdata;

  header_buffer #(.SLOTS(SLOTS)) u_hb (
    .clk, .a_we(hb_we), .a_addr(hb_waddr), .a_wdata(hb_wdata),
    .b_en(hb_re), .b_addr(hb_raddr), .b_rdata(hb_rdata));

  // ZBT SRAM controller
  logic              zr_req, zr_gnt, zr_cmd_valid, zr_rvalid;
  logic [ZBT_AW-1:0] zr_cmd_addr, zt_cmd_addr;
  word_t             zr_cmd_wdata, zbt_rdata;
  logic              zt_req, zt_gnt, zt_cmd_valid, zt_rvalid;

  zbt_controller #(.ADDR_W(ZBT_AW), .LAT(ZBT_LAT)) u_zbt (
    .clk, .rst,
    .tx_req(zt_req), .tx_gnt(zt_gnt), .tx_cmd_valid(zt_cmd_valid), .tx_cmd_we(1'b0),
    .tx_cmd_addr(zt_cmd_addr), .tx_cmd_wdata('0), .tx_rvalid(zt_rvalid),
    .rx_req(zr_req), .rx_gnt(zr_gnt), .rx_cmd_valid(zr_cmd_valid), .rx_cmd_we(1'b1),
    .rx_cmd_addr(zr_cmd_addr), .rx_cmd_wdata(zr_cmd_wdata), .rx_rvalid(zr_rvalid),
    .rdata(zbt_rdata),
    .zbt_cs_n, .zbt_we_n, .zbt_addr, .zbt_dq_o, .zbt_dq_oe, .zbt_dq_i);

  // function module
  logic          fm_rq_valid, fm_rq_ready, fm_res_valid;
  logic [SW-1:0] fm_rq_slot, fm_res_slot;
  logic [PW-1:0] fm_rq_port;
  len_t          fm_rq_len, fm_res_len;
  logic [47:0]   fm_rq_dst, fm_rq_src;
  logic [N-1:0]  fm_res_mask;

  address_route #(.N(N), .SLOTS(SLOTS), .ENTRIES(ROUTE_ENTRIES)) u_route (
    .clk, .rst,
    .rq_valid(fm_rq_valid), .rq_ready(fm_rq_ready), .rq_slot(fm_rq_slot),
    .rq_port(fm_rq_port), .rq_len(fm_rq_len), .rq_dst(fm_rq_dst), .rq_src(fm_rq_src),
    .res_valid(fm_res_valid), .res_slot(fm_res_slot), .res_mask(fm_res_mask),
    .res_len(fm_res_len), .ev_hit(ev_route_hit));

  scheduler #(.N(N), .SLOTS(SLOTS), .ZBT_AW(ZBT_AW), .ZBT_SLOT_WORDS(ZBT_SLOT_WORDS),
              .FW(FW), .TOL(TOL)) u_sched (
    .clk, .rst,
    .rxb_head_valid, .rxb_head_len, .rxb_free, .rxb_full, .rxb_pop,
    .rxb_rd_data, .rxb_rd_valid,
    .txb_free, .txb_wr_start, .txb_wr_len, .txb_wr_en, .txb_wr_data,
    .hb_we, .hb_waddr, .hb_wdata, .hb_re, .hb_raddr, .hb_rdata,
    .zr_req, .zr_gnt, .zr_cmd_valid, .zr_cmd_addr, .zr_cmd_wdata,
    .zt_req, .zt_gnt, .zt_cmd_valid, .zt_cmd_addr, .zt_rvalid, .zt_rdata(zbt_rdata),
    .fm_rq_valid, .fm_rq_ready, .fm_rq_slot, .fm_rq_port, .fm_rq_len,
    .fm_rq_dst, .fm_rq_src,
    .fm_res_valid, .fm_res_slot, .fm_res_mask, .fm_res_len,
    .ev_rx_big, .ev_rx_bypass, .ev_rx_lock_wait, .ev_rx_full_pick,
    .ev_tx_sent, .ev_tx_space_wait, .ev_tx_lock_wait, .ev_tx_filtered,
    .ev_slots_empty);

  // the receiving side only writes the SRAM
  a_rx_no_reads: assert property (@(posedge clk) disable iff (rst) !zr_rvalid);
  a_slot_fits: assert property (@(posedge clk) 32'(SLOTS) * ZBT_SLOT_WORDS <= (64'(1) << ZBT_AW));
endmodule
