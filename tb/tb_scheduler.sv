// Unit test of the scheduler with real receive/send buffers, header buffer,
// ZBT controller and the SRAM model, but with a behavioural function
// module: the export mask of a packet is the low four bits of its last
// destination byte, and the answer comes back in order after a random 1..40
// clocks. Four ports, 256-word buffers and only four header slots, so the
// slots run out. Checks every request to the function module (arrival
// port, length, addresses) against the packet that was stored, every byte
// that leaves a send buffer against the packet sent, and that each send
// port delivers packets in the order the function module answered. The
// scheduler's mechanisms are counted and must all have happened.
module tb_scheduler;
  import gbuf_pkg::*;
  localparam int N = 4, SLOTS = 4, BW = 256, FW = 9, ZAW = 12, ZSW = 512, GAP = 12;
  localparam int HBAW = $clog2(SLOTS * HDR_WORDS);

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  // ---- buffers ----
  logic [N-1:0] mac_rx_valid, mac_rx_last, rx_commit, rx_drop, rxb_head_valid, rxb_full, rxb_pop,
                rxb_rd_valid, txb_wr_start, txb_wr_en, mac_tx_valid, mac_tx_last, mac_tx_ready;
  logic [7:0]   mac_rx_data [N], mac_tx_data [N];
  len_t         rxb_head_len [N], txb_wr_len;
  logic [FW-1:0] rxb_free [N], txb_free [N];
  word_t        rxb_rd_data [N], txb_wr_data;

  for (genvar p = 0; p < N; p++) begin : g_port
    rx_buffer #(.DEPTH_WORDS(BW)) u_rx (
      .clk, .rst, .mac_valid(mac_rx_valid[p]), .mac_data(mac_rx_data[p]),
      .mac_last(mac_rx_last[p]), .rx_commit(rx_commit[p]), .rx_drop(rx_drop[p]),
      .head_valid(rxb_head_valid[p]), .head_len(rxb_head_len[p]), .pop(rxb_pop[p]),
      .rd_data(rxb_rd_data[p]), .rd_valid(rxb_rd_valid[p]), .free_words(rxb_free[p]),
      .full(rxb_full[p]));
    tx_buffer #(.DEPTH_WORDS(BW)) u_tx (
      .clk, .rst, .wr_start(txb_wr_start[p]), .wr_len(txb_wr_len), .wr_en(txb_wr_en[p]),
      .wr_data(txb_wr_data), .free_words(txb_free[p]), .mac_valid(mac_tx_valid[p]),
      .mac_data(mac_tx_data[p]), .mac_last(mac_tx_last[p]), .mac_ready(mac_tx_ready[p]));
  end

  logic hb_we, hb_re;
  logic [HBAW-1:0] hb_waddr, hb_raddr;
  word_t hb_wdata, hb_rdata;
  header_buffer #(.SLOTS(SLOTS)) u_hb (
    .clk, .a_we(hb_we), .a_addr(hb_waddr), .a_wdata(hb_wdata),
    .b_en(hb_re), .b_addr(hb_raddr), .b_rdata(hb_rdata));

  logic zr_req, zr_gnt, zr_cmd_valid, zt_req, zt_gnt, zt_cmd_valid, zt_rvalid, zr_rvalid;
  logic [ZAW-1:0] zr_cmd_addr, zt_cmd_addr, zbt_addr;
  word_t zr_cmd_wdata, zbt_rdata, zbt_dq_o, zbt_dq_i;
  logic zbt_cs_n, zbt_we_n, zbt_dq_oe;
  zbt_controller #(.ADDR_W(ZAW), .LAT(2)) u_zbt (
    .clk, .rst,
    .tx_req(zt_req), .tx_gnt(zt_gnt), .tx_cmd_valid(zt_cmd_valid), .tx_cmd_we(1'b0),
    .tx_cmd_addr(zt_cmd_addr), .tx_cmd_wdata('0), .tx_rvalid(zt_rvalid),
    .rx_req(zr_req), .rx_gnt(zr_gnt), .rx_cmd_valid(zr_cmd_valid), .rx_cmd_we(1'b1),
    .rx_cmd_addr(zr_cmd_addr), .rx_cmd_wdata(zr_cmd_wdata), .rx_rvalid(zr_rvalid),
    .rdata(zbt_rdata),
    .zbt_cs_n, .zbt_we_n, .zbt_addr, .zbt_dq_o, .zbt_dq_oe, .zbt_dq_i);
  int zbt_err, zbt_wr, zbt_rd;
  zbt_sram_model #(.ADDR_W(ZAW), .LAT(2)) u_sram (
    .clk, .cs_n(zbt_cs_n | rst), .we_n(zbt_we_n), .addr(zbt_addr), .dq_in(zbt_dq_o),
    .dq_oe(zbt_dq_oe), .dq_out(zbt_dq_i), .bus_errors(zbt_err), .writes(zbt_wr), .reads(zbt_rd));

  logic fm_rq_valid, fm_rq_ready, fm_res_valid;
  logic [1:0] fm_rq_slot, fm_rq_port, fm_res_slot;
  len_t fm_rq_len, fm_res_len;
  logic [47:0] fm_rq_dst, fm_rq_src;
  logic [N-1:0] fm_res_mask;
  logic ev_rx_big, ev_rx_bypass, ev_rx_lock_wait, ev_rx_full_pick, ev_tx_sent,
        ev_tx_space_wait, ev_tx_lock_wait, ev_tx_filtered, ev_slots_empty;

  scheduler #(.N(N), .SLOTS(SLOTS), .ZBT_AW(ZAW), .ZBT_SLOT_WORDS(ZSW), .FW(FW), .TOL(32)) dut (
    .clk, .rst,
    .rxb_head_valid, .rxb_head_len, .rxb_free, .rxb_full, .rxb_pop, .rxb_rd_data, .rxb_rd_valid,
    .txb_free, .txb_wr_start, .txb_wr_len, .txb_wr_en, .txb_wr_data,
    .hb_we, .hb_waddr, .hb_wdata, .hb_re, .hb_raddr, .hb_rdata,
    .zr_req, .zr_gnt, .zr_cmd_valid, .zr_cmd_addr, .zr_cmd_wdata,
    .zt_req, .zt_gnt, .zt_cmd_valid, .zt_cmd_addr, .zt_rvalid, .zt_rdata(zbt_rdata),
    .fm_rq_valid, .fm_rq_ready, .fm_rq_slot, .fm_rq_port, .fm_rq_len, .fm_rq_dst, .fm_rq_src,
    .fm_res_valid, .fm_res_slot, .fm_res_mask, .fm_res_len,
    .ev_rx_big, .ev_rx_bypass, .ev_rx_lock_wait, .ev_rx_full_pick, .ev_tx_sent,
    .ev_tx_space_wait, .ev_tx_lock_wait, .ev_tx_filtered, .ev_slots_empty);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- packets ----
  localparam int MAXID = 8192;
  int p_len [MAXID];
  logic [47:0] p_dst [MAXID], p_src [MAXID];
  int next_id = 1;
  function automatic logic [7:0] pkt_byte(input int id, input int i);
    if (i < 6)  return p_dst[id][47 - 8*i -: 8];
    if (i < 12) return p_src[id][47 - 8*(i-6) -: 8];
    if (i == 12) return 8'(id >> 8);
    if (i == 13) return 8'(id);
    return 8'(id * 5 + i * 3);
  endfunction

  int txq [N][$];       // to send, per arrival port
  int inflight [N][$];  // started on the MAC, not yet stored or dropped
  int stored [N][$];    // stored, not yet requested from the function module
  int expq [N][$];      // expected, per send port, in answer order
  task automatic new_pkt(input int in, input int mask, input int len);
    int id;
    id = next_id++;
    p_len[id] = len;
    p_dst[id] = {40'h02_0000_00AA, 8'(mask)};
    p_src[id] = {40'h02_0000_0100, 8'(in)};
    txq[in].push_back(id);
  endtask

  // MAC receive drivers: line rate, GAP idle clocks between packets
  int s_id [N], s_pos [N], s_gap [N];
  bit s_busy [N];
  always @(posedge clk) for (int p = 0; p < N; p++) begin
    mac_rx_valid[p] <= 1'b0;
    mac_rx_last[p]  <= 1'b0;
    if (rst) begin
      s_busy[p] = 0; s_gap[p] = 0;
    end else if (s_busy[p]) begin
      mac_rx_valid[p] <= 1'b1;
      mac_rx_data[p]  <= pkt_byte(s_id[p], s_pos[p]);
      mac_rx_last[p]  <= (s_pos[p] == p_len[s_id[p]] - 1);
      if (s_pos[p] == p_len[s_id[p]] - 1) begin s_busy[p] = 0; s_gap[p] = GAP; end
      s_pos[p]++;
    end else if (s_gap[p] > 0) s_gap[p]--;
    else if (txq[p].size() > 0) begin
      s_id[p] = txq[p].pop_front();
      s_pos[p] = 0;
      s_busy[p] = 1;
      inflight[p].push_back(s_id[p]);
    end
  end

  int n_drop = 0;
  always @(posedge clk) if (!rst) for (int p = 0; p < N; p++) begin
    if (rx_commit[p] || rx_drop[p]) begin
      check(inflight[p].size() > 0, "store or drop with no packet sent");
      if (inflight[p].size() > 0) begin
        if (rx_commit[p]) stored[p].push_back(inflight[p].pop_front());
        else begin void'(inflight[p].pop_front()); n_drop++; end
      end
    end
  end

  // ---- function module model ----
  bit fm_stall = 0;
  int fm_slot [$], fm_mask [$], fm_len [$], fm_due [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    fm_rq_ready <= !fm_stall && !rst;
    fm_res_valid <= 1'b0;
    if (!rst && fm_rq_valid && fm_rq_ready) begin
      int id, in;
      in = int'(fm_rq_port);
      check(stored[in].size() > 0, "request for a packet that was not stored");
      if (stored[in].size() > 0) begin
        id = stored[in].pop_front();
        check(fm_rq_len == len_t'(p_len[id]), $sformatf("request length of packet %0d", id));
        check(fm_rq_dst == p_dst[id] && fm_rq_src == p_src[id],
              $sformatf("request addresses of packet %0d", id));
        fm_slot.push_back(int'(fm_rq_slot));
        fm_mask.push_back(int'(p_dst[id][N-1:0]));
        fm_len.push_back(p_len[id]);
        fm_due.push_back(cyc + $urandom_range(1, 40));
        for (int o = 0; o < N; o++) if (p_dst[id][o]) expq[o].push_back(id);
      end
    end
    if (!rst && fm_due.size() > 0 && fm_due[0] <= cyc) begin
      fm_res_valid <= 1'b1;
      fm_res_slot  <= 2'(fm_slot.pop_front());
      fm_res_mask  <= N'(fm_mask.pop_front());
      fm_res_len   <= len_t'(fm_len.pop_front());
      void'(fm_due.pop_front());
    end
  end

  // ---- MAC transmit receivers ----
  logic [7:0] rbuf [N][$];
  int stall_pct = 0, delivered = 0;
  bit stall_port1 = 0;
  always @(posedge clk)
    for (int p = 0; p < N; p++)
      mac_tx_ready[p] <= !(p == 1 && stall_port1) && ($urandom_range(99) >= stall_pct);
  always @(posedge clk) if (!rst) for (int p = 0; p < N; p++)
    if (mac_tx_valid[p] && mac_tx_ready[p]) begin
      rbuf[p].push_back(mac_tx_data[p]);
      if (mac_tx_last[p]) begin
        int id, bad;
        id = (rbuf[p].size() >= 14) ? {rbuf[p][12], rbuf[p][13]} : 0;
        check(expq[p].size() > 0 && expq[p][0] == id,
              $sformatf("port %0d: packet %0d, expected %0d", p, id,
                        expq[p].size() > 0 ? expq[p][0] : -1));
        if (expq[p].size() > 0) begin
          id = expq[p].pop_front();
          check(rbuf[p].size() == p_len[id], $sformatf("packet %0d length", id));
          bad = 0;
          for (int i = 0; i < rbuf[p].size() && i < p_len[id]; i++)
            if (rbuf[p][i] != pkt_byte(id, i)) bad++;
          check(bad == 0, $sformatf("packet %0d: %0d bytes differ", id, bad));
        end
        delivered++;
        rbuf[p].delete();
      end
    end

  // ---- mechanism counters ----
  int n_big = 0, n_bypass = 0, n_rx_lock = 0, n_full = 0, n_sent = 0, n_space = 0,
      n_tx_lock = 0, n_filt = 0, n_empty = 0;
  always @(posedge clk) if (!rst) begin
    n_big += int'(ev_rx_big); n_bypass += int'(ev_rx_bypass); n_rx_lock += int'(ev_rx_lock_wait);
    n_full += int'(ev_rx_full_pick); n_sent += int'(ev_tx_sent); n_space += int'(ev_tx_space_wait);
    n_tx_lock += int'(ev_tx_lock_wait); n_filt += int'(ev_tx_filtered); n_empty += int'(ev_slots_empty);
  end

  function automatic bit idle();
    for (int p = 0; p < N; p++)
      if (txq[p].size() || inflight[p].size() || stored[p].size() || expq[p].size() || s_busy[p])
        return 0;
    return fm_due.size() == 0;
  endfunction
  task automatic drain(input int limit);
    int t = 0;
    while (!idle() && t < limit) begin @(posedge clk); t++; end
    check(idle(), "all packets delivered");
    repeat (50) @(posedge clk);
  endtask

  initial begin
    int m;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    // 1: random lengths and masks (mask 0 is filtered), random MAC stalls
    stall_pct = 10;
    for (int k = 0; k < 400; k++) begin
      m = $urandom_range(15);
      new_pkt(k % N, m & ~(1 << (k % N)), $urandom_range(60, 1518));
    end
    drain(400000);
    // 2: function module stalls: the header slots run out
    fm_stall = 1;
    for (int k = 0; k < 40; k++) new_pkt(k % N, 1 << ((k + 1) % N), 64 + k * 20);
    repeat (3000) @(posedge clk);
    fm_stall = 0;
    drain(200000);
    // 3: port 1 stops sending: its send buffer fills, then everything waits
    stall_port1 = 1;
    for (int k = 0; k < 40; k++) new_pkt(k % N, (k % 3 == 0) ? 4'b0010 : 4'b1100, 300 + k * 10);
    repeat (20000) @(posedge clk);
    stall_port1 = 0;
    drain(400000);
    // 4: 64-byte packets at full load on all ports: nothing may be dropped
    stall_pct = 0;
    m = n_drop;
    for (int k = 0; k < 400; k++) new_pkt(k % N, 1 << ((k % N + 1 + k / N % 3) % N), 64);
    drain(100000);
    check(n_drop == m, $sformatf("%0d drops at full load", n_drop - m));
    check(zbt_err == 0, "ZBT bus timing");
    check(n_big > 0 && n_sent > 0, "big packets through the SRAM");
    check(n_bypass > 0, "small packet bypassed the SRAM lock");
    check(n_rx_lock > 0 && n_tx_lock > 0, "lock waits on both sides");
    check(n_full > 0, "full receive buffer picked first");
    check(n_space > 0, "waited for send buffer room");
    check(n_filt > 0, "filtered packets freed");
    check(n_empty > 0, "header slots ran out");
    $display("delivered %0d drops %0d big %0d bypass %0d rxlock %0d txlock %0d full %0d space %0d filt %0d empty %0d",
             delivered, n_drop, n_big, n_bypass, n_rx_lock, n_tx_lock, n_full, n_space, n_filt, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
