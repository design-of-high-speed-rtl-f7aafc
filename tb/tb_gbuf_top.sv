// End-to-end test of the multi-level buffer at its default size (four
// ports, 1024-word buffers, 64 header slots), with the ZBT SRAM model.
//
// Each port's MAC side is driven with whole packets at line rate: payload
// bytes every clock and a 20-clock gap (preamble plus inter-frame gap)
// between packets. Packet contents are a function of a packet id written
// into bytes 12-13, so every byte that leaves a send buffer is checked
// against an independently generated copy, and packets between one pair of
// ports must leave in the order they came in. Phases:
//   1 learning: two stations per port broadcast; copies go to all other ports
//   2 mixed:    random lengths 64..1518 to random stations, random MAC
//               transmit stalls; packets to a station on the arrival port
//               must be filtered
//   3 full load: all four ports send 64-byte packets back to back; no
//               packet may be dropped and all must leave within the bound
//   3b max size: all four ports send 1518-byte frames back to back; the
//               external SRAM is the bottleneck, must stay busy, and the
//               frames it cannot carry are dropped whole
//   4 jam:      one transmit MAC stops; send buffer, header slots and
//               receive buffers fill until packets are dropped
//   5 bad:      a too-long and a too-short packet must be dropped
// Every mechanism is counted and must have happened at least once.
module tb_gbuf_top;
  import gbuf_pkg::*;

  localparam int N   = 4;
  localparam int GAP = 20;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #4 clk = ~clk;

  logic [N-1:0] mac_rx_valid, mac_rx_last, mac_tx_valid, mac_tx_last, mac_tx_ready;
  logic [7:0]   mac_rx_data [N];
  logic [7:0]   mac_tx_data [N];
  logic         zbt_cs_n, zbt_we_n, zbt_dq_oe;
  logic [17:0]  zbt_addr;
  word_t        zbt_dq_o, zbt_dq_i;
  logic [N-1:0] rx_commit, rx_drop;
  logic ev_rx_big, ev_rx_bypass, ev_rx_lock_wait, ev_rx_full_pick, ev_tx_sent,
        ev_tx_space_wait, ev_tx_lock_wait, ev_tx_filtered, ev_slots_empty, ev_route_hit;

  gbuf_top dut (.*);

  int zbt_err, zbt_wr, zbt_rd;
  zbt_sram_model #(.ADDR_W(18), .LAT(2)) u_sram (
    .clk, .cs_n(zbt_cs_n | rst), .we_n(zbt_we_n), .addr(zbt_addr), .dq_in(zbt_dq_o),
    .dq_oe(zbt_dq_oe), .dq_out(zbt_dq_i), .bus_errors(zbt_err), .writes(zbt_wr),
    .reads(zbt_rd));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- packets ----------------
  localparam int MAXID = 4096;
  int          p_len   [MAXID];
  logic [47:0] p_dst   [MAXID];
  logic [47:0] p_src   [MAXID];
  int          p_in    [MAXID];
  logic [N-1:0] p_dest [MAXID];
  int          next_id = 1;

  function automatic logic [47:0] station(input int port, input int which);
    return {8'h02, 8'h00, 8'h00, 8'h00, 8'(which), 8'(port)};
  endfunction

  function automatic logic [7:0] pkt_byte(input int id, input int i);
    if (i < 6)  return p_dst[id][47 - 8*i -: 8];
    if (i < 12) return p_src[id][47 - 8*(i-6) -: 8];
    if (i == 12) return 8'(id >> 8);
    if (i == 13) return 8'(id);
    return 8'((id * 7 + i * 13) ^ (i >> 8));
  endfunction

  // queues of ids still to send, per port, and expected per (in, out)
  int txq [N][$];
  int expq [N][N][$];
  int last_started [N];
  int delivered = 0, dropped = 0, filtered_exp = 0;

  // the export ports a packet should get, given the learned stations
  function automatic logic [N-1:0] dest_of(input logic [47:0] dst, input int in);
    if (dst[40]) return ~(N'(1) << in);
    if (dst[7:0] == 8'(in)) return '0;
    return N'(1) << dst[7:0];
  endfunction

  function automatic int new_pkt(input int in, input logic [47:0] src,
                                 input logic [47:0] dst, input int len);
    int id = next_id++;
    p_len[id] = len; p_src[id] = src; p_dst[id] = dst; p_in[id] = in;
    p_dest[id] = dest_of(dst, in);
    txq[in].push_back(id);
    return id;
  endfunction

  // ---------------- MAC receive drivers ----------------
  int  s_id [N], s_pos [N], s_gap [N];
  bit  s_busy [N];
  bit  expect_drop [MAXID];
  always @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      mac_rx_valid[p] <= 1'b0;
      mac_rx_last[p]  <= 1'b0;
      if (rst) begin
        s_busy[p] <= 1'b0; s_gap[p] <= 0;
      end else if (s_busy[p]) begin
        mac_rx_valid[p] <= 1'b1;
        mac_rx_data[p]  <= pkt_byte(s_id[p], s_pos[p]);
        mac_rx_last[p]  <= (s_pos[p] == p_len[s_id[p]] - 1);
        if (s_pos[p] == p_len[s_id[p]] - 1) begin
          s_busy[p] <= 1'b0;
          s_gap[p]  <= GAP;
        end
        s_pos[p] <= s_pos[p] + 1;
      end else if (s_gap[p] > 0) begin
        s_gap[p] <= s_gap[p] - 1;
      end else if (txq[p].size() > 0) begin
        int id;
        id = txq[p].pop_front();
        s_id[p] = id;
        s_pos[p] <= 0;
        s_busy[p] <= 1'b1;
        last_started[p] = id;
        for (int o = 0; o < N; o++) if (p_dest[id][o] && !expect_drop[id]) expq[p][o].push_back(id);
      end
    end
  end

  // drops: the packet currently or last arriving on that port
  int drops_seen = 0, exp_drops_seen = 0;
  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < N; p++) if (rx_drop[p]) begin
      int id;
      id = last_started[p];
      drops_seen++;
      if (expect_drop[id]) exp_drops_seen++;
      else begin
        dropped++;
        if (p_dest[id] == '0) filtered_exp--;
        for (int o = 0; o < N; o++)
          if (p_dest[id][o]) begin
            check(expq[p][o].size() > 0 && expq[p][o][$] == id, "dropped packet is last queued");
            if (expq[p][o].size() > 0) void'(expq[p][o].pop_back());
          end
      end
    end
  end

  // ---------------- MAC transmit receivers ----------------
  logic [7:0] rbuf [N][$];
  bit   stall_port0 = 0;
  int   stall_pct = 0;
  always @(posedge clk) begin
    for (int p = 0; p < N; p++)
      mac_tx_ready[p] <= !(p == 0 && stall_port0) && ($urandom_range(99) >= stall_pct);
  end

  int last_delivery = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < N; p++) if (mac_tx_valid[p] && mac_tx_ready[p]) begin
      rbuf[p].push_back(mac_tx_data[p]);
      if (mac_tx_last[p]) begin
        int id, in, len;
        bit ok;
        len = rbuf[p].size();
        id  = (len >= 14) ? {rbuf[p][12], rbuf[p][13]} : 0;
        in  = (len >= 12) ? int'(rbuf[p][11]) : 0;
        ok  = (id > 0 && id < next_id && in < N);
        check(ok, $sformatf("port %0d: unknown packet id %0d", p, id));
        if (ok) begin
          check(expq[in][p].size() > 0 && expq[in][p][0] == id,
                $sformatf("port %0d: packet %0d from %0d out of order (expected %0d)", p, id, in,
                          expq[in][p].size() > 0 ? expq[in][p][0] : -1));
          if (expq[in][p].size() > 0 && expq[in][p][0] == id) void'(expq[in][p].pop_front());
          check(len == p_len[id], $sformatf("packet %0d length %0d, sent %0d", id, len, p_len[id]));
          begin
            int bad = 0;
            for (int i = 0; i < len && i < p_len[id]; i++) if (rbuf[p][i] != pkt_byte(id, i)) bad++;
            check(bad == 0, $sformatf("packet %0d: %0d bytes differ", id, bad));
          end
        end
        delivered++;
        last_delivery = cyc;
        rbuf[p].delete();
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_big = 0, n_bypass = 0, n_rx_lock_wait = 0, n_full_pick = 0, n_space_wait = 0,
      n_tx_lock_wait = 0, n_filtered = 0, n_slots_empty = 0, n_hit = 0, n_small = 0;
  always @(posedge clk) if (!rst) begin
    n_big          += int'(ev_rx_big);
    n_bypass       += int'(ev_rx_bypass);
    n_rx_lock_wait += int'(ev_rx_lock_wait);
    n_full_pick    += int'(ev_rx_full_pick);
    n_space_wait   += int'(ev_tx_space_wait);
    n_tx_lock_wait += int'(ev_tx_lock_wait);
    n_filtered     += int'(ev_tx_filtered);
    n_slots_empty  += int'(ev_slots_empty);
    n_hit          += int'(ev_route_hit);
  end

  function automatic bit all_expected_out();
    for (int i = 0; i < N; i++) begin
      if (txq[i].size() != 0 || s_busy[i]) return 0;
      for (int o = 0; o < N; o++) if (expq[i][o].size() != 0) return 0;
    end
    return 1;
  endfunction

  task automatic drain(input int limit, input string phase);
    int t = 0;
    while (!all_expected_out() && t < limit) begin @(posedge clk); t++; end
    check(all_expected_out(), {phase, ": not all packets delivered"});
    repeat (50) @(posedge clk);
  endtask

  // ---------------- phases ----------------
  initial begin
    int id, len, d, st, t_start, drops0, n3;
    mac_rx_valid = '0; mac_rx_last = '0;
    for (int p = 0; p < N; p++) begin mac_rx_data[p] = '0; last_started[p] = 0; end
    repeat (5) @(posedge clk);
    rst = 1'b0;

    // 1: learning
    for (int p = 0; p < N; p++)
      for (int w = 0; w < 2; w++)
        void'(new_pkt(p, station(p, w), 48'hFFFF_FFFF_FFFF, 64 + 16 * p));
    drain(20000, "learning");

    // 2: mixed traffic with transmit stalls
    stall_pct = 10;
    for (int k = 0; k < 40; k++)
      for (int p = 0; p < N; p++) begin
        d   = $urandom_range(N - 1);
        st  = $urandom_range(1);
        case ($urandom_range(3))
          0: len = 64;
          1: len = $urandom_range(65, 128);
          2: len = $urandom_range(129, 600);
          default: len = $urandom_range(601, 1518);
        endcase
        if (d == p) filtered_exp++;
        n_small += int'(len <= 128);
        void'(new_pkt(p, station(p, 0), station(d, st), len));
      end
    drain(400000, "mixed");
    check(n_filtered == filtered_exp, $sformatf("filtered %0d, expected %0d", n_filtered, filtered_exp));

    // 3: full load, 64-byte packets on all ports, each port to the next
    stall_pct = 0;
    drops0 = drops_seen;
    n3 = 200;
    for (int k = 0; k < n3; k++)
      for (int p = 0; p < N; p++)
        void'(new_pkt(p, station(p, 0), station((p + 1) % N, k % 2), 64));
    t_start = cyc;
    drain(n3 * (64 + GAP) + 2000, "full load");
    check(drops_seen == drops0, "full load: packets dropped");
    // offered: n3 packets of 64+GAP clocks per port; all must be out within
    // that time plus a fixed latency (a backlog would grow with n3)
    check(last_delivery - t_start <= n3 * (64 + GAP) + 600,
          $sformatf("full load took %0d clocks for %0d clocks of traffic",
                    last_delivery - t_start, n3 * (64 + GAP)));
    $display("full load: %0d packets per port in %0d clocks (%0d offered)", n3,
             last_delivery - t_start, n3 * (64 + GAP));

    // 3b: full load with 1518-byte frames. Each frame's 348-word tail is
    // written to and read back from the one SRAM, 696 SRAM clocks per
    // frame, while four ports offer a frame every 1538 clocks each: the
    // SRAM can carry at most 1538 / 696 = 2.2 of every 4 frames, so the
    // receive buffers must overflow. Checked: every frame is either
    // delivered intact or dropped whole, some are dropped, and the SRAM is
    // kept busy while it is the bottleneck.
    drops0 = drops_seen;
    d = delivered;
    st = zbt_wr + zbt_rd;
    for (int k = 0; k < 24; k++)
      for (int p = 0; p < N; p++)
        void'(new_pkt(p, station(p, 0), station((p + 1) % N, k % 2), 1518));
    t_start = cyc;
    begin
      int t = 0;
      while ((txq[0].size() + txq[1].size() + txq[2].size() + txq[3].size()) != 0 && t < 200000) begin
        @(posedge clk); t++;
      end
    end
    len = cyc - t_start;
    st = zbt_wr + zbt_rd - st;
    drain(200000, "max-size frames");
    check(drops_seen > drops0, "max-size frames: the SRAM bound was not reached");
    check(delivered - d + drops_seen - drops0 == 24 * N, "max-size frames: frames unaccounted for");
    check(st * 100 >= len * 80, $sformatf("max-size frames: SRAM busy %0d of %0d clocks", st, len));
    $display("max-size frames: %0d of %0d delivered, SRAM busy %0d of %0d clocks while offered",
             delivered - d, 24 * N, st, len);

    // 4: jam port 0's transmit side
    stall_port0 = 1;
    drops0 = drops_seen;
    for (int k = 0; k < 30; k++)
      for (int p = 1; p < N; p++)
        void'(new_pkt(p, station(p, 0), station(0, 0), (k % 3 == 0) ? 100 : 1500));
    begin
      int t = 0;
      while ((txq[1].size() + txq[2].size() + txq[3].size()) != 0 && t < 300000) begin
        @(posedge clk); t++;
      end
    end
    repeat (2000) @(posedge clk);
    check(drops_seen > drops0, "jam: no packet dropped");
    stall_port0 = 0;
    drain(400000, "jam release");

    // 5: packets the receive buffer must refuse
    id = new_pkt(1, station(1, 0), station(2, 0), 1600); expect_drop[id] = 1;
    id = new_pkt(2, station(2, 0), station(3, 0), 10);   expect_drop[id] = 1;
    void'(new_pkt(3, station(3, 0), station(1, 0), 300));
    drain(20000, "bad packets");
    check(exp_drops_seen == 2, $sformatf("bad packets dropped: %0d of 2", exp_drops_seen));

    // mechanisms
    check(n_small > 0,        "no small packet");
    check(n_big > 0,          "no packet went to ZBT SRAM");
    check(n_bypass > 0,       "no small packet taken while SRAM locked");
    check(n_rx_lock_wait > 0, "receiving side never waited for SRAM");
    check(n_tx_lock_wait > 0, "sending side never waited for SRAM");
    check(n_full_pick > 0,    "full receive buffer never chosen first");
    check(n_space_wait > 0,   "send buffer never full");
    check(n_slots_empty > 0,  "header slots never ran out");
    check(n_filtered > 0,     "no packet filtered");
    check(n_hit > 0,          "no routed packet");
    check(dropped > 0,        "no overflow drop");
    check(zbt_err == 0,       "ZBT bus timing errors");
    check(zbt_wr > 0 && zbt_rd > 0, "ZBT SRAM unused");
    $display("delivered %0d, dropped %0d; big %0d bypass %0d rx-lock-wait %0d tx-lock-wait %0d",
             delivered, dropped, n_big, n_bypass, n_rx_lock_wait, n_tx_lock_wait);
    $display("full-pick %0d space-wait %0d slots-empty %0d filtered %0d route-hit %0d",
             n_full_pick, n_space_wait, n_slots_empty, n_filtered, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
