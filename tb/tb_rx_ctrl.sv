// Unit test of rx_ctrl (4 ports, 8 header slots) against behavioural
// models of the receive buffers, slot allocator, header buffer, ZBT lock
// and function module. For every packet handed on it checks where each
// word landed (header slot, then the slot's SRAM region), the MAC
// addresses, length and port, and the time taken (W+2 clocks from the
// decision to the request for a W-word packet). Directed cases check the
// choice rules: a full buffer first, least free space next, a small packet
// taken when the SRAM lock is refused, and waiting when there is none.
module tb_rx_ctrl;
  import gbuf_pkg::*;
  localparam int N = 4, SLOTS = 8, ZAW = 12, ZSW = 512, FW = 11;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [N-1:0] head_valid, rx_full = 0, pop, rd_valid = 0;
  len_t head_len [N];
  logic [FW-1:0] rx_free [N];
  word_t rd_data [N];
  logic slot_avail, slot_take, hb_we, zbt_req, zbt_gnt, zbt_cmd_valid, rq_valid, rq_ready;
  logic [2:0] slot_id, rq_slot;
  logic [7:0] hb_addr;
  word_t hb_wdata, zbt_cmd_wdata;
  logic [ZAW-1:0] zbt_cmd_addr;
  logic [1:0] rq_port;
  len_t rq_len;
  logic [47:0] rq_dst, rq_src;
  logic ev_big, ev_bypass, ev_lock_wait, ev_full_pick;

  rx_ctrl #(.N(N), .SLOTS(SLOTS), .ZBT_AW(ZAW), .ZBT_SLOT_WORDS(ZSW), .FW(FW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [7:0] pb(input int id, input int i);
    if (i < 6)  return (i == 5) ? 8'(id) : 8'h10 + 8'(i);   // destination
    if (i < 12) return (i == 11) ? 8'(id >> 8) : 8'h20 + 8'(i);
    return 8'(id * 5 + i * 3);
  endfunction
  function automatic word_t pw(input int id, input int w);
    word_t d;
    for (int k = 0; k < 4; k++) d[8*k +: 8] = pb(id, 4 * w + k);
    return d;
  endfunction

  // ---- receive buffer models ----
  int q_id [N][$], q_len [N][$];
  int widx [N];
  int next_id = 1;
  int pkt_len [4096];
  int pkt_port [4096];
  always_comb for (int p = 0; p < N; p++) begin
    head_valid[p] = q_id[p].size() > 0;
    head_len[p]   = head_valid[p] ? len_t'(q_len[p][0]) : '0;
  end
  // the model works at the falling edge, when pop has settled, and its
  // answer is registered at the next rising edge (one clock of latency)
  logic [N-1:0] st_valid = 0;
  word_t        st_data [N];
  always @(negedge clk) begin
    for (int p = 0; p < N; p++) begin
      st_valid[p] = 0;
      if (!rst && pop[p]) begin
        check(q_id[p].size() > 0, "pop of an empty buffer");
        st_valid[p] = 1;
        st_data[p]  = pw(q_id[p][0], widx[p]);
        if (widx[p] + 1 == (q_len[p][0] + 3) / 4) begin
          void'(q_id[p].pop_front()); void'(q_len[p].pop_front()); widx[p] = 0;
        end else widx[p] = widx[p] + 1;
      end
    end
  end
  always @(posedge clk) begin
    rd_valid <= st_valid;
    rd_data  <= st_data;
  end
  task automatic put(input int p, input int len);
    pkt_len[next_id] = len; pkt_port[next_id] = p;
    q_id[p].push_back(next_id++); q_len[p].push_back(len);
  endtask

  // ---- slot allocator, header buffer, SRAM lock models ----
  bit slot_busy [SLOTS];
  word_t hb [SLOTS * HDR_WORDS];
  word_t zm [2**ZAW];
  bit tx_holds = 0;
  always_comb begin
    slot_avail = 0; slot_id = 0;
    for (int i = SLOTS - 1; i >= 0; i--) if (!slot_busy[i]) begin slot_avail = 1; slot_id = 3'(i); end
  end
  bit rx_owns = 0;   // once granted, the lock stays with its owner
  assign zbt_gnt = zbt_req && (rx_owns || !tx_holds);
  always @(posedge clk) rx_owns <= zbt_gnt;
  int cyc = 0, t_take = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (slot_take) begin slot_busy[slot_id] <= 1; t_take = cyc; end
      if (hb_we) hb[hb_addr] = hb_wdata;
      if (zbt_cmd_valid) zm[zbt_cmd_addr] = zbt_cmd_wdata;
    end
  end

  // ---- function module model: check and free ----
  int order [$];
  int n_bypass = 0, n_wait = 0, n_full = 0, n_big = 0, n_done = 0;
  bit ready_random = 0;
  always @(posedge clk) rq_ready <= ready_random ? ($urandom_range(3) != 0) : 1'b1;
  always @(posedge clk) if (!rst) begin
    n_bypass += int'(ev_bypass); n_wait += int'(ev_lock_wait);
    n_full += int'(ev_full_pick); n_big += int'(ev_big);
    if (rq_valid && rq_ready) begin
      int id, w, bad;
      id = int'(rq_src[7:0]) << 8 | int'(rq_dst[7:0]);
      check(id > 0 && id < next_id, $sformatf("request for a known packet (%0d, dst %h src %h)", id, rq_dst, rq_src));
      if (id > 0 && id < next_id) begin
        order.push_back(id);
        check(int'(rq_len) == pkt_len[id] && int'(rq_port) == pkt_port[id], "length and port");
        check(rq_dst == {8'h10, 8'h11, 8'h12, 8'h13, 8'h14, 8'(id)}, "destination address");
        check(rq_src == {8'h26, 8'h27, 8'h28, 8'h29, 8'h2a, 8'(id >> 8)}, "source address");
        w = (pkt_len[id] + 3) / 4;
        bad = 0;
        for (int k = 0; k < w; k++)
          if (k < HDR_WORDS) bad += int'(hb[int'(rq_slot) * HDR_WORDS + k] != pw(id, k));
          else bad += int'(zm[int'(rq_slot) * ZSW + k - HDR_WORDS] != pw(id, k));
        check(bad == 0, $sformatf("packet %0d: %0d words misplaced", id, bad));
        if (!ready_random) check(cyc - t_take == w + 2, $sformatf("packet %0d took %0d clocks, W=%0d", id, cyc - t_take, w));
      end
      slot_busy[rq_slot] <= 0;
      n_done++;
    end
  end

  task automatic wait_done(input int n);
    int t = 0;
    while (n_done < n && t < 100000) begin @(posedge clk); t++; end
    check(n_done >= n, "requests done");
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < SLOTS; i++) slot_busy[i] = 0;
    for (int p = 0; p < N; p++) begin widx[p] = 0; rx_free[p] = 11'd1000; end
    repeat (3) @(posedge clk);
    rst <= 0;
    // timing: one small, one large
    @(negedge clk);
    put(0, 64);  wait_done(1);
    put(1, 700); wait_done(2);
    check(n_big == 1, "large packet used the SRAM");
    // full buffer first
    order.delete();
    rx_full = 4'b0100; rx_free = '{900, 100, 300, 500};
    for (int p = 0; p < N; p++) put(p, 100);
    wait_done(6);
    check(order[0] == next_id - 2, "full buffer served first");
    check(order[1] == next_id - 3, "then least free space");
    check(n_full >= 1, "full rule counted");
    rx_full = 0;
    // SRAM locked by the sending side: small packet goes first, large waits
    order.delete();
    @(negedge clk);
    tx_holds = 1;
    rx_free = '{100, 900, 900, 900};
    put(0, 600); put(1, 80);
    wait_done(7);
    check(order.size() == 1 && order[0] == next_id - 1, "small packet taken while SRAM locked");
    repeat (20) @(posedge clk);
    check(n_done == 7, "large packet waits for the lock");
    check(n_bypass >= 1 && n_wait > 0, "bypass and wait counted");
    @(negedge clk);
    tx_holds = 0;
    wait_done(8);
    // random traffic with random function-module stalls and lock holds
    ready_random = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      put($urandom_range(N - 1), $urandom_range(14, 1518));
      for (int p = 0; p < N; p++) rx_free[p] = 11'($urandom_range(1024));
      tx_holds = ($urandom_range(3) == 0);
      repeat ($urandom_range(100)) @(posedge clk);
    end
    @(negedge clk);
    tx_holds = 0;
    wait_done(208);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
