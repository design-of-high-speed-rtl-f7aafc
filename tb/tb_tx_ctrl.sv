// Unit test of tx_ctrl (4 ports, 8 slots) against behavioural models of
// the routed-packet queue, header buffer (1-clock reads), ZBT SRAM reads
// (LAT+2 = 4 clocks) behind a lock the receiving side may hold, and send
// buffers whose free space the testbench controls. Checks that every port
// in a mask gets the descriptor and every word in order, lowest port
// first; that a packet waits while the send buffer lacks room and does
// not ask for the SRAM meanwhile; that it waits for the lock; that the
// slot is freed after the last copy; and that an empty mask frees the slot
// at once.
module tb_tx_ctrl;
  import gbuf_pkg::*;
  localparam int N = 4, SLOTS = 8, ZAW = 12, ZSW = 512, FW = 11, ZLAT = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic q_valid, q_pop;
  logic [2:0] q_slot, slot_free_id;
  logic [N-1:0] q_mask, wr_start, wr_en;
  len_t q_len, wr_len;
  logic [FW-1:0] tx_free [N];
  word_t wr_data, hb_rdata, zbt_rdata;
  logic hb_en, zbt_req, zbt_gnt, zbt_cmd_valid, zbt_rvalid, slot_free;
  logic [7:0] hb_addr;
  logic [ZAW-1:0] zbt_cmd_addr;
  logic ev_sent, ev_space_wait, ev_lock_wait, ev_filtered;

  tx_ctrl #(.N(N), .SLOTS(SLOTS), .ZBT_AW(ZAW), .ZBT_SLOT_WORDS(ZSW), .FW(FW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // packet word k of slot s (contents change per use of the slot)
  int gen [SLOTS];
  function automatic word_t pw(input int s, input int g, input int k);
    return word_t'(s * 32'h0101_0000 + g * 32'h10_0001 + k * 7);
  endfunction

  // ---- queue model ----
  int qs [$], qm [$], ql [$];
  // the model outputs are refreshed shortly after each rising edge
  always @(posedge clk) begin
    #2;
    q_valid = qs.size() > 0;
    q_slot  = q_valid ? 3'(qs[0]) : '0;
    q_mask  = q_valid ? N'(qm[0]) : '0;
    q_len   = q_valid ? len_t'(ql[0]) : '0;
    for (int p = 0; p < N; p++) tx_free[p] = FW'(room[p]);
  end
  // the entry being sent: its slot, the ports still to serve and its length
  int cur_q_slot = 0, cur_q_mask = 0, cur_q_len = 0;
  always @(negedge clk) if (!rst && q_pop) begin
    cur_q_slot = qs[0]; cur_q_mask = qm[0]; cur_q_len = ql[0];
    void'(qs.pop_front()); void'(qm.pop_front()); void'(ql.pop_front());
  end

  // ---- header buffer and SRAM models ----
  word_t hb [SLOTS * HDR_WORDS];
  word_t zm [2**ZAW];
  always @(posedge clk) if (hb_en) hb_rdata <= hb[hb_addr];
  bit rx_holds = 0, tx_owns = 0;
  assign zbt_gnt = zbt_req && (tx_owns || !rx_holds);
  always @(posedge clk) tx_owns <= zbt_gnt;
  logic  zv [ZLAT];
  word_t zd [ZLAT];
  always @(posedge clk) begin
    zv[0] <= zbt_cmd_valid && !rst;
    zd[0] <= zm[zbt_cmd_addr];
    for (int i = 1; i < ZLAT; i++) begin zv[i] <= zv[i-1]; zd[i] <= zd[i-1]; end
  end
  assign zbt_rvalid = zv[ZLAT-1];
  assign zbt_rdata  = zd[ZLAT-1];
  int n_cmd_no_room = 0;

  // ---- send buffer models ----
  int room [N];
  int cur_slot [N], cur_len [N], cur_k [N], cur_g [N];
  bit active [N];
  int copies = 0, freed = 0, n_filtered = 0, n_space = 0, n_lock = 0;
  int last_port = -1;
  int pend_copies [SLOTS];   // copies still owed per slot
  always @(posedge clk) if (!rst) begin
    n_filtered += int'(ev_filtered); n_space += int'(ev_space_wait); n_lock += int'(ev_lock_wait);
    if (zbt_req && (state_wait_no_room())) n_cmd_no_room++;
    for (int p = 0; p < N; p++) begin
      if (wr_start[p]) begin
        check(!active[p], "start while a packet is open");
        check(int'(tx_free[p]) >= (int'(wr_len) + 3) / 4 + 1, "started without room");
        active[p] = 1; cur_slot[p] = cur_q_slot; cur_len[p] = int'(wr_len); cur_k[p] = 0;
        cur_g[p] = gen[cur_slot[p]];
        room[p] -= 1;
        check(p > last_port, "ports of one mask in ascending order");
        last_port = p;
      end
      if (wr_en[p]) begin
        check(active[p], "data without start");
        check(wr_data == pw(cur_slot[p], cur_g[p], cur_k[p]),
              $sformatf("port %0d slot %0d word %0d", p, cur_slot[p], cur_k[p]));
        cur_k[p]++; room[p] -= 1;
        if (cur_k[p] == (cur_len[p] + 3) / 4) begin
          active[p] = 0; copies++; pend_copies[cur_slot[p]]--;
          cur_q_mask &= ~(1 << p);
        end
      end
    end
    if (slot_free) begin
      check(pend_copies[slot_free_id] == 0, "slot freed before all copies");
      freed++;
      last_port = -1;
    end
  end
  // in the random phase the send buffers drain at about half a word per clock
  bit drain = 0;
  always @(negedge clk) if (drain) begin
    rx_holds = ($urandom_range(3) == 0);
    for (int p = 0; p < N; p++) if (room[p] < 1024 && $urandom_range(1) == 0) room[p]++;
  end
  // between copies of a packet longer than a header, with no room for it
  // at the next port of its mask
  function automatic bit state_wait_no_room();
    int lp;
    if (cur_q_mask == 0 || cur_q_len <= HDR_BYTES) return 0;
    for (int p = 0; p < N; p++) if (active[p]) return 0;
    lp = 0;
    while (!cur_q_mask[lp]) lp++;
    return int'(tx_free[lp]) < (cur_q_len + 3) / 4 + 1;
  endfunction

  task automatic push(input int s, input int mask, input int len);
    gen[s]++;
    for (int k = 0; k < (len + 3) / 4; k++)
      if (k < HDR_WORDS) hb[s * HDR_WORDS + k] = pw(s, gen[s], k);
      else zm[s * ZSW + k - HDR_WORDS] = pw(s, gen[s], k);
    pend_copies[s] = $countones(4'(mask));
    qs.push_back(s); qm.push_back(mask); ql.push_back(len);
  endtask

  task automatic wait_freed(input int n);
    int t = 0;
    while (freed < n && t < 100000) begin @(posedge clk); t++; end
    check(freed >= n, $sformatf("slots freed: %0d of %0d", freed, n));
    @(negedge clk);
  endtask

  initial begin
    int s;
    for (int p = 0; p < N; p++) begin room[p] = 1024; active[p] = 0; end
    for (int i = 0; i < SLOTS; i++) begin gen[i] = 0; pend_copies[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // small packet to one port, large to three
    push(0, 4'b0010, 100); wait_freed(1);
    push(1, 4'b1101, 900); wait_freed(2);
    check(copies == 4, "four copies");
    // filtered
    push(2, 0, 64); wait_freed(3);
    check(n_filtered == 1 && copies == 4, "empty mask frees the slot without copies");
    // no room on port 2: waits, and does not hold the SRAM meanwhile
    room[2] = 10;
    push(3, 4'b0100, 400);
    repeat (50) @(negedge clk);
    check(freed == 3 && n_space > 0, "waits for send-buffer room");
    check(n_cmd_no_room == 0, "no SRAM request while waiting for room");
    room[2] = 1024;
    wait_freed(4);
    // SRAM held by the receiving side
    rx_holds = 1;
    push(4, 4'b0001, 600);
    repeat (30) @(negedge clk);
    check(freed == 4 && n_lock > 0, "waits for the SRAM lock");
    rx_holds = 0;
    wait_freed(5);
    // random
    drain = 1;
    for (int k = 0; k < 150; k++) begin
      @(negedge clk);
      s = k % SLOTS;
      while (pend_copies[s] != 0 || qs.size() > 2) @(negedge clk);
      push(s, $urandom_range(15), $urandom_range(14, 1518));
      for (int p = 0; p < N; p++) room[p] = $urandom_range(3) == 0 ? $urandom_range(400) : 1024;
    end
    @(negedge clk);
    drain = 0;
    rx_holds = 0;
    for (int p = 0; p < N; p++) room[p] = 1024;
    wait_freed(155);
    check(n_cmd_no_room == 0, "no SRAM request while waiting for room");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: freed %0d queued %0d room %p", freed, qs.size(), room);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
