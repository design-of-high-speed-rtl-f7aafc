// Unit test of address_route (4 ports, 8-entry table). A reference
// learning table in the testbench predicts every answer: flooding of
// unknown and group destinations, a single port for a learned station,
// an empty mask for a station on the arrival port, station moves, no
// learning of group source addresses, and round-robin replacement when
// the table is full. Also checks that every answer comes within the
// 40-clock budget of a function module (here exactly 2 clocks).
module tb_address_route;
  localparam int N = 4, SLOTS = 16, ENTRIES = 8;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic rq_valid = 0, rq_ready, res_valid, ev_hit;
  logic [3:0] rq_slot = 0, res_slot;
  logic [1:0] rq_port = 0;
  logic [15:0] rq_len = 0, res_len;
  logic [47:0] rq_dst = 0, rq_src = 0;
  logic [N-1:0] res_mask;

  address_route #(.N(N), .SLOTS(SLOTS), .ENTRIES(ENTRIES)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // reference table
  logic [47:0] m_mac [ENTRIES];
  int          m_port [ENTRIES];
  bit          m_valid [ENTRIES];
  int          m_repl = 0;

  function automatic logic [N-1:0] model(input logic [47:0] dst, input logic [47:0] src, input int port);
    logic [N-1:0] mask;
    int hit = -1;
    for (int i = 0; i < ENTRIES; i++) if (m_valid[i] && m_mac[i] == dst) hit = m_port[i];
    if (dst[40] || hit < 0) mask = ~(N'(1) << port);
    else if (hit == port) mask = '0;
    else mask = N'(1) << hit;
    // learn after the lookup, as the hardware does in the same clock
    if (!src[40]) begin
      int found = -1;
      for (int i = 0; i < ENTRIES; i++) if (m_valid[i] && m_mac[i] == src) found = i;
      if (found >= 0) m_port[found] = port;
      else begin
        m_valid[m_repl] = 1; m_mac[m_repl] = src; m_port[m_repl] = port;
        m_repl = (m_repl + 1) % ENTRIES;
      end
    end
    return mask;
  endfunction

  function automatic logic [47:0] sta(input int k);
    return {8'h02, 24'h0, 16'(k)};
  endfunction

  int n_flood = 0, n_uni = 0, n_filt = 0;
  task automatic ask(input logic [47:0] dst, input logic [47:0] src, input int port);
    logic [N-1:0] e;
    int t;
    e = model(dst, src, port);
    rq_valid <= 1; rq_dst <= dst; rq_src <= src; rq_port <= 2'(port);
    rq_slot <= 4'($urandom); rq_len <= 16'($urandom_range(64, 1518));
    @(posedge clk);
    while (!rq_ready) @(posedge clk);
    rq_valid <= 0;
    t = 0;
    do begin @(posedge clk); #1; t++; end while (!res_valid && t < 40);
    check(res_valid && t <= 40, $sformatf("answer within 40 clocks (%0d)", t));
    check(t == 1, "answer one clock after acceptance");
    check(res_mask == e, $sformatf("mask %b, expected %b", res_mask, e));
    check(res_slot == rq_slot && res_len == rq_len, "slot and length carried");
    if (e == '0) n_filt++; else if ($countones(e) == 1) n_uni++; else n_flood++;
  endtask

  initial begin
    for (int i = 0; i < ENTRIES; i++) m_valid[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    ask(48'hFFFF_FFFF_FFFF, sta(1), 0);   // broadcast, learn 1@0
    ask(sta(1), sta(2), 3);               // known: to port 0
    ask(sta(2), sta(3), 3);               // same port: filtered
    ask(sta(9), sta(1), 0);               // unknown: flood
    ask(sta(2), sta(1), 1);               // station 1 moved to port 1
    ask(sta(1), sta(4), 2);               // now to port 1
    ask(sta(4), 48'h0300_0000_0001, 1);   // group source not learned
    ask(48'h0300_0000_0001, sta(5), 0);   // multicast destination: flood
    // random traffic over more stations than entries
    for (int k = 0; k < 400; k++)
      ask(($urandom_range(9) == 0) ? 48'hFFFF_FFFF_FFFF : sta($urandom_range(12)),
          sta($urandom_range(12)), $urandom_range(N - 1));
    check(n_flood > 0 && n_uni > 0 && n_filt > 0, "all three answers seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
