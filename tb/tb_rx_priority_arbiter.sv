// Unit test of rx_priority_arbiter with four buffers. A reference model
// written directly from the rule (full first with polling, else least free
// space with polling among those within TOL) is compared with the block on
// directed cases and on random inputs.
module tb_rx_priority_arbiter;
  localparam int N = 4, FW = 11, TOL = 32;

  logic [N-1:0] req, full;
  logic [FW-1:0] free_words [N];
  logic [1:0] rr, grant;
  logic grant_valid, grant_full;

  rx_priority_arbiter #(.N(N), .FW(FW), .TOL(TOL)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int model();
    int best, mn;
    bit anyfull;
    anyfull = |(req & full);
    mn = 1 << 30;
    for (int i = 0; i < N; i++) if (req[i] && int'(free_words[i]) < mn) mn = int'(free_words[i]);
    for (int k = 0; k < N; k++) begin
      int i;
      i = (int'(rr) + k) % N;
      if (anyfull ? (req[i] && full[i]) : (req[i] && int'(free_words[i]) <= mn + TOL)) return i;
    end
    return -1;
  endfunction

  task automatic apply(input string what);
    int m;
    #1;
    m = model();
    check(grant_valid == (m >= 0), {what, ": grant_valid"});
    if (m >= 0) check(int'(grant) == m, $sformatf("%s: grant %0d, expected %0d", what, grant, m));
    check(grant_full == |(req & full), {what, ": grant_full"});
  endtask

  int n_full = 0, n_min = 0, n_poll = 0;
  initial begin
    // directed: one full buffer wins over smaller free space elsewhere
    req = 4'b1111; full = 4'b0100; rr = 0;
    free_words = '{500, 100, 300, 200};
    #1 check(grant == 2, "full buffer first");
    // two full: polling from rr
    full = 4'b1010; rr = 2;
    #1 check(grant == 3, "polling among full from rr=2");
    rr = 0;
    #1 check(grant == 1, "polling among full from rr=0");
    // none full: least free space
    full = 0; free_words = '{500, 100, 300, 200}; rr = 2;
    #1 check(grant == 1, "least free space");
    // almost equal (within 32 words): polling
    free_words = '{120, 100, 300, 110};
    rr = 2;
    #1 check(grant == 3, "near-equal, polled from rr=2");
    rr = 0;
    #1 check(grant == 0, "near-equal, polled from rr=0");
    req = 0;
    #1 check(!grant_valid, "no request");
    // random
    for (int t = 0; t < 3000; t++) begin
      req = 4'($urandom); full = 4'($urandom) & 4'($urandom);
      rr = 2'($urandom);
      for (int i = 0; i < N; i++) free_words[i] = 11'($urandom_range(1024));
      if (t % 3 == 0) for (int i = 0; i < N; i++) free_words[i] = 11'(400 + $urandom_range(40));
      apply("random");
      if (|(req & full)) n_full++; else if (|req) n_min++;
    end
    check(n_full > 0 && n_min > 0, "both rules exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
