// Unit test of tx_buffer with a 64-word ring. Packets of many lengths are
// written as start+length then data words; the MAC side is read with and
// without random stalls. Checks every byte, mac_last, the word count each
// packet takes (free_words) and that, with mac_ready held high, a packet
// leaves at one byte per clock with no bubble.
module tb_tx_buffer;
  import gbuf_pkg::*;
  localparam int DEPTH = 64;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic wr_start = 0, wr_en = 0, mac_ready = 0;
  len_t wr_len = 0;
  word_t wr_data = 0;
  logic [6:0] free_words;
  logic mac_valid, mac_last;
  logic [7:0] mac_data;

  tx_buffer #(.DEPTH_WORDS(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [7:0] b(input int seed, input int i);
    return 8'(seed * 17 + i * 5 + (i >> 4));
  endfunction

  int q_seed [$], q_len [$];
  int stall = 0;

  task automatic write_pkt(input int seed, input int len);
    int words, f0, w;
    word_t d;
    words = (len + 3) / 4;
    while (int'(free_words) < words + 1) @(posedge clk);
    #1 f0 = int'(free_words);
    q_seed.push_back(seed); q_len.push_back(len);
    wr_start <= 1; wr_len <= len_t'(len);
    @(posedge clk);
    wr_start <= 0;
    w = 0;
    while (w < words) begin
      for (int k = 0; k < 4; k++) d[8*k +: 8] = b(seed, 4 * w + k);
      wr_en <= 1; wr_data <= d;
      @(posedge clk);
      w++;
      if ($urandom_range(3) == 0) begin
        wr_en <= 0;
        @(posedge clk);
      end
    end
    wr_en <= 0;
  endtask

  // MAC side
  int pos = 0, bubbles = 0, pkts = 0;
  bit in_pkt = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (mac_valid && mac_ready) begin
        check(q_len.size() > 0, "byte with no packet written");
        if (q_len.size() > 0) begin
          check(mac_data == b(q_seed[0], pos), $sformatf("seed %0d byte %0d", q_seed[0], pos));
          check(mac_last == (pos == q_len[0] - 1), "mac_last");
          if (mac_last) begin
            void'(q_seed.pop_front()); void'(q_len.pop_front());
            pos = 0; in_pkt = 0; pkts++;
          end else begin
            pos++; in_pkt = 1;
          end
        end
      end else if (in_pkt && mac_ready && stall == 0) bubbles++;
    end
    mac_ready <= (stall == 0) || ($urandom_range(99) >= stall);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(free_words == DEPTH && !mac_valid, "empty after reset");
    // word usage: a 65-byte packet takes 1 + 17 words (hold the MAC off)
    stall = 100;
    write_pkt(1, 65);
    // (the read side has by then taken the descriptor and two data words
    // into its queue and given their space back: 18 - 3 = 15 remain)
    repeat (5) @(posedge clk);
    #1 check(free_words == DEPTH - 15, $sformatf("65 bytes use %0d words", DEPTH - free_words + 3));
    stall = 0;
    // one byte per clock, no stall: burst of packets written ahead
    for (int s = 2; s < 30; s++) write_pkt(s, 14 + 6 * s);
    while (q_len.size() > 0) @(posedge clk);
    check(bubbles == 0, $sformatf("%0d bubbles inside packets at full rate", bubbles));
    // random stalls
    stall = 30;
    for (int s = 30; s < 60; s++) write_pkt(s, $urandom_range(14, 200));
    while (q_len.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk); #1;
    check(free_words == DEPTH, "all space back");
    check(pkts == 59, $sformatf("%0d packets out", pkts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d packets out, %0d queued, free %0d", pkts, q_len.size(), free_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
