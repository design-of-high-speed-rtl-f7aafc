// Unit test of rx_buffer with a 64-word ring and 200-byte maximum packet.
// Checks word usage per packet (descriptor plus ceil(len/4) words: 65 bytes
// take 18 words, 64 bytes take 17), byte packing order, head length,
// read latency, the full flag, and the three drop cases: ring overflow,
// too long and too short. The free space is given back after a drop.
module tb_rx_buffer;
  import gbuf_pkg::*;
  localparam int DEPTH = 64, MAXB = 200;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic mac_valid = 0, mac_last = 0, pop = 0;
  logic [7:0] mac_data = 0;
  logic rx_commit, rx_drop, head_valid, rd_valid, full;
  len_t head_len;
  word_t rd_data;
  logic [6:0] free_words;

  rx_buffer #(.DEPTH_WORDS(DEPTH), .MAX_BYTES(MAXB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [7:0] b(input int seed, input int i);
    return 8'(seed * 31 + i * 7 + (i >> 3));
  endfunction

  int commits = 0, drops = 0;
  always @(posedge clk) begin
    commits += int'(rx_commit);
    drops   += int'(rx_drop);
  end

  task automatic send(input int seed, input int len);
    for (int i = 0; i < len; i++) begin
      mac_valid <= 1; mac_data <= b(seed, i); mac_last <= (i == len - 1);
      @(posedge clk);
    end
    mac_valid <= 0; mac_last <= 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic receive(input int seed, input int len);
    int words, t;
    words = (len + 3) / 4;
    t = 0;
    while (!head_valid && t < 20) begin @(posedge clk); t++; end
    check(head_valid, "head_valid");
    check(head_len == len_t'(len), $sformatf("head_len %0d, expected %0d", head_len, len));
    for (int w = 0; w < words; w++) begin
      pop <= 1; @(posedge clk); pop <= 0;
      #1;
      check(rd_valid, "rd_valid one clock after pop");
      for (int k = 0; k < 4 && 4 * w + k < len; k++)
        check(rd_data[8*k +: 8] == b(seed, 4 * w + k),
              $sformatf("seed %0d word %0d byte %0d = %02x", seed, w, k, rd_data[8*k +: 8]));
    end
    @(posedge clk); #1;
    check(!rd_valid, "rd_valid only after a pop");
  endtask

  initial begin
    int f0, fr;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(free_words == DEPTH && !head_valid && !full, "empty after reset");
    // memory use of the worked examples: 65 bytes -> 18 words, 64 -> 17
    // (the descriptor of the packet at the head is fetched at once and its
    // word given back, so the head packet shows one word less)
    send(1, 65); #1;
    check(free_words == DEPTH - 17, $sformatf("65-byte packet uses %0d words", DEPTH - free_words + 1));
    check(commits == 1, "commit pulse");
    send(2, 64); #1;
    check(free_words == DEPTH - 34, $sformatf("64-byte packet uses %0d words", DEPTH - free_words - 16));
    check(full, "full when less than one maximum packet is free (30 < 51)");
    receive(1, 65);
    receive(2, 64);
    @(posedge clk); #1;
    check(free_words == DEPTH && !full, "space given back");
    // odd lengths and wrap-around
    for (int s = 0; s < 12; s++) begin
      send(10 + s, 14 + 13 * s);
      receive(10 + s, 14 + 13 * s);
    end
    // overflow: four 80-byte packets (21 words each) into 64 words
    f0 = drops;
    send(30, 80); send(31, 80); send(32, 80);
    #1;
    fr = int'(free_words);
    check(drops == f0, "three packets fit");
    send(33, 80);
    #1;
    check(drops == f0 + 1, "fourth packet dropped on overflow");
    check(int'(free_words) == fr, "dropped packet's space given back");
    receive(30, 80);
    receive(31, 80);
    receive(32, 80);
    // too long, too short
    send(40, MAXB + 1); #1;
    check(drops == f0 + 2, "too long dropped");
    send(41, 10); #1;
    check(drops == f0 + 3, "too short dropped");
    send(42, MAXB);
    receive(42, MAXB);
    repeat (5) @(posedge clk); #1;
    check(!head_valid && free_words == DEPTH, "empty at end");
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
