// Unit test of header_buffer (4 slots of 32 words): fills every word
// through port A while port B reads other words in the same clocks, then
// reads everything back and compares with a reference array. Checks the
// one-clock read latency and read-before-write on a same-address clash.
module tb_header_buffer;
  import gbuf_pkg::*;
  localparam int SLOTS = 4, WORDS = SLOTS * HDR_WORDS;

  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we = 0, b_en = 0;
  logic [6:0] a_addr = 0, b_addr = 0;
  word_t a_wdata = 0, b_rdata;

  header_buffer #(.SLOTS(SLOTS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  word_t ref_mem [WORDS];
  bit    known   [WORDS];

  initial begin
    int ra;
    word_t expect_old;
    for (int i = 0; i < WORDS; i++) known[i] = 0;
    @(posedge clk);
    // write all words, reading back the previously written word at once
    for (int i = 0; i < WORDS; i++) begin
      a_we <= 1; a_addr <= 7'(i); a_wdata <= $urandom;
      b_en <= (i > 0); b_addr <= 7'(i - 1);
      @(posedge clk);
      ref_mem[i] = a_wdata; known[i] = 1;
      #1 if (i > 0) check(b_rdata == ref_mem[i-1], $sformatf("parallel read of word %0d", i - 1));
    end
    a_we <= 0;
    // random reads, one per clock
    for (int k = 0; k < 300; k++) begin
      ra = $urandom_range(WORDS - 1);
      b_en <= 1; b_addr <= 7'(ra);
      @(posedge clk);
      #1 check(b_rdata == ref_mem[ra], $sformatf("read word %0d", ra));
    end
    // same-address write and read: old data comes back
    expect_old = ref_mem[5];
    a_we <= 1; a_addr <= 7'd5; a_wdata <= 32'hDEAD_BEEF; b_en <= 1; b_addr <= 7'd5;
    @(posedge clk);
    a_we <= 0;
    #1 check(b_rdata == expect_old, "read during write returns old word");
    @(posedge clk);
    #1 check(b_rdata == 32'hDEAD_BEEF, "new word after the write");
    // b_en low holds the output
    b_en <= 0; b_addr <= 7'd0;
    @(posedge clk);
    #1 check(b_rdata == 32'hDEAD_BEEF, "output held while b_en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
