// Unit test of zbt_controller with the pipelined ZBT SRAM model. Checks
// the lock rules (a free lock goes to the sending side when both ask, the
// owner keeps it, the other side gets it once it is dropped), that writes
// through one client read back through the other, the read latency of
// LAT+2 clocks, back-to-back mixed reads and writes on every clock, and the
// bus timing seen by the SRAM model.
module tb_zbt_controller;
  import gbuf_pkg::*;
  localparam int AW = 10, LAT = 2;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic tx_req = 0, tx_cmd_valid = 0, tx_cmd_we = 0, rx_req = 0, rx_cmd_valid = 0, rx_cmd_we = 0;
  logic [AW-1:0] tx_cmd_addr = 0, rx_cmd_addr = 0;
  word_t tx_cmd_wdata = 0, rx_cmd_wdata = 0, rdata;
  logic tx_gnt, rx_gnt, tx_rvalid, rx_rvalid;
  logic zbt_cs_n, zbt_we_n, zbt_dq_oe;
  logic [AW-1:0] zbt_addr;
  word_t zbt_dq_o, zbt_dq_i;

  zbt_controller #(.ADDR_W(AW), .LAT(LAT)) dut (.*);

  int bus_errors, writes, reads;
  zbt_sram_model #(.ADDR_W(AW), .LAT(LAT)) u_sram (
    .clk, .cs_n(zbt_cs_n | rst), .we_n(zbt_we_n), .addr(zbt_addr), .dq_in(zbt_dq_o),
    .dq_oe(zbt_dq_oe), .dq_out(zbt_dq_i), .bus_errors, .writes, .reads);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  word_t ref_mem [2**AW];
  bit    known [2**AW];
  word_t exp_q [$];
  int    exp_t [$];

  // read results, collected with their arrival clock
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  word_t got [$];
  int    got_t [$];
  always @(negedge clk) if (tx_rvalid || rx_rvalid) begin
    got.push_back(rdata); got_t.push_back(cyc);
  end

  initial begin
    int t0, a;
    for (int i = 0; i < 2**AW; i++) known[i] = 0;
    repeat (3) @(posedge clk) #1;
    rst = 0;
    @(posedge clk) #1;
    // both ask at once: the sending side wins
    tx_req = 1; rx_req = 1;
    #1 check(tx_gnt && !rx_gnt, "send side first when both ask");
    @(posedge clk) #1;
    tx_req = 0;
    #1 check(!rx_gnt, "lock not handed over in the release clock");
    @(posedge clk) #1;
    check(rx_gnt, "receive side gets the lock next");
    @(posedge clk) #1;
    // receive side owns it: a new send request must wait
    tx_req = 1;
    #1 check(rx_gnt && !tx_gnt, "owner keeps the lock");
    // receive side writes 64 words on consecutive clocks
    for (int i = 0; i < 64; i++) begin
      rx_cmd_valid = 1; rx_cmd_we = 1; rx_cmd_addr = AW'(i * 3); rx_cmd_wdata = $urandom;
      @(posedge clk) #1;
      ref_mem[i * 3] = rx_cmd_wdata;
      known[i * 3] = 1;
    end
    rx_cmd_valid = 0; rx_req = 0;
    @(posedge clk) #1;
    @(posedge clk) #1;
    check(tx_gnt, "send side gets the lock after release");
    // send side reads them back, one per clock
    t0 = cyc;
    for (int i = 0; i < 64; i++) begin
      tx_cmd_valid = 1; tx_cmd_we = 0; tx_cmd_addr = AW'(i * 3);
      @(posedge clk) #1;
    end
    tx_cmd_valid = 0;
    repeat (LAT + 4) @(posedge clk) #1;
    check(got.size() == 64, $sformatf("%0d reads returned", got.size()));
    for (int i = 0; i < got.size(); i++) check(got[i] == ref_mem[i * 3], $sformatf("read %0d", i));
    if (got.size() > 0) check(got_t[0] - t0 == LAT + 2, $sformatf("read latency %0d", got_t[0] - t0));
    got.delete(); got_t.delete();
    // mixed reads and writes on every clock, no idle cycles
    for (int i = 0; i < 200; i++) begin
      a = $urandom_range(2**AW - 1);
      tx_cmd_valid = 1;
      tx_cmd_addr = AW'(a);
      if ($urandom_range(1) == 0) begin
        tx_cmd_we = 1; tx_cmd_wdata = $urandom;
        @(posedge clk) #1;
        ref_mem[a] = tx_cmd_wdata;
        known[a] = 1;
      end else begin
        // read only what was written (the SRAM starts with random contents)
        if (!known[a]) a = 3 * $urandom_range(63);
        tx_cmd_addr = AW'(a);
        tx_cmd_we = 0;
        @(posedge clk) #1;
        exp_q.push_back(ref_mem[a]);
        exp_t.push_back(cyc - 1);
      end
    end
    tx_cmd_valid = 0; tx_req = 0;
    repeat (10) @(posedge clk) #1;
    check(got.size() == exp_q.size(), "mixed: all reads returned");
    for (int i = 0; i < got.size() && i < exp_q.size(); i++) begin
      check(got[i] == exp_q[i], $sformatf("mixed read %0d", i));
      check(got_t[i] - exp_t[i] == LAT + 2, $sformatf("mixed read %0d latency", i));
    end
    check(bus_errors == 0, $sformatf("%0d bus timing errors", bus_errors));
    check(writes == 64 + (writes - 64) && reads > 64, "SRAM saw the traffic");
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
