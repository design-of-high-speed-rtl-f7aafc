// Behavioural model of a pipelined ZBT SRAM (testbench only, not
// synthesizable intent): 2**ADDR_W words of 32 bits. A command is sampled
// at a rising edge n when cs_n is low. A write takes its data from dq_in at
// edge n+LAT; a read drives dq_out with the word during the clock before
// edge n+LAT. Reads and writes may alternate on every clock with no idle
// cycle. bus_errors counts write data that was not driven (dq_oe low) when
// sampled and reads that found the controller driving the bus.
module zbt_sram_model #(
  parameter int unsigned ADDR_W = 18,
  parameter int unsigned LAT    = 2
) (
  input  logic              clk,
  input  logic              cs_n,
  input  logic              we_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       dq_in,
  input  logic              dq_oe,
  output logic [31:0]       dq_out,
  output int                bus_errors,
  output int                writes,
  output int                reads
);
  logic [31:0] mem [2**ADDR_W];

  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ADDR_W-1:0] addr;
  } cmd_t;
  cmd_t st [LAT];

  initial begin
    bus_errors = 0;
    writes = 0;
    reads = 0;
    for (int k = 0; k < LAT; k++) st[k] = '0;
  end

  always @(posedge clk) begin
    st[0] <= '{valid: !cs_n, we: !we_n, addr: addr};
    for (int k = 1; k < LAT; k++) st[k] <= st[k-1];
    if (st[LAT-1].valid) begin
      if (st[LAT-1].we) begin
        if (!dq_oe) bus_errors <= bus_errors + 1;
        mem[st[LAT-1].addr] <= dq_in;
        writes <= writes + 1;
      end else begin
        if (dq_oe) bus_errors <= bus_errors + 1;
        reads <= reads + 1;
      end
    end
  end

  always_comb dq_out = (st[LAT-1].valid && !st[LAT-1].we) ? mem[st[LAT-1].addr] : 32'h0;
endmodule
