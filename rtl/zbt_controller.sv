// ZBT SRAM controller with a two-client lock.
//
// The external ZBT (zero bus turnaround) SRAM is the one resource the
// sending and receiving controllers share. Each client raises req for as
// long as it needs the memory; gnt is combinational from req and the
// current owner, so a client learns in the same clock whether it got the
// lock. A free lock goes to the sending side first when both ask; the owner
// keeps it until it drops req. Only the owner's commands reach the SRAM.
//
// SRAM bus timing (pipelined ZBT): a command (cmd_valid with cmd_we and
// cmd_addr) in clock c is driven on the pins from the edge ending c; the
// SRAM samples it one edge later (edge n). Write data is driven so that it
// is sampled at edge n+LAT, and read data is captured at edge n+LAT and
// returned to the owner on rvalid/rdata. A command can be issued every
// clock, reads and writes mixed, with no turnaround cycles; the read
// latency seen by a client is LAT+2 clocks.
//
// The lock, the send-side priority and the SRAM being shared follow the
// design. The bus timing is that of a standard pipelined ZBT part (LAT = 2)
// and the 18-bit address (256 K words) is this design's choice.
module zbt_controller
  import gbuf_pkg::*;
#(
  parameter int unsigned ADDR_W = 18,
  parameter int unsigned LAT    = 2
) (
  input  logic              clk,
  input  logic              rst,
  // client 0: sending controller (priority)
  input  logic              tx_req,
  output logic              tx_gnt,
  input  logic              tx_cmd_valid,
  input  logic              tx_cmd_we,
  input  logic [ADDR_W-1:0] tx_cmd_addr,
  input  word_t             tx_cmd_wdata,
  output logic              tx_rvalid,
  // client 1: receiving controller
  input  logic              rx_req,
  output logic              rx_gnt,
  input  logic              rx_cmd_valid,
  input  logic              rx_cmd_we,
  input  logic [ADDR_W-1:0] rx_cmd_addr,
  input  word_t             rx_cmd_wdata,
  output logic              rx_rvalid,
  output word_t             rdata,        // read data for either client
  // SRAM pins
  output logic              zbt_cs_n,
  output logic              zbt_we_n,
  output logic [ADDR_W-1:0] zbt_addr,
  output word_t             zbt_dq_o,
  output logic              zbt_dq_oe,
  input  word_t             zbt_dq_i
);
  typedef enum logic [1:0] {OWN_NONE, OWN_TX, OWN_RX} owner_t;
  owner_t owner;

  assign tx_gnt = tx_req && (owner == OWN_TX || (owner == OWN_NONE));
  assign rx_gnt = rx_req && (owner == OWN_RX || (owner == OWN_NONE && !tx_req));

  always_ff @(posedge clk) begin
    if (rst) owner <= OWN_NONE;
    else if (tx_gnt) owner <= OWN_TX;
    else if (rx_gnt) owner <= OWN_RX;
    else owner <= OWN_NONE;
  end

  // the granted client's command
  logic              c_valid, c_we, c_tx;
  logic [ADDR_W-1:0] c_addr;
  word_t             c_wdata;
  always_comb begin
    c_tx = tx_gnt;
    if (tx_gnt) begin
      c_valid = tx_cmd_valid; c_we = tx_cmd_we; c_addr = tx_cmd_addr; c_wdata = tx_cmd_wdata;
    end else begin
      c_valid = rx_gnt && rx_cmd_valid; c_we = rx_cmd_we; c_addr = rx_cmd_addr; c_wdata = rx_cmd_wdata;
    end
  end

  // pipeline: stage k is valid during the clock k edges after the command
  typedef struct packed {
    logic  valid;
    logic  we;
    logic  tx;
    word_t wdata;
  } stage_t;
  stage_t pipe [LAT+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      zbt_cs_n  <= 1'b1;
      zbt_we_n  <= 1'b1;
      zbt_addr  <= '0;
      zbt_dq_o  <= '0;
      zbt_dq_oe <= 1'b0;
      tx_rvalid <= 1'b0;
      rx_rvalid <= 1'b0;
      rdata     <= '0;
      for (int k = 0; k <= LAT; k++) pipe[k] <= '0;
    end else begin
      zbt_cs_n <= !c_valid;
      zbt_we_n <= !(c_valid && c_we);
      zbt_addr <= c_addr;
      pipe[0]  <= '{valid: c_valid, we: c_we, tx: c_tx, wdata: c_wdata};
      for (int k = 1; k <= LAT; k++) pipe[k] <= pipe[k-1];
      // write data on the pins in the clock before edge n+LAT
      zbt_dq_oe <= pipe[LAT-1].valid && pipe[LAT-1].we;
      zbt_dq_o  <= pipe[LAT-1].wdata;
      // read data sampled at edge n+LAT
      tx_rvalid <= pipe[LAT].valid && !pipe[LAT].we && pipe[LAT].tx;
      rx_rvalid <= pipe[LAT].valid && !pipe[LAT].we && !pipe[LAT].tx;
      rdata     <= zbt_dq_i;
    end
  end

  a_one_owner: assert property (@(posedge clk) disable iff (rst) !(tx_gnt && rx_gnt));
  a_cmd_needs_lock: assert property (@(posedge clk) disable iff (rst)
                                     (tx_cmd_valid |-> tx_gnt) and (rx_cmd_valid |-> rx_gnt));
endmodule
