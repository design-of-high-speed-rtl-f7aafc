// Small synchronous FIFO with registered storage and a show-ahead output:
// rd_data is the oldest entry whenever empty is low. Writing a full FIFO or
// reading an empty one is a protocol error and is flagged by assertions.
// Used for the queue of routed packets between the function module and the
// sending controller.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      count;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) begin
        mem[wp] <= wr_data;
        wp      <= inc(wp);
      end
      if (rd_en) rp <= inc(rp);
      count <= count + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) wr_en |-> (!full || rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty);
endmodule
