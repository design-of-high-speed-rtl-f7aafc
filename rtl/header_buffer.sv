// Header buffer: the on-chip store for the first HDR_BYTES (128) bytes of
// every packet the scheduler takes in. It is a simple dual-port block RAM of
// SLOTS slots of HDR_WORDS 32-bit words, word address = slot*HDR_WORDS+index.
// Port A is written by the receiving controller while port B is read by the
// sending controller in the same clock, which is what lets the two
// controllers run in parallel; a packet that fits in its header slot never
// touches the shared external SRAM.
//
// Timing: a write on port A takes effect at the clock edge; port B returns
// the addressed word one clock after b_en (registered read). A read of the
// word being written in the same clock returns the old contents.
//
// 128-byte headers and the dual-port block-RAM structure follow the design;
// the slot count (64 slots, 8 KiB) is this design's choice.
module header_buffer
  import gbuf_pkg::*;
#(
  parameter int unsigned SLOTS     = 64,
  parameter int unsigned SLOT_WORDS = HDR_WORDS,
  localparam int unsigned AW = $clog2(SLOTS * SLOT_WORDS)
) (
  input  logic          clk,
  // port A: write
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  word_t         a_wdata,
  // port B: read
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output word_t         b_rdata
);
  word_t mem [SLOTS * SLOT_WORDS];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end
endmodule
