// Shared constants, types and helper functions of the multi-level packet
// buffer. Widths that come from the design: the MAC side is 8 bits wide, the
// internal buffer bus 32 bits, and a header occupies 128 bytes. The maximum
// frame length (1518 bytes, standard Ethernet) and the 16-bit length field of
// the packet descriptor are choices of this implementation.
package gbuf_pkg;

  localparam int unsigned WORD_W        = 32;    // buffer / bus word width
  localparam int unsigned LEN_W         = 16;    // descriptor length field
  localparam int unsigned MAX_PKT_BYTES = 1518;  // longest accepted frame
  localparam int unsigned MIN_PKT_BYTES = 14;    // must at least hold both MAC addresses
  localparam int unsigned HDR_BYTES     = 128;   // bytes kept on chip per packet
  localparam int unsigned HDR_WORDS     = HDR_BYTES / 4;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LEN_W-1:0]  len_t;

  // Number of 32-bit words a packet of len bytes occupies. The unused bytes
  // of the last word are thrown away rather than packed with the next packet.
  function automatic len_t words_of(input len_t len);
    return len_t'((32'(len) + 3) >> 2);
  endfunction

  // Descriptor word stored in front of every packet in the receive and send
  // buffers: length in bytes in the low half, upper half reserved (zero).
  function automatic word_t make_desc(input len_t len);
    return {{(WORD_W-LEN_W){1'b0}}, len};
  endfunction

endpackage
