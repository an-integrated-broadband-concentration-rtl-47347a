// bebp_pkg: shared types and constants of the Fast Polling / BEBP network.
//
// Every byte on the hub<->node links is a 9-bit symbol. Bit 8 set marks a
// normal data byte. Bit 8 clear marks a control byte. Within control bytes, bit 7
// separates a one-byte poll command (bit 7 = 1, bits 6..0 = node address) from
// a packet delimiter (bit 7 = 0, bit 6 = 1 for header, 0 for trailer, bits 5..0
// reserved and sent as zero). A packet is header, 4-byte destination IP address,
// 512 data bytes and trailer: 518 symbols in all. The encoding and the packet
// format follow the document; sending reserved bits as zero is this design's choice.
package bebp_pkg;

  localparam int unsigned SYM_W          = 9;
  localparam int unsigned NODE_ADDR_W    = 7;
  localparam int unsigned ADDR_BYTES     = 4;
  localparam int unsigned PKT_DATA_BYTES = 512;
  // header + address + data + trailer
  localparam int unsigned PKT_SYMS       = 1 + ADDR_BYTES + PKT_DATA_BYTES + 1;

  typedef logic [SYM_W-1:0] sym_t;

  typedef enum logic [1:0] {
    SYM_DATA    = 2'd0,
    SYM_HEADER  = 2'd1,
    SYM_TRAILER = 2'd2,
    SYM_POLL    = 2'd3
  } sym_kind_e;

  localparam sym_t SYM_HDR = 9'h040;
  localparam sym_t SYM_TRL = 9'h000;

  function automatic sym_t mk_data(input logic [7:0] b);
    return {1'b1, b};
  endfunction

  function automatic sym_t mk_poll(input logic [NODE_ADDR_W-1:0] a);
    return {2'b01, a};
  endfunction

  function automatic sym_kind_e sym_kind(input sym_t s);
    if (s[8])      return SYM_DATA;
    else if (s[7]) return SYM_POLL;
    else if (s[6]) return SYM_HEADER;
    else           return SYM_TRAILER;
  endfunction

endpackage
