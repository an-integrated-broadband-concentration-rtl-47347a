// conc_node_module: node-connecting module of the concentrator.
//
// The concentrator emulates a tree (HFC) cable with point-to-point links: the
// hub's downlink is broadcast to every node module, and each node module puts
// its node's uplink onto the shared uplink bus only while its 9-bit bus buffer
// is open. A decoder on the downlink (dn_sym/dn_stb) opens the buffer on a poll
// command addressed to slot_addr. Any other poll closes it. The buffer's state
// is registered at the poll symbol, so it switches one cycle after the poll.
// While closed the module drives zeros and no strobe (bus_sym/bus_stb).
// The poll decoder and the buffer follow the document; modelling the bus
// buffer as an AND gate for an OR-ed bus is this design's choice.
module conc_node_module
  import bebp_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NODE_ADDR_W-1:0] slot_addr,
  input  sym_t                   dn_sym,
  input  logic                   dn_stb,
  input  sym_t                   node_up_sym,
  input  logic                   node_up_stb,
  output sym_t                   bus_sym,
  output logic                   bus_stb,
  output logic                   buf_open
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      buf_open <= 1'b0;
    else if (dn_stb && sym_kind(dn_sym) == SYM_POLL)
      buf_open <= (dn_sym[NODE_ADDR_W-1:0] == slot_addr);
  end

  assign bus_sym = buf_open ? node_up_sym : '0;
  assign bus_stb = buf_open && node_up_stb;
endmodule
