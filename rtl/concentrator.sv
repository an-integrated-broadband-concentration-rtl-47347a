// concentrator: backplane with one hub-connecting and N_PORTS node-connecting
// modules, standing in for the tree of a cable (HFC) plant.
//
// The downlink from the hub (hub_dn_*) is repeated to every node port
// (node_dn_*). Each node's uplink passes through its conc_node_module, which
// opens only after a poll to that port's address (port i has poll address
// BASE_ADDR + i). The uplink bus is the OR of all module outputs; at most one
// module is open at a time, so it carries exactly the polled node's burst to
// the hub (hub_up_*). open_mask shows which buffers are open.
// The two shared buses and the poll-selected buffers follow the document; the
// OR-ed bus and the port numbering are this design's choices.
module concentrator
  import bebp_pkg::*;
#(
  parameter int unsigned N_PORTS   = 4,
  parameter int unsigned BASE_ADDR = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  sym_t               hub_dn_sym,
  input  logic               hub_dn_stb,
  output sym_t               hub_up_sym,
  output logic               hub_up_stb,
  output sym_t               node_dn_sym,
  output logic               node_dn_stb,
  input  sym_t               node_up_sym [N_PORTS],
  input  logic [N_PORTS-1:0] node_up_stb,
  output logic [N_PORTS-1:0] open_mask
);
  sym_t               bus_sym [N_PORTS];
  logic [N_PORTS-1:0] bus_stb;

  assign node_dn_sym = hub_dn_sym;
  assign node_dn_stb = hub_dn_stb;

  for (genvar g = 0; g < N_PORTS; g++) begin : g_port
    conc_node_module u_mod (
      .clk, .rst_n, .slot_addr(NODE_ADDR_W'(BASE_ADDR + g)),
      .dn_sym(hub_dn_sym), .dn_stb(hub_dn_stb),
      .node_up_sym(node_up_sym[g]), .node_up_stb(node_up_stb[g]),
      .bus_sym(bus_sym[g]), .bus_stb(bus_stb[g]), .buf_open(open_mask[g])
    );
  end

  always_comb begin
    hub_up_sym = '0;
    for (int i = 0; i < N_PORTS; i++) hub_up_sym |= bus_sym[i];
  end
  assign hub_up_stb = |bus_stb;

  a_one_open: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(open_mask));
endmodule
