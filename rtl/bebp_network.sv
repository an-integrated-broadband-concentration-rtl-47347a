// bebp_network: a complete Fast Polling network segment: one hub, the
// concentrator standing in for the tree cable plant, and N_NIC nodes.
//
// The hub broadcasts its downlink through the concentrator to every NIC. It polls
// N_NODES addresses by BEBP; NIC i answers to poll address i. A NIC that holds a
// complete packet answers its poll with a burst. The concentrator lets that burst
// onto the uplink bus. The hub routes it to the local downlink buffer or to a
// ring port. Addresses with no NIC never answer, so their polls back off.
// Each NIC's PC bus is a top-level port, indexed by node (host_*[i]). The link
// transceivers between the blocks are replaced by direct 9-bit symbol wires. The
// Ring A/B router modules are outside this design; their packet ports are top
// ports. Everything runs on one clock at the link symbol rate.
// The network structure follows the document; the number of NICs on the
// concentrator (4, its backplane's node slots) and the direct wiring are this
// design's choices.
module bebp_network
  import bebp_pkg::*;
#(
  parameter int unsigned N_NIC     = 4,
  parameter int unsigned N_NODES   = 64,
  parameter int unsigned MAX_WL    = 256,
  parameter int unsigned GUARD_CYC = 25,
  parameter int unsigned PKT_CYC   = 518,
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  // hub configuration
  input  logic [31:0]      subnet,
  input  logic [31:0]      subnet_mask,
  input  logic             ring_b_sel,
  // PC bus of each node
  input  logic [19:0]      host_addr  [N_NIC],
  input  logic [7:0]       host_wdata [N_NIC],
  input  logic [N_NIC-1:0] host_wr,
  input  logic [N_NIC-1:0] host_rd,
  output logic [7:0]       host_rdata [N_NIC],
  output logic [N_NIC-1:0] irq,
  input  logic [N_NIC-1:0] vltn,
  // ring module ports of the hub
  input  logic             ring_a_in_wr,
  input  sym_t             ring_a_in_sym,
  output logic             ring_a_in_full,
  input  logic             ring_b_in_wr,
  input  sym_t             ring_b_in_sym,
  output logic             ring_b_in_full,
  output logic             ring_a_wr,
  output logic             ring_b_wr,
  output sym_t             ring_sym,
  // observation
  output logic [N_NIC-1:0] nic_tx_en,
  output logic [N_NIC-1:0] open_mask,
  output logic [31:0]      poll_cnt,
  output logic [31:0]      resp_cnt,
  output logic [31:0]      cycle_cnt,
  output logic [15:0]      drop_cnt
);
  sym_t             hub_dn_sym, hub_up_sym, node_dn_sym;
  logic             hub_dn_stb, hub_up_stb, node_dn_stb;
  sym_t             nic_tx_sym [N_NIC];
  logic [N_NIC-1:0] nic_tx_stb;

  hub #(.N_NODES(N_NODES), .MAX_WL(MAX_WL), .GUARD_CYC(GUARD_CYC), .PKT_CYC(PKT_CYC),
        .BUF_DEPTH(FIFO_DEPTH)) u_hub (
    .clk, .rst_n, .subnet, .subnet_mask, .ring_b_sel,
    .dn_sym(hub_dn_sym), .dn_stb(hub_dn_stb), .up_sym(hub_up_sym), .up_stb(hub_up_stb),
    .ring_a_in_wr, .ring_a_in_sym, .ring_a_in_full, .ring_b_in_wr, .ring_b_in_sym,
    .ring_b_in_full, .ring_a_wr, .ring_b_wr, .ring_sym,
    .poll_cnt, .resp_cnt, .cycle_cnt, .drop_cnt
  );

  concentrator #(.N_PORTS(N_NIC), .BASE_ADDR(0)) u_conc (
    .clk, .rst_n, .hub_dn_sym, .hub_dn_stb, .hub_up_sym, .hub_up_stb,
    .node_dn_sym, .node_dn_stb, .node_up_sym(nic_tx_sym), .node_up_stb(nic_tx_stb),
    .open_mask
  );

  for (genvar g = 0; g < N_NIC; g++) begin : g_nic
    nic #(.FIFO_DEPTH(FIFO_DEPTH)) u_nic (
      .clk, .rst_n, .my_node(NODE_ADDR_W'(g)),
      .host_addr(host_addr[g]), .host_wdata(host_wdata[g]), .host_wr(host_wr[g]),
      .host_rd(host_rd[g]), .host_rdata(host_rdata[g]), .irq(irq[g]),
      .tx_sym(nic_tx_sym[g]), .tx_stb(nic_tx_stb[g]), .tx_en(nic_tx_en[g]),
      .rx_sym(node_dn_sym), .rx_stb(node_dn_stb), .vltn(vltn[g])
    );
  end
endmodule
