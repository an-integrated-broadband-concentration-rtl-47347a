// nic: network interface card of a BEBP node.
//
// Transmit path: host writes (nic_host_port) -> TxFIFO (sym_fifo, 1K x 9) ->
// transmitter state machine (nic_txsm) -> link transmitter symbols tx_sym/tx_stb,
// with tx_en opening the burst-mode output while a packet is being sent.
// Receive path: link receiver symbols rx_sym/rx_stb -> receiver state machine and
// address filter (nic_rxsm) -> RxFIFO (sym_fifo) -> misalignment gate
// (nic_misalign) -> host reads. The receiver also turns a poll addressed to
// my_node into the transmitter's start signal. irq goes high on a received packet
// or on a link violation (vltn) until acknowledged.
// The node's poll address my_node is a static input; its IP address is loaded
// by the host through the IP register. Everything runs on clk, one link symbol
// per cycle. The block split follows the document's NIC; the single clock is
// this design's choice.
module nic
  import bebp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NODE_ADDR_W-1:0] my_node,
  // PC bus
  input  logic [19:0]            host_addr,
  input  logic [7:0]             host_wdata,
  input  logic                   host_wr,
  input  logic                   host_rd,
  output logic [7:0]             host_rdata,
  output logic                   irq,
  // link (parallel side of the transmitter and receiver)
  output sym_t                   tx_sym,
  output logic                   tx_stb,
  output logic                   tx_en,
  input  sym_t                   rx_sym,
  input  logic                   rx_stb,
  input  logic                   vltn
);
  logic tx_empty, tx_half, tx_full, rx_empty, rx_half, rx_full;
  logic txf_wr, txf_rd, rxf_wr, rxf_rd, rx_rd, rx_irq, poll_me, pmask;
  logic txf_rst, txsm_rst, rxf_rst, rxsm_rst, gate_rearm;
  sym_t txf_wdata, txf_rdata, rxf_wdata, rxf_rdata;
  logic [31:0] my_ip;
  logic [7:0]  rx_rdata;

  nic_host_port u_port (
    .clk, .rst_n, .host_addr, .host_wdata, .host_wr, .host_rd, .host_rdata, .irq,
    .tx_empty, .tx_half, .tx_full, .rx_empty, .rx_half, .rx_full,
    .rx_irq, .vltn, .rx_rdata, .rx_rd, .txf_wr, .txf_wdata, .pmask, .my_ip,
    .txf_rst, .txsm_rst, .rxf_rst, .rxsm_rst, .gate_rearm
  );

  sym_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(SYM_W)) u_txfifo (
    .clk, .rst_n, .srst(txf_rst), .wr(txf_wr), .wdata(txf_wdata),
    .rd(txf_rd), .rdata(txf_rdata), .empty(tx_empty), .half(tx_half), .full(tx_full),
    .count()
  );

  nic_txsm u_txsm (
    .clk, .rst_n, .srst(txsm_rst), .poll_me, .pmask,
    .trl_wr(txf_wr && !tx_full && sym_kind(txf_wdata) == SYM_TRAILER), .txf_clr(txf_rst),
    .txf_empty(tx_empty),
    .txf_rdata, .txf_rd, .tx_sym, .tx_stb, .tx_en
  );

  nic_rxsm u_rxsm (
    .clk, .rst_n, .srst(rxsm_rst), .rx_sym, .rx_stb, .my_node, .my_ip,
    .rxf_half(rx_half), .poll_me, .fifo_wr(rxf_wr), .fifo_wdata(rxf_wdata), .rx_irq
  );

  sym_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(SYM_W)) u_rxfifo (
    .clk, .rst_n, .srst(rxf_rst), .wr(rxf_wr), .wdata(rxf_wdata),
    .rd(rxf_rd), .rdata(rxf_rdata), .empty(rx_empty), .half(rx_half), .full(rx_full),
    .count()
  );

  nic_misalign #(.READ_LEN(PKT_DATA_BYTES + 1)) u_misalign (
    .clk, .rst_n, .srst(rxf_rst), .gate_rearm, .host_rd(rx_rd), .host_rdata(rx_rdata),
    .fifo_empty(rx_empty), .fifo_rdata(rxf_rdata), .fifo_rd(rxf_rd)
  );
endmodule
