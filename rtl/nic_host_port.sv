// nic_host_port: PC-bus side of the network interface card.
//
// Address decoding (as the card's address-decoder GAL): the Data Port is the
// 4 KB block at BASE_DATA (20'hD8xxx), the control registers are the 16 bytes at
// BASE_CTRL (20'hD900x). Register offsets in the control block:
//   0 read  : status {0, rx_full, rx_half, rx_empty, 0, tx_full, tx_half, tx_empty}
//   1 read  : interrupt register {.., violation, rx_packet}; write: acknowledge,
//             each 1 bit clears that interrupt
//   2 write : IP address, one byte per write, most significant byte first
//   3 write : reset strobes: bit0 TxFIFO, bit1 TxSM, bit2 RxFIFO, bit3 RxSM,
//             bit4 re-arm the receive gate
//   4 write : Control Port: writes a control symbol to the TxFIFO with bit 8
//             clear. The host byte's bit 6 becomes the header/trailer bit, so
//             0x40 is a header and 0x00 a trailer.
//   5 write : Poll Mask (bit 0)
// A write to the Data Port puts {1, byte} into the TxFIFO. A read of the Data
// Port is a receive read (rx_rd) passed to the misalignment gate. The irq output
// is the OR of the two interrupt latches, set by rx_irq and by vltn.
// Host cycles are one-cycle strobes (host_wr/host_rd); read data appears on
// host_rdata the next cycle. Addresses, register bits and the latch structure
// follow the card's logic equations. The single-cycle synchronous bus, the
// 32-bit IP register and the header/trailer bit mapping are this design's choices.
module nic_host_port
  import bebp_pkg::*;
#(
  parameter logic [19:0] BASE_DATA = 20'hD8000,
  parameter logic [19:0] BASE_CTRL = 20'hD9000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [19:0] host_addr,
  input  logic [7:0]  host_wdata,
  input  logic        host_wr,
  input  logic        host_rd,
  output logic [7:0]  host_rdata,
  output logic        irq,
  // FIFO and NIC state
  input  logic        tx_empty, tx_half, tx_full,
  input  logic        rx_empty, rx_half, rx_full,
  input  logic        rx_irq,
  input  logic        vltn,
  input  logic [7:0]  rx_rdata,
  output logic        rx_rd,
  output logic        txf_wr,
  output sym_t        txf_wdata,
  output logic        pmask,
  output logic [31:0] my_ip,
  output logic        txf_rst, txsm_rst, rxf_rst, rxsm_rst, gate_rearm
);
  wire bda = (host_addr[19:12] == BASE_DATA[19:12]);
  wire bca = (host_addr[19:4]  == BASE_CTRL[19:4]);
  wire [3:0] off = host_addr[3:0];

  logic       irq_rx, irq_vl;
  logic [7:0] reg_q;
  logic       rd_data_q;

  wire wr_ctl = host_wr && bca;

  assign txf_wr    = host_wr && (bda || (bca && off == 4'd4));
  assign txf_wdata = bda ? mk_data(host_wdata) : {2'b00, host_wdata[6], 6'b0};
  assign rx_rd     = host_rd && bda;

  assign txf_rst    = wr_ctl && off == 4'd3 && host_wdata[0];
  assign txsm_rst   = wr_ctl && off == 4'd3 && host_wdata[1];
  assign rxf_rst    = wr_ctl && off == 4'd3 && host_wdata[2];
  assign rxsm_rst   = wr_ctl && off == 4'd3 && host_wdata[3];
  assign gate_rearm = wr_ctl && off == 4'd3 && host_wdata[4];

  assign irq        = irq_rx || irq_vl;
  assign host_rdata = rd_data_q ? rx_rdata : reg_q;

  wire ack = wr_ctl && off == 4'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_rx <= 1'b0; irq_vl <= 1'b0; pmask <= 1'b0; my_ip <= '0;
      reg_q <= '0; rd_data_q <= 1'b0;
    end else begin
      // set has priority over a simultaneous acknowledge
      irq_rx <= rx_irq || (irq_rx && !(ack && host_wdata[0]));
      irq_vl <= vltn   || (irq_vl && !(ack && host_wdata[1]));
      if (wr_ctl && off == 4'd5) pmask <= host_wdata[0];
      if (wr_ctl && off == 4'd2) my_ip <= {my_ip[23:0], host_wdata};
      if (host_rd) begin
        rd_data_q <= bda;
        if (bca && off == 4'd0)
          reg_q <= {1'b0, rx_full, rx_half, rx_empty, 1'b0, tx_full, tx_half, tx_empty};
        else if (bca && off == 4'd1)
          reg_q <= {6'b0, irq_vl, irq_rx};
        else
          reg_q <= 8'hFF;
      end
    end
  end
endmodule
