// nic_txsm: transmitter state machine of the network interface card.
//
// The host loads a whole packet (header, address, data, trailer) into the
// transmit FIFO. A counter keeps the number of complete packets in the FIFO:
// it goes up when a trailer is written (trl_wr) and down when a trailer is
// sent, and is cleared with the FIFO (txf_clr). Polls are ignored while pmask
// (Poll Mask) is set or no complete packet is stored. When a
// poll_me pulse arrives with pmask low and a complete packet stored, the state machine
// reads the FIFO one symbol per cycle and sends each symbol to the link
// transmitter (tx_sym with tx_stb). It stops after it has sent a trailer. tx_en is
// high from the first to the last symbol of the burst: it is the enable of the
// burst-mode output gate. If the FIFO runs dry inside a packet, the machine waits
// without a strobe. srst (TxSM reset) stops it at once.
// Timing: the first symbol leaves one cycle after the poll_me pulse, because the
// FIFO read data is registered. The start and stop conditions (a complete
// packet and a poll, unless masked) follow the document; counting trailers to
// know that a packet is complete, and the cycle timing, are this design's choices.
module nic_txsm
  import bebp_pkg::*;
#(
  parameter int unsigned PKT_CNT_W = 11   // counts up to 2047 complete packets
) (
  input  logic clk,
  input  logic rst_n,
  input  logic srst,
  input  logic poll_me,
  input  logic pmask,
  input  logic trl_wr,
  input  logic txf_clr,
  input  logic txf_empty,
  input  sym_t txf_rdata,
  output logic txf_rd,
  output sym_t tx_sym,
  output logic tx_stb,
  output logic tx_en
);
  typedef enum logic {S_IDLE, S_SEND} state_e;
  state_e state;
  logic   pend;     // a symbol read last cycle is on txf_rdata
  logic [PKT_CNT_W-1:0] pkt_cnt;   // complete packets (trailers) in the TxFIFO

  wire start   = (state == S_IDLE) && poll_me && !pmask && (pkt_cnt != '0);
  wire last    = pend && (sym_kind(txf_rdata) == SYM_TRAILER);
  wire trl_out = (state == S_SEND) && last;

  assign txf_rd = !srst && !txf_empty && (start || (state == S_SEND && !last));
  assign tx_sym = txf_rdata;
  assign tx_stb = (state == S_SEND) && pend;
  assign tx_en  = (state == S_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_cnt <= '0;
    end else if (txf_clr) begin
      pkt_cnt <= '0;
    end else if (trl_wr && !trl_out) begin
      pkt_cnt <= pkt_cnt + 1'b1;
    end else if (trl_out && !trl_wr) begin
      pkt_cnt <= pkt_cnt - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pend  <= 1'b0;
    end else if (srst) begin
      state <= S_IDLE;
      pend  <= 1'b0;
    end else begin
      pend <= txf_rd;
      if (start)     state <= S_SEND;
      else if (last) state <= S_IDLE;
    end
  end
endmodule
