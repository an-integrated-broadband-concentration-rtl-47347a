// nic_rxsm: receiver state machine and packet filter of the network interface card.
//
// It watches the symbol stream from the link receiver (rx_sym, valid when rx_stb).
//   * A poll command whose address equals my_node gives a one-cycle poll_me pulse
//     to the transmitter state machine; other polls are dropped.
//   * A header clears a five-stage shift register that shifts once per data byte.
//     Its first four stages go with the four destination-address bytes. For each
//     byte, the filter records whether it equals the matching byte of my_ip and
//     whether it equals 255. When the fourth byte arrives, the fifth stage is set
//     if all four bytes match my_ip, or all four are 255 (broadcast). It is set only
//     if the receive FIFO is not half full. It stays set until the trailer.
//   * While the fifth stage is set, every data byte and then the trailer are written
//     to the receive FIFO (fifo_wr/fifo_wdata). The header and address are not
//     written. A written trailer also gives the rx_irq pulse.
// Poll commands may be interleaved anywhere inside a packet and do not disturb it.
// Writes happen in the cycle after the symbol arrives. The filter structure, the
// half-full condition and the kept trailer follow the document; the synchronous
// single-clock form is this design's choice.
module nic_rxsm
  import bebp_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   srst,
  input  sym_t                   rx_sym,
  input  logic                   rx_stb,
  input  logic [NODE_ADDR_W-1:0] my_node,
  input  logic [31:0]            my_ip,
  input  logic                   rxf_half,
  output logic                   poll_me,
  output logic                   fifo_wr,
  output sym_t                   fifo_wdata,
  output logic                   rx_irq
);
  sym_kind_e kind;
  logic [4:0] sr;          // SR1..SR5: SR5 (sr[4]) is the accept flag
  logic [3:0] ip_ok, bc_ok;
  logic [7:0] ip_byte;
  logic       in_pkt;

  assign kind = sym_kind(rx_sym);

  always_comb begin
    unique case (sr[3:0])
      4'b0000: ip_byte = my_ip[31:24];
      4'b0001: ip_byte = my_ip[23:16];
      4'b0011: ip_byte = my_ip[15:8];
      default: ip_byte = my_ip[7:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; ip_ok <= '0; bc_ok <= '0; in_pkt <= 1'b0;
      poll_me <= 1'b0; fifo_wr <= 1'b0; fifo_wdata <= '0; rx_irq <= 1'b0;
    end else begin
      poll_me <= 1'b0;
      fifo_wr <= 1'b0;
      rx_irq  <= 1'b0;
      if (srst) begin
        sr <= '0; ip_ok <= '0; bc_ok <= '0; in_pkt <= 1'b0;
      end else if (rx_stb) begin
        unique case (kind)
          SYM_POLL: poll_me <= (rx_sym[NODE_ADDR_W-1:0] == my_node);
          SYM_HEADER: begin
            sr <= '0; ip_ok <= '0; bc_ok <= '0; in_pkt <= 1'b1;
          end
          SYM_TRAILER: begin
            if (sr[4]) begin
              fifo_wr    <= 1'b1;
              fifo_wdata <= rx_sym;
              rx_irq     <= 1'b1;
            end
            sr <= '0; in_pkt <= 1'b0;
          end
          SYM_DATA: if (in_pkt) begin
            if (sr[3:0] != 4'b1111) begin
              // address byte: shift in one stage and record the match flags
              ip_ok <= {ip_ok[2:0], rx_sym[7:0] == ip_byte};
              bc_ok <= {bc_ok[2:0], rx_sym[7:0] == 8'hFF};
              sr    <= {sr[3:0], 1'b1};
              if (sr[3:0] == 4'b0111)
                sr[4] <= ((&ip_ok[2:0] && rx_sym[7:0] == ip_byte) ||
                          (&bc_ok[2:0] && rx_sym[7:0] == 8'hFF)) && !rxf_half;
            end else if (sr[4]) begin
              fifo_wr    <= 1'b1;
              fifo_wdata <= rx_sym;
            end
          end
        endcase
      end
    end
  end
endmodule
