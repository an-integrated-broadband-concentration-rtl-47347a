// nic_misalign: misalignment protection between the receive FIFO and the host.
//
// The host always reads a fixed READ_LEN (512 data + 1 trailer) bytes per
// packet and accepts the packet only if the last byte it read is a trailer.
// This block counts host reads in READ_LEN-long windows. When a trailer leaves
// the FIFO before the window has ended, the gate closes. Until the window ends,
// further host reads get 0xFF (an undriven bus) and the FIFO is not touched.
// A packet that is too short is then rejected by the host, and the next window
// starts at the next packet. A packet that is too long spills into a second
// window that ends early, so two windows are rejected and the third is aligned
// again. The gate also re-opens on gate_rearm (the host's re-arm strobe) and
// srst resets the window.
// Interface: host_rd is a one-cycle read strobe; host_rdata is valid the next
// cycle. The FIFO is read with fifo_rd and its registered output fifo_rdata.
// The fixed-length read and the stop after a packet-end follow the document;
// re-opening at the window end and the 0xFF filler are this design's choices.
module nic_misalign
  import bebp_pkg::*;
#(
  parameter int unsigned READ_LEN = 513
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       srst,
  input  logic       gate_rearm,
  input  logic       host_rd,
  output logic [7:0] host_rdata,
  input  logic       fifo_empty,
  input  sym_t       fifo_rdata,
  output logic       fifo_rd
);
  localparam int unsigned CW = $clog2(READ_LEN + 1);

  logic [CW-1:0] cnt;
  logic          gate_open;
  logic          from_fifo;   // last host read was served from the FIFO
  logic          trl_chk;     // ... and was not the last read of its window

  wire trl_seen  = trl_chk && (sym_kind(fifo_rdata) == SYM_TRAILER);
  wire gate_eff  = gate_open && !trl_seen;
  wire wrap      = host_rd && (cnt == CW'(READ_LEN - 1));

  assign fifo_rd    = host_rd && gate_eff && !fifo_empty && !srst;
  assign host_rdata = from_fifo ? fifo_rdata[7:0] : 8'hFF;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; gate_open <= 1'b1; from_fifo <= 1'b0; trl_chk <= 1'b0;
    end else if (srst) begin
      cnt <= '0; gate_open <= 1'b1; from_fifo <= 1'b0; trl_chk <= 1'b0;
    end else begin
      if (host_rd) begin
        from_fifo <= fifo_rd;
        trl_chk   <= fifo_rd && !wrap;
        cnt       <= wrap ? '0 : cnt + 1'b1;
      end else begin
        trl_chk   <= 1'b0;
      end
      gate_open <= wrap || gate_rearm || gate_eff;
    end
  end
endmodule
