// hub_uplink_router: packet router on the hub's uplink.
//
// Symbols received from the nodes (up_sym/up_stb) enter an 8-entry queue, from
// the header up to and including the trailer. Data symbols that arrive outside a
// packet (no header seen) are dropped and counted in drop_cnt. When the fourth
// destination-address byte arrives, the route of the packet is decided:
//   local  (0) if the address is 255.255.255.255 or lies in the local subnet,
//              (dest & subnet_mask) == (subnet & subnet_mask);
//   ring   (1 or 2) otherwise, Ring A unless ring_b_sel is set.
// The route is queued, and the queue drains at one symbol per cycle into the
// chosen output (out_wr[route] with out_sym) until that packet's trailer. The
// packet is forwarded unchanged, header to trailer, five cycles or more behind
// the input.
// Routing by destination address to the local buffer or to a ring follows the
// document; the subnet test, the static ring choice and the queue are this
// design's choices.
module hub_uplink_router
  import bebp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sym_t        up_sym,
  input  logic        up_stb,
  input  logic [31:0] subnet,
  input  logic [31:0] subnet_mask,
  input  logic        ring_b_sel,
  output logic [2:0]  out_wr,
  output sym_t        out_sym,
  output logic [15:0] drop_cnt
);
  localparam int unsigned QD = 8;

  sym_t       q [QD];
  logic [2:0] qw, qr;
  logic [3:0] qn;
  logic [1:0] rq [2];       // route queue
  logic       rq_w, rq_r;
  logic [1:0] rq_n;
  logic       in_pkt;
  logic [2:0] acnt;         // address bytes seen
  logic [23:0] dest_hi;
  sym_kind_e  kind;

  assign kind = sym_kind(up_sym);

  wire enq     = up_stb && (kind == SYM_HEADER || ((kind == SYM_DATA || kind == SYM_TRAILER) && in_pkt));
  wire addr4   = up_stb && kind == SYM_DATA && in_pkt && acnt == 3'd3;
  wire [31:0] dest = {dest_hi, up_sym[7:0]};
  wire is_local = (dest == 32'hFFFF_FFFF) || ((dest & subnet_mask) == (subnet & subnet_mask));
  wire [1:0] route = is_local ? 2'd0 : (ring_b_sel ? 2'd2 : 2'd1);

  wire deq     = (qn != 0) && (rq_n != 0);
  wire deq_last = deq && (sym_kind(q[qr]) == SYM_TRAILER);

  always_comb begin
    out_wr  = '0;
    out_sym = q[qr];
    if (deq) out_wr[rq[rq_r]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qw <= '0; qr <= '0; qn <= '0;
      rq_w <= 1'b0; rq_r <= 1'b0; rq_n <= '0;
      rq[0] <= '0; rq[1] <= '0;
      in_pkt <= 1'b0; acnt <= '0; dest_hi <= '0; drop_cnt <= '0;
      for (int i = 0; i < QD; i++) q[i] <= '0;
    end else begin
      if (enq) begin
        q[qw] <= up_sym;
        qw    <= qw + 1'b1;
      end
      if (deq) qr <= qr + 1'b1;
      qn <= qn + 4'(enq) - 4'(deq);

      if (addr4) begin
        rq[rq_w] <= route;
        rq_w     <= ~rq_w;
      end
      if (deq_last) rq_r <= ~rq_r;
      rq_n <= rq_n + 2'(addr4) - 2'(deq_last);

      if (up_stb) begin
        unique case (kind)
          SYM_HEADER:  begin in_pkt <= 1'b1; acnt <= '0; end
          SYM_TRAILER: in_pkt <= 1'b0;
          SYM_DATA: begin
            if (!in_pkt) drop_cnt <= drop_cnt + 1'b1;
            else if (acnt < 3'd4) begin
              acnt    <= acnt + 1'b1;
              dest_hi <= {dest_hi[15:0], up_sym[7:0]};
            end
          end
          default: ;
        endcase
      end
    end
  end

  a_queue_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) qn <= 4'(QD));
endmodule
