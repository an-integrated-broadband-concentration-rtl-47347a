// hub_downlink_mux: downlink transmitter of the hub.
//
// Three output buffers (0 = local traffic, 1 = from Ring A, 2 = from Ring B)
// hold whole packets, each ended by a trailer. The multiplexer sends one packet at
// a time, choosing the next non-empty buffer round-robin after each trailer, at
// one symbol per cycle (dn_sym with dn_stb). A poll command (cmd_req/cmd_sym)
// can be sent at any time, even in the middle of a packet: it takes the next
// symbol slot (cmd_ack), and the packet goes on in the slot after it. Nodes pick
// polls out of the stream by their bit pattern.
// Interface to each buffer: src_empty, src_rd, and src_rdata, valid the cycle
// after src_rd (sym_fifo timing). The output is registered.
// The round-robin order and the poll insertion follow the document; the
// packet-by-packet round robin is this design's choice.
module hub_downlink_mux
  import bebp_pkg::*;
#(
  parameter int unsigned N_SRC = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_SRC-1:0] src_empty,
  input  sym_t             src_rdata [N_SRC],
  output logic [N_SRC-1:0] src_rd,
  input  logic             cmd_req,
  input  sym_t             cmd_sym,
  output logic             cmd_ack,
  output sym_t             dn_sym,
  output logic             dn_stb
);
  localparam int unsigned SW = (N_SRC > 1) ? $clog2(N_SRC) : 1;

  logic [SW-1:0] cur;
  logic          in_pkt;   // a packet from cur is being sent
  logic          pend;     // src_rdata[cur] holds a symbol not yet sent
  logic          nxt_found;
  logic [SW-1:0] nxt;
  logic          emit_data, is_last, rd_now;

  // next non-empty buffer after cur, round-robin
  always_comb begin
    nxt_found = 1'b0;
    nxt = cur;
    for (int k = N_SRC; k >= 1; k--) begin
      automatic int idx = (int'(cur) + k) % N_SRC;
      if (!src_empty[idx]) begin
        nxt_found = 1'b1;
        nxt = SW'(idx);
      end
    end
  end

  assign cmd_ack   = cmd_req;
  assign emit_data = !cmd_req && pend;
  assign is_last   = emit_data && (sym_kind(src_rdata[cur]) == SYM_TRAILER);
  // keep the current packet flowing: read when the previous symbol goes out (or
  // none is waiting), never while a symbol is waiting behind a poll
  assign rd_now    = in_pkt && !is_last && !src_empty[cur] && (emit_data || !pend);

  always_comb begin
    src_rd = '0;
    if (rd_now) src_rd[cur] = 1'b1;
    else if (!in_pkt && !pend && nxt_found) src_rd[nxt] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= SW'(N_SRC - 1); in_pkt <= 1'b0; pend <= 1'b0;
      dn_sym <= '0; dn_stb <= 1'b0;
    end else begin
      dn_stb <= cmd_req || emit_data;
      if (cmd_req)        dn_sym <= cmd_sym;
      else if (emit_data) dn_sym <= src_rdata[cur];

      if (rd_now) begin
        pend <= 1'b1;
      end else if (!in_pkt && !pend && nxt_found) begin
        cur    <= nxt;
        in_pkt <= 1'b1;
        pend   <= 1'b1;
      end else if (emit_data) begin
        pend <= 1'b0;
      end
      if (is_last) in_pkt <= 1'b0;
    end
  end
endmodule
