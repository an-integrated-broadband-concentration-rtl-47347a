// hub: hub module of the router board, the polling master of a BEBP network.
//
// Uplink: symbols from the nodes (up_sym/up_stb) go to hub_uplink_router, which
// sends local-subnet packets into the local output buffer and other packets out
// of the Ring A / Ring B ports (ring_a_wr / ring_b_wr with ring_sym). A header on
// the uplink also tells the poll timer that the polled node answered.
// Downlink: the local buffer and the two buffers filled from the rings
// (ring_a_in_* / ring_b_in_*) are sent round-robin by hub_downlink_mux, with
// the poll commands from bebp_scheduler and hub_poll_timer inserted into the
// stream (dn_sym/dn_stb).
// Polling: bebp_scheduler chooses whom to poll (WL/CDTP counters); hub_poll_timer
// sends the poll and waits t_gu, or t_gu + t_pkt when a packet comes back.
// Counters: polls sent (poll_cnt), answered polls (resp_cnt), polling cycles
// (cycle_cnt). All timing is in link symbol clocks.
// The structure follows the document's hub; the document runs the polling on a
// DSP, while this design does it in logic with the same rules.
module hub
  import bebp_pkg::*;
#(
  parameter int unsigned N_NODES   = 64,
  parameter int unsigned MAX_WL    = 256,
  parameter int unsigned GUARD_CYC = 25,
  parameter int unsigned PKT_CYC   = 518,
  parameter int unsigned BUF_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] subnet,
  input  logic [31:0] subnet_mask,
  input  logic        ring_b_sel,
  // node links
  output sym_t        dn_sym,
  output logic        dn_stb,
  input  sym_t        up_sym,
  input  logic        up_stb,
  // ring modules
  input  logic        ring_a_in_wr,
  input  sym_t        ring_a_in_sym,
  output logic        ring_a_in_full,
  input  logic        ring_b_in_wr,
  input  sym_t        ring_b_in_sym,
  output logic        ring_b_in_full,
  output logic        ring_a_wr,
  output logic        ring_b_wr,
  output sym_t        ring_sym,
  // statistics
  output logic [31:0] poll_cnt,
  output logic [31:0] resp_cnt,
  output logic [31:0] cycle_cnt,
  output logic [15:0] drop_cnt
);
  logic                   poll_valid, poll_ready, res_valid, res_resp, cycle_start;
  logic [NODE_ADDR_W-1:0] poll_addr;
  logic                   cmd_req, cmd_ack;
  sym_t                   cmd_sym;
  logic [2:0]             out_wr;
  sym_t                   out_sym;
  logic [2:0]             b_wr, b_rd, b_empty, b_full;
  sym_t                   b_wdata [3];
  sym_t                   b_rdata [3];

  bebp_scheduler #(.N_NODES(N_NODES), .MAX_WL(MAX_WL)) u_sched (
    .clk, .rst_n, .poll_valid, .poll_addr, .poll_ready, .res_valid, .res_resp,
    .cycle_start, .wl_dbg(), .cdtp_dbg()
  );

  hub_poll_timer #(.GUARD_CYC(GUARD_CYC), .PKT_CYC(PKT_CYC)) u_timer (
    .clk, .rst_n, .poll_valid, .poll_addr, .poll_ready, .cmd_req, .cmd_sym, .cmd_ack,
    .up_hdr(up_stb && sym_kind(up_sym) == SYM_HEADER), .res_valid, .res_resp
  );

  hub_uplink_router u_router (
    .clk, .rst_n, .up_sym, .up_stb, .subnet, .subnet_mask, .ring_b_sel,
    .out_wr, .out_sym, .drop_cnt
  );

  assign ring_a_wr = out_wr[1];
  assign ring_b_wr = out_wr[2];
  assign ring_sym  = out_sym;

  assign b_wr[0] = out_wr[0];      assign b_wdata[0] = out_sym;
  assign b_wr[1] = ring_a_in_wr;   assign b_wdata[1] = ring_a_in_sym;
  assign b_wr[2] = ring_b_in_wr;   assign b_wdata[2] = ring_b_in_sym;
  assign ring_a_in_full = b_full[1];
  assign ring_b_in_full = b_full[2];

  for (genvar g = 0; g < 3; g++) begin : g_buf
    sym_fifo #(.DEPTH(BUF_DEPTH), .WIDTH(SYM_W)) u_buf (
      .clk, .rst_n, .srst(1'b0), .wr(b_wr[g]), .wdata(b_wdata[g]),
      .rd(b_rd[g]), .rdata(b_rdata[g]), .empty(b_empty[g]), .half(), .full(b_full[g]),
      .count()
    );
  end

  hub_downlink_mux #(.N_SRC(3)) u_dnmux (
    .clk, .rst_n, .src_empty(b_empty), .src_rdata(b_rdata), .src_rd(b_rd),
    .cmd_req, .cmd_sym, .cmd_ack, .dn_sym, .dn_stb
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poll_cnt <= '0; resp_cnt <= '0; cycle_cnt <= '0;
    end else begin
      if (poll_valid && poll_ready) poll_cnt <= poll_cnt + 1'b1;
      if (res_valid && res_resp)    resp_cnt <= resp_cnt + 1'b1;
      if (cycle_start)              cycle_cnt <= cycle_cnt + 1'b1;
    end
  end
endmodule
