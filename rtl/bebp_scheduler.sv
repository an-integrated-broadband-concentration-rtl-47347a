// bebp_scheduler: Binary Exponential Backoff Polling (BEBP) decision logic of the hub.
//
// For every node n the hub keeps a Wait Level counter WL[n] and a Count Down To
// Poll counter CDTP[n], both starting at 1. A polling cycle begins by
// decrementing every CDTP (stopping at 0). The nodes whose CDTP is then 0 are
// polled one after another in ascending address order. After each poll the
// result (res_valid, res_resp) updates that node: WL becomes 1 if it answered,
// otherwise WL doubles up to MAX_WL; in both cases CDTP := WL. When no polled
// node is left the next cycle starts. A node that keeps silent is thus polled
// only every 2, 4, ... MAX_WL cycles, and a node that sent is polled again in
// the very next cycle.
// Interface: poll_valid/poll_addr offer the next poll until poll_ready takes
// it; the scheduler then waits for one res_valid. cycle_start pulses at the start
// of each polling cycle. wl_dbg/cdtp_dbg show the counters.
// The counters and update rules follow the document; the priority search that
// skips unpolled nodes in the same clock is this design's choice.
module bebp_scheduler
  import bebp_pkg::*;
#(
  parameter int unsigned N_NODES = 64,
  parameter int unsigned MAX_WL  = 256
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   poll_valid,
  output logic [NODE_ADDR_W-1:0] poll_addr,
  input  logic                   poll_ready,
  input  logic                   res_valid,
  input  logic                   res_resp,
  output logic                   cycle_start,
  output logic [$clog2(MAX_WL+1)-1:0] wl_dbg   [N_NODES],
  output logic [$clog2(MAX_WL+1)-1:0] cdtp_dbg [N_NODES]
);
  localparam int unsigned CW = $clog2(MAX_WL + 1);
  localparam int unsigned IW = $clog2(N_NODES + 1);
  localparam int unsigned AW = (N_NODES > 1) ? $clog2(N_NODES) : 1;

  typedef enum logic [1:0] {S_DEC, S_FIND, S_ISSUE, S_WAIT} state_e;
  state_e state;

  logic [CW-1:0] wl   [N_NODES];
  logic [CW-1:0] cdtp [N_NODES];
  logic [IW-1:0] ptr;        // first node not yet considered in this cycle
  logic [IW-1:0] cur;        // node being polled
  logic          found;
  logic [AW-1:0] ci;         // cur as an array index
  logic [IW-1:0] found_idx;

  // lowest node at or above ptr whose CDTP is zero
  always_comb begin
    found = 1'b0;
    found_idx = '0;
    for (int i = N_NODES - 1; i >= 0; i--) begin
      if (IW'(i) >= ptr && cdtp[i] == '0) begin
        found = 1'b1;
        found_idx = IW'(i);
      end
    end
  end

  assign poll_valid  = (state == S_ISSUE);
  assign poll_addr   = NODE_ADDR_W'(cur);
  assign cycle_start = (state == S_DEC);
  assign wl_dbg      = wl;
  assign cdtp_dbg    = cdtp;

  logic [CW:0] wl_dbl;
  assign ci     = cur[AW-1:0];
  assign wl_dbl = {wl[ci], 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_DEC;
      ptr   <= '0;
      cur   <= '0;
      for (int i = 0; i < N_NODES; i++) begin
        wl[i]   <= CW'(1);
        cdtp[i] <= CW'(1);
      end
    end else begin
      unique case (state)
        S_DEC: begin
          for (int i = 0; i < N_NODES; i++)
            if (cdtp[i] != '0) cdtp[i] <= cdtp[i] - 1'b1;
          ptr   <= '0;
          state <= S_FIND;
        end
        S_FIND: begin
          if (found) begin
            cur   <= found_idx;
            state <= S_ISSUE;
          end else begin
            state <= S_DEC;
          end
        end
        S_ISSUE: if (poll_ready) state <= S_WAIT;
        S_WAIT: if (res_valid) begin
          if (res_resp) begin
            wl[ci]   <= CW'(1);
            cdtp[ci] <= CW'(1);
          end else if (wl_dbl >= (CW+1)'(MAX_WL)) begin
            wl[ci]   <= CW'(MAX_WL);
            cdtp[ci] <= CW'(MAX_WL);
          end else begin
            wl[ci]   <= wl_dbl[CW-1:0];
            cdtp[ci] <= wl_dbl[CW-1:0];
          end
          ptr   <= cur + 1'b1;
          state <= S_FIND;
        end
        default: state <= S_DEC;
      endcase
    end
  end
endmodule
