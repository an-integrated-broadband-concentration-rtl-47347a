// hub_poll_timer: guard-time control of the hub's polling.
//
// When the scheduler offers a poll (poll_valid) and the timer is idle, the timer
// takes it (poll_ready) and asks the downlink multiplexer to send the one-symbol
// poll command (cmd_req/cmd_sym until cmd_ack). From the cycle the command is
// sent it counts clock cycles. If a packet header arrives on the uplink
// (up_hdr) within the first GUARD_CYC cycles, the poll is answered and the
// timer waits GUARD_CYC + PKT_CYC cycles in all (t_gu + t_pkt). Otherwise it
// gives up after GUARD_CYC cycles (t_gu). It then reports res_valid with
// res_resp and becomes idle.
// With one symbol per cycle at 100 Mb/s (80 ns), the defaults are the
// document's t_gu = 2 us (25 cycles) and t_pkt = 41.44 us (518 cycles). The two
// waits follow the document; detecting the answer by its header symbol is this
// design's choice.
module hub_poll_timer
  import bebp_pkg::*;
#(
  parameter int unsigned GUARD_CYC = 25,
  parameter int unsigned PKT_CYC   = 518
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   poll_valid,
  input  logic [NODE_ADDR_W-1:0] poll_addr,
  output logic                   poll_ready,
  output logic                   cmd_req,
  output sym_t                   cmd_sym,
  input  logic                   cmd_ack,
  input  logic                   up_hdr,
  output logic                   res_valid,
  output logic                   res_resp
);
  localparam int unsigned TW = $clog2(GUARD_CYC + PKT_CYC + 1);

  typedef enum logic [1:0] {S_IDLE, S_CMD, S_WAIT} state_e;
  state_e        state;
  logic [TW-1:0] t;
  logic          resp;

  wire [TW-1:0] limit = resp ? TW'(GUARD_CYC + PKT_CYC) : TW'(GUARD_CYC);

  assign poll_ready = (state == S_IDLE);
  assign cmd_req    = (state == S_CMD);
  assign res_valid  = (state == S_WAIT) && (t >= limit);
  assign res_resp   = resp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; t <= '0; resp <= 1'b0; cmd_sym <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (poll_valid) begin
          cmd_sym <= mk_poll(poll_addr);
          resp    <= 1'b0;
          state   <= S_CMD;
        end
        S_CMD: if (cmd_ack) begin
          t     <= TW'(1);
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (res_valid) state <= S_IDLE;
          else begin
            t <= t + 1'b1;
            if (up_hdr && t < TW'(GUARD_CYC)) resp <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
