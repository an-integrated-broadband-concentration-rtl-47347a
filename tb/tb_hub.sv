// tb_hub: test of the hub at reduced size (4 nodes, maximum waiting length
// 8, guard 6 cycles, packet time 40 cycles, 64-symbol buffers).
// Behavioural nodes answer a poll to their address with the next queued
// packet, starting the cycle after the poll. Node 3 never has traffic.
// Checks:
//  - every polled address exists; the hub counts one response per packet;
//  - polls are not sent while a response is still expected (guard/packet
//    time), and node 3 is polled less often than the busy nodes (backoff);
//  - packets to the local subnet and packets written by ring A come out on
//    the downlink whole (with polls inserted into them allowed);
//  - packets to other subnets come out on the ring A output whole.
// Polling, guard/packet waits and routing by destination follow the document;
// the reduced timing and the behavioural node models are this testbench's own
// choices.
module tb_hub;
  import bebp_pkg::*;
  localparam int NN = 4, GUARD = 6, PKTC = 40;
  logic clk = 0, rst_n = 0;
  logic [31:0] subnet = 32'h0A000000, subnet_mask = 32'hFFFFFF00;
  logic ring_b_sel = 0;
  sym_t dn_sym, up_sym = '0;
  logic dn_stb, up_stb = 0;
  logic ring_a_in_wr = 0, ring_b_in_wr = 0, ring_a_in_full, ring_b_in_full;
  sym_t ring_a_in_sym = '0, ring_b_in_sym = '0, ring_sym;
  logic ring_a_wr, ring_b_wr;
  logic [31:0] poll_cnt, resp_cnt, cycle_cnt;
  logic [15:0] drop_cnt;

  hub #(.N_NODES(NN), .MAX_WL(8), .GUARD_CYC(GUARD), .PKT_CYC(PKTC), .BUF_DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef sym_t pkt_t[$];
  pkt_t node_q [NN][$];          // packets each node will send
  pkt_t exp_dn [$], exp_ring [$]; // packets expected on each output
  int polls_of[NN], sent = 0, polls_in_pkt = 0, dn_pkts = 0, ring_pkts = 0;

  function automatic pkt_t make_pkt(input logic [31:0] dst, input int n);
    pkt_t p;
    p.push_back(9'h040);
    for (int i = 0; i < 4; i++) p.push_back(mk_data(dst[31-8*i -: 8]));
    for (int i = 0; i < n; i++) p.push_back(mk_data(8'($urandom)));
    p.push_back(9'h000);
    return p;
  endfunction

  function automatic bit take(ref pkt_t q [$], input pkt_t p);
    foreach (q[i]) if (q[i] == p) begin q.delete(i); return 1; end
    return 0;
  endfunction

  // node models: answer a poll with the next packet
  pkt_t cur; int pa; int cur_i = -1, busy_until = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dn_stb && sym_kind(dn_sym) === SYM_POLL) begin
      pa = int'(dn_sym[6:0]);
      check(pa < NN, "polled address exists");
      check(cyc >= busy_until, "no poll while a response may still come");
      polls_of[pa]++;
      if (node_q[pa].size() > 0) begin
        cur = node_q[pa].pop_front(); cur_i = 0; sent++;
        busy_until = cyc + PKTC;
      end else busy_until = cyc + GUARD;
    end
  end
  always @(negedge clk) begin
    up_stb = 0;
    if (cur_i >= 0) begin
      up_sym = cur[cur_i]; up_stb = 1; cur_i++;
      if (cur_i == cur.size()) cur_i = -1;
    end
  end

  // downlink packet collector (polls may be inserted between symbols)
  pkt_t dn_p, ring_p; bit in_dn = 0;
  always @(posedge clk) if (rst_n) begin
    if (dn_stb && sym_kind(dn_sym) === SYM_POLL) begin
      if (in_dn) polls_in_pkt++;
    end else if (dn_stb) begin
      if (dn_sym === 9'h040) begin dn_p.delete(); in_dn = 1; end
      dn_p.push_back(dn_sym);
      if (dn_sym === 9'h000) begin
        in_dn = 0; dn_pkts++;
        check(take(exp_dn, dn_p), "downlink packet expected");
      end
    end
    if (ring_a_wr) begin
      if (ring_sym === 9'h040) ring_p.delete();
      ring_p.push_back(ring_sym);
      if (ring_sym === 9'h000) begin
        ring_pkts++;
        check(take(exp_ring, ring_p), "ring packet expected");
      end
    end
    check(!ring_b_wr, "ring B unused");
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p;
    for (int k = 0; k < 18; k++) begin
      int nd; bit loc;
      nd = k % 3; loc = (k % 4) !== 3;
      p = make_pkt(loc ? {24'h0A0000, 8'(k)} : 32'h0B000001, 8 + $urandom % 26);
      node_q[nd].push_back(p);
      if (loc) exp_dn.push_back(p); else exp_ring.push_back(p);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    // two packets from ring A, written at full speed
    for (int r = 0; r < 2; r++) begin
      p = make_pkt(32'h0A000002, 30);
      exp_dn.push_back(p);
      foreach (p[i]) begin
        @(negedge clk); ring_a_in_wr = 1; ring_a_in_sym = p[i];
        check(!ring_a_in_full, "ring A buffer has room");
      end
      @(negedge clk); ring_a_in_wr = 0;
    end
    wait (sent === 18 && cur_i < 0);
    repeat (PKTC * 8) @(posedge clk);
    check(exp_dn.size() == 0 && exp_ring.size() == 0,
          $sformatf("all delivered (left %0d dn, %0d ring)", exp_dn.size(), exp_ring.size()));
    check(resp_cnt === 18, $sformatf("responses counted %0d", resp_cnt));
    check(poll_cnt === polls_of[0] + polls_of[1] + polls_of[2] + polls_of[3], "polls counted");
    check(polls_of[3] * 3 < cycle_cnt && polls_of[0] >= 6, $sformatf("silent node backed off (%0d polls in %0d cycles)", polls_of[3], cycle_cnt));
    check(cycle_cnt > 0 && drop_cnt === 0, "cycles run, nothing dropped");
    check(polls_in_pkt > 0, "polls were inserted inside downlink packets");
    $display("info: polls %0d %0d %0d %0d, polls inside packets %0d, cycles %0d",
             polls_of[0], polls_of[1], polls_of[2], polls_of[3], polls_in_pkt, cycle_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
