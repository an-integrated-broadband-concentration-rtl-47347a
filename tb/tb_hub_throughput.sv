// tb_hub_throughput: uplink throughput of the hub at its default sizes
// (64 node addresses, maximum waiting length 256, guard time 25 cycles,
// packet time 518 cycles), with behavioural nodes that answer every poll
// with a full 518-symbol packet for another subnet.
//  1. All 64 nodes active: every poll is answered, so the uplink carries
//     t_pkt out of every t_pkt + t_gu, about 95 %. Checked: at least 93 %
//     of the cycles in a window of two rounds carry packet symbols.
//  2. One active node (node 17), 63 silent: after the silent nodes have
//     backed off to the maximum waiting length, the active node is polled
//     every round. Checked: over 70 % of the cycles carry its packets, the
//     figure given for BEBP with a single active node, and far above the
//     24 % of plain round-robin polling.
// Also checked: the spacing of consecutive polls is the packet time plus
// guard time (543 cycles plus at most 12 cycles, 1 us, of hub processing) after an answered
// poll, and the guard time (25 cycles plus overhead) after a silent one.
// The throughput figures and the sizes are the document's; the node models
// and the measuring windows are this testbench's own choices.
module tb_hub_throughput;
  import bebp_pkg::*;
  localparam int NN = 64, GUARD = 25, PKTC = 518;
  logic clk = 0, rst_n = 0;
  logic [31:0] subnet = 32'h0A000000, subnet_mask = 32'hFFFFFF00;
  sym_t dn_sym, up_sym = '0, ring_sym;
  logic dn_stb, up_stb = 0;
  logic ring_a_in_full, ring_b_in_full, ring_a_wr, ring_b_wr;
  logic [31:0] poll_cnt, resp_cnt, cycle_cnt;
  logic [15:0] drop_cnt;

  hub dut (.clk, .rst_n, .subnet, .subnet_mask, .ring_b_sel(1'b0), .dn_sym, .dn_stb,
           .up_sym, .up_stb, .ring_a_in_wr(1'b0), .ring_a_in_sym('0), .ring_a_in_full,
           .ring_b_in_wr(1'b0), .ring_b_in_sym('0), .ring_b_in_full, .ring_a_wr, .ring_b_wr,
           .ring_sym, .poll_cnt, .resp_cnt, .cycle_cnt, .drop_cnt);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  bit active [NN];
  int cyc = 0, last_poll = -1;
  bit last_answered;
  int gap_ans_min = 1 << 30, gap_ans_max = 0, gap_sil_min = 1 << 30, gap_sil_max = 0;
  int pa;
  int idx = -1;              // symbol index of the packet being sent, -1 idle
  longint ring_syms = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dn_stb && sym_kind(dn_sym) === SYM_POLL) begin
      if (last_poll >= 0) begin
        if (last_answered) begin
          gap_ans_min = (cyc - last_poll < gap_ans_min) ? (cyc - last_poll) : gap_ans_min;
          gap_ans_max = (cyc - last_poll > gap_ans_max) ? (cyc - last_poll) : gap_ans_max;
        end else begin
          gap_sil_min = (cyc - last_poll < gap_sil_min) ? (cyc - last_poll) : gap_sil_min;
          gap_sil_max = (cyc - last_poll > gap_sil_max) ? (cyc - last_poll) : gap_sil_max;
        end
      end
      last_poll = cyc;
      pa = int'(dn_sym[6:0]);
      last_answered = active[pa];
      if (active[pa]) begin
        check(idx < 0, "no poll while a packet is being sent");
        idx = 0;
      end
    end
    if (ring_a_wr) ring_syms++;
    check(!ring_b_wr && drop_cnt === 0, "packets routed whole to ring A");
  end
  always @(negedge clk) begin
    up_stb = 0;
    if (idx >= 0) begin
      up_stb = 1;
      if (idx === 0)                 up_sym = 9'h040;
      else if (idx < 5)              up_sym = mk_data(8'(11 * idx));
      else if (idx === PKT_SYMS - 1) up_sym = 9'h000;
      else                           up_sym = mk_data(8'(idx));
      idx = (idx === PKT_SYMS - 1) ? -1 : idx + 1;
    end
  end

  task automatic measure(input int cycles, output real eff);
    longint s0;
    s0 = ring_syms;
    repeat (cycles) @(posedge clk);
    eff = real'(ring_syms - s0) / real'(cycles);
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real eff_all, eff_one;
    int c0;
    for (int n = 0; n < NN; n++) active[n] = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (NN * (GUARD + PKTC)) @(posedge clk);
    measure(2 * NN * (GUARD + PKTC), eff_all);
    check(eff_all >= 0.93, $sformatf("all active: efficiency %f", eff_all));
    // one active node; the others stop answering and back off
    for (int n = 0; n < NN; n++) active[n] = (n === 17);
    c0 = cycle_cnt;
    while (cycle_cnt - c0 < 600) @(posedge clk);
    measure(100 * (GUARD + PKTC), eff_one);
    check(eff_one > 0.70, $sformatf("one active: efficiency %f", eff_one));
    check(gap_ans_min >= GUARD + PKTC && gap_ans_max <= GUARD + PKTC + 12,
          $sformatf("poll spacing after an answer %0d..%0d cycles", gap_ans_min, gap_ans_max));
    check(gap_sil_min >= GUARD && gap_sil_max <= GUARD + 12,
          $sformatf("poll spacing after silence %0d..%0d cycles", gap_sil_min, gap_sil_max));
    $display("poll spacing: answered %0d..%0d, silent %0d..%0d cycles",
             gap_ans_min, gap_ans_max, gap_sil_min, gap_sil_max);
    $display("uplink efficiency: all 64 active %0.3f, one active %0.3f (plain polling %0.3f)",
             eff_all, eff_one, real'(PKTC) / real'(PKTC + NN * GUARD));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
