// tb_bebp_network: end-to-end test of the whole network at reduced size:
// a hub polling 6 node addresses (maximum waiting length 8, guard 12 cycles,
// packet time 80 cycles), one concentrator and 4 network cards on addresses
// 0-3; addresses 4 and 5 have no card. The hosts drive the cards through
// their PC bus registers. Each mechanism is exercised and counted:
//  - polling and responses, backoff of the silent addresses;
//  - local delivery, broadcast, routing to ring A and ring B, delivery of a
//    packet arriving from ring A;
//  - polls inserted inside downlink packets;
//  - the poll mask holding a packet back;
//  - headerless data dropped by the hub;
//  - read-window misalignment after short packets (0xFF fillers);
//  - receive and violation interrupts.
// The expected behaviour (who is polled, what is delivered where) follows the
// document's network; the reduced sizes, the traffic and the register
// sequences are this testbench's own choices.
module tb_bebp_network;
  import bebp_pkg::*;
  localparam int NIC = 4, NN = 6, GUARD = 12, PKTC = 80;
  localparam logic [19:0] DATA = 20'hD8000, CTRL = 20'hD9000;
  logic clk = 0, rst_n = 0;
  logic [31:0] subnet = 32'h0A000000, subnet_mask = 32'hFFFFFF00;
  logic ring_b_sel = 0;
  logic [19:0] host_addr [NIC];
  logic [7:0] host_wdata [NIC], host_rdata [NIC];
  logic [NIC-1:0] host_wr = '0, host_rd = '0, irq, vltn = '0, nic_tx_en, open_mask;
  logic ring_a_in_wr = 0, ring_b_in_wr = 0, ring_a_in_full, ring_b_in_full, ring_a_wr, ring_b_wr;
  sym_t ring_a_in_sym = '0, ring_b_in_sym = '0, ring_sym;
  logic [31:0] poll_cnt, resp_cnt, cycle_cnt;
  logic [15:0] drop_cnt;

  bebp_network #(.N_NIC(NIC), .N_NODES(NN), .MAX_WL(8), .GUARD_CYC(GUARD), .PKT_CYC(PKTC),
                 .FIFO_DEPTH(1024)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // mechanism counters
  int n_poll_of[NN], n_polls_in_pkt, n_local, n_bcast, n_ring_a, n_ring_b, n_from_ring,
      n_fillers, n_masked, n_irq, n_vltn;

  // host bus tasks
  task automatic hwr(input int g, input logic [19:0] a, input logic [7:0] d);
    @(negedge clk); host_addr[g] = a; host_wdata[g] = d; host_wr[g] = 1;
    @(negedge clk); host_wr[g] = 0;
  endtask
  task automatic hrd(input int g, input logic [19:0] a, output logic [7:0] d);
    @(negedge clk); host_addr[g] = a; host_rd[g] = 1;
    @(negedge clk); host_rd[g] = 0; d = host_rdata[g];
  endtask
  typedef logic [7:0] bytes_t [$];
  typedef sym_t syms_t [$];
  function automatic syms_t to_syms(input logic [31:0] dst, input bytes_t pl);
    syms_t s;
    s.push_back(9'h040);
    for (int i = 0; i < 4; i++) s.push_back(mk_data(dst[31-8*i -: 8]));
    foreach (pl[i]) s.push_back(mk_data(pl[i]));
    s.push_back(9'h000);
    return s;
  endfunction
  function automatic bytes_t rand_bytes(input int n);
    bytes_t b;
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
    return b;
  endfunction
  task automatic host_send(input int g, input logic [31:0] dst, input bytes_t pl);
    hwr(g, CTRL + 4, 8'h40);
    for (int i = 0; i < 4; i++) hwr(g, DATA, dst[31-8*i -: 8]);
    foreach (pl[i]) hwr(g, DATA, pl[i]);
    hwr(g, CTRL + 4, 8'h00);
  endtask
  // one 513-byte read window; counts the fillers of a short packet
  task automatic host_recv(input int g, input bytes_t pl, input string what);
    logic [7:0] d; int bad = 0;
    for (int i = 0; i < PKT_DATA_BYTES + 1; i++) begin
      hrd(g, DATA, d);
      if (i < pl.size()) begin if (d != pl[i]) bad++; end
      else if (i == pl.size()) begin if (d != 8'h00) bad++; end
      else begin if (d === 8'hFF) n_fillers++; else bad++; end
    end
    check(bad === 0, $sformatf("%s: card %0d read %0d wrong bytes", what, g, bad));
  endtask
  task automatic wait_irq(input int g, input string what);
    logic [7:0] d; int t = 0;
    while (!irq[g] && t < 20000) begin @(posedge clk); t++; end
    check(irq[g], $sformatf("%s: card %0d interrupt", what, g));
    hrd(g, CTRL + 1, d);
    check(d[0], $sformatf("%s: card %0d receive flag", what, g));
    if (d[0]) n_irq++;
    hwr(g, CTRL + 1, 8'h01);
  endtask

  // hub downlink observer: polls, and polls inside packets
  bit in_pkt = 0;
  int pa;
  always @(posedge clk) if (rst_n && dut.hub_dn_stb) begin
    case (sym_kind(dut.hub_dn_sym))
      SYM_POLL: begin
        pa = int'(dut.hub_dn_sym[6:0]);
        check(pa < NN, "poll address in range");
        if (pa < NN) n_poll_of[pa]++;
        if (in_pkt) n_polls_in_pkt++;
      end
      SYM_HEADER:  in_pkt = 1;
      SYM_TRAILER: in_pkt = 0;
      default: ;
    endcase
  end
  // ring output observer
  syms_t ring_exp_a [$], ring_exp_b [$], ring_got;
  always @(posedge clk) if (rst_n && (ring_a_wr || ring_b_wr)) begin
    check(!(ring_a_wr && ring_b_wr), "one ring at a time");
    if (ring_sym === 9'h040) ring_got.delete();
    ring_got.push_back(ring_sym);
    if (ring_sym === 9'h000) begin
      if (ring_a_wr) begin
        check(ring_exp_a.size() > 0 && ring_got == ring_exp_a[0], "ring A packet");
        if (ring_exp_a.size() > 0) void'(ring_exp_a.pop_front());
        n_ring_a++;
      end else begin
        check(ring_exp_b.size() > 0 && ring_got == ring_exp_b[0], "ring B packet");
        if (ring_exp_b.size() > 0) void'(ring_exp_b.pop_front());
        n_ring_b++;
      end
    end
  end
  // poll mask observer
  bit masked2 = 0;
  always @(posedge clk) if (rst_n && masked2) check(!nic_tx_en[2], "masked card stays silent");

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t p1, p2, p3, p4, p5;
    syms_t s;
    logic [7:0] d;
    int t;
    for (int g = 0; g < NIC; g++) begin host_addr[g] = '0; host_wdata[g] = '0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int g = 0; g < NIC; g++)
      for (int i = 0; i < 4; i++) hwr(g, CTRL + 2, (i === 3) ? 8'(10 + g) : ((i === 0) ? 8'h0A : 8'h00));

    // local delivery: card 0 -> card 2 (short packet: misaligned window)
    p1 = rand_bytes(20);
    host_send(0, 32'h0A00000C, p1);
    wait_irq(2, "local");
    host_recv(2, p1, "local"); n_local++;
    check(!irq[0] && !irq[1] && !irq[3], "other cards not interrupted");

    // broadcast from card 1, received by every card
    p2 = rand_bytes(30);
    host_send(1, 32'hFFFFFFFF, p2);
    for (int g = 0; g < NIC; g++) begin
      wait_irq(g, "broadcast");
      host_recv(g, p2, "broadcast");
    end
    n_bcast++;

    // poll mask on card 2, with a packet for ring A waiting
    hwr(2, CTRL + 5, 8'h01);
    p3 = rand_bytes(25);
    ring_exp_a.push_back(to_syms(32'h0B000001, p3));
    masked2 = 1;
    host_send(2, 32'h0B000001, p3);
    repeat (1500) @(posedge clk);
    check(n_ring_a === 0, "masked packet held back"); n_masked++;
    masked2 = 0;
    hwr(2, CTRL + 5, 8'h00);
    t = 0; while (n_ring_a === 0 && t < 5000) begin @(posedge clk); t++; end
    check(n_ring_a === 1, "packet sent to ring A after unmasking");

    // ring B
    ring_b_sel = 1;
    p4 = rand_bytes(12);
    ring_exp_b.push_back(to_syms(32'h0C000001, p4));
    host_send(3, 32'h0C000001, p4);
    t = 0; while (n_ring_b === 0 && t < 5000) begin @(posedge clk); t++; end
    check(n_ring_b === 1, "packet sent to ring B");
    ring_b_sel = 0;

    // headerless data from card 3 is dropped at the hub
    for (int i = 0; i < 3; i++) hwr(3, DATA, 8'h55);
    hwr(3, CTRL + 4, 8'h00);
    t = 0; while (drop_cnt === 0 && t < 5000) begin @(posedge clk); t++; end
    repeat (50) @(posedge clk);
    check(drop_cnt === 3, $sformatf("headerless bytes dropped: %0d", drop_cnt));

    // a full packet arriving from ring A for card 1
    p5 = rand_bytes(PKT_DATA_BYTES);
    s = to_syms(32'h0A00000B, p5);
    foreach (s[i]) begin
      @(negedge clk); ring_a_in_wr = 1; ring_a_in_sym = s[i];
      check(!ring_a_in_full, "ring A input has room");
    end
    @(negedge clk); ring_a_in_wr = 0;
    wait_irq(1, "from ring");
    host_recv(1, p5, "from ring"); n_from_ring++;

    // code violation on card 0
    @(negedge clk); vltn[0] = 1; @(negedge clk); vltn[0] = 0;
    check(irq[0], "violation interrupt");
    hrd(0, CTRL + 1, d); check(d[1], "violation flag");
    if (d[1]) n_vltn++;
    hwr(0, CTRL + 1, 8'h02);

    repeat (200) @(posedge clk);
    check(resp_cnt === 4, $sformatf("responses %0d (four cards sent a packet with a header)", resp_cnt));
    check(poll_cnt === n_poll_of[0] + n_poll_of[1] + n_poll_of[2] + n_poll_of[3] + n_poll_of[4] + n_poll_of[5],
          "hub poll count matches the link");
    check(n_poll_of[4] * 4 < cycle_cnt && n_poll_of[5] * 4 < cycle_cnt,
          $sformatf("silent addresses backed off (%0d, %0d polls in %0d cycles)", n_poll_of[4], n_poll_of[5], cycle_cnt));
    check(n_polls_in_pkt > 0, "polls inserted inside downlink packets");
    check(n_fillers > 0, "misaligned windows filled");
    check(ring_exp_a.size() == 0 && ring_exp_b.size() == 0, "ring packets all seen");
    $display("mechanisms: polls=%0d responses=%0d cycles=%0d silent_polls=%0d/%0d polls_in_pkt=%0d local=%0d broadcast=%0d ring_a=%0d ring_b=%0d from_ring=%0d dropped=%0d fillers=%0d masked=%0d rx_irq=%0d violation_irq=%0d",
             poll_cnt, resp_cnt, cycle_cnt, n_poll_of[4], n_poll_of[5], n_polls_in_pkt, n_local, n_bcast,
             n_ring_a, n_ring_b, n_from_ring, drop_cnt, n_fillers, n_masked, n_irq, n_vltn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
