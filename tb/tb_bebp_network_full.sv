// tb_bebp_network_full: the whole network at the document's sizes: 64 polled
// node addresses, maximum waiting length 256, guard time 2 us and packet time
// 41.44 us (25 and 518 cycles of 80 ns), 1K FIFOs, one concentrator with 4
// network cards on addresses 0-3 (the other 60 addresses have no card).
// Card 0 sends a full 512-byte packet to card 3 and card 1 sends a full
// packet to another subnet. Checks that card 3 receives it intact through
// its 513-byte read window, that the ring A output carries the other packet
// intact, that every poll is for an address below 64, that the two responses
// are counted, and that the 60 empty addresses back off.
// The sizes and timing are the document's; the traffic pattern is this
// testbench's own choice.
module tb_bebp_network_full;
  import bebp_pkg::*;
  localparam int NIC = 4;
  localparam logic [19:0] DATA = 20'hD8000, CTRL = 20'hD9000;
  logic clk = 0, rst_n = 0;
  logic [31:0] subnet = 32'h89BD6200, subnet_mask = 32'hFFFFFF00;
  logic ring_b_sel = 0;
  logic [19:0] host_addr [NIC];
  logic [7:0] host_wdata [NIC], host_rdata [NIC];
  logic [NIC-1:0] host_wr = '0, host_rd = '0, irq, vltn = '0, nic_tx_en, open_mask;
  logic ring_a_in_wr = 0, ring_b_in_wr = 0, ring_a_in_full, ring_b_in_full, ring_a_wr, ring_b_wr;
  sym_t ring_a_in_sym = '0, ring_b_in_sym = '0, ring_sym;
  logic [31:0] poll_cnt, resp_cnt, cycle_cnt;
  logic [15:0] drop_cnt;

  bebp_network dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

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
  task automatic host_send(input int g, input logic [31:0] dst, input bytes_t pl);
    hwr(g, CTRL + 4, 8'h40);
    for (int i = 0; i < 4; i++) hwr(g, DATA, dst[31-8*i -: 8]);
    foreach (pl[i]) hwr(g, DATA, pl[i]);
    hwr(g, CTRL + 4, 8'h00);
  endtask

  int polls_of[128];
  always @(posedge clk) if (rst_n && dut.hub_dn_stb && sym_kind(dut.hub_dn_sym) === SYM_POLL) begin
    check(dut.hub_dn_sym[6:0] < 64, "poll address below 64");
    polls_of[dut.hub_dn_sym[6:0]]++;
  end
  syms_t ring_exp, ring_got;
  int ring_pkts = 0;
  always @(posedge clk) if (rst_n && ring_a_wr) begin
    ring_got.push_back(ring_sym);
    if (ring_sym === 9'h000) begin
      check(ring_got == ring_exp, "ring A packet intact");
      ring_pkts++;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t pa, pb;
    logic [7:0] d;
    int t, bad;
    for (int g = 0; g < NIC; g++) begin host_addr[g] = '0; host_wdata[g] = '0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int g = 0; g < NIC; g++) begin
      hwr(g, CTRL + 2, 8'h89); hwr(g, CTRL + 2, 8'hBD); hwr(g, CTRL + 2, 8'h62); hwr(g, CTRL + 2, 8'(40 + g));
    end
    for (int i = 0; i < PKT_DATA_BYTES; i++) begin pa.push_back(8'($urandom)); pb.push_back(8'($urandom)); end
    ring_exp.push_back(9'h040);
    ring_exp.push_back(mk_data(8'h89)); ring_exp.push_back(mk_data(8'hBD));
    ring_exp.push_back(mk_data(8'h61)); ring_exp.push_back(mk_data(8'h05));
    foreach (pb[i]) ring_exp.push_back(mk_data(pb[i]));
    ring_exp.push_back(9'h000);
    host_send(0, 32'h89BD622B, pa);
    host_send(1, 32'h89BD6105, pb);
    t = 0; while (!irq[3] && t < 100000) begin @(posedge clk); t++; end
    check(irq[3], "card 3 interrupt");
    hrd(3, CTRL + 1, d); check(d === 8'h01, "card 3 receive flag");
    hwr(3, CTRL + 1, 8'h01);
    bad = 0;
    for (int i = 0; i < PKT_DATA_BYTES; i++) begin hrd(3, DATA, d); if (d !== pa[i]) bad++; end
    check(bad === 0, $sformatf("card 3 payload (%0d wrong)", bad));
    hrd(3, DATA, d); check(d === 8'h00, "trailer closes the window");
    t = 0; while (ring_pkts === 0 && t < 100000) begin @(posedge clk); t++; end
    check(ring_pkts === 1, "ring A packet seen");
    repeat (20000) @(posedge clk);
    check(resp_cnt === 2, $sformatf("responses %0d", resp_cnt));
    check(polls_of[63] > 0 && polls_of[63] * 16 < cycle_cnt,
          $sformatf("empty address 63 backs off (%0d polls in %0d cycles)", polls_of[63], cycle_cnt));
    check(!irq[0] && !irq[1] && !irq[2] && drop_cnt === 0, "no stray interrupts or drops");
    $display("full size: polls=%0d responses=%0d cycles=%0d", poll_cnt, resp_cnt, cycle_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
