// tb_hub_uplink_router: test of the hub's uplink router.
// Subnet 137.189.98.0/24. Packets to an address in the subnet, to broadcast,
// and to other subnets (with ring_b_sel low and high) are sent back to back
// and with gaps. Headerless data is sent as well. Checks that each packet
// comes out whole and unchanged on the right output, in order, and that
// the headerless bytes are dropped and counted.
// Routing by destination to the local buffer or a ring follows the document;
// the subnet test, the static ring choice and the drop counter are this
// design's own choices.
module tb_hub_uplink_router;
  import bebp_pkg::*;
  logic clk = 0, rst_n = 0, up_stb = 0, ring_b_sel = 0;
  sym_t up_sym = '0, out_sym;
  logic [31:0] subnet = 32'h89BD6200, subnet_mask = 32'hFFFFFF00;
  logic [2:0] out_wr;
  logic [15:0] drop_cnt;
  int checks = 0, failures = 0;
  sym_t expq [3][$];
  int got_pkts[3];

  hub_uplink_router dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    check($countones(out_wr) <= 1, "one output at a time");
    for (int o = 0; o < 3; o++) if (out_wr[o]) begin
      check(expq[o].size() > 0 && out_sym == expq[o][0], $sformatf("output %0d symbol %h", o, out_sym));
      if (expq[o].size() > 0) void'(expq[o].pop_front());
      if (out_sym === 9'h000) got_pkts[o]++;
    end
  end

  task automatic send(input sym_t s, input bit gap);
    @(negedge clk); up_sym = s; up_stb = 1; @(negedge clk); up_stb = 0;
    if (!gap) ; else repeat ($urandom % 3) @(negedge clk);
  endtask

  task automatic pkt(input logic [31:0] dst, input int n, input int route, input bit gap);
    sym_t p[$];
    p.push_back(9'h040);
    for (int i = 0; i < 4; i++) p.push_back(mk_data(dst[31-8*i -: 8]));
    for (int i = 0; i < n; i++) p.push_back(mk_data(8'($urandom)));
    p.push_back(9'h000);
    foreach (p[i]) expq[route].push_back(p[i]);
    // back-to-back: send with no idle cycles between symbols
    foreach (p[i]) begin
      @(negedge clk); up_sym = p[i]; up_stb = 1;
      if (gap && (($urandom % 2) !== 0)) begin @(negedge clk); up_stb = 0; end
    end
    @(negedge clk); up_stb = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    pkt(32'h89BD6205, 10, 0, 0);
    pkt(32'hFFFFFFFF, 3, 0, 0);
    pkt(32'h89BD6105, 8, 1, 1);
    ring_b_sel = 1;
    pkt(32'h0A000001, 0, 2, 0);
    send(mk_data(8'h12), 0); send(mk_data(8'h34), 0); send(9'h000, 0);
    pkt(32'h89BD62FE, 6, 0, 1);
    ring_b_sel = 0;
    pkt(32'h00000000, 12, 1, 0);
    repeat (20) @(posedge clk);
    check(got_pkts[0] === 3 && got_pkts[1] === 2 && got_pkts[2] === 1,
          $sformatf("packets per output %0d %0d %0d", got_pkts[0], got_pkts[1], got_pkts[2]));
    for (int o = 0; o < 3; o++) check(expq[o].size() == 0, "all symbols forwarded");
    check(drop_cnt === 2, $sformatf("dropped %0d", drop_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
