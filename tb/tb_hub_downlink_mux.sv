// tb_hub_downlink_mux: test of the hub's downlink multiplexer with three real
// sym_fifo buffers. Packets of different lengths are loaded into the buffers,
// and poll commands are requested at random times. Checks: every output symbol
// is either a poll (sent in the cycle after its request, nothing lost) or the
// next symbol of the packet in progress; packets are never interleaved; packets
// come out round-robin over the non-empty buffers; no gaps appear inside a packet
// except for polls; all packets arrive intact.
// Polls inserted into the packet stream follow the document; the traffic
// pattern and the packet-by-packet round robin checked here are this design's
// own choices.
module tb_hub_downlink_mux;
  import bebp_pkg::*;
  logic clk = 0, rst_n = 0, cmd_req = 0;
  sym_t cmd_sym = '0, dn_sym;
  logic dn_stb, cmd_ack;
  logic [2:0] wr = '0, src_empty, src_rd;
  sym_t wd [3];
  sym_t src_rdata [3];
  int checks = 0, failures = 0;
  sym_t expq [3][$];
  int cur_src = -1, polls_sent = 0, polls_req = 0, pkts = 0, last_src = -1;
  int order[$];

  for (genvar g = 0; g < 3; g++) begin : g_f
    sym_fifo #(.DEPTH(256), .WIDTH(9)) u_f (.clk, .rst_n, .srst(1'b0), .wr(wr[g]), .wdata(wd[g]),
      .rd(src_rd[g]), .rdata(src_rdata[g]), .empty(src_empty[g]), .half(), .full(), .count());
  end
  hub_downlink_mux dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic pend_poll = 0;
  sym_t pend_sym;
  always @(posedge clk) if (rst_n) begin
    if (pend_poll) begin
      check(dn_stb && dn_sym === pend_sym, "poll in the slot after the request");
    end
    pend_poll <= cmd_req && cmd_ack;
    pend_sym  <= cmd_sym;
    if (dn_stb && !pend_poll) begin
      if (cur_src < 0) begin
        // the round-robin successor of the last buffer that has a packet waiting
        for (int k = 3; k >= 1; k--) begin
          int s;
          s = (last_src + k + 3) % 3;
          if (expq[s].size() > 0) cur_src = s;
        end
        order.push_back(cur_src);
      end
      check(expq[cur_src].size() > 0 && dn_sym == expq[cur_src][0], $sformatf("symbol %h from buffer %0d", dn_sym, cur_src));
      if (expq[cur_src].size() > 0) void'(expq[cur_src].pop_front());
      if (dn_sym === 9'h000) begin last_src = cur_src; cur_src = -1; pkts++; end
    end
    if (pend_poll) polls_sent++;
  end

  task automatic load(input int s, input int n, input logic [7:0] tag);
    sym_t p[$];
    p.push_back(9'h040);
    for (int i = 0; i < n; i++) p.push_back(mk_data(tag + 8'(i)));
    p.push_back(9'h000);
    foreach (p[i]) begin
      @(negedge clk); wr[s] = 1; wd[s] = p[i]; expq[s].push_back(p[i]);
    end
    @(negedge clk); wr[s] = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) wd[s] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // all three buffers loaded before the first packet can finish
    fork
      load(0, 20, 8'h00);
      load(1, 15, 8'h40);
      load(2, 10, 8'h80);
    join
    load(0, 12, 8'h20);
    load(1, 5, 8'h60);
    fork
      repeat (400) begin
        @(negedge clk);
        cmd_req = ($urandom % 7) === 0;
        cmd_sym = mk_poll(7'($urandom));
        if (cmd_req) polls_req++;
      end
    join
    @(negedge clk); cmd_req = 0;
    repeat (100) @(posedge clk);
    check(pkts === 5, $sformatf("packets delivered %0d", pkts));
    check(polls_sent === polls_req, $sformatf("polls %0d of %0d", polls_sent, polls_req));
    for (int s = 0; s < 3; s++) check(expq[s].size() == 0, "buffer drained");
    check(order.size() == 5 && order[0] == 0 && order[1] == 1 && order[2] == 2 && order[3] == 0 && order[4] == 1,
          "round-robin order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
