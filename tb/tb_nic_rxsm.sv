// tb_nic_rxsm: test of the receiver state machine and address filter.
// Sends packets to the node's IP, to the broadcast address, to another address
// (with one, two and four bytes differing), with polls inserted inside the
// packet, and a packet while the receive FIFO is half full. Checks the poll_me
// pulses, the symbols written to the FIFO (data + trailer only) and rx_irq.
// The filter rules (own address or broadcast, header and address not stored,
// half-full refusal) follow the document; the cycle timing is this design's
// own choice.
module tb_nic_rxsm;
  import bebp_pkg::*;
  logic clk = 0, rst_n = 0, srst = 0, rx_stb = 0, rxf_half = 0;
  sym_t rx_sym = '0, fifo_wdata;
  logic [6:0] my_node = 7'd5;
  logic [31:0] my_ip = 32'h89BD612E;
  logic poll_me, fifo_wr, rx_irq;
  int checks = 0, failures = 0, polls = 0, irqs = 0;
  sym_t got[$];

  nic_rxsm dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (fifo_wr) got.push_back(fifo_wdata);
    if (poll_me) polls++;
    if (rx_irq) irqs++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input sym_t s);
    @(negedge clk); rx_sym = s; rx_stb = 1; @(negedge clk); rx_stb = 0;
  endtask

  task automatic send_pkt(input logic [31:0] dst, input int n, input int poll_at);
    send(9'h040);
    for (int i = 0; i < 4; i++) send(mk_data(dst[31-8*i -: 8]));
    for (int i = 0; i < n; i++) begin
      if (i === poll_at) send(mk_poll(7'd5));
      send(mk_data(8'(i * 3)));
    end
    send(9'h000);
  endtask

  task automatic expect_pkt(input int n, input string what);
    repeat (2) @(posedge clk);
    check(got.size() == n + 1, $sformatf("%s: %0d symbols written", what, got.size()));
    if (n >= 0 && got.size() == n + 1) begin
      for (int i = 0; i < n; i++) check(got[i] === mk_data(8'(i * 3)), {what, " data"});
      check(got[n] === 9'h000, {what, " trailer kept"});
    end
    got.delete();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    send(mk_poll(7'd5)); send(mk_poll(7'd4)); send(mk_poll(7'd6)); send(mk_poll(7'd5));
    repeat (2) @(posedge clk);
    check(polls === 2, $sformatf("own polls detected: %0d", polls));
    send_pkt(my_ip, 20, -1);           expect_pkt(20, "own IP");
    check(irqs === 1, "irq on own packet");
    send_pkt(32'hFFFFFFFF, 7, 3);      expect_pkt(7, "broadcast with poll inside");
    check(polls === 3, "poll inside packet detected");
    check(irqs === 2, "irq on broadcast");
    send_pkt(32'h89BD612F, 9, -1);     expect_pkt(-1, "last byte differs");
    send_pkt(32'h00BD612E, 9, -1);     expect_pkt(-1, "first byte differs");
    send_pkt(32'hFFFFFF2E, 9, -1);     expect_pkt(-1, "mixed broadcast/IP");
    check(irqs === 2, "no irq on foreign packets");
    rxf_half = 1;
    send_pkt(my_ip, 5, -1);            expect_pkt(-1, "RxFIFO half full");
    rxf_half = 0;
    // data with no header is ignored
    send(mk_data(8'h11)); send(mk_data(8'h22)); send(9'h000);
    repeat (2) @(posedge clk);
    check(got.size() == 0, "headerless data ignored");
    send_pkt(my_ip, 3, 1);             expect_pkt(3, "own IP again");
    check(irqs === 3, "irq count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
