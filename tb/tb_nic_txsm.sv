// tb_nic_txsm: test of the transmitter state machine with a real sym_fifo.
// Checks: no burst while Poll Mask is set or the FIFO is empty; a poll with the
// mask clear sends the whole packet (header ... trailer) in order, one symbol per
// cycle, starting one cycle after the poll; tx_en covers the burst; the second
// packet in the FIFO stays for the next poll; an incomplete packet (no trailer
// written yet) is not sent; a TxSM reset stops a burst.
// The start and stop conditions and the poll mask follow the document; the
// one-cycle latency checked here is this design's own choice.
module tb_nic_txsm;
  import bebp_pkg::*;
  logic clk = 0, rst_n = 0, srst = 0, poll_me = 0, pmask = 0;
  logic fwr = 0, txf_rd, tx_stb, tx_en, txf_empty;
  sym_t fwdata = '0, txf_rdata, tx_sym;
  int checks = 0, failures = 0;
  sym_t sent[$];
  int   first_stb_cyc, poll_cyc, cyc = 0;

  sym_fifo #(.DEPTH(64), .WIDTH(9)) u_f (.clk, .rst_n, .srst(1'b0), .wr(fwr), .wdata(fwdata),
    .rd(txf_rd), .rdata(txf_rdata), .empty(txf_empty), .half(), .full(), .count());
  logic trl_wr, txf_clr = 0;
  assign trl_wr = fwr && (sym_kind(fwdata) === SYM_TRAILER);
  nic_txsm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tx_stb && rst_n) begin
      sent.push_back(tx_sym);
      if (sent.size() == 1) first_stb_cyc = cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic push(input sym_t s);
    @(negedge clk); fwr = 1; fwdata = s; @(negedge clk); fwr = 0;
  endtask

  task automatic load_pkt(input int n, input logic [7:0] seed);
    push(9'h040);
    for (int i = 0; i < n; i++) push(mk_data(seed + 8'(i)));
    push(9'h000);
  endtask

  task automatic poll();
    @(negedge clk); poll_me = 1; poll_cyc = cyc; @(negedge clk); poll_me = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // empty FIFO: a poll does nothing
    poll(); repeat (5) @(posedge clk);
    check(sent.size() == 0 && !tx_en, "no burst from empty FIFO");
    // mask set while loading: polls ignored
    pmask = 1;
    load_pkt(10, 8'h10);
    load_pkt(6, 8'h80);
    poll(); repeat (5) @(posedge clk);
    check(sent.size() == 0, "no burst while Poll Mask set");
    pmask = 0;
    poll();
    repeat (20) @(posedge clk);
    check(sent.size() == 12, $sformatf("first packet length %0d", sent.size()));
    check(first_stb_cyc === poll_cyc + 1, $sformatf("start latency %0d", first_stb_cyc - poll_cyc));
    check(sent[0] === 9'h040 && sent[11] === 9'h000, "delimiters");
    for (int i = 0; i < 10; i++) check(sent[1+i] === mk_data(8'h10 + 8'(i)), "payload order");
    check(!tx_en, "tx_en released after trailer");
    check(!txf_empty, "second packet kept");
    sent.delete();
    // second packet: check tx_en high throughout the burst
    fork
      poll();
      begin
        automatic int en_cnt = 0;
        repeat (15) begin @(posedge clk); if (tx_en) en_cnt++; end
        check(en_cnt >= 8 && en_cnt <= 10, $sformatf("tx_en length %0d", en_cnt));
      end
    join
    check(sent.size() == 8 && sent[7] == 9'h000, "second packet");
    check(txf_empty, "FIFO drained");
    // a packet without its trailer yet is not sent, even with the mask clear
    sent.delete();
    push(9'h040); push(mk_data(8'h01)); push(mk_data(8'h02));
    poll(); repeat (6) @(posedge clk);
    check(sent.size() === 0 && !tx_en, "no burst before the packet is complete");
    push(9'h000);
    poll(); repeat (10) @(posedge clk);
    check(sent.size() === 4 && sent[3] === 9'h000, "burst once the trailer is written");
    // reset during a burst
    sent.delete();
    load_pkt(30, 8'h00);
    poll();
    repeat (5) @(posedge clk);
    @(negedge clk); srst = 1; @(negedge clk); srst = 0;
    repeat (5) @(posedge clk);
    check(!tx_en && sent.size() < 10, "TxSM reset stops burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
