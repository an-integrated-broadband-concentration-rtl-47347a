// tb_nic: end-to-end test of one network interface card (node 2) through
// its PC bus registers and its link symbols, at the default 1K FIFOs.
//  - the host loads its IP address and writes a packet (header, address,
//    data, trailer) into the transmit FIFO; the status register follows;
//  - with the poll mask set a poll is ignored; with it clear the poll makes
//    the card send exactly the written packet;
//  - a full-size packet to the card's IP raises the receive interrupt and
//    is read back through the data port; a packet for another IP is ignored;
//  - a short packet leaves the host's 513-byte read window misaligned: the
//    read gate returns 0xFF after the trailer and the next packet is read
//    aligned again; a code violation raises the violation interrupt.
// The register addresses, the poll mask, the address filter and the 513-byte
// read window follow the document's card; the one-cycle bus model is this
// design's own choice.
module tb_nic;
  import bebp_pkg::*;
  localparam logic [19:0] DATA = 20'hD8000, CTRL = 20'hD9000;
  localparam logic [31:0] IP = 32'h0A000002;
  logic clk = 0, rst_n = 0;
  logic [19:0] host_addr = '0;
  logic [7:0] host_wdata = '0, host_rdata;
  logic host_wr = 0, host_rd = 0, irq, tx_stb, tx_en, rx_stb = 0, vltn = 0;
  sym_t tx_sym, rx_sym = '0;
  logic [6:0] my_node = 7'd2;
  int checks = 0, failures = 0;

  nic dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input logic [19:0] a, input logic [7:0] d);
    @(negedge clk); host_addr = a; host_wdata = d; host_wr = 1;
    @(negedge clk); host_wr = 0;
  endtask
  task automatic rd(input logic [19:0] a, output logic [7:0] d);
    @(negedge clk); host_addr = a; host_rd = 1;
    @(negedge clk); host_rd = 0; d = host_rdata;
  endtask
  task automatic link(input sym_t s);
    @(negedge clk); rx_sym = s; rx_stb = 1; @(negedge clk); rx_stb = 0;
  endtask

  sym_t tx_seen [$];
  always @(posedge clk) if (rst_n && tx_stb) begin
    check(tx_en, "transmitter enabled while sending");
    tx_seen.push_back(tx_sym);
  end

  task automatic rx_pkt(input logic [31:0] dst, input int n, output logic [7:0] pl [$]);
    pl.delete();
    link(9'h040);
    for (int i = 0; i < 4; i++) link(mk_data(dst[31-8*i -: 8]));
    for (int i = 0; i < n; i++) begin pl.push_back(8'($urandom)); link(mk_data(pl[i])); end
    link(9'h000);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d, pl [$], pl2 [$];
    sym_t sent [$];
    repeat (3) @(posedge clk); rst_n = 1;
    rd(CTRL + 0, d); check(d === 8'b0001_0001, $sformatf("status after reset %b", d));
    for (int i = 0; i < 4; i++) wr(CTRL + 2, IP[31-8*i -: 8]);
    // transmit: header, destination, 40 data bytes, trailer
    wr(CTRL + 4, 8'h40); sent.push_back(9'h040);
    for (int i = 0; i < 4; i++) begin wr(DATA + 20'(i), 8'h0A); sent.push_back(mk_data(8'h0A)); end
    for (int i = 0; i < 40; i++) begin d = 8'($urandom); wr(DATA + 20'(i), d); sent.push_back(mk_data(d)); end
    wr(CTRL + 4, 8'h00); sent.push_back(9'h000);
    rd(CTRL + 0, d); check(d[0] === 0 && d[1] === 0, "TxFIFO not empty, under half");
    wr(CTRL + 5, 8'h01);
    link(mk_poll(7'd2)); repeat (10) @(posedge clk);
    check(tx_seen.size() == 0 && !tx_en, "poll mask blocks sending");
    wr(CTRL + 5, 8'h00);
    link(mk_poll(7'd3)); repeat (10) @(posedge clk);
    check(tx_seen.size() == 0, "poll to another node ignored");
    link(mk_poll(7'd2)); repeat (80) @(posedge clk);
    check(tx_seen.size() == sent.size(), $sformatf("sent %0d symbols", tx_seen.size()));
    foreach (sent[i]) check(i < tx_seen.size() && tx_seen[i] == sent[i], $sformatf("tx symbol %0d", i));
    check(!tx_en, "transmitter released after trailer");
    rd(CTRL + 0, d); check(d[0] === 1, "TxFIFO empty again");
    // receive a packet for another IP, then a full packet for this card
    rx_pkt(32'h0A000009, 20, pl);
    repeat (5) @(posedge clk); check(!irq, "foreign packet ignored");
    rx_pkt(IP, PKT_DATA_BYTES, pl);
    repeat (5) @(posedge clk); check(irq, "receive interrupt");
    rd(CTRL + 1, d); check(d === 8'h01, $sformatf("irq register %h", d));
    wr(CTRL + 1, 8'h01); check(!irq, "interrupt acknowledged");
    for (int i = 0; i < PKT_DATA_BYTES; i++) begin
      rd(DATA + 20'(i), d); check(d === pl[i], $sformatf("rx byte %0d", i));
    end
    rd(DATA, d); check(d === 8'h00, "trailer ends the window");
    rd(CTRL + 0, d); check(d[4] === 1, "RxFIFO empty");
    // misalignment: a 10-byte packet then a full packet
    rx_pkt(IP, 10, pl);
    rx_pkt(32'hFFFFFFFF, PKT_DATA_BYTES, pl2);
    for (int i = 0; i < PKT_DATA_BYTES + 1; i++) begin
      rd(DATA, d);
      if (i < 10) check(d === pl[i], $sformatf("short packet byte %0d", i));
      else if (i === 10) check(d === 8'h00, "short packet trailer");
      else check(d === 8'hFF, $sformatf("filler %0d", i));
    end
    for (int i = 0; i < PKT_DATA_BYTES; i++) begin
      rd(DATA, d); check(d === pl2[i], $sformatf("broadcast byte %0d", i));
    end
    rd(DATA, d); check(d === 8'h00, "broadcast trailer");
    wr(CTRL + 1, 8'h01);
    @(negedge clk); vltn = 1; @(negedge clk); vltn = 0;
    check(irq, "violation interrupt");
    rd(CTRL + 1, d); check(d === 8'h02, $sformatf("violation flag %h", d));
    wr(CTRL + 1, 8'h02); check(!irq, "violation acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
