// tb_nic_host_port: test of the NIC's PC-bus port.
// Checks the address decode (data block D8xxx, control block D900x, nothing
// elsewhere), the symbols written to the TxFIFO through the Data and Control
// ports, Poll Mask, the 4-byte IP register, the reset strobes, the status and
// interrupt registers, interrupt set/acknowledge and the receive-data path.
// The addresses and register bits follow the card's logic equations in the
// document; the bus timing is this design's own choice.
module tb_nic_host_port;
  import bebp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [19:0] host_addr = '0;
  logic [7:0]  host_wdata = '0, host_rdata, rx_rdata = 8'h5A;
  logic host_wr = 0, host_rd = 0, irq;
  logic tx_empty = 1, tx_half = 0, tx_full = 0, rx_empty = 0, rx_half = 1, rx_full = 0;
  logic rx_irq = 0, vltn = 0, rx_rd, txf_wr, pmask;
  sym_t txf_wdata;
  logic [31:0] my_ip;
  logic txf_rst, txsm_rst, rxf_rst, rxsm_rst, gate_rearm;
  int checks = 0, failures = 0;
  sym_t wrote[$];
  int strobes[5];

  nic_host_port dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (txf_wr) wrote.push_back(txf_wdata);
    if (txf_rst) strobes[0]++;
    if (txsm_rst) strobes[1]++;
    if (rxf_rst) strobes[2]++;
    if (rxsm_rst) strobes[3]++;
    if (gate_rearm) strobes[4]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic hw(input logic [19:0] a, input logic [7:0] d);
    @(negedge clk); host_addr = a; host_wdata = d; host_wr = 1; @(negedge clk); host_wr = 0;
  endtask
  task automatic hr(input logic [19:0] a, output logic [7:0] d, output bit rxrd);
    @(negedge clk); host_addr = a; host_rd = 1; #1 rxrd = rx_rd; @(negedge clk); host_rd = 0; d = host_rdata;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d; bit rr;
    repeat (3) @(posedge clk); rst_n = 1;
    hw(20'hD9004, 8'h40);          // header via control port
    hw(20'hD8000, 8'hA5);          // data
    hw(20'hD8123, 8'h00);          // data anywhere in the block
    hw(20'hD9004, 8'h00);          // trailer
    hw(20'hD7000, 8'h33);          // outside: ignored
    hw(20'hD9014, 8'h40);          // outside control block: ignored
    repeat (2) @(posedge clk);
    check(wrote.size() == 4, $sformatf("TxFIFO writes %0d", wrote.size()));
    if (wrote.size() == 4) begin
      check(wrote[0] === 9'h040, "header symbol");
      check(wrote[1] === 9'h1A5, "data symbol");
      check(wrote[2] === 9'h100, "data zero symbol");
      check(wrote[3] === 9'h000, "trailer symbol");
    end
    hw(20'hD9005, 8'h01); check(pmask, "poll mask set");
    hw(20'hD9005, 8'h00); check(!pmask, "poll mask clear");
    hw(20'hD9002, 8'h89); hw(20'hD9002, 8'hBD); hw(20'hD9002, 8'h61); hw(20'hD9002, 8'h2E);
    check(my_ip === 32'h89BD612E, "IP register");
    hw(20'hD9003, 8'h1F);
    hw(20'hD9003, 8'h05);
    repeat (2) @(posedge clk);
    check(strobes[0] === 2 && strobes[1] === 1 && strobes[2] === 2 && strobes[3] === 1 && strobes[4] === 1,
          "reset strobes");
    hr(20'hD9000, d, rr);
    check(d === 8'b0010_0001, $sformatf("status %b", d));
    check(!rr, "status read is not a receive read");
    check(!irq, "no irq yet");
    @(negedge clk); rx_irq = 1; @(negedge clk); rx_irq = 0;
    check(irq, "irq after packet");
    hr(20'hD9001, d, rr); check(d === 8'h01, "irq register rx");
    @(negedge clk); vltn = 1; @(negedge clk); vltn = 0;
    hr(20'hD9001, d, rr); check(d === 8'h03, "irq register both");
    hw(20'hD9001, 8'h01);
    hr(20'hD9001, d, rr); check(d === 8'h02, "ack rx");
    check(irq, "violation irq still pending");
    hw(20'hD9001, 8'h02);
    check(!irq, "all acknowledged");
    hr(20'hD8000, d, rr);
    check(rr && d === 8'h5A, "receive data read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
