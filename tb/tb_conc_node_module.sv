// tb_conc_node_module: test of the concentrator's node-connecting module (slot 6).
// Checks that the uplink buffer is closed after reset, opens one cycle after a
// poll to address 6, stays open through data and other control symbols, and
// closes on a poll to any other address; when closed nothing reaches the bus.
// Opening on the node's own poll and closing on any other follows the
// document; the symbol sequence and the one-cycle switching are this design's
// own choices.
module tb_conc_node_module;
  import bebp_pkg::*;
  logic clk = 0, rst_n = 0, dn_stb = 0, node_up_stb = 0;
  sym_t dn_sym = '0, node_up_sym = 9'h1AB, bus_sym;
  logic bus_stb, buf_open;
  logic [6:0] slot_addr = 7'd6;
  int checks = 0, failures = 0;

  conc_node_module dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic dn(input sym_t s);
    @(negedge clk); dn_sym = s; dn_stb = 1; @(negedge clk); dn_stb = 0;
  endtask
  task automatic expect_open(input bit o, input string what);
    check(buf_open === o, what);
    node_up_stb = 1; #1;
    check(bus_stb === o && bus_sym === (o ? node_up_sym : 9'h000), {what, " (bus)"});
    node_up_stb = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); expect_open(0, "closed after reset");
    dn(mk_poll(7'd5));   expect_open(0, "poll to 5");
    dn(mk_poll(7'd6));   expect_open(1, "poll to 6 opens");
    dn(mk_data(8'h86));  expect_open(1, "data keeps it open");
    dn(9'h040);          expect_open(1, "header keeps it open");
    dn(9'h000);          expect_open(1, "trailer keeps it open");
    dn(mk_poll(7'd70));  expect_open(0, "poll to 70 closes");
    dn(mk_poll(7'd6));   expect_open(1, "reopen");
    @(negedge clk); dn_sym = mk_poll(7'd7); #1;
    check(buf_open, "no change without strobe");
    dn(mk_poll(7'd7));   expect_open(0, "poll to 7 closes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
