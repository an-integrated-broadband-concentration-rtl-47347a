// tb_nic_misalign: test of the misalignment protection with a real sym_fifo.
// READ_LEN is reduced to 9 (8 data + trailer). The receive FIFO is loaded with
// a good packet, a short packet (5 data), a long packet (12 data) and two good
// packets. The test plays the host: it reads READ_LEN bytes per window and
// accepts a window only if its last byte is the trailer (0x00). Expected, as in
// the document's short/long cases: good, reject (short), good, reject, reject
// (long spills over), good, good. It also checks the 0xFF filler and that the
// re-arm strobe opens the gate.
// The fixed-length read and the packet cases follow the document; the
// shortened window and the 0xFF filler are this design's own choices.
module tb_nic_misalign;
  import bebp_pkg::*;
  localparam int RL = 9;
  logic clk = 0, rst_n = 0, srst = 0, gate_rearm = 0, host_rd = 0, fwr = 0;
  logic [7:0] host_rdata;
  logic fifo_empty, fifo_rd;
  sym_t fwdata = '0, fifo_rdata;
  int checks = 0, failures = 0;

  sym_fifo #(.DEPTH(128), .WIDTH(9)) u_f (.clk, .rst_n, .srst(1'b0), .wr(fwr), .wdata(fwdata),
    .rd(fifo_rd), .rdata(fifo_rdata), .empty(fifo_empty), .half(), .full(), .count());
  nic_misalign #(.READ_LEN(RL)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic push_pkt(input int n, input logic [7:0] tag);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); fwr = 1; fwdata = mk_data(tag + 8'(i));
    end
    @(negedge clk); fwr = 1; fwdata = 9'h000;
    @(negedge clk); fwr = 0;
  endtask

  // one host read; returns the byte
  task automatic hread(output logic [7:0] b);
    @(negedge clk); host_rd = 1; @(negedge clk); host_rd = 0; b = host_rdata;
  endtask

  task automatic window(output bit ok, output logic [7:0] first, output int fillers);
    logic [7:0] b;
    fillers = 0;
    for (int i = 0; i < RL; i++) begin
      hread(b);
      if (i === 0) first = b;
      if (b === 8'hFF) fillers++;
    end
    ok = (b === 8'h00);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok; logic [7:0] first; int fill;
    automatic bit exp_ok[7] = '{1, 0, 1, 0, 0, 1, 1};
    automatic logic [7:0] exp_first[7] = '{8'h10, 8'h20, 8'h30, 8'h40, 8'h49, 8'h50, 8'h60};
    automatic int exp_fill[7] = '{0, 3, 0, 0, 5, 0, 0};
    repeat (3) @(posedge clk); rst_n = 1;
    push_pkt(8, 8'h10);
    push_pkt(5, 8'h20);
    push_pkt(8, 8'h30);
    push_pkt(12, 8'h40);
    push_pkt(8, 8'h50);
    push_pkt(8, 8'h60);
    for (int w = 0; w < 7; w++) begin
      window(ok, first, fill);
      check(ok === exp_ok[w], $sformatf("window %0d accept=%0d", w, ok));
      check(first === exp_first[w], $sformatf("window %0d first byte %h", w, first));
      check(fill === exp_fill[w], $sformatf("window %0d fillers %0d", w, fill));
    end
    check(fifo_empty, "FIFO drained");
    // re-arm: short packet, gate closes, re-arm opens it mid-window
    push_pkt(2, 8'h70);
    push_pkt(8, 8'h80);
    begin
      logic [7:0] b;
      hread(b); hread(b); hread(b);   // 2 data + trailer
      check(b === 8'h00, "short packet trailer");
      hread(b);
      check(b === 8'hFF, "filler after trailer");
      @(negedge clk); gate_rearm = 1; @(negedge clk); gate_rearm = 0;
      hread(b);
      check(b === 8'h80, "re-arm opens the gate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
