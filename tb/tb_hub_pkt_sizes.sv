// tb_hub_pkt_sizes: uplink efficiency of BEBP against packet size, with all
// 64 nodes active. Five hubs run side by side, each with its packet time set
// to its packet length: 64, 128, 256, 512 and 1024 data bytes plus the
// 6-symbol header, address and trailer (70 to 1030 cycles). The other sizes
// are the defaults (64 nodes, maximum waiting length 256, guard 25 cycles).
// Behavioural nodes answer every poll with a packet of that length for
// another subnet. Each hub's efficiency must lie between
// L / (L + t_gu + 12) and L / (L + t_gu), where 12 cycles (1 us) bounds the
// hub's own processing.
// The packet sizes swept and the guard time are the document's; matching
// the packet time to the packet size for each hub and the node models are
// this testbench's own choices.
module tb_hub_pkt_sizes;
  import bebp_pkg::*;
  localparam int NN = 64, GUARD = 25, NSZ = 5;
  localparam int DATA_B [NSZ] = '{64, 128, 256, 512, 1024};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int ring_syms [NSZ];
  bit measuring = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  for (genvar g = 0; g < NSZ; g++) begin : g_hub
    localparam int L = DATA_B[g] + 6;
    sym_t dn_sym, up_sym, ring_sym;
    logic dn_stb, up_stb, ring_a_wr, ring_b_wr, a_full, b_full;
    logic [31:0] poll_cnt, resp_cnt, cycle_cnt;
    logic [15:0] drop_cnt;
    int idx;

    hub #(.PKT_CYC(L)) u_hub (
      .clk, .rst_n, .subnet(32'h0A000000), .subnet_mask(32'hFFFFFF00), .ring_b_sel(1'b0),
      .dn_sym, .dn_stb, .up_sym, .up_stb, .ring_a_in_wr(1'b0), .ring_a_in_sym('0),
      .ring_a_in_full(a_full), .ring_b_in_wr(1'b0), .ring_b_in_sym('0), .ring_b_in_full(b_full),
      .ring_a_wr, .ring_b_wr, .ring_sym, .poll_cnt, .resp_cnt, .cycle_cnt, .drop_cnt);

    initial begin idx = -1; up_sym = '0; up_stb = 0; end
    always @(posedge clk) if (rst_n) begin
      if (dn_stb && sym_kind(dn_sym) === SYM_POLL) begin
        check(idx < 0, "no poll while a packet is being sent");
        idx = 0;
      end
      if (ring_a_wr && measuring) ring_syms[g]++;
    end
    always @(negedge clk) begin
      up_stb = 0;
      if (idx >= 0) begin
        up_stb = 1;
        if (idx === 0)          up_sym = 9'h040;
        else if (idx < 5)       up_sym = mk_data(8'(11 * idx));
        else if (idx === L - 1) up_sym = 9'h000;
        else                    up_sym = mk_data(8'(idx));
        idx = (idx === L - 1) ? -1 : idx + 1;
      end
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real eff, lo, hi;
    int win;
    int lens [NSZ];
    for (int g = 0; g < NSZ; g++) lens[g] = DATA_B[g] + 6;
    win = 2 * NN * (1030 + GUARD + 12);
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (NN * (1030 + GUARD + 12)) @(posedge clk);
    measuring = 1;
    repeat (win) @(posedge clk);
    measuring = 0;
    for (int g = 0; g < NSZ; g++) begin
      eff = real'(ring_syms[g]) / real'(win);
      lo  = real'(lens[g]) / real'(lens[g] + GUARD + 12);
      hi  = real'(lens[g]) / real'(lens[g] + GUARD);
      check(eff >= lo - 0.01 && eff <= hi + 0.01,
            $sformatf("%0d-byte data: efficiency %f outside %f..%f", DATA_B[g], eff, lo, hi));
      $display("data %4d bytes: efficiency %0.3f (ideal %0.3f)", DATA_B[g], eff, hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
