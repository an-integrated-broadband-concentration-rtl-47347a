// tb_hub_poll_timer: test of the hub's guard-time control with GUARD_CYC = 25
// and PKT_CYC = 518 (2 us and 41.44 us at 80 ns per symbol).
// For each poll the testbench records the cycle the poll command is taken
// (cmd_ack) and the cycle of res_valid. No answer: the result must come
// GUARD_CYC cycles after the command, with res_resp = 0. A header within the
// guard time: GUARD_CYC + PKT_CYC cycles, res_resp = 1. A header after the guard
// time is ignored. cmd_ack is delayed at random to check that the command waits.
// The guard time and packet time rules follow the document; the reduced cycle
// counts are this testbench's own choice.
module tb_hub_poll_timer;
  import bebp_pkg::*;
  localparam int G = 25, P = 518;
  logic clk = 0, rst_n = 0, poll_valid = 0, cmd_ack = 0, up_hdr = 0;
  logic [6:0] poll_addr = '0;
  logic poll_ready, cmd_req, res_valid, res_resp;
  sym_t cmd_sym;
  int checks = 0, failures = 0, cyc = 0;

  hub_poll_timer #(.GUARD_CYC(G), .PKT_CYC(P)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // hdr_at < 0: no answer
  task automatic one_poll(input logic [6:0] a, input int hdr_at, input bit exp_resp);
    int t_cmd, t_res;
    @(negedge clk); poll_valid = 1; poll_addr = a;
    check(poll_ready, "ready when idle");
    @(negedge clk); poll_valid = 0;
    repeat ($urandom % 3) begin check(cmd_req, "command held"); @(negedge clk); end
    check(cmd_req && cmd_sym === mk_poll(a), "poll command symbol");
    cmd_ack = 1; t_cmd = cyc; @(negedge clk); cmd_ack = 0;
    check(!poll_ready, "busy while waiting");
    fork
      if (hdr_at >= 0) begin repeat (hdr_at - 1) @(negedge clk); up_hdr = 1; @(negedge clk); up_hdr = 0; end
      begin while (!res_valid) @(negedge clk); t_res = cyc; end
    join
    check(res_resp === exp_resp, $sformatf("response flag for hdr_at=%0d", hdr_at));
    check(t_res - t_cmd === (exp_resp ? G + P : G), $sformatf("wait %0d cycles (hdr_at=%0d)", t_res - t_cmd, hdr_at));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    one_poll(7'd3, -1, 0);
    one_poll(7'd9, 3, 1);
    one_poll(7'd0, 20, 1);
    one_poll(7'd127, 30, 0);   // too late
    one_poll(7'd1, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
