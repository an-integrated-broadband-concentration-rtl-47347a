// tb_concentrator: test of the concentrator with 4 ports at base address 8.
// Each port's node drives random symbols on its uplink every cycle. Polls
// addressed to the ports (and to other nodes) are sent down. Checks that the
// downlink reaches the nodes unchanged, that at most one port is open, that
// the open port is the last one polled, and that only the open port's
// symbols reach the hub.
// Poll-selected uplink buffers on a shared bus follow the document; the base
// address, the random traffic and the OR-ed bus are this design's own choices.
module tb_concentrator;
  import bebp_pkg::*;
  localparam int N = 4, BASE = 8;
  logic clk = 0, rst_n = 0, hub_dn_stb = 0;
  sym_t hub_dn_sym = '0, hub_up_sym, node_dn_sym;
  logic hub_up_stb, node_dn_stb;
  sym_t node_up_sym [N];
  logic [N-1:0] node_up_stb = '1, open_mask;
  int checks = 0, failures = 0, open_exp = -1, opened[N];

  concentrator #(.N_PORTS(N), .BASE_ADDR(BASE)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge clk) for (int i = 0; i < N; i++) node_up_sym[i] = sym_t'($urandom);

  always @(posedge clk) if (rst_n) begin
    #1;
    check(node_dn_sym === hub_dn_sym && node_dn_stb === hub_dn_stb, "downlink passes");
    check($onehot0(open_mask), "one port open");
    if (open_exp < 0) check(open_mask === 0 && !hub_up_stb && hub_up_sym === 0, "closed: bus idle");
    else begin
      check(open_mask === N'(1 << open_exp), $sformatf("port %0d open", open_exp));
      check(hub_up_stb && hub_up_sym === node_up_sym[open_exp], "open port drives the hub");
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      a = (($urandom % 3) === 0) ? ($urandom % 128) : (BASE + $urandom % N);
      case ($urandom % 4)
        0: hub_dn_sym = mk_data(8'($urandom));
        1: hub_dn_sym = (($urandom % 2) !== 0) ? 9'h040 : 9'h000;
        default: hub_dn_sym = mk_poll(7'(a));
      endcase
      hub_dn_stb = $urandom % 4 !== 0;
      @(posedge clk);
      if (hub_dn_stb && sym_kind(hub_dn_sym) === SYM_POLL) begin
        a = int'(hub_dn_sym[6:0]);
        open_exp = (a >= BASE && a < BASE + N) ? a - BASE : -1;
        if (open_exp >= 0) opened[open_exp]++;
      end
    end
    @(negedge clk); hub_dn_stb = 0;
    for (int i = 0; i < N; i++) check(opened[i] > 0, $sformatf("port %0d was polled", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
