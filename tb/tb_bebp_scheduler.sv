// tb_bebp_scheduler: test of the BEBP decision logic against a reference model.
// 8 nodes, MAX_WL 16. The testbench acts as the poll timer: it takes each poll
// and answers after a short random delay; whether a node answers comes from an
// activity pattern that changes during the run (always active, never active,
// active every third poll). The model repeats the document's rules (decrement
// all CDTP, poll the zeros in order, WL doubles or resets to 1, CDTP := WL) and
// predicts the order of polls; WL/CDTP values and the skip pattern of a silent
// node (polled after 1, 2, 4, 8, 16, 16 ... skipped cycles) are checked too.
// The expected WL/CDTP behaviour is the document's; the reduced sizes and the
// traffic pattern are this testbench's own choices.
module tb_bebp_scheduler;
  localparam int N = 8, MAXWL = 16;
  logic clk = 0, rst_n = 0, poll_ready = 0, res_valid = 0, res_resp = 0;
  logic poll_valid, cycle_start;
  logic [6:0] poll_addr;
  logic [4:0] wl_dbg [N];
  logic [4:0] cdtp_dbg [N];
  int checks = 0, failures = 0;
  int m_wl[N], m_cd[N];
  int exp_q[$];
  int cycles = 0;
  int last_poll_cycle[N];
  int gaps3[$];

  bebp_scheduler #(.N_NODES(N), .MAX_WL(MAXWL)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit active(int node, int cyc, int cnt);
    case (node)
      0, 1: return 1;
      2: return cyc < 40;          // goes silent later
      3: return 0;                 // never answers
      4: return (cnt % 3) === 0;
      default: return (cyc > 100) && (node === 5);
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pcount[N];
    for (int i = 0; i < N; i++) begin m_wl[i] = 1; m_cd[i] = 1; last_poll_cycle[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    while (cycles < 200) begin
      // model: a new cycle
      for (int i = 0; i < N; i++) if (m_cd[i] > 0) m_cd[i]--;
      cycles++;
      exp_q.delete();
      for (int i = 0; i < N; i++) if (m_cd[i] === 0) exp_q.push_back(i);
      foreach (exp_q[k]) begin
        int a;
        bit r;
        a = exp_q[k];
        @(negedge clk);
        while (!poll_valid) @(negedge clk);
        check(poll_addr === 7'(a), $sformatf("cycle %0d poll %0d expected %0d", cycles, poll_addr, a));
        poll_ready = 1; @(negedge clk); poll_ready = 0;
        repeat ($urandom % 4) @(negedge clk);
        r = active(a, cycles, pcount[a]);
        pcount[a]++;
        res_valid = 1; res_resp = r; @(negedge clk); res_valid = 0;
        if (a === 3 && cycles > 1) gaps3.push_back(cycles - last_poll_cycle[a] - 1);
        last_poll_cycle[a] = cycles;
        if (r) m_wl[a] = 1; else m_wl[a] = (m_wl[a] * 2 > MAXWL) ? MAXWL : m_wl[a] * 2;
        m_cd[a] = m_wl[a];
        @(posedge clk); #1;
        check(wl_dbg[a] === 5'(m_wl[a]) && cdtp_dbg[a] === 5'(m_cd[a]), $sformatf("counters of node %0d", a));
      end
    end
    // silent node 3: skipped 1, 3, 7, 15, 15 ... cycles (polled every 2^n cycles)
    check(gaps3.size() >= 6, "node 3 polled repeatedly");
    if (gaps3.size() >= 6) begin
      check(gaps3[0] === 1 && gaps3[1] === 3 && gaps3[2] === 7 && gaps3[3] === 15 && gaps3[4] === 15,
            $sformatf("backoff gaps %0d %0d %0d %0d %0d", gaps3[0], gaps3[1], gaps3[2], gaps3[3], gaps3[4]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
