// tb_sym_fifo: self-checking test of sym_fifo at a small depth (16).
// Random writes and reads are compared with a queue model; the Empty, Half-full
// and Full flags are checked every cycle, including writes into a full FIFO
// (ignored), reads from an empty FIFO (ignored) and the synchronous reset.
// The flags are those of the document's FIFO chips; the half-full threshold
// and the reduced depth are this design's and this testbench's own choices.
module tb_sym_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, srst = 0, wr = 0, rd = 0;
  logic [8:0] wdata = '0, rdata;
  logic empty, half, full;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  logic [8:0] model[$];
  logic [8:0] exp_rd;
  logic       exp_valid = 0;

  sym_fifo #(.DEPTH(DEPTH), .WIDTH(9)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // bias towards filling in the first half and draining in the second
      automatic int pw = (cyc % 1000) < 500 ? 70 : 30;
      @(negedge clk);
      if (exp_valid) check(rdata === exp_rd, "read data");
      check(empty == (model.size() == 0), "empty flag");
      check(full  == (model.size() == DEPTH), "full flag");
      check(half  == (model.size() >= DEPTH/2), "half flag");
      check(int'(count) === model.size(), "count");
      wr = ($urandom % 100) < pw;
      rd = ($urandom % 100) < (100 - pw);
      wdata = 9'($urandom);
      srst = (cyc === 2500);
      exp_valid = 0;
      @(posedge clk);
      #1;
      if (srst) begin
        model.delete();
      end else begin
        if (rd && model.size() > 0) begin exp_rd = model.pop_front(); exp_valid = 1; end
        if (wr && model.size() + (exp_valid ? 1 : 0) <= DEPTH) begin
          if (!(model.size() + (exp_valid ? 1 : 0) == DEPTH)) model.push_back(wdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
