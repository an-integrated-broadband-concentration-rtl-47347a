// tb_bebp_pkg: test of the shared link-symbol definitions.
// Goes through all 512 nine-bit symbols and compares the package's
// classification with the bit fields written out here: bit 8 set is data;
// bit 8 clear and bit 7 set is a poll with the node address in bits 6..0;
// bits 8..7 clear is a header when bit 6 is set and a trailer when it is
// clear. Also checks the symbol builders, the header/trailer constants and
// the packet length of 518 symbols.
// The bit fields checked are those of the document's symbol format; the
// exhaustive sweep is this testbench's own choice.
module tb_bebp_pkg;
  import bebp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_kind_e exp;
    sym_t s;
    for (int v = 0; v < 512; v++) begin
      s = sym_t'(v);
      if (v >= 256)      exp = SYM_DATA;
      else if (v >= 128) exp = SYM_POLL;
      else if (v >= 64)  exp = SYM_HEADER;
      else               exp = SYM_TRAILER;
      check(sym_kind(s) === exp, $sformatf("kind of %h", v));
    end
    for (int b = 0; b < 256; b++) check(mk_data(8'(b)) === sym_t'(256 + b), $sformatf("data %0d", b));
    for (int a = 0; a < 128; a++) check(mk_poll(7'(a)) === sym_t'(128 + a), $sformatf("poll %0d", a));
    check(sym_kind(SYM_HDR) === SYM_HEADER && sym_kind(SYM_TRL) === SYM_TRAILER, "header/trailer constants");
    check(PKT_SYMS === 518 && SYM_W === 9 && NODE_ADDR_W === 7, "sizes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
