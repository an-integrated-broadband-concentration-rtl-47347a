// sym_fifo: first-in first-out buffer of link symbols with Empty, Half-full and
// Full flags, the behaviour of the 1K x 9 FIFO chips used as the NIC's transmit
// and receive buffers and reused here for the hub's packet buffers.
//
// Single clock. A write (wr) stores wdata unless the FIFO is full. A read (rd)
// removes the oldest entry unless the FIFO is empty; its value appears on rdata
// the following cycle and stays there until the next read. empty, half and full
// are functions of the current occupancy: half is set at DEPTH/2 entries or more.
// srst empties the FIFO. The flags are the document's; the synchronous single
// clock (the chip has asynchronous strobes), the half-full threshold and the
// registered read data are this design's choices.
module sym_fifo #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             srst,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             half,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  wire do_wr = wr && !full;
  wire do_rd = rd && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (srst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rdata <= '0;
    else if (do_rd) rdata <= mem[rptr];
  end

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign half  = (count >= (AW+1)'(DEPTH/2));

  // the write pointer never passes the read pointer
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
