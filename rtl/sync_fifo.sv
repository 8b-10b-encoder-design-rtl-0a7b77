// sync_fifo - single-clock FIFO buffer for the encoded 10-bit words.
//
// A DEPTH-entry circular buffer (DEPTH a power of two) with read and write
// pointers one bit wider than the address, so full and empty are told apart
// by that extra bit.  The head word is always visible on dout while empty is
// low (first-word fall-through); rd_en pops it on the next rising edge.
// wr_en pushes din on the rising edge unless the FIFO is full; a push while
// full is dropped and flagged by a one-cycle overflow pulse.  A pop while
// empty is ignored.  RSTn is asynchronous and active low and empties the FIFO.
// The design only names a FIFO buffer after the encoder; depth, flags and
// read style are this implementation's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             RSTn,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             overflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  always_comb begin
    empty = (wptr == rptr);
    full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
    do_wr = wr_en && !full;
    do_rd = rd_en && !empty;
    dout  = mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge RSTn) begin
    if (!RSTn) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      overflow <= wr_en && full;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("sync_fifo: DEPTH must be a power of two");
  end

  a_count: assert property (@(posedge clk) disable iff (!RSTn)
    (AW+1)'(wptr - rptr) <= (AW+1)'(DEPTH));

endmodule
