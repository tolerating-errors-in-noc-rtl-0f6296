// flit_fifo: input buffer of a router port, a first-word-fall-through FIFO.
//
// Holds DEPTH entries of W bits in a register array with read and write
// pointers and an occupancy counter. dout shows the oldest entry whenever
// empty is low; pop removes it, push stores din. A push and a pop may happen
// in the same cycle, also when the FIFO is full. The depth is this design's
// choice.
module flit_fifo #(
  parameter int unsigned W     = 66,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;

  assign full  = (cnt == (AW+1)'(DEPTH));
  assign empty = (cnt == '0);
  assign dout  = mem[rp];

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  // A producer must respect full; the router only pushes when ready.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (!full || pop))
    else $error("flit_fifo: push while full");

endmodule
