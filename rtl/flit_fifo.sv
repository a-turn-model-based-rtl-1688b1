// flit_fifo: the input queue of one router port.
//
// A circular buffer of DEPTH entries with read and write pointers and an
// occupancy counter. The head entry is always visible on dout (first word
// fall-through), so the output controller can look at the header flit
// before it pops it. A push and a pop in the same cycle are both done.
// Push when full and pop when empty are protocol errors: they are ignored
// and flagged by assertions. The 4-entry depth is the router's published
// buffer depth; the organisation of the buffer is this design's choice.
module flit_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 34
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign dout  = mem[rp];

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= nxt(wp);
      if (do_pop)  rp <= nxt(rp);
      if (do_push && !do_pop) count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  // Storage is not reset: an entry is only read after it was written.
  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("flit_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("flit_fifo: pop while empty");
endmodule
