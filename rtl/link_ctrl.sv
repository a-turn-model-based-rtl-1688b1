// link_ctrl: receiving side of one router input link.
//
// Every cycle in which the upstream router drives req, the flit (with its
// bop/eop framing bits) is written into the input FIFO. The credit sent
// back upstream is the number of free FIFO slots, DEPTH - count, taken
// from the FIFO's occupancy register; it drops by one with each flit
// written, and the sender only forwards while it is non-zero, so the FIFO
// cannot overflow. The link controller also watches the framing: a bop
// flit inside a packet, a non-bop flit outside one, or a flit arriving
// with no free slot sets the sticky protocol_err flag. The credit as a
// free-slot count follows the described credit scheme; the framing check
// is this design's addition. Clocking: clk is the clock of the sender.
// With GALS links the input controller feeds it the upstream clock and the
// writer-side count of the dual-clock FIFO, which never understates the
// occupancy, so the credit stays safe and is synchronous to the sender.
// Timing: push is combinational from req; credit_out follows fifo_count.
module link_ctrl
  import noc3d_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  link_t                      in_link,
  input  logic [$clog2(DEPTH+1)-1:0] fifo_count,
  output logic                       push,
  output credit_t                    credit_out,
  output logic                       protocol_err
);
  logic in_pkt;  // between a bop flit and its eop flit

  assign push       = in_link.req;
  assign credit_out = credit_t'(DEPTH[$clog2(DEPTH+1)-1:0] - fifo_count);

  wire bad_frame = in_link.req && (in_link.bop == in_pkt);
  wire overflow  = in_link.req && (fifo_count == DEPTH[$clog2(DEPTH+1)-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt       <= 1'b0;
      protocol_err <= 1'b0;
    end else begin
      if (in_link.req) in_pkt <= !in_link.eop;
      if (bad_frame || overflow) protocol_err <= 1'b1;
    end
  end
endmodule
