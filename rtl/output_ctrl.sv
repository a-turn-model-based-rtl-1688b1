// output_ctrl: bridge from an input FIFO to the semi-crossbar.
//
// When a header (bop) flit reaches the FIFO head, the output controller
// raises a one-hot request for the port chosen by the routing function,
// together with the packet priority from the header, and latches both.
// The request is held until the packet's eop flit has left. While the
// switch allocator grants the requested port, one flit per cycle is popped
// and driven to the crossbar, provided the FIFO is not empty and the credit
// of the granted output (the downstream free-slot count) is non-zero.
// prio reads 0 while no request is raised.
//
// Timing: request in the cycle the header is at the head; the allocator
// grants from the next cycle; flits then leave at one per cycle, paced by
// credit. The request/grant/credit behaviour follows the described router;
// the cycle timing is this design's choice.
module output_ctrl
  import noc3d_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              head_bop,
  input  logic              head_eop,
  input  logic [FLIT_W-1:0] head_data,
  input  logic              empty,
  input  port_e             rf_port,
  input  logic              rf_valid,
  input  portvec_t          grant,
  input  credit_t           credit,
  output logic              pop,
  output portvec_t          port_req,
  output prio_t             prio,
  output link_t             out_link
);
  logic  routed;      // a packet holds a route
  port_e route_q;
  prio_t prio_q;

  wire new_hdr = !routed && !empty && head_bop && rf_valid;

  port_e cur_port;
  assign cur_port = routed ? route_q : rf_port;

  always_comb begin
    port_req = '0;
    prio     = '0;
    if (routed || new_hdr) begin
      port_req[cur_port] = 1'b1;
      prio               = routed ? prio_q : hdr_prio(head_data);
    end
  end

  assign pop = routed && grant[route_q] && !empty && (credit != '0);

  assign out_link.req  = pop;
  assign out_link.bop  = head_bop;
  assign out_link.eop  = head_eop;
  assign out_link.data = head_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      routed  <= 1'b0;
      route_q <= P_L;
      prio_q  <= '0;
    end else if (new_hdr) begin
      routed  <= 1'b1;
      route_q <= rf_port;
      prio_q  <= hdr_prio(head_data);
    end else if (pop && head_eop) begin
      routed  <= 1'b0;
    end
  end

  // A granted port is always the one requested.
  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~port_req) == '0)
    else $error("output_ctrl: grant for a port not requested");
endmodule
