// input_controller: everything behind one router input port.
//
// Chains the link controller (writes arriving flits into the FIFO and
// returns the free-slot count upstream as credit), the FIFO (DEPTH entries
// of {bop, eop, data}), the routing function (Negative-First route of the
// header flit at the FIFO head) and the output controller (requests the
// routed output port, and forwards the packet flit by flit once granted
// and while the granted output has credit). The grant comes from the
// switch allocator and the credit from the credit switcher. The split into
// these four parts follows the described input controller. avail tells
// the routing function which outputs are free and have credit, for the
// adaptive choice among the directions of the current routing phase.
//
// Clocking: with GALS = 1 (default) the link is globally asynchronous,
// locally synchronous: the upstream router's clock in_clk writes the flits
// into a dual-clock FIFO (gals_flit_fifo) and the link controller and its
// credit run in that clock domain, while routing and forwarding run on
// clk. With GALS = 0 the whole port runs on clk with a single-clock FIFO
// and in_clk is unused.
//
// Latency (GALS = 0): a header written into an empty FIFO at a clock edge
// raises its request in the next cycle and can be forwarded one cycle
// later. With GALS = 1 the header becomes visible two to three clk edges
// after it is written, and a freed slot returns to the credit two to three
// in_clk edges after it is read.
module input_controller
  import noc3d_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter bit          GALS  = 1'b1,
  parameter bit      ADAPTIVE  = 1'b1
) (
  input  logic     clk,        // this router's clock
  input  logic     in_clk,     // upstream clock of this link (GALS = 1)
  input  logic     rst_n,
  input  coord_t   adc,
  input  link_t    in_link,
  output credit_t  credit_out,
  output portvec_t port_req,
  output prio_t    prio,
  input  portvec_t grant,
  input  credit_t  credit,
  input  portvec_t avail,      // outputs free and with credit (adaptive routing)
  output link_t    out_link,
  output logic     protocol_err
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic              push, pop, empty;
  logic [CW-1:0]     count;
  logic              head_bop, head_eop;
  logic [FLIT_W-1:0] head_data;
  port_e             rf_port;
  logic              rf_valid;

  if (GALS) begin : g_gals
    // The link controller and the FIFO's write side run on the upstream
    // clock; the credit is computed in that domain.
    gals_flit_fifo #(.DEPTH(DEPTH), .W(FLIT_W + 2)) u_fifo (
      .wclk   (in_clk),
      .wrst_n (rst_n),
      .push,
      .din    ({in_link.bop, in_link.eop, in_link.data}),
      .wcount (count),
      .rclk   (clk),
      .rrst_n (rst_n),
      .pop,
      .dout   ({head_bop, head_eop, head_data}),
      .empty
    );
    link_ctrl #(.DEPTH(DEPTH)) u_link (
      .clk(in_clk), .rst_n, .in_link, .fifo_count(count), .push, .credit_out, .protocol_err
    );
  end else begin : g_sync
    logic full;
    flit_fifo #(.DEPTH(DEPTH), .W(FLIT_W + 2)) u_fifo (
      .clk, .rst_n, .push,
      .din  ({in_link.bop, in_link.eop, in_link.data}),
      .pop,
      .dout ({head_bop, head_eop, head_data}),
      .empty, .full, .count
    );
    link_ctrl #(.DEPTH(DEPTH)) u_link (
      .clk, .rst_n, .in_link, .fifo_count(count), .push, .credit_out, .protocol_err
    );
  end

  routing_function #(.ADAPTIVE(ADAPTIVE)) u_rf (
    .adc, .dst(hdr_dst(head_data)), .avail, .valid_in(!empty && head_bop),
    .out_port(rf_port), .valid(rf_valid)
  );

  output_ctrl u_oc (
    .clk, .rst_n, .head_bop, .head_eop, .head_data, .empty,
    .rf_port, .rf_valid, .grant, .credit, .pop, .port_req, .prio, .out_link
  );
endmodule
