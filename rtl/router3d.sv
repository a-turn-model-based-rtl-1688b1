// router3d: seven-port wormhole router for a 3D mesh.
//
// Ports, in index order: pz (up), py (north), px (east), L (local IP core),
// nz (down), ny (south), nx (west). Each enabled input port has an
// input_controller (link controller, 4-flit FIFO, Negative-First routing
// function, output controller). The switch_allocator gives each output
// port to one requesting input at a time, by packet priority and then
// round robin, and keeps it until the packet's eop flit has passed. The
// semi_crossbar carries the granted flits out, and the credit_switcher
// hands each output's credit (free slots of the downstream FIFO) to the
// input that owns the output.
//
// Link interface: in_link[p]/out_link[p] carry req, bop, eop and a 32-bit
// flit; credit_out[p] is returned upstream, credit_in[p] comes back from
// downstream. A flit on out_link is written into the downstream FIFO at the
// next edge of this router's clock.
//
// Routing: with ADAPTIVE = 1 (default) each new header picks, among the
// minimal directions of its Negative-First phase, the first whose output
// is free and has credit (avail, built here from registered signals).
//
// Clocking: with GALS = 1 (default) each input FIFO is written with the
// clock of the router (or IP core) that drives that input, in_clk[p], and
// credit_out[p] is in that clock domain too; everything else runs on clk.
// Neighbouring routers may then run on unrelated clocks. With GALS = 0 the
// router is fully synchronous and in_clk is unused.
//
// Timing with GALS = 0: a header flit that arrives on a clock edge requests
// its output in the next cycle and leaves one cycle after that if the
// output is free; body flits then follow one per cycle while credit lasts.
// GALS = 1 adds two to three cycles of pointer synchronisation to the
// header's path and to each credit's return.
//
// Because an input is named after the direction its packets travel, the
// input and output with the same name sit on opposite sides of the router
// (input pz comes from below, output pz goes up). IN_EN and OUT_EN remove
// the inputs and outputs that have no neighbour, so border routers are
// built with 4, 5 or 6 physical ports: a removed input has no input
// controller and reports credit 0, a removed output has no arbiter and
// stays idle. adc is the router's own XYZ address. The block structure
// follows the described router; the header format, timing and the
// IN_EN/OUT_EN mechanism are this design's choices.
module router3d
  import noc3d_pkg::*;
#(
  parameter int unsigned DEPTH   = 4,
  parameter bit          GALS    = 1'b1,
  parameter bit          ADAPTIVE = 1'b1,
  parameter portvec_t    IN_EN   = '1,
  parameter portvec_t    OUT_EN  = '1
) (
  input  logic                  clk,
  input  logic    [NPORTS-1:0]  in_clk,    // clock of each input's upstream
  input  logic                  rst_n,
  input  coord_t                adc,
  input  link_t   [NPORTS-1:0]  in_link,
  output credit_t [NPORTS-1:0]  credit_out,
  output link_t   [NPORTS-1:0]  out_link,
  input  credit_t [NPORTS-1:0]  credit_in,
  output logic                  protocol_err
);
  portvec_t [NPORTS-1:0] port_req;   // [input][output]
  prio_t    [NPORTS-1:0] prio;
  portvec_t [NPORTS-1:0] grant;      // [input][output]
  portvec_t [NPORTS-1:0] sel;        // [output][input]
  credit_t  [NPORTS-1:0] ic_credit;
  link_t    [NPORTS-1:0] ic_out;
  link_t    [NPORTS-1:0] xbar_out;
  portvec_t              perr;
  portvec_t              avail;      // outputs free and with credit

  // An output is available to a new header when it exists, nobody owns it
  // and its downstream FIFO has a free slot. All terms are registered
  // (sel, credit_in), so the routing decision adds no combinational loop.
  for (genvar o = 0; o < NPORTS; o++) begin : g_avail
    assign avail[o] = OUT_EN[o] && sel[o] == '0 && credit_in[o] != '0;
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    if (IN_EN[p]) begin : g_ic
      input_controller #(.DEPTH(DEPTH), .GALS(GALS), .ADAPTIVE(ADAPTIVE)) u_ic (
        .clk, .rst_n, .adc,
        .in_clk       (in_clk[p]),
        .in_link      (in_link[p]),
        .credit_out   (credit_out[p]),
        .port_req     (port_req[p]),
        .prio         (prio[p]),
        .grant        (grant[p]),
        .credit       (ic_credit[p]),
        .avail,
        .out_link     (ic_out[p]),
        .protocol_err (perr[p])
      );
    end else begin : g_off
      assign credit_out[p] = '0;
      assign port_req[p]   = '0;
      assign prio[p]       = '0;
      assign ic_out[p]     = '0;
      assign perr[p]       = 1'b0;
    end
  end

  switch_allocator #(.IN_EN(IN_EN), .OUT_EN(OUT_EN)) u_sa (
    .clk, .rst_n, .port_req, .prio, .out_link(xbar_out), .grant, .sel
  );

  semi_crossbar u_xbar (.in_link(ic_out), .sel, .out_link(xbar_out));

  credit_switcher u_cs (.credit_in, .sel, .credit_to_ic(ic_credit));

  assign out_link     = xbar_out;
  assign protocol_err = |perr;
endmodule
