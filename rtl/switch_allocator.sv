// switch_allocator: assigns the router's output ports to input ports.
//
// One output_arbiter per enabled output port. Arbiter o sees, from each
// input i, the request port_req[i][o] and the input's packet priority when
// that request is raised (0 otherwise). Its one-hot grant becomes the
// select lines sel[o][*] of the semi-crossbar and the credit switcher, and
// is returned transposed to the input controllers as grant[i][o]. An
// arbiter releases its output when the crossbar output carries a flit with
// eop set. Outputs removed by OUT_EN have no arbiter, and inputs removed
// by IN_EN are masked out of every arbiter. The arbiter count
// and structure follow the described switch allocator; the priority
// masking per output is this design's choice.
module switch_allocator
  import noc3d_pkg::*;
#(
  parameter portvec_t IN_EN  = '1,
  parameter portvec_t OUT_EN = '1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  portvec_t [NPORTS-1:0] port_req,  // [input][output]
  input  prio_t    [NPORTS-1:0] prio,      // [input]
  input  link_t    [NPORTS-1:0] out_link,  // crossbar outputs, for release
  output portvec_t [NPORTS-1:0] grant,     // [input][output]
  output portvec_t [NPORTS-1:0] sel        // [output][input]
);
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    if (OUT_EN[o]) begin : g_arb
      portvec_t             req_o;
      prio_t [NPORTS-1:0]   prio_o;
      for (genvar i = 0; i < NPORTS; i++) begin : g_in
        assign req_o[i]  = port_req[i][o];
        assign prio_o[i] = port_req[i][o] ? prio[i] : '0;
      end
      output_arbiter #(.N(NPORTS), .MASK(xbar_mask(o) & IN_EN)) u_arb (
        .clk, .rst_n,
        .req       (req_o),
        .prio      (prio_o),
        .release_i (out_link[o].req && out_link[o].eop),
        .grant     (sel[o])
      );
    end else begin : g_off
      assign sel[o] = '0;
    end
  end

  always_comb
    for (int i = 0; i < NPORTS; i++)
      for (int o = 0; o < NPORTS; o++)
        grant[i][o] = sel[o][i];
endmodule
