// semi_crossbar: the router's switch, one multiplexer per output port.
//
// Output o passes req, bop, eop and data of the input selected by the
// one-hot select sel[o] from the switch allocator, and drives nothing
// (all zero) when no input is selected. The multiplexers for nz, ny and
// nx only have the local port and the n-type inputs as data inputs; those
// for pz, py, px and the local output have all seven inputs. That reduced
// connectivity (a "semi" crossbar) follows the described design and is
// what Negative-First routing needs: a packet that has moved in a positive
// direction never leaves through a negative one. Purely combinational.
module semi_crossbar
  import noc3d_pkg::*;
(
  input  link_t    [NPORTS-1:0] in_link,   // from the output controllers
  input  portvec_t [NPORTS-1:0] sel,       // [output][input], one-hot
  output link_t    [NPORTS-1:0] out_link
);
  for (genvar o = 0; o < NPORTS; o++) begin : g_mux
    localparam portvec_t M = xbar_mask(o);
    always_comb begin
      out_link[o] = '0;
      for (int i = 0; i < NPORTS; i++)
        if (M[i] && sel[o][i]) out_link[o] = in_link[i];
    end
  end
endmodule
