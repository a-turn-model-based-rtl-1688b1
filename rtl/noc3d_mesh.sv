// noc3d_mesh: a 3D mesh network on chip of MX x MY x MZ routers.
//
// Router (x, y, z) has index x + MX*(y + MY*z) and the address
// {z, y, x}; its local port is brought out for the IP core of that node.
// Neighbouring routers are joined by one link in each direction: output pz
// of (x, y, z) feeds input pz of (x, y, z+1), whose credit for that input
// returns as credit_in[pz]; likewise for the other five directions. Links
// that would leave the mesh are not built: each router is generated with
// only the inputs and outputs that have a neighbour, so corner routers have
// 4 ports, edge routers 5, face routers 6 and the inner router 7 (for the
// default 3 x 3 x 3 mesh).
//
// ADAPTIVE is passed to every router (adaptive Negative-First routing).
//
// Clocking: node n's router runs on clk[n]. With GALS = 1 (default) every
// input FIFO is written with the clock of the router that drives it, so
// the nodes may run on unrelated clocks (a globally asynchronous, locally
// synchronous network); with GALS = 0 all clk[n] must be the same clock.
// rst_n resets every node asynchronously; it should be released while the
// clocks are running slowly enough, or long enough, for all nodes to leave
// reset cleanly.
//
// IP-core interface per node n, in the clock domain of clk[n]: local_in[n] injects flits (a header flit
// with bop, then body flits, the last with eop; at most one per cycle and
// only while local_credit_out[n] is non-zero); local_out[n] delivers flits,
// one per cycle while local_credit_in[n] (free slots at the core) is
// non-zero. Header format: see noc3d_pkg. The 3 x 3 x 3 size and 4-flit
// buffers follow the described network; MX, MY, MZ up to 4 fit the 2-bit
// coordinates.
module noc3d_mesh
  import noc3d_pkg::*;
#(
  parameter int unsigned MX    = 3,
  parameter int unsigned MY    = 3,
  parameter int unsigned MZ    = 3,
  parameter int unsigned DEPTH = 4,
  parameter bit          GALS  = 1'b1,
  parameter bit      ADAPTIVE  = 1'b1
) (
  input  logic    [MX*MY*MZ-1:0]   clk,      // one clock per node
  input  logic                     rst_n,
  input  link_t   [MX*MY*MZ-1:0]   local_in,
  output credit_t [MX*MY*MZ-1:0]   local_credit_out,
  output link_t   [MX*MY*MZ-1:0]   local_out,
  input  credit_t [MX*MY*MZ-1:0]   local_credit_in,
  output logic    [MX*MY*MZ-1:0]   protocol_err
);
  localparam int unsigned NN = MX * MY * MZ;

  link_t   [NN-1:0][NPORTS-1:0] r_in, r_out;
  credit_t [NN-1:0][NPORTS-1:0] r_cin, r_cout;

  function automatic int unsigned idx(int x, int y, int z);
    return x + MX * (y + MY * z);
  endfunction

  for (genvar z = 0; z < MZ; z++) begin : g_z
    for (genvar y = 0; y < MY; y++) begin : g_y
      for (genvar x = 0; x < MX; x++) begin : g_x
        localparam int unsigned N = idx(x, y, z);
        // Which neighbours exist.
        localparam bit UP = (z < MZ - 1), DN = (z > 0);
        localparam bit NO = (y < MY - 1), SO = (y > 0);
        localparam bit EA = (x < MX - 1), WE = (x > 0);
        // Output p goes towards direction p; input p comes from the
        // opposite side.
        localparam portvec_t OUT_EN = {WE, SO, DN, 1'b1, EA, NO, UP};
        localparam portvec_t IN_EN  = {EA, NO, UP, 1'b1, WE, SO, DN};

        logic [NPORTS-1:0] in_clk;

        router3d #(.DEPTH(DEPTH), .GALS(GALS), .ADAPTIVE(ADAPTIVE), .IN_EN(IN_EN), .OUT_EN(OUT_EN)) u_router (
          .clk          (clk[N]),
          .in_clk       (in_clk),
          .rst_n,
          .adc          ('{z: COORD_W'(z), y: COORD_W'(y), x: COORD_W'(x)}),
          .in_link      (r_in[N]),
          .credit_out   (r_cout[N]),
          .out_link     (r_out[N]),
          .credit_in    (r_cin[N]),
          .protocol_err (protocol_err[N])
        );

        // Local port: the IP core shares its node's clock.
        assign in_clk[P_L]         = clk[N];
        assign r_in[N][P_L]        = local_in[N];
        assign r_cin[N][P_L]       = local_credit_in[N];
        assign local_out[N]        = r_out[N][P_L];
        assign local_credit_out[N] = r_cout[N][P_L];

        // +z / -z
        if (DN) begin : g_from_dn
          assign in_clk[P_PZ]   = clk[idx(x, y, z-1)];
          assign r_in[N][P_PZ]  = r_out[idx(x, y, z-1)][P_PZ];
          assign r_cin[N][P_NZ] = r_cout[idx(x, y, z-1)][P_NZ];
        end else begin : g_edge_dn
          assign in_clk[P_PZ]   = 1'b0;
          assign r_in[N][P_PZ]  = '0;
          assign r_cin[N][P_NZ] = '0;
        end
        if (UP) begin : g_from_up
          assign in_clk[P_NZ]   = clk[idx(x, y, z+1)];
          assign r_in[N][P_NZ]  = r_out[idx(x, y, z+1)][P_NZ];
          assign r_cin[N][P_PZ] = r_cout[idx(x, y, z+1)][P_PZ];
        end else begin : g_edge_up
          assign in_clk[P_NZ]   = 1'b0;
          assign r_in[N][P_NZ]  = '0;
          assign r_cin[N][P_PZ] = '0;
        end
        // +y / -y
        if (SO) begin : g_from_so
          assign in_clk[P_PY]   = clk[idx(x, y-1, z)];
          assign r_in[N][P_PY]  = r_out[idx(x, y-1, z)][P_PY];
          assign r_cin[N][P_NY] = r_cout[idx(x, y-1, z)][P_NY];
        end else begin : g_edge_so
          assign in_clk[P_PY]   = 1'b0;
          assign r_in[N][P_PY]  = '0;
          assign r_cin[N][P_NY] = '0;
        end
        if (NO) begin : g_from_no
          assign in_clk[P_NY]   = clk[idx(x, y+1, z)];
          assign r_in[N][P_NY]  = r_out[idx(x, y+1, z)][P_NY];
          assign r_cin[N][P_PY] = r_cout[idx(x, y+1, z)][P_PY];
        end else begin : g_edge_no
          assign in_clk[P_NY]   = 1'b0;
          assign r_in[N][P_NY]  = '0;
          assign r_cin[N][P_PY] = '0;
        end
        // +x / -x
        if (WE) begin : g_from_we
          assign in_clk[P_PX]   = clk[idx(x-1, y, z)];
          assign r_in[N][P_PX]  = r_out[idx(x-1, y, z)][P_PX];
          assign r_cin[N][P_NX] = r_cout[idx(x-1, y, z)][P_NX];
        end else begin : g_edge_we
          assign in_clk[P_PX]   = 1'b0;
          assign r_in[N][P_PX]  = '0;
          assign r_cin[N][P_NX] = '0;
        end
        if (EA) begin : g_from_ea
          assign in_clk[P_NX]   = clk[idx(x+1, y, z)];
          assign r_in[N][P_NX]  = r_out[idx(x+1, y, z)][P_NX];
          assign r_cin[N][P_PX] = r_cout[idx(x+1, y, z)][P_PX];
        end else begin : g_edge_ea
          assign in_clk[P_NX]   = 1'b0;
          assign r_in[N][P_NX]  = '0;
          assign r_cin[N][P_PX] = '0;
        end
      end
    end
  end
endmodule
