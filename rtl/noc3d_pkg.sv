// noc3d_pkg: types and constants shared by the 3D mesh router.
//
// A flit is 32 bits wide and travels with three framing bits: req (the flit
// is valid this cycle), bop (first flit of a packet) and eop (last flit).
// The first flit of a packet, the header, carries the destination address
// and the packet priority in its low byte:
//   data[1:0] dst_x, data[3:2] dst_y, data[5:4] dst_z, data[7:6] priority.
// The header layout and the 2-bit coordinate and priority widths are this
// design's choice; the 32-bit flit and the 4-entry buffer follow the
// router's published parameters.
//
// Ports are numbered in the order pz, py, px, L, nz, ny, nx. An input port
// is named after the direction its packets travel: input nx receives the
// packets that the +x neighbour sends out of its nx output.
package noc3d_pkg;

  localparam int unsigned FLIT_W   = 32;  // flit size in bits
  localparam int unsigned NPORTS   = 7;   // local + six mesh directions
  localparam int unsigned COORD_W  = 2;   // bits per coordinate (up to 4 per axis)
  localparam int unsigned PRIO_W   = 2;   // packet priority bits
  localparam int unsigned CREDIT_W = 3;   // free-slot count, 0..DEPTH for DEPTH <= 7

  typedef enum logic [2:0] {
    P_PZ = 3'd0,  // up
    P_PY = 3'd1,  // north
    P_PX = 3'd2,  // east
    P_L  = 3'd3,  // local IP core
    P_NZ = 3'd4,  // down
    P_NY = 3'd5,  // south
    P_NX = 3'd6   // west
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0] z;
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
  } coord_t;

  // One direction of a router-to-router link, as seen by the receiver.
  typedef struct packed {
    logic              req;
    logic              bop;
    logic              eop;
    logic [FLIT_W-1:0] data;
  } link_t;

  typedef logic [NPORTS-1:0]   portvec_t;
  typedef logic [CREDIT_W-1:0] credit_t;
  typedef logic [PRIO_W-1:0]   prio_t;

  // Mask of the n-type ports (nz, ny, nx).
  localparam portvec_t N_PORTS = portvec_t'(7'b111_0000);

  // Inputs that the semi-crossbar connects to output o: the n-type outputs
  // only take flits from the local port and the n-type inputs (a packet
  // that has moved in a positive direction never turns negative again);
  // p-type and local outputs take flits from every input.
  function automatic portvec_t xbar_mask(int unsigned o);
    if (N_PORTS[o]) return N_PORTS | portvec_t'(1 << P_L);
    return '1;
  endfunction

  function automatic coord_t hdr_dst(logic [FLIT_W-1:0] d);
    return '{z: d[5:4], y: d[3:2], x: d[1:0]};
  endfunction

  function automatic prio_t hdr_prio(logic [FLIT_W-1:0] d);
    return d[7:6];
  endfunction

endpackage
