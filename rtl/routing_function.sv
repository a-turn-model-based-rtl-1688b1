// routing_function: Negative-First routing for a 3D mesh.
//
// Combinational. Compares this router's address adc with the packet's
// destination dst and chooses the next output port. Under the
// Negative-First turn model every hop in a negative direction (-x, -z,
// -y) is taken before any hop in a positive direction (+y, +x, +z), so a
// packet never turns from a positive to a negative direction and no
// dependency cycle can form. The candidates are the directions of the
// current phase (the negative ones while any negative offset remains, the
// positive ones after that) in which an offset remains; every candidate
// is a minimal hop. With ADAPTIVE = 1 (default) the route is the first
// candidate, in the order -x, -z, -y or +y, +x, +z, whose output is
// marked in avail (free and with downstream credit); if none is, it is the
// first candidate. With ADAPTIVE = 0 it is always the first candidate.
// When all three coordinates match, the packet leaves through the local
// port. valid (the "RFplein" signal) is valid_in: a header flit is present
// and a route is available.
//
// The phase rule and the direction order follow the described algorithm,
// which routes "adaptively" within each phase but gives no selection
// criterion; the availability criterion is this design's choice.
module routing_function
  import noc3d_pkg::*;
#(
  parameter bit ADAPTIVE = 1'b1
) (
  input  coord_t   adc,
  input  coord_t   dst,
  input  portvec_t avail,     // outputs that are free and have credit
  input  logic     valid_in,
  output port_e    out_port,
  output logic     valid
);
  portvec_t cand;             // minimal directions of the current phase

  always_comb begin
    cand = '0;
    if (dst.x < adc.x || dst.z < adc.z || dst.y < adc.y) begin
      cand[P_NX] = (dst.x < adc.x);
      cand[P_NZ] = (dst.z < adc.z);
      cand[P_NY] = (dst.y < adc.y);
    end else begin
      cand[P_PY] = (dst.y > adc.y);
      cand[P_PX] = (dst.x > adc.x);
      cand[P_PZ] = (dst.z > adc.z);
    end
  end

  // First set port of v in the order nx, nz, ny, py, px, pz; local if none.
  function automatic port_e first_of(portvec_t v);
    if      (v[P_NX]) return P_NX;
    else if (v[P_NZ]) return P_NZ;
    else if (v[P_NY]) return P_NY;
    else if (v[P_PY]) return P_PY;
    else if (v[P_PX]) return P_PX;
    else if (v[P_PZ]) return P_PZ;
    else              return P_L;
  endfunction

  always_comb begin
    if (ADAPTIVE && (cand & avail) != '0) out_port = first_of(cand & avail);
    else                                  out_port = first_of(cand);
  end

  assign valid = valid_in;
endmodule
