// tb_routing_function: exhaustive check of adaptive Negative-First routing.
// For every router address and destination in a 4 x 4 x 4 space, each with
// three availability patterns (all outputs free, none free, random), the
// chosen port must (a) be local exactly when the addresses match, (b)
// reduce the distance to the destination by one hop, (c) be a negative
// direction whenever any negative offset remains (negative hops first),
// and (d) be the first available direction of the current phase in the
// order -x, -z, -y / +y, +x, +z, or the first one of the phase when none
// is available. The expected port is worked out here from the offsets.
module tb_routing_function;
  import noc3d_pkg::*;
  coord_t   adc, dst;
  portvec_t avail;
  logic     valid_in, valid;
  port_e    out_port;
  routing_function dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  localparam port_e ORDER [6] = '{P_NX, P_NZ, P_NY, P_PY, P_PX, P_PZ};

  initial begin
    for (int a = 0; a < 64; a++)
      for (int d = 0; d < 64; d++)
        for (int m = 0; m < 3; m++) begin
          int ax, ay, az, dx, dy, dz, nx, ny, nz, dist0, dist1;
          bit neg_left;
          bit offs [6];
          port_e want, first;
          bit found;
          ax = a % 4; ay = (a / 4) % 4; az = a / 16;
          dx = d % 4; dy = (d / 4) % 4; dz = d / 16;
          adc = '{z: 2'(az), y: 2'(ay), x: 2'(ax)};
          dst = '{z: 2'(dz), y: 2'(dy), x: 2'(dx)};
          avail = (m == 0) ? '1 : (m == 1) ? '0 : portvec_t'($urandom);
          valid_in = ((a + d + m) % 3) != 0;
          #1;
          check(valid == valid_in, "valid follows valid_in");
          // position after the hop
          nx = ax; ny = ay; nz = az;
          case (out_port)
            P_PX: nx++; P_NX: nx--; P_PY: ny++; P_NY: ny--; P_PZ: nz++; P_NZ: nz--;
            default: ;
          endcase
          dist0 = (dx > ax ? dx - ax : ax - dx) + (dy > ay ? dy - ay : ay - dy) + (dz > az ? dz - az : az - dz);
          dist1 = (dx > nx ? dx - nx : nx - dx) + (dy > ny ? dy - ny : ny - dy) + (dz > nz ? dz - nz : nz - dz);
          check((out_port == P_L) == (dist0 == 0), "local iff arrived");
          if (dist0 > 0) check(dist1 == dist0 - 1, $sformatf("hop %0d->%0d not minimal", a, d));
          neg_left = (dx < ax) || (dy < ay) || (dz < az);
          if (neg_left) check(out_port inside {P_NX, P_NY, P_NZ}, "negative hops first");
          // offsets remaining in the current phase, in routing order
          offs = '{dx < ax, dz < az, dy < ay, !neg_left && dy > ay, !neg_left && dx > ax, !neg_left && dz > az};
          first = P_L; want = P_L; found = 0;
          for (int i = 5; i >= 0; i--) if (offs[i]) first = ORDER[i];
          for (int i = 0; i < 6; i++)
            if (!found && offs[i] && avail[ORDER[i]]) begin want = ORDER[i]; found = 1; end
          if (!found) want = first;
          check(out_port == want, $sformatf("order: %0d->%0d avail %b got %0d want %0d",
                                            a, d, avail, out_port, want));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
