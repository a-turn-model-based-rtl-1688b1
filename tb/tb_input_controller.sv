// tb_input_controller: one input port, with the switch allocator and the
// downstream credit modelled by the testbench. Packets with random
// destinations arrive while credit_out allows; the testbench grants the
// requested port after a random delay and offers random downstream credit.
// Checks: credit_out equals 4 minus the flits held; the request names the
// Negative-First port for the header's destination, with the header's
// priority; flits leave in order, only while granted with credit; and a
// header arriving at an idle port is requested one cycle later.
// Built with GALS = 0 (single clock), where these timings are exact; the
// dual-clock input path is covered by tb_gals_flit_fifo, tb_router3d and
// the mesh tests.
module tb_input_controller;
  import noc3d_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  coord_t   adc;
  link_t    in_link;
  credit_t  credit_out;
  portvec_t port_req;
  prio_t    prio;
  portvec_t grant;
  credit_t  credit;
  link_t    out_link;
  logic     protocol_err;
  logic     in_clk;
  portvec_t avail;
  assign avail = '1;   // all outputs free: the route is the first candidate
  assign in_clk = clk;
  input_controller #(.DEPTH(4), .GALS(1'b0)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", t, msg); end
  endtask

  function automatic port_e nf_route(coord_t a, coord_t d);
    if (d.x < a.x) return P_NX;
    if (d.z < a.z) return P_NZ;
    if (d.y < a.y) return P_NY;
    if (d.y > a.y) return P_PY;
    if (d.x > a.x) return P_PX;
    if (d.z > a.z) return P_PZ;
    return P_L;
  endfunction

  logic [33:0] tx [$];    // flits still to send
  logic [33:0] held [$];  // flits inside the DUT
  int t = 0, gdelay = 0, n_out = 0, n_stall = 0;
  bit busy = 0, first = 1;
  port_e want;

  initial begin
    adc = '{z: 2'd1, y: 2'd2, x: 2'd1};
    in_link = '0; grant = '0; credit = '0;
    for (int p = 0; p < 80; p++) begin
      int len;
      logic [31:0] h;
      len = $urandom_range(1, 5);
      h = $urandom;
      tx.push_back({1'b1, len == 1, h});
      for (int k = 1; k < len; k++) tx.push_back({1'b0, k == len - 1, 32'($urandom)});
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (t = 0; t < 6000 && (tx.size() > 0 || held.size() > 0); t++) begin
      @(negedge clk);
      check(credit_out == credit_t'(4 - held.size()), "credit_out is free slots");
      if (!busy && held.size() > 0) begin
        busy = 1; want = nf_route(adc, hdr_dst(held[0][31:0]));
        gdelay = $urandom_range(1, 4);
      end
      if (busy) begin
        check(port_req == portvec_t'(1 << want), "request on Negative-First port");
        check(prio == hdr_prio(held[0][31:0]) || !held[0][33], "request priority");
      end else check(port_req == '0, "no request when idle");
      grant  = (busy && gdelay == 0) ? (portvec_t'(1 << want) & port_req) : '0;
      if (busy && gdelay > 0) gdelay--;
      credit = credit_t'($urandom_range(0, 3));
      // source
      in_link = '0;
      if (tx.size() > 0 && credit_out != 0 && $urandom_range(2) != 0)
        in_link = '{req: 1'b1, bop: tx[0][33], eop: tx[0][32], data: tx[0][31:0]};
      #1;
      if (grant != '0 && credit == 0 && held.size() > 0) n_stall++;
      check(out_link.req == (grant != '0 && credit != 0 && held.size() > 0), "forward rule");
      if (out_link.req)
        check({out_link.bop, out_link.eop, out_link.data} == held[0], "flit order");
      @(posedge clk);
      if (out_link.req) begin
        if (held[0][32]) busy = 0;
        void'(held.pop_front());
        n_out++;
      end
      if (in_link.req) held.push_back(tx.pop_front());
    end
    check(n_out > 200 && n_stall > 0, "traffic and credit stalls");
    check(protocol_err == 1'b0, "no protocol error");
    // latency: a header into the now idle port is requested one cycle later
    @(negedge clk);
    grant = '0;
    in_link = '0;
    check(held.size() == 0, "port drained");
    if (held.size() == 0) begin
      in_link = '{req: 1'b1, bop: 1'b1, eop: 1'b1, data: 32'h0000_0015};
      @(negedge clk);
      in_link = '0;
      #1 check(port_req == portvec_t'(1 << nf_route(adc, hdr_dst(32'h15))), "request one cycle after arrival");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
