// tb_noc3d_mesh_2d: the end-to-end mesh test on a single 3 x 3 layer, built
// fully synchronous (GALS = 0, one clock for all nodes). With no vertical
// links the routers are the planar configurations: the centre router has
// 5 ports, edge routers 4 and corner routers 3. Same traffic and checks as
// the 3D test, except that no flit is expected on the vertical ports.
// Every node's IP core is modelled by the testbench: it injects NPKT
// packets of 1 to 6 flits to random destinations (itself included) with
// random priorities, honouring the local credit, and sinks the flits its
// router delivers into a 4-slot receive buffer that drains at random, so
// the network is back-pressured. Each packet's header and body flits carry
// its source, sequence number, length and a check pattern. The sinks check
// that every packet arrives whole, its flits in order, unmixed with others, at the
// node its header names, and that every packet sent is delivered exactly
// once (no loss, no deadlock). Mechanism counters, each required to be
// non-zero: flits on each of the seven output directions, arbitration
// contention, contention between different priorities, credit stalls
// inside the mesh, single- and multi-flit packets, and packets that turn
// from a negative to a positive direction, and adaptive route choices
// (a header sent to an allowed direction other than the first in order).
module tb_noc3d_mesh_2d;
  import noc3d_pkg::*;

  localparam int MX = 3, MY = 3, MZ = 1;
  localparam int NN = MX * MY * MZ;
  localparam int NPKT = 24;          // packets per node
  localparam int SINK_CAP = 4;
  localparam int WATCHDOG = 20000;

  // One clock per node. With GALS links each node may have its own period;
  // CLK_SPREAD = 0 gives every node the same 10-unit clock.
  localparam int CLK_SPREAD = 0;
  logic [NN-1:0] clk;
  logic rst_n = 1'b0;
  for (genvar n = 0; n < NN; n++) begin : g_clk
    localparam int HALF = 5 + (CLK_SPREAD > 0 ? (n * 7) % CLK_SPREAD : 0);
    initial begin
      clk[n] = 1'b0;
      #0;
      forever #(HALF) clk[n] = ~clk[n];
    end
  end

  link_t   [NN-1:0] local_in;
  credit_t [NN-1:0] local_credit_out;
  link_t   [NN-1:0] local_out;
  credit_t [NN-1:0] local_credit_in;
  logic    [NN-1:0] protocol_err;

  noc3d_mesh #(.MX(MX), .MY(MY), .MZ(MZ), .GALS(1'b0)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  function automatic logic [15:0] pattern(int src, int seq, int k);
    return 16'((src * 7919 + seq * 131 + k * 17) ^ 16'hA5C3);
  endfunction

  // Scoreboard: key {src, seq} -> expected {dst, len}
  int exp_dst [int];
  int exp_len [int];

  logic [33:0] srcq [NN][$];   // {bop, eop, data}
  int sent_pkts = 0, recv_pkts = 0;
  int n_single = 0, n_multi = 0, n_negpos = 0;

  // Sink state per node
  bit in_pkt [NN];
  int cur_src [NN], cur_seq [NN], cur_len [NN], cur_idx [NN];
  int occ [NN];

  initial begin
    for (int n = 0; n < NN; n++) begin
      int sx, sy, sz;
      sx = n % MX; sy = (n / MX) % MY; sz = n / (MX * MY);
      for (int s = 0; s < NPKT; s++) begin
        int d, dx, dy, dz, len, pr;
        logic [31:0] hdr;
        d = $urandom_range(NN - 1);
        dx = d % MX; dy = (d / MX) % MY; dz = d / (MX * MY);
        len = $urandom_range(1, 6);
        pr = $urandom_range(3);
        hdr = {5'(n), 8'(s), 3'(len), 8'h00, 2'(pr), 2'(dz), 2'(dy), 2'(dx)};
        srcq[n].push_back({1'b1, len == 1, hdr});
        for (int k = 1; k < len; k++)
          srcq[n].push_back({1'b0, k == len - 1, 5'(n), 8'(s), 3'(k), pattern(n, s, k)});
        exp_dst[n * 256 + s] = d;
        exp_len[n * 256 + s] = len;
        if (len == 1) n_single++; else n_multi++;
        if ((dx < sx || dy < sy || dz < sz) && (dx > sx || dy > sy || dz > sz)) n_negpos++;
      end
    end
  end

  // Sinks take each flit at the rising edge that transfers it; sinks drain,
  // credits change and sources drive on the falling edge.
  for (genvar gn = 0; gn < NN; gn++) begin : g_node
    localparam int n = gn;
    always @(posedge clk[n]) begin
      if (rst_n) begin
        // Sink: take the flit the router is delivering this cycle.
        if (local_out[n].req) begin
          link_t f;
          int src, seq, k;
          f = local_out[n];
          occ[n]++;
          check(occ[n] <= SINK_CAP, $sformatf("node %0d sink overflow", n));
          src = int'(f.data[31:27]);
          seq = int'(f.data[26:19]);
          k   = int'(f.data[18:16]);
          if (f.bop) begin
            int key;
            key = src * 256 + seq;
            check(!in_pkt[n], $sformatf("node %0d: header inside a packet", n));
            check(exp_dst.exists(key), $sformatf("node %0d: unknown packet %0d/%0d", n, src, seq));
            if (exp_dst.exists(key)) begin
              check(exp_dst[key] == n, $sformatf("node %0d: packet %0d/%0d for node %0d", n, src, seq, exp_dst[key]));
              check(int'(f.data[1:0]) == n % MX && int'(f.data[3:2]) == (n / MX) % MY &&
                    int'(f.data[5:4]) == n / (MX * MY), "header address mismatch");
              cur_len[n] = exp_len[key];
              check(k == cur_len[n], "header length field");
            end
            in_pkt[n] = 1; cur_src[n] = src; cur_seq[n] = seq; cur_idx[n] = 0;
          end else begin
            cur_idx[n]++;
            check(in_pkt[n], $sformatf("node %0d: body flit outside a packet", n));
            check(src == cur_src[n] && seq == cur_seq[n] && k == cur_idx[n],
                  $sformatf("node %0d: flit of %0d/%0d/%0d inside packet %0d/%0d", n, src, seq, k, cur_src[n], cur_seq[n]));
            check(f.data[15:0] == pattern(src, seq, k), "body pattern");
          end
          if (f.eop) begin
            int key;
            key = cur_src[n] * 256 + cur_seq[n];
            check(cur_idx[n] == cur_len[n] - 1, $sformatf("node %0d: packet length", n));
            if (exp_dst.exists(key)) begin
              exp_dst.delete(key);
              exp_len.delete(key);
            end
            in_pkt[n] = 0;
            recv_pkts++;
          end
        end
      end
    end

    always @(negedge clk[n]) begin
      if (rst_n) begin
        // Sink drains at random.
        if (occ[n] > 0 && $urandom_range(3) == 0) occ[n]--;
        local_credit_in[n] = credit_t'(SINK_CAP - occ[n]);
        // Source.
        local_in[n] = '0;
        if (srcq[n].size() > 0 && local_credit_out[n] != 0 && $urandom_range(1) == 0) begin
          logic [33:0] e;
          e = srcq[n].pop_front();
          local_in[n] = '{req: 1'b1, bop: e[33], eop: e[32], data: e[31:0]};
          if (e[33]) sent_pkts++;
        end
      end
    end
  end

  // Mechanism counters, from each router's internal request/grant state.
  int dir_flits [NPORTS];
  int n_contend = 0, n_prio_contend = 0, n_credit_stall = 0, n_adaptive = 0;

  // First set port in the routing order nx, nz, ny, py, px, pz.
  function automatic int first_dir(portvec_t v);
    if (v[P_NX]) return P_NX;
    if (v[P_NZ]) return P_NZ;
    if (v[P_NY]) return P_NY;
    if (v[P_PY]) return P_PY;
    if (v[P_PX]) return P_PX;
    if (v[P_PZ]) return P_PZ;
    return P_L;
  endfunction

  for (genvar z = 0; z < MZ; z++) begin : g_z
    for (genvar y = 0; y < MY; y++) begin : g_y
      for (genvar x = 0; x < MX; x++) begin : g_x
        always @(negedge clk[x + MX * (y + MY * z)]) if (rst_n) begin
          for (int o = 0; o < NPORTS; o++) begin
            int nreq;
            bit p_lo, p_hi;
            nreq = 0; p_lo = 0; p_hi = 0;
            if (dut.g_z[z].g_y[y].g_x[x].u_router.out_link[o].req) dir_flits[o]++;
            for (int i = 0; i < NPORTS; i++)
              if (dut.g_z[z].g_y[y].g_x[x].u_router.port_req[i][o] &&
                  dut.g_z[z].g_y[y].g_x[x].u_router.sel[o] == '0) begin
                nreq++;
                if (dut.g_z[z].g_y[y].g_x[x].u_router.prio[i] == 0) p_lo = 1; else p_hi = 1;
              end
            if (nreq > 1) n_contend++;
            if (nreq > 1 && p_lo && p_hi) n_prio_contend++;
          end
          for (int i = 0; i < NPORTS; i++)
            if (i != P_L &&
                (dut.g_z[z].g_y[y].g_x[x].u_router.grant[i] & dut.g_z[z].g_y[y].g_x[x].u_router.port_req[i]) != '0 &&
                dut.g_z[z].g_y[y].g_x[x].u_router.ic_credit[i] == '0)
              n_credit_stall++;
        end
        // Adaptive routing: a header routed to a direction other than the
        // first allowed one, because that one was busy or out of credit.
        for (genvar p = 0; p < NPORTS; p++) begin : g_p
          localparam bit HAS_IN = (p == P_PZ) ? z > 0 : (p == P_PY) ? y > 0 :
                                  (p == P_PX) ? x > 0 : (p == P_NZ) ? z < MZ - 1 :
                                  (p == P_NY) ? y < MY - 1 : (p == P_NX) ? x < MX - 1 : 1'b1;
          if (HAS_IN) begin : g_in
            always @(negedge clk[x + MX * (y + MY * z)])
              if (rst_n && dut.g_z[z].g_y[y].g_x[x].u_router.g_port[p].g_ic.u_ic.u_oc.new_hdr &&
                  int'(dut.g_z[z].g_y[y].g_x[x].u_router.g_port[p].g_ic.u_ic.u_rf.out_port) !=
                  first_dir(dut.g_z[z].g_y[y].g_x[x].u_router.g_port[p].g_ic.u_ic.u_rf.cand))
                n_adaptive++;
          end
        end
      end
    end
  end

  always @(posedge clk[0]) cyc++;

  initial begin
    local_in = '0;
    local_credit_in = '0;
    repeat (3) @(posedge clk[0]);
    @(negedge clk[0]) rst_n = 1'b1;
    wait (recv_pkts == NN * NPKT);
    repeat (20) @(posedge clk[0]);
    check(exp_dst.size() == 0, $sformatf("%0d packets never delivered", exp_dst.size()));
    check(sent_pkts == NN * NPKT, "all packets injected");
    check(protocol_err == '0, "no link protocol error");
    for (int o = 0; o < NPORTS; o++)
      check(dir_flits[o] > 0 || (MZ == 1 && (o == P_PZ || o == P_NZ)),
            $sformatf("no flit left through port %0d", o));
    check(n_contend > 0, "no output contention happened");
    check(n_prio_contend > 0, "no contention between priorities happened");
    check(n_credit_stall > 0, "no credit stall happened");
    check(n_single > 0 && n_multi > 0, "single- and multi-flit packets");
    check(n_negpos > 0, "negative-then-positive routes");
    check(n_adaptive > 0, "no adaptive route choice happened");
    $display("mesh: %0d packets in %0d cycles of node 0; flits per output pz..nx: %0d %0d %0d %0d %0d %0d %0d",
             recv_pkts, cyc, dir_flits[0], dir_flits[1], dir_flits[2], dir_flits[3],
             dir_flits[4], dir_flits[5], dir_flits[6]);
    $display("mesh: contention %0d, priority contention %0d, credit stalls %0d, neg->pos packets %0d, adaptive choices %0d",
             n_contend, n_prio_contend, n_credit_stall, n_negpos, n_adaptive);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk[0]);
    failures++;
    $display("watchdog: %0d of %0d packets delivered", recv_pkts, NN * NPKT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
