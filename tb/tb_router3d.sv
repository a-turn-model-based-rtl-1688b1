// tb_router3d: one 7-port router at address (1,1,1).
//
// The router is built with its default GALS inputs, every input clocked
// by the router's own clock. Directed tests first: (1) a single-flit header
// into the idle router leaves through its Negative-First port four cycles
// after it is stored (two of them for pointer synchronisation),
// and a 4-flit packet then streams at one flit per cycle; (2) two inputs
// ask for the same output in the same cycle with different priorities:
// the higher priority packet goes first even when the round-robin pointer
// favours the other; (3) a packet toward a sink with no credit is held
// until credit returns. Then random traffic: every input sends packets to
// destinations that are legal for it (an input reached by a positive hop
// only gets destinations with no negative offset left), with random
// lengths and priorities, into sinks whose credit follows a randomly
// drained 4-slot buffer. Every packet must leave whole, unmixed and in
// order through one of the ports the Negative-First rule allows (the
// adaptive choice among them depends on which outputs are free).
module tb_router3d;
  import noc3d_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  coord_t                adc;
  link_t   [NPORTS-1:0]  in_link, out_link;
  credit_t [NPORTS-1:0]  credit_out, credit_in;
  logic                  protocol_err;
  logic    [NPORTS-1:0]  in_clk;
  assign in_clk = {NPORTS{clk}};
  router3d #(.DEPTH(4)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // Outputs the Negative-First rule allows: the minimal negative
  // directions while any remain, else the minimal positive ones, else local.
  function automatic portvec_t nf_allowed(coord_t a, coord_t d);
    portvec_t m;
    m = '0;
    m[P_NX] = d.x < a.x; m[P_NZ] = d.z < a.z; m[P_NY] = d.y < a.y;
    if (m == '0) begin
      m[P_PY] = d.y > a.y; m[P_PX] = d.x > a.x; m[P_PZ] = d.z > a.z;
    end
    if (m == '0) m[P_L] = 1'b1;
    return m;
  endfunction

  function automatic logic [31:0] mk_hdr(int src, int seq, int len, int pr, coord_t d);
    return {3'(src), 8'(seq), 3'(len), 10'h0, 2'(pr), d.z, d.y, d.x};
  endfunction
  function automatic logic [31:0] mk_body(int src, int seq, int k);
    return {3'(src), 8'(seq), 3'(k), 18'((src * 977 + seq * 31 + k * 7) ^ 18'h2A5A5)};
  endfunction

  logic [33:0] txq [NPORTS][$];
  portvec_t exp_port [int]; // {src, seq} -> outputs it may leave through
  int occ [NPORTS];
  bit sink_hold [NPORTS];
  bit in_pkt [NPORTS];
  int cur_key [NPORTS], cur_k [NPORTS];
  int n_recv = 0, n_sent = 0;
  int first_out_port = -1;
  longint first_out_time = -1, first_in_time = -1;
  int order [$];            // keys in order of header delivery

  function automatic int key_of(logic [31:0] d);
    return int'(d[31:29]) * 256 + int'(d[28:21]);
  endfunction

  task automatic queue_pkt(int src, int seq, int len, int pr, coord_t d);
    txq[src].push_back({1'b1, len == 1, mk_hdr(src, seq, len, pr, d)});
    for (int k = 1; k < len; k++) txq[src].push_back({1'b0, k == len - 1, mk_body(src, seq, k)});
    exp_port[src * 256 + seq] = nf_allowed(adc, d);
  endtask

  // Sinks take a flit at the rising edge that transfers it.
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      if (out_link[o].req) begin
        link_t f;
        int key;
        f = out_link[o];
        occ[o]++;
        check(occ[o] <= 4, "sink overflow");
        key = key_of(f.data);
        if (f.bop) begin
          check(!in_pkt[o], "header inside packet");
          check(exp_port.exists(key) && exp_port[key][o],
                $sformatf("packet %0d left via %0d", key, o));
          in_pkt[o] = 1; cur_key[o] = key; cur_k[o] = 0;
          order.push_back(key);
          if (first_out_port < 0) begin first_out_port = o; first_out_time = $time; end
        end else begin
          cur_k[o]++;
          check(in_pkt[o] && key == cur_key[o] && int'(f.data[20:18]) == cur_k[o], "body flit order");
          check(f.data == mk_body(key / 256, key % 256, cur_k[o]), "body data");
        end
        if (f.eop) begin
          in_pkt[o] = 0; n_recv++;
          if (exp_port.exists(cur_key[o])) exp_port.delete(cur_key[o]);
        end
      end
    end
  end

  // Sinks drain and return credit, sources drive, on the falling edge.
  always @(negedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      if (occ[o] > 0 && !sink_hold[o] && $urandom_range(2) == 0) occ[o]--;
      credit_in[o] = sink_hold[o] ? '0 : credit_t'(4 - occ[o]);
    end
    for (int i = 0; i < NPORTS; i++) begin
      in_link[i] = '0;
      if (txq[i].size() > 0 && credit_out[i] != 0 && (burst || $urandom_range(3) != 0)) begin
        logic [33:0] e;
        e = txq[i].pop_front();
        in_link[i] = '{req: 1'b1, bop: e[33], eop: e[32], data: e[31:0]};
        if (e[33]) begin
          n_sent++;
          if (first_in_time < 0) first_in_time = $time;
        end
      end
    end
  end

  bit burst = 1;
  int seqn = 0;

  task automatic wait_idle(int limit);
    int n;
    n = 0;
    while ((exp_port.size() > 0) && n < limit) begin @(posedge clk); n++; end
    check(exp_port.size() == 0, "all packets delivered");
    repeat (3) @(posedge clk);
  endtask

  initial begin
    coord_t d;
    int c0;
    adc = '{z: 2'd1, y: 2'd1, x: 2'd1};
    in_link = '0; credit_in = '0;
    foreach (occ[o]) begin occ[o] = 0; sink_hold[o] = 0; in_pkt[o] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);

    // (1) latency of a lone header, then streaming of a 4-flit packet
    d = '{z: 2'd1, y: 2'd0, x: 2'd1};                 // -y: leaves through ny
    queue_pkt(P_L, seqn++, 1, 0, d);
    wait_idle(50);
    check(first_out_port == P_NY, "lone packet via ny");
    // edges from the one that stores the flit in the input FIFO (5 time
    // units after it is driven) to the one that passes it downstream
    c0 = int'((first_out_time - first_in_time - 5) / 10);
    // GALS input: two edges to synchronise the write pointer, then the
    // request and grant cycles of the single-clock path
    check(c0 == 4, $sformatf("header latency %0d cycles, expected 4", c0));
    begin
      int t0, t1;
      d = '{z: 2'd2, y: 2'd1, x: 2'd1};               // +z
      queue_pkt(P_PZ, seqn++, 4, 0, d);
      t0 = -1; t1 = -1;
      for (int n = 0; n < 30; n++) begin
        @(posedge clk);
        if (out_link[P_PZ].req && out_link[P_PZ].bop) t0 = cyc;
        if (out_link[P_PZ].req && out_link[P_PZ].eop) t1 = cyc;
      end
      check(t0 >= 0 && t1 - t0 == 3, "4-flit packet streams at one flit per cycle");
    end
    wait_idle(50);

    // (2) priority beats round robin: inputs nz and nx both want output px
    begin
      int k_lo, k_hi;
      d = '{z: 2'd1, y: 2'd1, x: 2'd2};
      k_lo = P_NZ * 256 + seqn; queue_pkt(P_NZ, seqn++, 3, 0, d);
      k_hi = P_NX * 256 + seqn; queue_pkt(P_NX, seqn++, 3, 3, d);
      order.delete();
      wait_idle(100);
      check(order.size() == 2 && order[0] == k_hi, "higher priority packet served first");
      // equal priorities: round robin alternates the winner
      k_lo = P_NZ * 256 + seqn; queue_pkt(P_NZ, seqn++, 2, 1, d);
      k_hi = P_NX * 256 + seqn; queue_pkt(P_NX, seqn++, 2, 1, d);
      order.delete();
      wait_idle(100);
      // the last winner was nz (4), so the search starts at ny (5) and
      // reaches nx (6) before nz
      check(order.size() == 2 && order[0] == k_hi, "round robin: input after the last winner goes first");
    end

    // (3) credit stall: the sink at pz holds back credit
    sink_hold[P_PZ] = 1;
    d = '{z: 2'd2, y: 2'd1, x: 2'd1};
    queue_pkt(P_L, seqn++, 3, 0, d);
    repeat (20) @(posedge clk);
    check(exp_port.size() == 1, "packet held while credit is zero");
    sink_hold[P_PZ] = 0;
    wait_idle(100);

    // random traffic
    burst = 0;
    for (int i = 0; i < NPORTS; i++)
      for (int p = 0; p < 40; p++) begin
        coord_t dd;
        dd = '{z: 2'($urandom_range(3)), y: 2'($urandom_range(3)), x: 2'($urandom_range(3))};
        if (i inside {P_PX, P_PY, P_PZ}) begin   // arrived on a positive hop
          if (dd.x < adc.x) dd.x = adc.x;
          if (dd.y < adc.y) dd.y = adc.y;
          if (dd.z < adc.z) dd.z = adc.z;
        end
        queue_pkt(i, seqn++ % 256, $urandom_range(1, 6), $urandom_range(3), dd);
      end
    wait_idle(20000);
    check(n_recv == n_sent, "every packet sent was received");
    check(protocol_err == 1'b0, "no protocol error");
    $display("router: %0d packets", n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
