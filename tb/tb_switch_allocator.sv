// tb_switch_allocator: all seven inputs request random outputs with random
// priorities and hold the request through a random packet length; the
// testbench signals each packet's end with an eop flit on the granted
// output. A reference model (one priority/round-robin arbiter with lock per
// output, restricted to the semi-crossbar connectivity and to the enabled
// ports) predicts sel and grant every cycle. Run with input 5 (ny) and
// output 0 (pz) disabled.
module tb_switch_allocator;
  import noc3d_pkg::*;
  localparam portvec_t IN_EN  = 7'b101_1111;
  localparam portvec_t OUT_EN = 7'b111_1110;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  portvec_t [NPORTS-1:0] port_req;
  prio_t    [NPORTS-1:0] prio;
  link_t    [NPORTS-1:0] out_link;
  portvec_t [NPORTS-1:0] grant, sel;
  switch_allocator #(.IN_EN(IN_EN), .OUT_EN(OUT_EN)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  bit m_locked [NPORTS];
  int m_owner [NPORTS], m_ptr [NPORTS], left [NPORTS];
  int tgt [NPORTS];
  prio_t pr [NPORTS];
  bit active [NPORTS];
  int n_grants = 0, n_contend = 0;

  initial begin
    port_req = '0; prio = '0; out_link = '0;
    foreach (m_locked[o]) begin m_locked[o] = 0; m_ptr[o] = 0; m_owner[o] = 0; end
    foreach (active[i]) active[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int o = 0; o < NPORTS; o++) begin
        check(sel[o] == (m_locked[o] ? portvec_t'(1 << m_owner[o]) : '0), $sformatf("sel[%0d]", o));
        for (int i = 0; i < NPORTS; i++) check(grant[i][o] == sel[o][i], "grant is sel transposed");
      end
      // inputs start new requests (only valid, connectable, enabled pairs)
      for (int i = 0; i < NPORTS; i++)
        if (!active[i] && $urandom_range(2) == 0) begin
          int o;
          o = $urandom_range(NPORTS - 1);
          if (OUT_EN[o] && xbar_mask(o)[i]) begin
            active[i] = 1; tgt[i] = o; pr[i] = prio_t'($urandom_range(3));
          end
        end
      port_req = '0; prio = '0;
      for (int i = 0; i < NPORTS; i++)
        if (active[i]) begin port_req[i][tgt[i]] = 1'b1; prio[i] = pr[i]; end
      // release: eop flit on outputs whose packet is done
      out_link = '0;
      for (int o = 0; o < NPORTS; o++)
        if (m_locked[o]) begin
          out_link[o].req = 1'b1;
          out_link[o].eop = (left[o] == 0);
        end
      // reference update
      for (int o = 0; o < NPORTS; o++) begin
        if (!OUT_EN[o]) continue;
        if (m_locked[o]) begin
          if (left[o] == 0) begin m_locked[o] = 0; active[m_owner[o]] = 0; end
          else left[o]--;
        end else begin
          int pmax, w, nr;
          bit found;
          pmax = 0; nr = 0;
          for (int i = 0; i < NPORTS; i++)
            if (IN_EN[i] && port_req[i][o]) begin nr++; if (int'(prio[i]) > pmax) pmax = int'(prio[i]); end
          found = 0; w = 0;
          for (int k = 0; k < NPORTS; k++) begin
            int i;
            i = (m_ptr[o] + k) % NPORTS;
            if (!found && IN_EN[i] && port_req[i][o] && int'(prio[i]) == pmax) begin found = 1; w = i; end
          end
          if (found) begin
            m_locked[o] = 1; m_owner[o] = w; m_ptr[o] = (w + 1) % NPORTS;
            left[o] = $urandom_range(0, 3); n_grants++;
            if (nr > 1) n_contend++;
          end
        end
      end
      // requests from a disabled input are never granted: drop them
      if (active[5] && $urandom_range(3) == 0) active[5] = 0;
    end
    check(n_grants > 100 && n_contend > 10, "grants and contention exercised");
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
