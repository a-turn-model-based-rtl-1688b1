// tb_output_arbiter: random requests and priorities against a reference
// model of priority-then-round-robin arbitration with wormhole locking.
// The model keeps its own owner, lock and round-robin pointer; the
// testbench holds each owner's request until it releases after a random
// packet length. Checks the grant every cycle; counts contended grants,
// grants decided by priority and grants decided by the round-robin order.
// Run with N = 7 and a mask that removes inputs 1 and 2.
module tb_output_arbiter;
  import noc3d_pkg::*;
  localparam int N = 7;
  localparam logic [N-1:0] MASK = 7'b111_1001;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0]  req;
  prio_t [N-1:0] prio;
  logic          release_i;
  logic [N-1:0]  grant;
  output_arbiter #(.N(N), .MASK(MASK)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // reference state
  bit m_locked = 0;
  int m_owner = 0, m_ptr = 0, left = 0;
  int n_contend = 0, n_by_prio = 0, n_by_rr = 0;
  prio_t preq [N];

  initial begin
    req = '0; prio = '0; release_i = 1'b0;
    for (int i = 0; i < N; i++) preq[i] = prio_t'($urandom_range(3));
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      check(grant == (m_locked ? N'(1) << m_owner : '0), $sformatf("t=%0d grant %b owner %0d locked %0d", t, grant, m_owner, m_locked));
      // new requests: waiting requesters keep requesting, others join at random
      for (int i = 0; i < N; i++) begin
        if (!(m_locked && m_owner == i) && !req[i] && $urandom_range(3) == 0) begin
          req[i] = 1'b1;
          preq[i] = prio_t'($urandom_range(3));
        end
      end
      for (int i = 0; i < N; i++) prio[i] = req[i] ? preq[i] : '0;
      release_i = m_locked && (left == 0);
      #1;
      // reference update at the coming edge
      if (m_locked) begin
        if (release_i) begin
          m_locked = 0;
          req[m_owner] = 1'b0;   // owner drops its request after eop
          prio[m_owner] = '0;
        end else left--;
      end else begin
        int pmax, nc, w, nreqs;
        bit found, first_rr;
        pmax = 0; nreqs = 0;
        for (int i = 0; i < N; i++) if (MASK[i] && req[i]) begin
          nreqs++;
          if (int'(prio[i]) > pmax) pmax = int'(prio[i]);
        end
        found = 0; w = 0;
        for (int k = 0; k < N; k++) begin
          int i;
          i = (m_ptr + k) % N;
          if (!found && MASK[i] && req[i] && int'(prio[i]) == pmax) begin found = 1; w = i; end
        end
        if (found) begin
          // statistics: would plain round robin have picked someone else?
          first_rr = 0;
          for (int k = 0; k < N; k++) begin
            int i;
            i = (m_ptr + k) % N;
            if (!first_rr && MASK[i] && req[i]) begin
              first_rr = 1;
              if (i != w) n_by_prio++;
            end
          end
          if (nreqs > 1) n_contend++;
          if (nreqs > 1 && w != m_ptr) n_by_rr++;
          m_locked = 1; m_owner = w; m_ptr = (w + 1) % N; left = $urandom_range(0, 4);
        end
      end
      @(posedge clk);
      #1;
      // masked inputs never hold a request for long
      for (int i = 0; i < N; i++) if (!MASK[i] && req[i] && $urandom_range(1)) req[i] = 1'b0;
    end
    check(n_contend > 0 && n_by_prio > 0 && n_by_rr > 0, "contention, priority and round-robin decisions seen");
    $display("arbiter: contended %0d, by priority %0d, by round robin %0d", n_contend, n_by_prio, n_by_rr);
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
