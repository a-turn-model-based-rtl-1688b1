// tb_output_ctrl: the output controller against a FIFO model.
// Feeds packets through a modelled FIFO head, with the routing result and
// grant/credit driven by the testbench. Checks: the one-hot request and
// the priority appear in the cycle the header is at the head and are held
// until the eop flit leaves; nothing is popped without grant or with zero
// credit (credit stalls are forced); popped flits are driven to the
// crossbar in order with their framing bits; prio is 0 when idle.
module tb_output_ctrl;
  import noc3d_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              head_bop, head_eop, empty;
  logic [FLIT_W-1:0] head_data;
  port_e             rf_port;
  logic              rf_valid;
  portvec_t          grant;
  credit_t           credit;
  logic              pop;
  portvec_t          port_req;
  prio_t             prio;
  link_t             out_link;
  output_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  logic [33:0] q [$];
  int n_stall = 0, n_nogrant = 0, n_pkts = 0;

  task automatic drive_head();
    empty     = (q.size() == 0);
    head_bop  = empty ? 1'b0 : q[0][33];
    head_eop  = empty ? 1'b0 : q[0][32];
    head_data = empty ? '0 : q[0][31:0];
    rf_valid  = !empty && head_bop;
    rf_port   = port_e'(head_data[10:8] % 7);
  endtask

  initial begin
    bit   busy;
    port_e want;
    prio_t wprio;
    int    gdelay;
    grant = '0; credit = '0;
    for (int p = 0; p < 60; p++) begin
      int len;
      logic [31:0] h;
      len = $urandom_range(1, 5);
      h = $urandom;
      h[10:8] = 3'($urandom_range(6));
      q.push_back({1'b1, len == 1, h});
      for (int k = 1; k < len; k++) q.push_back({1'b0, k == len - 1, 32'($urandom)});
    end
    drive_head();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    busy = 0;
    for (int t = 0; t < 3000 && q.size() > 0; t++) begin
      @(negedge clk);
      drive_head();
      #1;
      if (!busy && !empty && head_bop) begin
        busy = 1; want = port_e'(head_data[10:8] % 7); wprio = hdr_prio(head_data);
        gdelay = $urandom_range(1, 3);  // an arbiter grants one cycle after the request at the earliest
      end
      if (busy) begin
        check(port_req == portvec_t'(1 << want), "request one-hot on routed port");
        check(prio == wprio, "priority from header");
      end else begin
        check(port_req == '0 && prio == '0, "idle: no request");
      end
      // grant after a random delay, random credit
      grant  = (busy && gdelay == 0) ? portvec_t'(1 << want) : '0;
      if (busy && gdelay > 0) gdelay--;
      credit = credit_t'($urandom_range(0, 2));
      #1;
      if (grant != '0 && credit == 0 && !empty) n_stall++;
      if (busy && grant == '0) n_nogrant++;
      check(pop == (grant != '0 && credit != 0 && !empty), "pop only when granted with credit");
      check(out_link.req == pop, "req follows pop");
      if (pop) begin
        check(out_link.data == q[0][31:0] && out_link.bop == q[0][33] && out_link.eop == q[0][32], "flit data");
      end
      @(posedge clk);
      if (pop) begin
        if (q[0][32]) begin busy = 0; n_pkts++; end
        void'(q.pop_front());
      end
    end
    check(q.size() == 0, "all flits forwarded");
    check(n_stall > 0 && n_nogrant > 0, "credit and grant stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
