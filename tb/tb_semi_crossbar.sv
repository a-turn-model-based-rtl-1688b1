// tb_semi_crossbar: random flits on all inputs and random one-hot or empty
// selects on all outputs. Each output must carry the selected input's
// flit when the pair is connected (n-type outputs: local and n-type inputs
// only; other outputs: every input) and all zeros otherwise.
module tb_semi_crossbar;
  import noc3d_pkg::*;
  link_t    [NPORTS-1:0] in_link, out_link;
  portvec_t [NPORTS-1:0] sel;
  semi_crossbar dut (.*);

  int checks = 0, failures = 0, n_blocked = 0, n_pass = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NPORTS; i++)
        in_link[i] = '{req: 1'($urandom), bop: 1'($urandom), eop: 1'($urandom), data: $urandom};
      for (int o = 0; o < NPORTS; o++) begin
        int s;
        s = $urandom_range(NPORTS);   // NPORTS means no selection
        sel[o] = (s == NPORTS) ? '0 : portvec_t'(1 << s);
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        link_t want;
        bit n_out;
        want = '0;
        n_out = (o == P_NZ || o == P_NY || o == P_NX);
        for (int i = 0; i < NPORTS; i++)
          if (sel[o][i]) begin
            if (!n_out || i == P_L || i == P_NZ || i == P_NY || i == P_NX) begin
              want = in_link[i]; n_pass++;
            end else n_blocked++;
          end
        check(out_link[o] == want, $sformatf("output %0d", o));
      end
    end
    check(n_blocked > 0 && n_pass > 0, "connected and unconnected pairs exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
