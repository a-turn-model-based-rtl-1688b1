// tb_credit_switcher: random credits and random output-to-input
// assignments (each input owning at most one output, as the allocator
// guarantees). Each input must see the credit of the output it owns, or 0;
// pairs the semi-crossbar does not connect never carry credit.
module tb_credit_switcher;
  import noc3d_pkg::*;
  credit_t  [NPORTS-1:0] credit_in, credit_to_ic;
  portvec_t [NPORTS-1:0] sel;
  credit_switcher dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int owner_of [NPORTS];   // input -> owned output, -1 for none
      portvec_t taken;
      taken = '0;
      for (int i = 0; i < NPORTS; i++) owner_of[i] = -1;
      for (int o = 0; o < NPORTS; o++) begin
        int i;
        credit_in[o] = credit_t'($urandom_range(4));
        sel[o] = '0;
        i = $urandom_range(NPORTS);
        if (i < NPORTS && !taken[i]) begin
          taken[i] = 1'b1; sel[o][i] = 1'b1; owner_of[i] = o;
        end
      end
      #1;
      for (int i = 0; i < NPORTS; i++) begin
        credit_t want;
        int o;
        want = '0;
        o = owner_of[i];
        if (o >= 0 && xbar_mask(o)[i]) want = credit_in[o];
        check(credit_to_ic[i] == want, $sformatf("input %0d", i));
      end
    end
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
