// tb_flit_fifo: random push/pop traffic against a queue model.
// Checks head data, empty, full and count every cycle, including pushes
// and pops in the same cycle and runs to full and to empty.
module tb_flit_fifo;
  localparam int DEPTH = 4, W = 34;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push = 1'b0, pop = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [2:0] count;
  flit_fifo #(.DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int n_full = 0, n_both = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // compare state
      check(count == 3'(model.size()), $sformatf("count %0d vs %0d", count, model.size()));
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(dout == model[0], "head data");
      // next operation, biased in phases to reach full and empty
      push = (model.size() < DEPTH) && ($urandom_range(99) < ((t / 200) % 2 ? 80 : 30));
      pop  = (model.size() > 0) && ($urandom_range(99) < ((t / 200) % 2 ? 30 : 80));
      din  = {$urandom, $urandom} [W-1:0];
      if (push && pop) n_both++;
      if (model.size() == DEPTH) n_full++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check(n_full > 0 && n_both > 0, "full and simultaneous push/pop reached");
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
