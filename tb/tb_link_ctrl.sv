// tb_link_ctrl: drives flits and FIFO occupancies into the link controller.
// Checks that every flit is pushed, that the credit equals the free slots
// for each occupancy, and that the sticky error flag stays clear for good
// framing and rises for a body flit outside a packet, for a header inside
// a packet and for a flit sent to a full FIFO.
module tb_link_ctrl;
  import noc3d_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  link_t   in_link = '0;
  logic [2:0] fifo_count = '0;
  logic    push;
  credit_t credit_out;
  logic    protocol_err;
  link_ctrl #(.DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input bit bop, input bit eop);
    @(negedge clk);
    in_link = '{req: 1'b1, bop: bop, eop: eop, data: $urandom};
    #1 check(push == 1'b1, "push follows req");
    @(negedge clk);
    in_link = '0;
    #1 check(push == 1'b0, "no push without req");
  endtask

  task automatic reset_dut();
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c <= 4; c++) begin
      fifo_count = 3'(c);
      #1 check(credit_out == credit_t'(4 - c), $sformatf("credit for count %0d", c));
    end
    fifo_count = 3'd1;
    // good framing: 3-flit packet, single-flit packet, 2-flit packet
    send(1, 0); send(0, 0); send(0, 1);
    send(1, 1);
    send(1, 0); send(0, 1);
    check(protocol_err == 1'b0, "no error on good framing");
    // body flit outside a packet
    send(0, 0);
    check(protocol_err == 1'b1, "error on body flit outside packet");
    reset_dut();
    check(protocol_err == 1'b0, "error cleared by reset");
    // header inside a packet
    send(1, 0); send(1, 0);
    check(protocol_err == 1'b1, "error on header inside packet");
    reset_dut();
    // flit into a full FIFO
    fifo_count = 3'd4;
    send(1, 1);
    check(protocol_err == 1'b1, "error on overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
