// tb_gals_flit_fifo: the dual-clock FIFO between two unrelated clocks.
// Phase 1 has a fast writer and a slow reader, phase 2 the reverse. The
// writer pushes random data whenever its occupancy count shows a free
// slot; the reader pops at random whenever the FIFO is not empty. Checks:
// data arrive complete and in order; the writer's count is never below the
// true occupancy (so it is a safe credit) and never above DEPTH; the reader
// never sees a flit that has not been written; and the count returns to 0
// once everything is read.
module tb_gals_flit_fifo;
  localparam int DEPTH = 4, W = 34;
  logic wclk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  int whalf = 5, rhalf = 13;
  always #(whalf) wclk = ~wclk;
  initial begin #3; forever #(rhalf) rclk = ~rclk; end

  logic         push = 1'b0, pop = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic [2:0]   wcount;
  logic         empty;
  gals_flit_fifo #(.DEPTH(DEPTH), .W(W)) dut (
    .wclk, .wrst_n(rst_n), .push, .din, .wcount,
    .rclk, .rrst_n(rst_n), .pop, .dout, .empty
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  logic [W-1:0] model [$];
  int n_written = 0, n_read = 0, n_full_seen = 0;
  int target = 0;

  // writer
  always @(negedge wclk) if (rst_n) begin
    check(int'(wcount) >= model.size(), "writer count below true occupancy");
    check(int'(wcount) <= DEPTH, "writer count above depth");
    if (wcount == 3'(DEPTH)) n_full_seen++;
    push = (n_written < target) && (int'(wcount) < DEPTH) && ($urandom_range(3) != 0);
    din  = {$urandom, $urandom} [W-1:0];
  end
  always @(posedge wclk) if (rst_n && push) begin
    model.push_back(din);
    n_written++;
  end

  // reader
  always @(negedge rclk) if (rst_n) begin
    if (!empty) begin
      check(model.size() > 0, "reader sees data that was never written");
      if (model.size() > 0) check(dout == model[0], "data order");
    end
    pop = !empty && ($urandom_range(2) != 0);
  end
  always @(posedge rclk) if (rst_n && pop) begin
    void'(model.pop_front());
    n_read++;
  end

  initial begin
    repeat (3) @(posedge wclk);
    rst_n = 1'b1;
    target = 400;
    wait (n_read == 400);
    whalf = 11; rhalf = 4;            // slow writer, fast reader
    target = 800;
    wait (n_read == 800);
    repeat (10) @(posedge wclk);
    check(wcount == 0 && empty, "drained");
    check(n_full_seen > 0, "writer saw a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
