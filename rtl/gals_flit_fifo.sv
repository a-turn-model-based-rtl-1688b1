// gals_flit_fifo: dual-clock input queue for a link between two clock
// domains (globally asynchronous, locally synchronous operation).
//
// The upstream router writes with its own clock wclk; this router reads
// with rclk. Read and write pointers are DEPTH-entry binary counters with
// one extra wrap bit, kept in Gray code where they cross domains and
// passed through two-flop synchronisers. The write side computes the free
// slots as DEPTH - (write pointer - synchronised read pointer): the count
// is in the writer's clock domain and can only under-estimate the free
// space, so it is a safe credit for the upstream sender. The read side
// sees the FIFO as empty until the synchronised write pointer moves past
// the read pointer. dout shows the head entry (first word fall-through).
// DEPTH must be a power of two. Cost: a flit becomes visible to the reader
// two to three read clocks after it is written, and a freed slot returns
// to the credit two to three write clocks after it is read. The use of a
// GALS link follows the described link controller; this realisation
// (Gray-coded pointers, two-flop synchronisers) is this design's choice.
module gals_flit_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 34
) (
  // write side, upstream clock
  input  logic                       wclk,
  input  logic                       wrst_n,
  input  logic                       push,
  input  logic [W-1:0]               din,
  output logic [$clog2(DEPTH+1)-1:0] wcount,   // occupancy seen by the writer
  // read side, local clock
  input  logic                       rclk,
  input  logic                       rrst_n,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, rbin;            // binary pointers with wrap bit
  logic [AW:0]  wgray, rgray;          // registered Gray copies
  logic [AW:0]  rgray_w1, rgray_w2;    // read pointer synchronised to wclk
  logic [AW:0]  wgray_r1, wgray_r2;    // write pointer synchronised to rclk
  logic [AW:0]  rbin_w;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---- write domain ----
  assign rbin_w = gray2bin(rgray_w2);
  assign wcount = CW'(wbin - rbin_w);
  wire   wfull  = (wcount == DEPTH[CW-1:0]);
  wire   do_push = push && !wfull;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_push) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (do_push) mem[wbin[AW-1:0]] <= din;
  end

  // ---- read domain ----
  assign empty = (rgray == wgray_r2);
  assign dout  = mem[rbin[AW-1:0]];
  wire   do_pop = pop && !empty;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_pop) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assert property (@(posedge wclk) disable iff (!wrst_n) !(push && wfull))
    else $error("gals_flit_fifo: push while full");
  assert property (@(posedge rclk) disable iff (!rrst_n) !(pop && empty))
    else $error("gals_flit_fifo: pop while empty");
endmodule
