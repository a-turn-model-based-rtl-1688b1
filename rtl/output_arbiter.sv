// output_arbiter: arbiter of one router output port.
//
// Three stages, as in the arbiter module of the switch allocator:
//  1. a priority comparator marks the inputs whose priority equals the
//     highest priority presented (an input that is not requesting this
//     output presents priority 0, so only requesters are compared);
//  2. a C-element stage passes an input on only when both its request and
//     its comparator mark are high;
//  3. a synchronous round-robin arbiter picks one of the remaining inputs,
//     searching from the input after the previous winner.
// The winner is locked into a register and owns the output (wormhole
// switching) until release reports that its eop flit went through; grant
// is that register, one-hot. MASK removes inputs the semi-crossbar does
// not connect to this output. The three-stage structure and the eop
// release follow the described arbiter; the C-stage is the both-high
// (AND) condition of a C-element, and the one-cycle grant latency and the
// pointer update are this design's choices.
module output_arbiter
  import noc3d_pkg::*;
#(
  parameter int unsigned N    = 7,
  parameter logic [N-1:0] MASK = '1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  prio_t [N-1:0] prio,
  input  logic          release_i,
  output logic [N-1:0]  grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  req_m, top_prio, cand;
  prio_t         pmax;
  logic [IW-1:0] ptr;        // round-robin start position
  logic [IW-1:0] win;
  logic          win_ok;
  logic          locked;
  logic [N-1:0]  owner;

  assign req_m = req & MASK;

  // Priority comparator.
  always_comb begin
    pmax = '0;
    for (int i = 0; i < N; i++)
      if (MASK[i] && prio[i] > pmax) pmax = prio[i];
    for (int i = 0; i < N; i++)
      top_prio[i] = MASK[i] && (prio[i] == pmax);
  end

  // C-element stage.
  assign cand = req_m & top_prio;

  // Round-robin search starting at ptr.
  always_comb begin
    win    = '0;
    win_ok = 1'b0;
    for (int k = 0; k < N; k++) begin
      int unsigned idx;
      idx = int'(ptr) + k;
      if (idx >= N) idx = idx - N;
      if (!win_ok && cand[idx]) begin
        win    = IW'(idx);
        win_ok = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
      ptr    <= '0;
    end else if (locked) begin
      if (release_i) begin
        locked <= 1'b0;
        owner  <= '0;
      end
    end else if (win_ok) begin
      locked <= 1'b1;
      owner  <= N'(1) << win;
      ptr    <= (int'(win) == N - 1) ? '0 : win + 1'b1;
    end
  end

  assign grant = owner;

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("output_arbiter: grant not one-hot");
endmodule
