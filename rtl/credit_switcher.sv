// credit_switcher: routes each output's credit to the input that owns it.
//
// One demultiplexer per output port: the credit arriving for output o
// (the free-slot count of the downstream FIFO) is steered to the input
// controller selected by sel[o], the same one-hot select the semi-crossbar
// uses. Each demultiplexer reaches only the inputs its crossbar
// multiplexer connects. An input controller owns at most one output, so
// the demultiplexer outputs for one input are OR-ed together; an input
// that owns no output sees credit 0. Purely combinational.
module credit_switcher
  import noc3d_pkg::*;
(
  input  credit_t  [NPORTS-1:0] credit_in,     // [output]
  input  portvec_t [NPORTS-1:0] sel,           // [output][input]
  output credit_t  [NPORTS-1:0] credit_to_ic   // [input]
);
  credit_t [NPORTS-1:0][NPORTS-1:0] demux;     // [output][input]

  for (genvar o = 0; o < NPORTS; o++) begin : g_demux
    localparam portvec_t M = xbar_mask(o);
    for (genvar i = 0; i < NPORTS; i++) begin : g_leg
      assign demux[o][i] = (M[i] && sel[o][i]) ? credit_in[o] : '0;
    end
  end

  always_comb
    for (int i = 0; i < NPORTS; i++) begin
      credit_to_ic[i] = '0;
      for (int o = 0; o < NPORTS; o++)
        credit_to_ic[i] |= demux[o][i];
    end
endmodule
