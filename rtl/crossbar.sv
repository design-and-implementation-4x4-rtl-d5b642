// crossbar: N-by-N packet switch between the router's input buffers and its
// output buffers.
//
// Each output o takes the packet of the input whose bit is set in gnt[o];
// the arbiters guarantee at most one bit per output and, because an input
// asks for a single output, at most one output per input. out_valid[o] says
// that output o receives a packet this cycle. Combinational.
module crossbar
  import noc_pkg::*;
#(
  parameter int N = NPORTS
) (
  input  pkt_t         in_pkt   [N],
  input  logic [N-1:0] gnt      [N],
  output pkt_t         out_pkt  [N],
  output logic [N-1:0] out_valid
);
  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_pkt[o]   = '0;
      out_valid[o] = |gnt[o];
      for (int i = 0; i < N; i++)
        if (gnt[o][i]) out_pkt[o] = out_pkt[o] | in_pkt[i];
    end
  end
endmodule
