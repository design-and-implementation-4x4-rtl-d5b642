// route_unit: routing decision for the packet at the head of one input
// buffer.
//
// Deterministic dimension-order routing on the hop counters carried in the
// packet: while the Y count is non-zero the packet goes north (Y direction
// bit 1) or south (0) and leaves with its Y count one lower; once Y is used
// up the X count is spent the same way, west (X direction bit 1) or east (0);
// a packet with both counts at zero has arrived and goes to the local port.
// Y before X and the decrement at each hop are read from the paper's
// router waveform, where a packet entering from the north with Y count 1 and
// X count 1 leaves to the south with Y count 0 and X count still 1.
// Purely combinational: out_port is a one-hot vector indexed by port number
// (0 local, 1 north, 2 east, 3 south, 4 west); pkt_out is the updated packet.
module route_unit
  import noc_pkg::*;
(
  input  pkt_t              pkt_in,
  output logic [NPORTS-1:0] out_port,
  output pkt_t              pkt_out
);
  always_comb begin
    pkt_out  = pkt_in;
    out_port = '0;
    if (pkt_in.ycnt != 2'd0) begin
      pkt_out.ycnt = pkt_in.ycnt - 2'd1;
      out_port[pkt_in.ydir ? P_NORTH : P_SOUTH] = 1'b1;
    end else if (pkt_in.xcnt != 2'd0) begin
      pkt_out.xcnt = pkt_in.xcnt - 2'd1;
      out_port[pkt_in.xdir ? P_WEST : P_EAST] = 1'b1;
    end else begin
      out_port[P_LOCAL] = 1'b1;
    end
  end
endmodule
