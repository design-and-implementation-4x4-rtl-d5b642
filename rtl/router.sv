// router: five-port packet router of the 4x4 mesh (local, north, east,
// south, west), the same for master, slave and plain nodes.
//
// Every port has an input buffer and an output buffer (the paper's two
// buffer sets). Each cycle the packet at the head of every non-empty input
// buffer is given an output by its route_unit; one round-robin arbiter per
// output picks one of the inputs that want it, provided that output's buffer
// has room; the crossbar copies the winners, with their hop count already
// decremented, into the output buffers. A packet that loses arbitration
// stays at the head of its input buffer and tries again next cycle.
//
// Links: a packet is on pkt_in / pkt_out for exactly one cycle and counts
// when one of its type bits is set; an idle link carries zeros. busy_out of a
// port is high while that port's input buffer is full, and the neighbour must
// not send then. An output buffer presents its head on pkt_out only in cycles
// where the neighbour's busy (busy_in) is low, and pops it in that cycle.
// Timing: a packet written into an input buffer at one clock edge reaches the
// output buffer at the next edge and the neighbour's input buffer at the one
// after, two cycles per hop when nothing blocks.
// The port naming (busy_in[4:1], local_busy_in, north_pkt_in, ...) follows
// the paper's router waveform; directions 1..4 are north, east, south,
// west in that order. Buffer depths are this design's choice.
module router
  import noc_pkg::*;
#(
  parameter int IN_DEPTH  = 4,
  parameter int OUT_DEPTH = 4
) (
  input  logic clk,
  input  logic nreset,
  // local port, to and from the network adaptor
  input  pkt_t local_pkt_in,
  output pkt_t local_pkt_out,
  input  logic local_busy_in,
  output logic local_busy_out,
  // mesh ports, index 1 north, 2 east, 3 south, 4 west
  input  pkt_t pkt_in   [4:1],
  output pkt_t pkt_out  [4:1],
  input  logic busy_in  [4:1],
  output logic busy_out [4:1]
);
  pkt_t              in_pkt  [NPORTS];
  logic              in_busy [NPORTS];   // neighbour cannot accept
  pkt_t              ihead   [NPORTS];
  logic              iempty  [NPORTS];
  logic              ifull   [NPORTS];
  logic              ipop    [NPORTS];
  pkt_t              routed  [NPORTS];
  logic [NPORTS-1:0] want    [NPORTS];   // want[i][o]: input i asks for output o
  logic [NPORTS-1:0] req     [NPORTS];   // req[o][i]
  logic [NPORTS-1:0] gnt     [NPORTS];   // gnt[o][i]
  pkt_t              xb_pkt  [NPORTS];
  logic [NPORTS-1:0] xb_valid;
  pkt_t              ohead   [NPORTS];
  logic              oempty  [NPORTS];
  logic              ofull   [NPORTS];
  logic              osend   [NPORTS];
  pkt_t              out_pkt [NPORTS];

  always_comb begin
    in_pkt[0]  = local_pkt_in;
    in_busy[0] = local_busy_in;
    for (int d = 1; d <= 4; d++) begin
      in_pkt[d]  = pkt_in[d];
      in_busy[d] = busy_in[d];
    end
  end

  assign local_pkt_out  = out_pkt[0];
  assign local_busy_out = ifull[0];
  always_comb begin
    for (int d = 1; d <= 4; d++) begin
      pkt_out[d]  = out_pkt[d];
      busy_out[d] = ifull[d];
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    logic [$clog2(IN_DEPTH+1)-1:0]  icount;
    logic [$clog2(OUT_DEPTH+1)-1:0] ocount;

    packet_fifo #(.WIDTH(PKT_W), .DEPTH(IN_DEPTH)) u_in_buf (
      .clk, .nreset,
      .push (pkt_valid(in_pkt[p])),
      .din  (in_pkt[p]),
      .pop  (ipop[p]),
      .dout (ihead[p]),
      .empty(iempty[p]),
      .full (ifull[p]),
      .count(icount)
    );

    route_unit u_route (
      .pkt_in  (ihead[p]),
      .out_port(want[p]),
      .pkt_out (routed[p])
    );

    // output p collects the requests of all inputs that want it
    always_comb begin
      for (int i = 0; i < NPORTS; i++)
        req[p][i] = !iempty[i] && want[i][p];
    end

    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk, .nreset,
      .en   (!ofull[p]),
      .req  (req[p]),
      .grant(gnt[p])
    );

    // input p is popped when some output granted it
    always_comb begin
      ipop[p] = 1'b0;
      for (int o = 0; o < NPORTS; o++) ipop[p] = ipop[p] | gnt[o][p];
    end

    packet_fifo #(.WIDTH(PKT_W), .DEPTH(OUT_DEPTH)) u_out_buf (
      .clk, .nreset,
      .push (xb_valid[p]),
      .din  (xb_pkt[p]),
      .pop  (osend[p]),
      .dout (ohead[p]),
      .empty(oempty[p]),
      .full (ofull[p]),
      .count(ocount)
    );

    assign osend[p]   = !oempty[p] && !in_busy[p];
    assign out_pkt[p] = osend[p] ? ohead[p] : '0;
  end

  crossbar #(.N(NPORTS)) u_xbar (
    .in_pkt   (routed),
    .gnt      (gnt),
    .out_pkt  (xb_pkt),
    .out_valid(xb_valid)
  );

endmodule
