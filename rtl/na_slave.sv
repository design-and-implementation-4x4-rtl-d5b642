// na_slave: network adaptor of a slave node. It unpacks write and read
// request packets from the router's local port into bus cycles on the IP
// slave, and packs the slave's answer to a read into a read-return packet.
//
// A state machine holds one packet at a time. In IDLE it takes a packet from
// pkt_in (local_busy to the router, busy_out, is low only in IDLE). A write
// drives address = local contact, write_data and a one-cycle write_enable;
// a read request drives address and a one-cycle read_request, then waits for
// the slave's read_return. The return packet carries the read data in body
// bits [35:28], the read-return type bit, and as objective the source
// contact of the request, with the route computed from NODE_ID to it. It is
// offered on pkt_out in the first cycle the router's local busy is low. While
// the slave raises not_ready no strobe is issued. The address's top nibble is
// driven as zero, as in the paper's slave waveform. read_return must come
// at least one cycle after read_request. Packets of other types arriving here
// are dropped. The state machine itself is this design's construction around
// the signals the paper names.
module na_slave
  import noc_pkg::*;
#(
  parameter logic [ID_W-1:0] NODE_ID = 4'd4
) (
  input  logic        clk,
  input  logic        nreset,
  // IP slave side
  output logic [31:0] address,
  output logic        write_enable,
  output logic [7:0]  write_data,
  output logic        read_request,
  input  logic        not_ready,
  input  logic        read_return,
  input  logic [7:0]  read_data,
  // router local port side
  input  pkt_t        pkt_in,
  output logic        busy_out,
  output pkt_t        pkt_out,
  input  logic        busy_in
);
  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_READ, S_WAIT, S_SEND} state_e;

  state_e          state;
  pkt_t            rx_pkt, tx_pkt, ret_pkt;
  logic [ID_W-1:0] src;
  route_t          rt;

  assign src = rx_pkt.body[7:4];

  always_comb begin
    rt      = make_route(NODE_ID, src);
    ret_pkt = '0;
    ret_pkt.ydir = rt.ydir;
    ret_pkt.ycnt = rt.ycnt;
    ret_pkt.xdir = rt.xdir;
    ret_pkt.xcnt = rt.xcnt;
    ret_pkt.rr   = 1'b1;
    ret_pkt.obj  = src;
    ret_pkt.body = {read_data, 28'h0};
  end

  assign address      = {4'h0, rx_pkt.body[35:8]};
  assign write_data   = rx_pkt.body[7:0];
  assign write_enable = (state == S_WRITE) && !not_ready;
  assign read_request = (state == S_READ) && !not_ready;
  assign busy_out     = (state != S_IDLE);
  assign pkt_out      = (state == S_SEND && !busy_in) ? tx_pkt : '0;

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      state  <= S_IDLE;
      rx_pkt <= '0;
      tx_pkt <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (pkt_valid(pkt_in)) begin
            rx_pkt <= pkt_in;
            if (pkt_in.wr)      state <= S_WRITE;
            else if (pkt_in.rd) state <= S_READ;
          end
        S_WRITE: if (!not_ready) state <= S_IDLE;
        S_READ:  if (!not_ready) state <= S_WAIT;
        S_WAIT:
          if (read_return) begin
            tx_pkt <= ret_pkt;
            state  <= S_SEND;
          end
        S_SEND:  if (!busy_in) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The router may only deliver a packet while this adaptor is idle.
  a_no_drop: assert property (@(posedge clk) disable iff (!nreset)
    !(pkt_valid(pkt_in) && state != S_IDLE))
    else $error("na_slave: packet delivered while busy");

endmodule
