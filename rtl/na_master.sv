// na_master: network adaptor of a master node. It turns the IP core's bus
// requests into packets for the router's local port and turns read-return
// packets back into a read-return strobe and read data.
//
// IP side (as in the paper's master node figure): a 32-bit address whose
// top nibble is the target node ID and whose low 28 bits are the local
// contact (the address inside the target), write enable with 8-bit write
// data, read request, and back to the IP read return with 8-bit read data.
// A write becomes a packet with the write bit, the local contact and the
// data; a read request becomes a packet with the read bit, the local contact
// and this node's ID as source contact. The route fields are computed from
// NODE_ID and the target ID.
//
// The adaptor holds one outgoing packet. not_ready is high while it holds
// one; the IP must not issue a request then (write wins if both strobes come
// in the same cycle). The packet is offered on pkt_out in every cycle in which
// the router's local busy is low and is gone after that cycle. A read return
// arriving on pkt_in raises read_return for one cycle, one cycle later, with
// read_data from body bits [35:28]; the adaptor never stalls the router.
// The single-entry holding register and not_ready as the request handshake
// are this design's choices.
module na_master
  import noc_pkg::*;
#(
  parameter logic [ID_W-1:0] NODE_ID = 4'd0
) (
  input  logic        clk,
  input  logic        nreset,
  // IP core side
  input  logic [31:0] address,
  input  logic        write_enable,
  input  logic [7:0]  write_data,
  input  logic        read_request,
  output logic        read_return,
  output logic [7:0]  read_data,
  output logic        not_ready,
  // router local port side
  output pkt_t        pkt_out,
  input  logic        busy_in,
  input  pkt_t        pkt_in
);
  pkt_t   tx_pkt, new_pkt;
  logic   tx_valid;
  route_t rt;

  always_comb begin
    rt      = make_route(NODE_ID, address[31:28]);
    new_pkt = '0;
    new_pkt.ydir = rt.ydir;
    new_pkt.ycnt = rt.ycnt;
    new_pkt.xdir = rt.xdir;
    new_pkt.xcnt = rt.xcnt;
    new_pkt.obj  = address[31:28];
    if (write_enable) begin
      new_pkt.wr   = 1'b1;
      new_pkt.body = {address[27:0], write_data};
    end else begin
      new_pkt.rd   = 1'b1;
      new_pkt.body = {address[27:0], NODE_ID, 4'h0};
    end
  end

  assign not_ready = tx_valid;
  assign pkt_out   = (tx_valid && !busy_in) ? tx_pkt : '0;

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      tx_valid    <= 1'b0;
      tx_pkt      <= '0;
      read_return <= 1'b0;
      read_data   <= '0;
    end else begin
      if (tx_valid && !busy_in) tx_valid <= 1'b0;
      if (!tx_valid && (write_enable || read_request)) begin
        tx_valid <= 1'b1;
        tx_pkt   <= new_pkt;
      end
      read_return <= pkt_in.rr;
      if (pkt_in.rr) read_data <= pkt_in.body[35:28];
    end
  end

endmodule
