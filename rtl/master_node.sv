// master_node: one master node of the mesh, the IP master (processor core),
// its network adaptor and a router, wired as in the paper's master node
// figure. The adaptor's packet data out / in go to the router's local port;
// the router's four mesh ports are this node's ports (index 1 north, 2 east,
// 3 south, 4 west). The adaptor never stalls the router, so the router's
// local busy input is tied low. test_leds shows the last byte read back.
module master_node
  import noc_pkg::*;
#(
  parameter logic [ID_W-1:0] NODE_ID    = 4'd0,
  parameter logic [3:0]      TARGET_ID  = 4'd4,
  parameter logic [27:0]     LOCAL_ADDR = 28'h0,
  parameter logic [7:0]      WR_DATA    = 8'hAA,
  parameter int              IN_DEPTH   = 4,
  parameter int              OUT_DEPTH  = 4
) (
  input  logic       clk,
  input  logic       nreset,
  input  pkt_t       pkt_in   [4:1],
  output pkt_t       pkt_out  [4:1],
  input  logic       busy_in  [4:1],
  output logic       busy_out [4:1],
  output logic [7:0] test_leds
);
  logic [31:0] address;
  logic        write_enable, read_request, read_return, not_ready;
  logic [7:0]  write_data, read_data;
  pkt_t        na_to_router, router_to_na;
  logic        router_busy;

  ip_master #(
    .TARGET_ID(TARGET_ID), .LOCAL_ADDR(LOCAL_ADDR), .WR_DATA(WR_DATA)
  ) u_ip (
    .clk, .nreset,
    .dest_addr   (address),
    .wr          (write_enable),
    .wr_data     (write_data),
    .read_request(read_request),
    .read_return (read_return),
    .rd_data     (read_data),
    .not_ready   (not_ready),
    .test_leds   (test_leds)
  );

  na_master #(.NODE_ID(NODE_ID)) u_na (
    .clk, .nreset,
    .address, .write_enable, .write_data, .read_request,
    .read_return, .read_data, .not_ready,
    .pkt_out(na_to_router),
    .busy_in(router_busy),
    .pkt_in (router_to_na)
  );

  router #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_router (
    .clk, .nreset,
    .local_pkt_in  (na_to_router),
    .local_pkt_out (router_to_na),
    .local_busy_in (1'b0),
    .local_busy_out(router_busy),
    .pkt_in, .pkt_out, .busy_in, .busy_out
  );

endmodule
