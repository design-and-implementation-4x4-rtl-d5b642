// slave_node: one slave node of the mesh, the IP slave (memory), its network
// adaptor and a router, wired as in the paper's slave node figure. The
// router's four mesh ports are this node's ports (index 1 north, 2 east,
// 3 south, 4 west). led_output shows the last byte written into the slave.
module slave_node
  import noc_pkg::*;
#(
  parameter logic [ID_W-1:0] NODE_ID      = 4'd4,
  parameter int              MEM_DEPTH    = 8,
  parameter int              READ_LATENCY = 1,
  parameter int              IN_DEPTH     = 4,
  parameter int              OUT_DEPTH    = 4
) (
  input  logic       clk,
  input  logic       nreset,
  input  pkt_t       pkt_in   [4:1],
  output pkt_t       pkt_out  [4:1],
  input  logic       busy_in  [4:1],
  output logic       busy_out [4:1],
  output logic [7:0] led_output
);
  logic [31:0] address;
  logic        write_enable, read_request, read_return, not_ready;
  logic [7:0]  write_data, read_data;
  pkt_t        na_to_router, router_to_na;
  logic        router_busy, na_busy;

  ip_slave #(.MEM_DEPTH(MEM_DEPTH), .READ_LATENCY(READ_LATENCY)) u_ip (
    .clk, .nreset,
    .address, .write_enable, .write_data, .read_request,
    .not_ready, .read_return, .read_data, .led_output
  );

  na_slave #(.NODE_ID(NODE_ID)) u_na (
    .clk, .nreset,
    .address, .write_enable, .write_data, .read_request,
    .not_ready, .read_return, .read_data,
    .pkt_in  (router_to_na),
    .busy_out(na_busy),
    .pkt_out (na_to_router),
    .busy_in (router_busy)
  );

  router #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_router (
    .clk, .nreset,
    .local_pkt_in  (na_to_router),
    .local_pkt_out (router_to_na),
    .local_busy_in (na_busy),
    .local_busy_out(router_busy),
    .pkt_in, .pkt_out, .busy_in, .busy_out
  );

endmodule
