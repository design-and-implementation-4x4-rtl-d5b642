// noc_top: the 4x4 two-dimensional mesh network on chip.
//
// Sixteen nodes, numbered ID = 4*row + column with row 0 at the top, as laid
// out in the paper's network figure: masters 0-3 in the top row, slaves
// at 4, 7, 12 and 15, plain routers everywhere else (their local port is
// idle). Neighbouring routers are joined by a pair of 49-bit packet links and
// a pair of busy lines. Links that leave the mesh carry no packets and are
// never busy.
//
// Master m writes M_DATA[m] to local address M_ADDR[m] of slave M_TARGET[m]
// every 32 cycles and reads it back five cycles later; test_leds[m] shows
// the byte that came back, led_output[s] the last byte written into the s-th
// slave (slaves in the order 4, 7, 12, 15). The default pairing
// (master 0 with slave 4, 1 with 12, 2 with 15, 3 with 7) and data follow
// the paper's simulation figures.
module noc_top
  import noc_pkg::*;
#(
  parameter logic [3:0][3:0]  M_TARGET     = {4'd7, 4'd15, 4'd12, 4'd4},
  parameter logic [3:0][27:0] M_ADDR       = {28'h3, 28'h2, 28'h1, 28'h0},
  parameter logic [3:0][7:0]  M_DATA       = {8'hCC, 8'hDD, 8'hBB, 8'hAA},
  parameter int               READ_LATENCY = 1,
  parameter int               IN_DEPTH     = 4,
  parameter int               OUT_DEPTH    = 4
) (
  input  logic            clk,
  input  logic            nreset,
  output logic [3:0][7:0] test_leds,
  output logic [3:0][7:0] led_output
);
  localparam int N = MESH_DIM * MESH_DIM;

  // per node, per direction (1 north, 2 east, 3 south, 4 west)
  pkt_t link_out  [N][4:1];
  pkt_t link_in   [N][4:1];
  logic bsy_out   [N][4:1];
  logic bsy_in    [N][4:1];

  for (genvar r = 0; r < MESH_DIM; r++) begin : g_row
    for (genvar c = 0; c < MESH_DIM; c++) begin : g_col
      localparam int ID = r * MESH_DIM + c;

      // north neighbour sends on its south port, and so on
      if (r > 0) begin : g_n
        assign link_in[ID][1] = link_out[ID - MESH_DIM][3];
        assign bsy_in[ID][1]  = bsy_out[ID - MESH_DIM][3];
      end else begin : g_n_edge
        assign link_in[ID][1] = '0;
        assign bsy_in[ID][1]  = 1'b0;
      end
      if (c < MESH_DIM - 1) begin : g_e
        assign link_in[ID][2] = link_out[ID + 1][4];
        assign bsy_in[ID][2]  = bsy_out[ID + 1][4];
      end else begin : g_e_edge
        assign link_in[ID][2] = '0;
        assign bsy_in[ID][2]  = 1'b0;
      end
      if (r < MESH_DIM - 1) begin : g_s
        assign link_in[ID][3] = link_out[ID + MESH_DIM][1];
        assign bsy_in[ID][3]  = bsy_out[ID + MESH_DIM][1];
      end else begin : g_s_edge
        assign link_in[ID][3] = '0;
        assign bsy_in[ID][3]  = 1'b0;
      end
      if (c > 0) begin : g_w
        assign link_in[ID][4] = link_out[ID - 1][2];
        assign bsy_in[ID][4]  = bsy_out[ID - 1][2];
      end else begin : g_w_edge
        assign link_in[ID][4] = '0;
        assign bsy_in[ID][4]  = 1'b0;
      end

      if (r == 0) begin : g_master
        master_node #(
          .NODE_ID   (4'(ID)),
          .TARGET_ID (M_TARGET[c]),
          .LOCAL_ADDR(M_ADDR[c]),
          .WR_DATA   (M_DATA[c]),
          .IN_DEPTH  (IN_DEPTH),
          .OUT_DEPTH (OUT_DEPTH)
        ) u_node (
          .clk, .nreset,
          .pkt_in  (link_in[ID]),
          .pkt_out (link_out[ID]),
          .busy_in (bsy_in[ID]),
          .busy_out(bsy_out[ID]),
          .test_leds(test_leds[c])
        );
      end else if (ID == 4 || ID == 7 || ID == 12 || ID == 15) begin : g_slave
        localparam int S = (ID == 4) ? 0 : (ID == 7) ? 1 : (ID == 12) ? 2 : 3;
        slave_node #(
          .NODE_ID     (4'(ID)),
          .READ_LATENCY(READ_LATENCY),
          .IN_DEPTH    (IN_DEPTH),
          .OUT_DEPTH   (OUT_DEPTH)
        ) u_node (
          .clk, .nreset,
          .pkt_in  (link_in[ID]),
          .pkt_out (link_out[ID]),
          .busy_in (bsy_in[ID]),
          .busy_out(bsy_out[ID]),
          .led_output(led_output[S])
        );
      end else begin : g_router
        pkt_t local_out;
        logic local_busy;
        router #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_node (
          .clk, .nreset,
          .local_pkt_in  ('0),
          .local_pkt_out (local_out),
          .local_busy_in (1'b0),
          .local_busy_out(local_busy),
          .pkt_in  (link_in[ID]),
          .pkt_out (link_out[ID]),
          .busy_in (bsy_in[ID]),
          .busy_out(bsy_out[ID])
        );
      end
    end
  end

endmodule
