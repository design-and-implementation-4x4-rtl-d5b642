// noc_pkg: types and constants shared by every block of the 4x4 mesh NoC.
//
// A packet is one 49-bit flit [48:0] that carries its own route. The six
// most significant bits are the route: a Y direction bit and a 2-bit Y hop
// count, then an X direction bit and a 2-bit X hop count. Three one-hot type
// bits follow (read request, write, read return), then the 4-bit objective
// (destination node ID) and a 36-bit body whose layout depends on the type:
//   write        : body[35:8] local contact (address), body[7:0] write data
//   read request : body[35:8] local contact, body[7:4] source contact, [3:0] 0
//   read return  : body[35:28] read data, body[27:0] 0
// This bit map follows the paper's packet figure. The encodings of the
// direction bits (0 = south / east, 1 = north / west), the node numbering
// (ID = 4*row + column, row 0 at the top) and the rule that an all-zero type
// field means "no packet on the link" are this design's reading of the
// document's waveforms.
package noc_pkg;

  localparam int MESH_DIM = 4;   // 4x4 mesh
  localparam int PKT_W    = 49;  // packet width, bits [48:0]
  localparam int ID_W     = 4;   // node ID width (16 nodes)
  localparam int NPORTS   = 5;   // local + four mesh directions

  // Router port numbering: 0 is the local port, 1..4 the mesh directions.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef struct packed {
    logic            ydir;   // [48]    0: south, 1: north
    logic [1:0]      ycnt;   // [47:46] Y hops still to go
    logic            xdir;   // [45]    0: east, 1: west
    logic [1:0]      xcnt;   // [44:43] X hops still to go
    logic            rd;     // [42]    read request
    logic            wr;     // [41]    write
    logic            rr;     // [40]    read return
    logic [ID_W-1:0] obj;    // [39:36] objective (destination ID)
    logic [35:0]     body;   // [35:0]
  } pkt_t;

  typedef struct packed {
    logic       ydir;
    logic [1:0] ycnt;
    logic       xdir;
    logic [1:0] xcnt;
  } route_t;

  // A link carries a packet in a cycle when any type bit is set.
  function automatic logic pkt_valid(pkt_t p);
    return p.rd | p.wr | p.rr;
  endfunction

  // Route header from a source node to a destination node.
  function automatic route_t make_route(logic [ID_W-1:0] src, logic [ID_W-1:0] dst);
    route_t r;
    logic [1:0] sr, sc, dr, dc;
    sr = src[3:2]; sc = src[1:0];
    dr = dst[3:2]; dc = dst[1:0];
    r.ydir = (dr < sr);                       // destination above: north
    r.ycnt = (dr < sr) ? (sr - dr) : (dr - sr);
    r.xdir = (dc < sc);                       // destination left: west
    r.xcnt = (dc < sc) ? (sc - dc) : (dc - sc);
    return r;
  endfunction

endpackage
