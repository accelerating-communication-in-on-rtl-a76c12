// noc_pkg: types and constants shared by the electrical router blocks.
//
// The electrical network is a 4x4 concentrated mesh. Each router has four mesh
// ports (N, E, S, W) and four local ports, one per attached node (two cores and
// two L2 banks), so it has eight ports in all. Each input port has four virtual
// channels (VCs) of four flits and a flit carries 128 data bits. These numbers
// follow the evaluated configuration; the field layout of a flit is this
// design's own choice.
//
// Routing is lookahead dimension-order (XY): a flit arrives already carrying the
// output port it takes in the router it enters (field `route`), and the router
// computes the port for the next router while the flit crosses the switch.
// Mesh directions: N is y-1, S is y+1, E is x+1, W is x-1.
package noc_pkg;

  localparam int unsigned MESH_X  = 4;   // routers per row
  localparam int unsigned MESH_Y  = 4;   // routers per column
  localparam int unsigned CONC    = 4;   // nodes per router (concentration)
  localparam int unsigned NPORT   = 4 + CONC;
  localparam int unsigned NVC     = 4;   // VCs per input port
  localparam int unsigned DATA_W  = 128; // link width in bits
  localparam int unsigned PORT_W  = $clog2(NPORT);
  localparam int unsigned VC_W    = $clog2(NVC);
  localparam int unsigned XW      = $clog2(MESH_X);
  localparam int unsigned YW      = $clog2(MESH_Y);
  localparam int unsigned LW      = $clog2(CONC);

  typedef enum logic [PORT_W-1:0] {
    P_N = 3'd0, P_E = 3'd1, P_S = 3'd2, P_W = 3'd3,
    P_L0 = 3'd4, P_L1 = 3'd5, P_L2 = 3'd6, P_L3 = 3'd7
  } port_e;

  typedef struct packed {
    logic [XW-1:0] x;
    logic [YW-1:0] y;
    logic [LW-1:0] loc;
  } dest_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [VC_W-1:0]   vc;     // VC the flit occupies at the receiving input port
    logic [PORT_W-1:0] route;  // output port to take in the receiving router
    dest_t             dst;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Dimension-order XY routing decision made in router (cx, cy).
  function automatic logic [PORT_W-1:0] xy_route(input logic [XW-1:0] cx,
                                                 input logic [YW-1:0] cy,
                                                 input dest_t d);
    if (d.x > cx)      return P_E;
    else if (d.x < cx) return P_W;
    else if (d.y < cy) return P_N;
    else if (d.y > cy) return P_S;
    else               return PORT_W'(4 + int'(d.loc));
  endfunction

  // Lookahead routing: port the flit will take in the neighbour reached
  // through mesh output port `o` of router (cx, cy). Local ports return 0.
  function automatic logic [PORT_W-1:0] lookahead_route(input logic [XW-1:0] cx,
                                                        input logic [YW-1:0] cy,
                                                        input logic [PORT_W-1:0] o,
                                                        input dest_t d);
    logic [XW-1:0] nx;
    logic [YW-1:0] ny;
    nx = cx;
    ny = cy;
    case (o)
      P_N:     ny = cy - 1'b1;
      P_E:     nx = cx + 1'b1;
      P_S:     ny = cy + 1'b1;
      P_W:     nx = cx - 1'b1;
      default: return '0;
    endcase
    return xy_route(nx, ny, d);
  endfunction

  // Static VC allocation: the output VC is a function of the destination only,
  // so every flow to one destination uses the same VC at every hop.
  function automatic logic [VC_W-1:0] static_vc(input dest_t d);
    return VC_W'(d.x) ^ VC_W'(d.y) ^ VC_W'(d.loc);
  endfunction

endpackage
