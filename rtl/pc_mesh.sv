// pc_mesh: concentrated mesh of pseudo-circuit routers.
//
// MESH_X x MESH_Y routers (4 x 4), each serving CONC (4) nodes on its local
// ports, 64 nodes in all. Router (x, y) is number y*MESH_X + x; node number
// is router*CONC + local index. Neighbouring routers are joined by their N/S
// and E/W ports, flits and credits each taking one cycle on the link (the
// router's output register). Ports at the mesh edge are left idle: XY routing
// never selects them. The node side of every local port is brought out: a
// node injects flits that already carry the output port of their first router
// (lookahead routing; noc_pkg::xy_route), and returns a credit for every flit it
// takes out of an ejection port. Event vectors are the OR over each router's
// input ports.
module pc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4,
  parameter bit          STATIC_VA = 1'b1,
  parameter bit          EN_PC     = 1'b1,
  parameter bit          EN_SPEC   = 1'b1,
  parameter bit          EN_BYPASS = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  // node side, indexed by node number
  input  logic  [MESH_X*MESH_Y*CONC-1:0] inj_valid,
  input  flit_t                          inj_flit     [MESH_X*MESH_Y*CONC],
  output logic  [MESH_X*MESH_Y*CONC-1:0] inj_cr_valid,
  output logic  [VC_W-1:0]               inj_cr_vc    [MESH_X*MESH_Y*CONC],
  output logic  [MESH_X*MESH_Y*CONC-1:0] ej_valid,
  output flit_t                          ej_flit      [MESH_X*MESH_Y*CONC],
  input  logic  [MESH_X*MESH_Y*CONC-1:0] ej_cr_valid,
  input  logic  [VC_W-1:0]               ej_cr_vc     [MESH_X*MESH_Y*CONC],
  // events per router
  output logic  [MESH_X*MESH_Y-1:0]      ev_sa_grant,
  output logic  [MESH_X*MESH_Y-1:0]      ev_pc_reuse,
  output logic  [MESH_X*MESH_Y-1:0]      ev_bypass,
  output logic  [MESH_X*MESH_Y-1:0]      ev_spec,
  output logic  [MESH_X*MESH_Y-1:0]      ev_term_conflict,
  output logic  [MESH_X*MESH_Y-1:0]      ev_term_congest
);
  localparam int unsigned NR = MESH_X * MESH_Y;

  logic [NPORT-1:0] r_in_valid  [NR];
  flit_t            r_in_flit   [NR][NPORT];
  logic [NPORT-1:0] r_cro_valid [NR];
  logic [VC_W-1:0]  r_cro_vc    [NR][NPORT];
  logic [NPORT-1:0] r_out_valid [NR];
  flit_t            r_out_flit  [NR][NPORT];
  logic [NPORT-1:0] r_cri_valid [NR];
  logic [VC_W-1:0]  r_cri_vc    [NR][NPORT];
  logic [NPORT-1:0] e_sa [NR], e_pc [NR], e_by [NR], e_sp [NR], e_tc [NR], e_tg [NR];

  // neighbour of router r through mesh port o, or -1 at the edge
  function automatic int nbr(int r, int o);
    int x, y;
    x = r % MESH_X;
    y = r / MESH_X;
    case (o)
      0: return (y > 0)               ? r - MESH_X : -1;
      1: return (x < MESH_X - 1)      ? r + 1      : -1;
      2: return (y < MESH_Y - 1)      ? r + MESH_X : -1;
      3: return (x > 0)               ? r - 1      : -1;
      default: return -1;
    endcase
  endfunction

  always_comb begin
    for (int r = 0; r < int'(NR); r++) begin
      for (int o = 0; o < 4; o++) begin
        int n;
        n = nbr(r, o);
        // the neighbour's opposite port faces this router
        if (n >= 0) begin
          r_in_valid[r][o]  = r_out_valid[n][(o + 2) % 4];
          r_in_flit[r][o]   = r_out_flit[n][(o + 2) % 4];
          r_cri_valid[r][o] = r_cro_valid[n][(o + 2) % 4];
          r_cri_vc[r][o]    = r_cro_vc[n][(o + 2) % 4];
        end else begin
          r_in_valid[r][o]  = 1'b0;
          r_in_flit[r][o]   = '0;
          r_cri_valid[r][o] = 1'b0;
          r_cri_vc[r][o]    = '0;
        end
      end
      for (int l = 0; l < int'(CONC); l++) begin
        r_in_valid[r][4+l]  = inj_valid[r*CONC+l];
        r_in_flit[r][4+l]   = inj_flit[r*CONC+l];
        r_cri_valid[r][4+l] = ej_cr_valid[r*CONC+l];
        r_cri_vc[r][4+l]    = ej_cr_vc[r*CONC+l];
        inj_cr_valid[r*CONC+l] = r_cro_valid[r][4+l];
        inj_cr_vc[r*CONC+l]    = r_cro_vc[r][4+l];
        ej_valid[r*CONC+l]     = r_out_valid[r][4+l];
        ej_flit[r*CONC+l]      = r_out_flit[r][4+l];
      end
      ev_sa_grant[r]      = |e_sa[r];
      ev_pc_reuse[r]      = |e_pc[r];
      ev_bypass[r]        = |e_by[r];
      ev_spec[r]          = |e_sp[r];
      ev_term_conflict[r] = |e_tc[r];
      ev_term_congest[r]  = |e_tg[r];
    end
  end

  for (genvar r = 0; r < NR; r++) begin : g_r
    pc_router #(
      .X(XW'(r % MESH_X)), .Y(YW'(r / MESH_X)), .BUF_DEPTH(BUF_DEPTH),
      .STATIC_VA(STATIC_VA), .EN_PC(EN_PC), .EN_SPEC(EN_SPEC), .EN_BYPASS(EN_BYPASS)
    ) u_rt (
      .clk, .rst_n,
      .in_valid        (r_in_valid[r]),
      .in_flit         (r_in_flit[r]),
      .cr_out_valid    (r_cro_valid[r]),
      .cr_out_vc       (r_cro_vc[r]),
      .out_valid       (r_out_valid[r]),
      .out_flit        (r_out_flit[r]),
      .cr_in_valid     (r_cri_valid[r]),
      .cr_in_vc        (r_cri_vc[r]),
      .ev_sa_grant     (e_sa[r]),
      .ev_pc_reuse     (e_pc[r]),
      .ev_bypass       (e_by[r]),
      .ev_spec         (e_sp[r]),
      .ev_term_conflict(e_tc[r]),
      .ev_term_congest (e_tg[r])
    );
  end
endmodule
