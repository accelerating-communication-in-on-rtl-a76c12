// noc_accel_top: the three on-chip communication accelerators, side by side.
//
//  * u_mesh  - a 4x4 concentrated electrical mesh (64 nodes) of two-stage VC
//              routers with pseudo-circuits, pseudo-circuit speculation and
//              buffer bypassing (pc_mesh / pc_router). Node side brought out.
//  * u_et    - the route and VC selection unit of a fully adaptive router with
//              early transition to O1TURN escape channels (et_route_select),
//              for router (ET_X, ET_Y); its credit view and request are ports.
//  * u_hs    - a 64-node nanophotonic MWSR ring network with handshake flow
//              control (hs_network), mode HS_MODE. Node side brought out.
// The three parts do not exchange signals; they share clock and reset.
// Parameters select reduced sizes or other modes for experiments; the
// defaults are the configurations evaluated for each scheme.
module noc_accel_top
  import noc_pkg::*;
  import hs_pkg::*;
#(
  parameter int unsigned   HS_N        = HS_NODES,
  parameter hs_mode_e      HS_MODE     = HS_DHS_CIRC,
  parameter int unsigned   HS_SETASIDE = 2,
  parameter logic [XW-1:0] ET_X        = XW'(1),
  parameter logic [YW-1:0] ET_Y        = YW'(1)
) (
  input  logic  clk,
  input  logic  rst_n,
  // ---- electrical pseudo-circuit mesh, per node
  input  logic  [MESH_X*MESH_Y*CONC-1:0] m_inj_valid,
  input  flit_t                          m_inj_flit     [MESH_X*MESH_Y*CONC],
  output logic  [MESH_X*MESH_Y*CONC-1:0] m_inj_cr_valid,
  output logic  [VC_W-1:0]               m_inj_cr_vc    [MESH_X*MESH_Y*CONC],
  output logic  [MESH_X*MESH_Y*CONC-1:0] m_ej_valid,
  output flit_t                          m_ej_flit      [MESH_X*MESH_Y*CONC],
  input  logic  [MESH_X*MESH_Y*CONC-1:0] m_ej_cr_valid,
  input  logic  [VC_W-1:0]               m_ej_cr_vc     [MESH_X*MESH_Y*CONC],
  output logic  [MESH_X*MESH_Y-1:0]      m_ev_sa_grant,
  output logic  [MESH_X*MESH_Y-1:0]      m_ev_pc_reuse,
  output logic  [MESH_X*MESH_Y-1:0]      m_ev_bypass,
  output logic  [MESH_X*MESH_Y-1:0]      m_ev_spec,
  output logic  [MESH_X*MESH_Y-1:0]      m_ev_term_conflict,
  output logic  [MESH_X*MESH_Y-1:0]      m_ev_term_congest,
  // ---- early-transition route selection
  input  dest_t                          et_dst,
  input  logic                           et_in_escape,
  input  logic                           et_in_vn,
  input  logic  [2:0]                    et_credits     [NPORT][NVC],
  output logic                           et_valid,
  output logic  [PORT_W-1:0]             et_out_port,
  output logic  [VC_W-1:0]               et_out_vc,
  output logic                           et_to_escape,
  output logic                           et_out_vn,
  output logic                           et_early,
  // ---- nanophotonic handshake network, per node
  input  logic  [HS_N-1:0]               h_inj_valid,
  input  logic  [NID_W-1:0]              h_inj_dst      [HS_N],
  input  logic  [HS_DATA_W-1:0]          h_inj_data     [HS_N],
  output logic  [HS_N-1:0]               h_inj_ready,
  output logic  [HS_N-1:0]               h_ej_valid,
  output hflit_t                         h_ej_flit      [HS_N],
  input  logic  [HS_N-1:0]               h_ej_ready,
  output logic  [HS_N-1:0]               h_ev_grant,
  output logic  [HS_N-1:0]               h_ev_retx,
  output logic  [HS_N-1:0]               h_ev_drop,
  output logic  [HS_N-1:0]               h_ev_reinject
);
  pc_mesh u_mesh (
    .clk, .rst_n,
    .inj_valid       (m_inj_valid),
    .inj_flit        (m_inj_flit),
    .inj_cr_valid    (m_inj_cr_valid),
    .inj_cr_vc       (m_inj_cr_vc),
    .ej_valid        (m_ej_valid),
    .ej_flit         (m_ej_flit),
    .ej_cr_valid     (m_ej_cr_valid),
    .ej_cr_vc        (m_ej_cr_vc),
    .ev_sa_grant     (m_ev_sa_grant),
    .ev_pc_reuse     (m_ev_pc_reuse),
    .ev_bypass       (m_ev_bypass),
    .ev_spec         (m_ev_spec),
    .ev_term_conflict(m_ev_term_conflict),
    .ev_term_congest (m_ev_term_congest)
  );

  et_route_select #(.X(ET_X), .Y(ET_Y), .BUF_DEPTH(4), .N_ESC(2), .CW(3)) u_et (
    .clk, .rst_n,
    .dst      (et_dst),
    .in_escape(et_in_escape),
    .in_vn    (et_in_vn),
    .credits  (et_credits),
    .valid    (et_valid),
    .out_port (et_out_port),
    .out_vc   (et_out_vc),
    .to_escape(et_to_escape),
    .out_vn   (et_out_vn),
    .early    (et_early)
  );

  hs_network #(.NODES(HS_N), .MODE(HS_MODE), .SETASIDE(HS_SETASIDE)) u_hs (
    .clk, .rst_n,
    .inj_valid  (h_inj_valid),
    .inj_dst    (h_inj_dst),
    .inj_data   (h_inj_data),
    .inj_ready  (h_inj_ready),
    .ej_valid   (h_ej_valid),
    .ej_flit    (h_ej_flit),
    .ej_ready   (h_ej_ready),
    .ev_grant   (h_ev_grant),
    .ev_retx    (h_ev_retx),
    .ev_drop    (h_ev_drop),
    .ev_reinject(h_ev_reinject)
  );
endmodule
