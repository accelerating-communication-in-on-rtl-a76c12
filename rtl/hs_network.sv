// hs_network: nanophotonic MWSR ring network of NODES nodes with handshake
// flow control.
//
// Node d is the home node (single reader) of channel d; every other node owns
// one sender (virtual output queue, setaside slots, handshake receiver) on
// that channel. A flit injected at node n for destination d enters the queue
// of node n on channel d; `inj_ready` reflects that queue only, so traffic to
// different destinations does not block each other. Each home node delivers
// the flits it stored on its ejection port (`ej_*`), one per cycle, towards its
// router. The channels are independent and identical apart from their home
// node. Self-addressed flits are not accepted (`inj_ready` is low).
// Event vectors: per node, a token was captured / a retransmission was sent /
// a flit was dropped at this home node / re-injected by this home node.
module hs_network
  import hs_pkg::*;
#(
  parameter int unsigned NODES    = HS_NODES,
  parameter int unsigned SEGS     = HS_SEGS,
  parameter hs_mode_e    MODE     = HS_DHS_CIRC,
  parameter int unsigned QDEPTH   = 2,
  parameter int unsigned SETASIDE = 2,
  parameter int unsigned HOME_BUF = HS_HOME_BUF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NODES-1:0] inj_valid,
  input  logic [NID_W-1:0] inj_dst  [NODES],
  input  logic [HS_DATA_W-1:0] inj_data [NODES],
  output logic [NODES-1:0] inj_ready,
  output logic [NODES-1:0] ej_valid,
  output hflit_t           ej_flit  [NODES],
  input  logic [NODES-1:0] ej_ready,
  output logic [NODES-1:0] ev_grant,
  output logic [NODES-1:0] ev_retx,
  output logic [NODES-1:0] ev_drop,
  output logic [NODES-1:0] ev_reinject
);
  logic [NODES-1:0] ch_enq_valid [NODES];   // [channel][node]
  hflit_t           ch_enq_flit  [NODES][NODES];
  logic [NODES-1:0] ch_enq_ready [NODES];
  logic [NODES-1:0] ch_grant     [NODES];
  logic [NODES-1:0] ch_retx      [NODES];

  always_comb begin
    for (int d = 0; d < int'(NODES); d++)
      for (int n = 0; n < int'(NODES); n++) begin
        ch_enq_valid[d][n] = inj_valid[n] && (int'(inj_dst[n]) == d) && (n != d);
        ch_enq_flit[d][n]  = '{src: NID_W'(n), data: inj_data[n]};
      end
    for (int n = 0; n < int'(NODES); n++) begin
      inj_ready[n] = 1'b0;
      ev_grant[n]  = 1'b0;
      ev_retx[n]   = 1'b0;
      for (int d = 0; d < int'(NODES); d++) begin
        if (int'(inj_dst[n]) == d && n != d) inj_ready[n] = ch_enq_ready[d][n];
        ev_grant[n] = ev_grant[n] | ch_grant[d][n];
        ev_retx[n]  = ev_retx[n]  | ch_retx[d][n];
      end
    end
  end

  for (genvar d = 0; d < NODES; d++) begin : g_ch
    hs_channel #(
      .NODES(NODES), .SEGS(SEGS), .HOME(d), .MODE(MODE),
      .QDEPTH(QDEPTH), .SETASIDE(SETASIDE), .HOME_BUF(HOME_BUF)
    ) u_ch (
      .clk, .rst_n,
      .enq_valid  (ch_enq_valid[d]),
      .enq_flit   (ch_enq_flit[d]),
      .enq_ready  (ch_enq_ready[d]),
      .ej_valid   (ej_valid[d]),
      .ej_flit    (ej_flit[d]),
      .ej_ready   (ej_ready[d]),
      .ev_grant   (ch_grant[d]),
      .ev_retx    (ch_retx[d]),
      .ev_drop    (ev_drop[d]),
      .ev_reinject(ev_reinject[d])
    );
  end
endmodule
