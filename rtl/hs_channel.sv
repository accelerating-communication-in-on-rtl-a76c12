// hs_channel: one Multiple-Write-Single-Read optical channel with its home
// node and the senders of all other nodes.
//
// The ring is modelled cycle by cycle as the wave pipeline it is: SEGS segments
// (one ring round trip takes SEGS cycles) and NODES attachment points spread
// evenly over them, starting at the home node (position 0) and following the
// direction of the light; node n sits at position (n - HOME) mod NODES. Light
// entering segment s in a cycle passes all nodes of that segment in that cycle,
// upstream nodes first, and enters segment s+1 in the next cycle. Three
// waveguides are modelled:
//   token     - a node that wants to send removes a passing token (destructive
//               detection, so nodes further downstream no longer see it) and
//               sends one flit in the next cycle. HS_GHS: the token stays with
//               its holder as long as it has flits to send (one per cycle) and
//               then continues downstream; it keeps circulating through the
//               home node. HS_DHS/HS_DHS_CIRC: the home node emits a token
//               every cycle (except when it re-injects); unused tokens are
//               absorbed when they return to the home node.
//   data      - a flit modulated by a sender travels to the end of the ring and
//               reaches the home node one cycle after leaving the last segment.
//               Each token reserves exactly one data slot, so writers never
//               collide (checked by an assertion).
//   handshake - the home node's ACK/NACK bit travels from the home node to the
//               addressed sender, which detects it; the answer therefore
//               arrives SEGS+1 cycles after the flit was sent, for every node.
// Ports are indexed by node number; the entries of the home node are unused.
// This slot-level model of waveguides, micro-rings and E/O, O/E conversion is
// this design's own abstraction of the optical parts; the protocol on top of
// it follows the document.
module hs_channel
  import hs_pkg::*;
#(
  parameter int unsigned NODES    = HS_NODES,
  parameter int unsigned SEGS     = HS_SEGS,
  parameter int unsigned HOME     = 0,
  parameter hs_mode_e    MODE     = HS_DHS_CIRC,
  parameter int unsigned QDEPTH   = 2,
  parameter int unsigned SETASIDE = 2,
  parameter int unsigned HOME_BUF = HS_HOME_BUF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NODES-1:0] enq_valid,
  input  hflit_t           enq_flit  [NODES],
  output logic [NODES-1:0] enq_ready,
  output logic             ej_valid,
  output hflit_t           ej_flit,
  input  logic             ej_ready,
  // events
  output logic [NODES-1:0] ev_grant,      // node captured a token / sent
  output logic [NODES-1:0] ev_retx,
  output logic             ev_drop,
  output logic             ev_reinject
);
  typedef struct packed {
    logic             valid;
    logic [NID_W-1:0] dst;
    logic             ack;
  } hsmsg_t;

  typedef struct packed {
    logic   valid;
    hflit_t flit;
  } slot_t;

  function automatic int unsigned seg_of(int unsigned p);
    return (p * SEGS) / NODES;
  endfunction

  function automatic int unsigned node_of(int unsigned p);
    return (HOME + p) % NODES;
  endfunction

  // ---------------------------------------------------------------- waveguide state
  logic [SEGS-1:0] tok_q;       // token entering segment s (s >= 1)
  logic            tok_ret_q;   // token arriving back at the home node
  slot_t           data_q [SEGS];
  slot_t           rx_q;
  hsmsg_t          hs_q   [SEGS];

  // ---------------------------------------------------------------- per position signals
  logic [NODES-1:0] p_req, p_grant, p_tx_valid, p_hs_valid, p_hs_ack;
  hflit_t           p_tx_flit [NODES];
  logic [NODES-1:0] hold_q, hold_d;

  // ---------------------------------------------------------------- home node
  logic   tok_gen, reinj_valid, h_hs_valid, h_hs_ack;
  hflit_t reinj_flit;
  logic [NID_W-1:0] h_hs_dst;

  hs_home #(.MODE(MODE), .BUF(HOME_BUF)) u_home (
    .clk, .rst_n,
    .rx_valid   (rx_q.valid),
    .rx_flit    (rx_q.flit),
    .ej_valid, .ej_flit, .ej_ready,
    .tok_gen,
    .reinj_valid, .reinj_flit,
    .hs_valid   (h_hs_valid),
    .hs_dst     (h_hs_dst),
    .hs_ack     (h_hs_ack),
    .ev_drop, .ev_reinject
  );

  // ---------------------------------------------------------------- senders
  assign p_req[0]      = 1'b0;
  assign p_tx_valid[0] = 1'b0;
  assign p_tx_flit[0]  = '0;

  for (genvar p = 1; p < NODES; p++) begin : g_snd
    hs_sender #(.MODE(MODE), .QDEPTH(QDEPTH), .SETASIDE(SETASIDE), .HS_DELAY(SEGS + 1)) u_snd (
      .clk, .rst_n,
      .enq_valid(enq_valid[node_of(p)]),
      .enq_flit (enq_flit[node_of(p)]),
      .enq_ready(enq_ready[node_of(p)]),
      .req      (p_req[p]),
      .grant    (p_grant[p]),
      .tx_valid (p_tx_valid[p]),
      .tx_flit  (p_tx_flit[p]),
      .hs_valid (p_hs_valid[p]),
      .hs_ack   (p_hs_ack[p]),
      .ev_retx  (ev_retx[node_of(p)])
    );
  end
  assign enq_ready[HOME] = 1'b0;
  assign ev_retx[HOME]   = 1'b0;

  // ---------------------------------------------------------------- light passing the nodes
  logic [SEGS-1:0] tok_out;
  slot_t           data_out [SEGS];
  hsmsg_t          hs_out   [SEGS];
  logic            collision;

  always_comb begin
    p_grant    = '0;
    p_hs_valid = '0;
    p_hs_ack   = '0;
    hold_d     = hold_q;
    collision  = 1'b0;
    for (int s = 0; s < int'(SEGS); s++) begin
      logic   tok;
      slot_t  d;
      hsmsg_t h;
      if (s == 0) begin
        tok          = tok_gen || ((MODE == HS_GHS) && tok_ret_q);
        d.valid      = reinj_valid;
        d.flit       = reinj_flit;
        h.valid      = h_hs_valid;
        h.dst        = h_hs_dst;
        h.ack        = h_hs_ack;
      end else begin
        tok = tok_q[s];
        d   = data_q[s];
        h   = hs_q[s];
      end
      for (int p = 1; p < int'(NODES); p++) begin
        if (seg_of(p) == s) begin
          // token waveguide
          if (MODE == HS_GHS) begin
            if (hold_q[p]) begin
              if (p_req[p]) p_grant[p] = 1'b1;
              else begin
                hold_d[p] = 1'b0;
                tok       = 1'b1;            // released downstream
              end
            end else if (tok && p_req[p]) begin
              p_grant[p] = 1'b1;
              hold_d[p]  = 1'b1;
              tok        = 1'b0;
            end
          end else if (tok && p_req[p]) begin
            p_grant[p] = 1'b1;
            tok        = 1'b0;
          end
          // data waveguide
          if (p_tx_valid[p]) begin
            if (d.valid) collision = 1'b1;
            d.valid = 1'b1;
            d.flit  = p_tx_flit[p];
          end
          // handshake waveguide
          if (h.valid && (int'(h.dst) == int'(node_of(p)))) begin
            p_hs_valid[p] = 1'b1;
            p_hs_ack[p]   = h.ack;
            h.valid       = 1'b0;
          end
        end
      end
      tok_out[s]  = tok;
      data_out[s] = d;
      hs_out[s]   = h;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_q     <= '0;
      tok_ret_q <= 1'b0;
      rx_q      <= '0;
      hold_q    <= '0;
      for (int s = 0; s < int'(SEGS); s++) begin
        data_q[s] <= '0;
        hs_q[s]   <= '0;
      end
    end else begin
      hold_q    <= hold_d;
      tok_ret_q <= tok_out[SEGS-1];
      rx_q      <= data_out[SEGS-1];
      for (int s = 1; s < int'(SEGS); s++) begin
        tok_q[s]  <= tok_out[s-1];
        data_q[s] <= data_out[s-1];
        hs_q[s]   <= hs_out[s-1];
      end
    end
  end

  always_comb begin
    ev_grant = '0;
    for (int p = 1; p < int'(NODES); p++) ev_grant[node_of(p)] = p_grant[p];
  end

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !collision)
    else $error("hs_channel: two flits in one data slot");
  a_hs_delivered: assert property (@(posedge clk) disable iff (!rst_n) !hs_out[SEGS-1].valid)
    else $error("hs_channel: handshake message not detected");
endmodule
