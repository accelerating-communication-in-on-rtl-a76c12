// pc_router: virtual-channel router with pseudo-circuits, pseudo-circuit
// speculation and buffer bypassing.
//
// Baseline pipeline (per hop, the link adds one more cycle outside):
//   cycle 0  BW      the arriving flit is written into its input VC buffer
//   cycle 1  VA+SA   header flits get an output VC (vc_alloc) and, in the same
//                    cycle, every flit with an output VC and a credit competes
//                    in the separable switch arbiter (sw_alloc)
//   cycle 2  ST      the winner crosses the crossbar into the output register
//   => the flit is on the output link at cycle 3.
// Pseudo-circuit (PC): each input port keeps the last connection the switch
// arbiter granted it (pc_unit). A flit at the head of that VC that routes to the
// same output port skips SA and crosses the crossbar in cycle 1 (PC+ST), so it
// is on the output link at cycle 2. Buffer bypassing lets a matching flit that
// finds its VC buffer empty cross in its arrival cycle (cycle 0), on the link
// at cycle 1; it is then never written into the buffer.
//
// A pseudo-circuit is used only when no flit in SA asks for its input port or
// its output port and the output port is not busy with a flit granted in the
// previous cycle; SA therefore always wins and nothing starves. Termination
// (valid flag cleared, registers kept):
//   conflict   - SA grants the output port to another input, or grants this
//                input port another connection;
//   mismatch   - a flit on the circuit's VC routes to another output port;
//   congestion - the output VC the circuit feeds has no credit (the VC of the
//                packet on it, or else the output VC it fed last).
// Speculation: every output port remembers the input port of its most
// recently terminated pseudo-circuit; if that input port's last connection
// points to this output, the output is free and it has a credit, the circuit is
// restored (also after congestion, once that output VC has a credit again).
// Routing is lookahead XY: incoming flits carry their output port and
// the router writes the next router's port into leaving flits. Flow control is
// credit based per VC, one credit returned upstream (registered, one cycle
// later) for every flit leaving an input VC or bypassing it.
//
// Following the document: the two-stage pipeline, lookahead routing, credit
// flow control, the pseudo-circuit register/flag/comparator per input port, the
// termination rules, the per-output history register for speculation, bypass
// only when the VC buffer is empty. This design's own choices: SA in the same
// cycle as VA instead of speculative SA, round-robin arbiters, the static VC
// function, the mismatch rule for buffered flits, and the event outputs
// (one pulse per input port and cycle) kept for measurement.
module pc_router
  import noc_pkg::*;
#(
  parameter logic [XW-1:0] X         = '0,
  parameter logic [YW-1:0] Y         = '0,
  parameter int unsigned   BUF_DEPTH = 4,
  parameter bit            STATIC_VA = 1'b1,
  parameter bit            EN_PC     = 1'b1,
  parameter bit            EN_SPEC   = 1'b1,
  parameter bit            EN_BYPASS = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // input links
  input  logic [NPORT-1:0]  in_valid,
  input  flit_t             in_flit      [NPORT],
  output logic [NPORT-1:0]  cr_out_valid,             // credit to upstream
  output logic [VC_W-1:0]   cr_out_vc    [NPORT],
  // output links
  output logic [NPORT-1:0]  out_valid,
  output flit_t             out_flit     [NPORT],
  input  logic [NPORT-1:0]  cr_in_valid,              // credit from downstream
  input  logic [VC_W-1:0]   cr_in_vc     [NPORT],
  // events, one bit per input port
  output logic [NPORT-1:0]  ev_sa_grant,
  output logic [NPORT-1:0]  ev_pc_reuse,
  output logic [NPORT-1:0]  ev_bypass,
  output logic [NPORT-1:0]  ev_spec,
  output logic [NPORT-1:0]  ev_term_conflict,
  output logic [NPORT-1:0]  ev_term_congest
);
  localparam int unsigned CW   = $clog2(BUF_DEPTH + 1);
  localparam int unsigned NREQ = NPORT * NVC;

  // ---------------------------------------------------------------- state
  logic [NVC-1:0]    vs_active_q [NPORT];
  logic [PORT_W-1:0] vs_out_q    [NPORT][NVC];
  logic [VC_W-1:0]   vs_ovc_q    [NPORT][NVC];
  logic [NVC-1:0]    ovc_busy_q  [NPORT];
  logic [CW-1:0]     cred_q      [NPORT][NVC];
  logic [PORT_W-1:0] hist_q      [NPORT];
  logic [NPORT-1:0]  hist_valid_q;
  logic [NPORT-1:0]  st_valid_q;
  flit_t             st_flit_q   [NPORT];
  logic [PORT_W-1:0] st_out_q    [NPORT];
  logic [NPORT-1:0]  out_valid_q;
  flit_t             out_flit_q  [NPORT];
  logic [NPORT-1:0]  cr_valid_q;
  logic [VC_W-1:0]   pc_ovc_q    [NPORT];   // output VC last fed through the circuit
  logic [VC_W-1:0]   cr_vc_q     [NPORT];

  // ---------------------------------------------------------------- buffers
  flit_t          buf_head  [NPORT][NVC];
  logic [NVC-1:0] buf_empty [NPORT];
  logic [NVC-1:0] buf_wr    [NPORT];
  logic [NVC-1:0] buf_rd    [NPORT];

  for (genvar i = 0; i < NPORT; i++) begin : g_ip
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      vc_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
        .clk, .rst_n,
        .wr_en  (buf_wr[i][v]),
        .wr_flit(in_flit[i]),
        .rd_en  (buf_rd[i][v]),
        .head   (buf_head[i][v]),
        .empty  (buf_empty[i][v]),
        .full   (),
        .count  ()
      );
    end
  end

  // ---------------------------------------------------------------- pseudo-circuit units
  logic [NPORT-1:0]  pc_valid, pc_known, pc_match, pc_mismatch;
  logic [VC_W-1:0]   pc_vc     [NPORT];
  logic [PORT_W-1:0] pc_out    [NPORT];
  logic [NPORT-1:0]  cand_buf, cand_byp, cand_valid;
  flit_t             cand_flit [NPORT];
  logic [PORT_W-1:0] cand_route[NPORT];
  logic [NPORT-1:0]  pc_create, pc_term, pc_restore;

  always_comb begin
    for (int i = 0; i < int'(NPORT); i++) begin
      cand_buf[i]   = EN_PC && !buf_empty[i][pc_vc[i]];
      cand_byp[i]   = EN_PC && EN_BYPASS && buf_empty[i][pc_vc[i]] && in_valid[i]
                      && (in_flit[i].vc == pc_vc[i]);
      cand_valid[i] = cand_buf[i] || cand_byp[i];
      cand_flit[i]  = cand_buf[i] ? buf_head[i][pc_vc[i]] : in_flit[i];
      cand_route[i] = cand_flit[i].head ? cand_flit[i].route : vs_out_q[i][pc_vc[i]];
    end
  end

  logic [VC_W-1:0]   create_vc  [NPORT];
  logic [PORT_W-1:0] create_out [NPORT];

  for (genvar i = 0; i < NPORT; i++) begin : g_pc
    pc_unit u_pc (
      .clk, .rst_n,
      .cand_valid(cand_valid[i]),
      .cand_vc   (cand_flit[i].vc),
      .cand_route(cand_route[i]),
      .create    (pc_create[i]),
      .create_vc (create_vc[i]),
      .create_out(create_out[i]),
      .terminate (pc_term[i]),
      .restore   (pc_restore[i]),
      .pc_valid  (pc_valid[i]),
      .pc_vc     (pc_vc[i]),
      .pc_out    (pc_out[i]),
      .pc_known  (pc_known[i]),
      .match     (pc_match[i]),
      .mismatch  (pc_mismatch[i])
    );
  end

  // ---------------------------------------------------------------- VC allocation
  logic [NREQ-1:0]   va_req, va_gnt;
  logic [PORT_W-1:0] va_port [NREQ];
  dest_t             va_dst  [NREQ];
  logic [VC_W-1:0]   va_vc   [NREQ];

  always_comb begin
    for (int i = 0; i < int'(NPORT); i++) begin
      for (int v = 0; v < int'(NVC); v++) begin
        int unsigned r;
        r = i * NVC + v;
        va_req[r]  = 1'b0;
        va_port[r] = buf_head[i][v].route;
        va_dst[r]  = buf_head[i][v].dst;
        if (!vs_active_q[i][v]) begin
          if (!buf_empty[i][v] && buf_head[i][v].head) begin
            va_req[r] = 1'b1;
          end else if (cand_byp[i] && (int'(pc_vc[i]) == v) && in_flit[i].head && pc_match[i]) begin
            va_req[r]  = 1'b1;               // header that may bypass the buffer
            va_port[r] = in_flit[i].route;
            va_dst[r]  = in_flit[i].dst;
          end
        end
      end
    end
  end

  vc_alloc #(.STATIC_VA(STATIC_VA), .CW(CW)) u_va (
    .clk, .rst_n,
    .req     (va_req),
    .req_port(va_port),
    .req_dst (va_dst),
    .ovc_busy(ovc_busy_q),
    .credits (cred_q),
    .gnt     (va_gnt),
    .gnt_vc  (va_vc)
  );

  // effective VC state in this cycle (registered state or fresh VA grant)
  logic [NVC-1:0]    act     [NPORT];
  logic [PORT_W-1:0] out_eff [NPORT][NVC];
  logic [VC_W-1:0]   ovc_eff [NPORT][NVC];
  logic [NVC-1:0]    has_cr  [NPORT];

  always_comb begin
    for (int i = 0; i < int'(NPORT); i++) begin
      for (int v = 0; v < int'(NVC); v++) begin
        act[i][v]     = vs_active_q[i][v] || va_gnt[i*NVC+v];
        out_eff[i][v] = vs_active_q[i][v] ? vs_out_q[i][v] : va_port[i*NVC+v];
        ovc_eff[i][v] = vs_active_q[i][v] ? vs_ovc_q[i][v] : va_vc[i*NVC+v];
        has_cr[i][v]  = (cred_q[out_eff[i][v]][ovc_eff[i][v]] != '0);
      end
    end
  end

  // ---------------------------------------------------------------- switch allocation
  logic [NVC-1:0]    sa_req     [NPORT];
  logic [PORT_W-1:0] sa_port    [NPORT][NVC];
  logic [NPORT-1:0]  sa_gnt_in, sa_out_used;
  logic [VC_W-1:0]   sa_gnt_vc  [NPORT];
  logic [PORT_W-1:0] sa_gnt_out [NPORT];

  always_comb begin
    for (int i = 0; i < int'(NPORT); i++) begin
      for (int v = 0; v < int'(NVC); v++) begin
        sa_port[i][v] = out_eff[i][v];
        sa_req[i][v]  = !buf_empty[i][v] && act[i][v] && has_cr[i][v]
                        && !((int'(pc_vc[i]) == v) && pc_match[i] && cand_buf[i]);
      end
    end
  end

  sw_alloc u_sa (
    .clk, .rst_n,
    .req     (sa_req),
    .req_port(sa_port),
    .gnt_in  (sa_gnt_in),
    .gnt_vc  (sa_gnt_vc),
    .gnt_out (sa_gnt_out),
    .out_used(sa_out_used)
  );

  // ---------------------------------------------------------------- pseudo-circuit traversal
  logic [NPORT-1:0] req_to_out [NPORT];   // per output: inputs with an SA request for it
  logic [NPORT-1:0] st_out_busy;
  logic [NPORT-1:0] pc_go;
  logic [NPORT-1:0] out_has_pc;

  always_comb begin
    for (int o = 0; o < int'(NPORT); o++) begin
      req_to_out[o]  = '0;
      st_out_busy[o] = 1'b0;
      out_has_pc[o]  = 1'b0;
    end
    for (int i = 0; i < int'(NPORT); i++) begin
      for (int v = 0; v < int'(NVC); v++)
        if (sa_req[i][v]) req_to_out[sa_port[i][v]][i] = 1'b1;
      if (st_valid_q[i]) st_out_busy[st_out_q[i]] = 1'b1;
      if (pc_valid[i])   out_has_pc[pc_out[i]]   = 1'b1;
    end
    for (int i = 0; i < int'(NPORT); i++) begin
      logic [NPORT-1:0] others;
      others   = req_to_out[pc_out[i]];
      others[i] = 1'b0;
      pc_go[i] = pc_match[i] && act[i][pc_vc[i]] && has_cr[i][pc_vc[i]]
                 && (out_eff[i][pc_vc[i]] == pc_out[i])
                 && !st_valid_q[i] && !st_out_busy[pc_out[i]]
                 && (others == '0) && (sa_req[i] == '0);
    end
  end

  // ---------------------------------------------------------------- crossbar
  flit_t             xin      [NPORT];
  logic [PORT_W-1:0] xsel     [NPORT];
  logic [NPORT-1:0]  xsel_v;
  flit_t             xout     [NPORT];
  logic [NPORT-1:0]  xout_v;

  always_comb begin
    for (int o = 0; o < int'(NPORT); o++) begin
      xsel[o]   = '0;
      xsel_v[o] = 1'b0;
    end
    for (int i = 0; i < int'(NPORT); i++) begin
      if (st_valid_q[i]) begin
        xin[i] = st_flit_q[i];
        xsel[st_out_q[i]]   = PORT_W'(i);
        xsel_v[st_out_q[i]] = 1'b1;
      end else begin
        xin[i]    = cand_flit[i];
        xin[i].vc = ovc_eff[i][pc_vc[i]];
        if (pc_go[i]) begin
          xsel[pc_out[i]]   = PORT_W'(i);
          xsel_v[pc_out[i]] = 1'b1;
        end
      end
    end
  end

  crossbar u_xbar (
    .in_flit  (xin),
    .sel      (xsel),
    .sel_valid(xsel_v),
    .out_flit (xout),
    .out_valid(xout_v)
  );

  // ---------------------------------------------------------------- buffer control, PC control
  always_comb begin
    for (int i = 0; i < int'(NPORT); i++) begin
      for (int v = 0; v < int'(NVC); v++) begin
        buf_rd[i][v] = (sa_gnt_in[i] && (int'(sa_gnt_vc[i]) == v))
                       || (pc_go[i] && cand_buf[i] && (int'(pc_vc[i]) == v));
        buf_wr[i][v] = in_valid[i] && (int'(in_flit[i].vc) == v)
                       && !(pc_go[i] && cand_byp[i]);
      end
    end
  end

  logic [NPORT-1:0] t_conflict, t_congest;

  always_comb begin
    for (int i = 0; i < int'(NPORT); i++) begin
      logic [VC_W-1:0] pv;
      pv            = pc_vc[i];
      pc_create[i]  = EN_PC && sa_gnt_in[i];
      create_vc[i]  = sa_gnt_vc[i];
      create_out[i] = sa_gnt_out[i];
      t_conflict[i] = pc_valid[i] &&
                      ((!sa_gnt_in[i] && sa_out_used[pc_out[i]]) ||
                       (sa_gnt_in[i] && (sa_gnt_out[i] != pc_out[i] || sa_gnt_vc[i] != pv)));
      if (act[i][pv] && out_eff[i][pv] == pc_out[i])
        t_congest[i] = pc_valid[i] && (cred_q[pc_out[i]][ovc_eff[i][pv]] == '0);
      else
        t_congest[i] = pc_valid[i] && (cred_q[pc_out[i]][pc_ovc_q[i]] == '0);
      pc_term[i]    = t_conflict[i] || pc_mismatch[i] || t_congest[i];
      pc_restore[i] = EN_SPEC && !pc_valid[i] && pc_known[i]
                      && hist_valid_q[pc_out[i]] && (int'(hist_q[pc_out[i]]) == i)
                      && !out_has_pc[pc_out[i]] && !sa_out_used[pc_out[i]]
                      && (cred_q[pc_out[i]][pc_ovc_q[i]] != '0);
    end
  end

  // ---------------------------------------------------------------- sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NPORT); i++) begin
        vs_active_q[i]  <= '0;
        ovc_busy_q[i]   <= '0;
        hist_q[i]       <= '0;
        st_flit_q[i]    <= '0;
        st_out_q[i]     <= '0;
        out_flit_q[i]   <= '0;
        cr_vc_q[i]      <= '0;
        pc_ovc_q[i]     <= '0;
        for (int v = 0; v < int'(NVC); v++) begin
          vs_out_q[i][v] <= '0;
          vs_ovc_q[i][v] <= '0;
          cred_q[i][v]   <= CW'(BUF_DEPTH);
        end
      end
      hist_valid_q <= '0;
      st_valid_q   <= '0;
      out_valid_q  <= '0;
      cr_valid_q   <= '0;
    end else begin
      // VA grants
      for (int i = 0; i < int'(NPORT); i++)
        for (int v = 0; v < int'(NVC); v++)
          if (va_gnt[i*NVC+v]) begin
            vs_active_q[i][v] <= 1'b1;
            vs_out_q[i][v]    <= va_port[i*NVC+v];
            vs_ovc_q[i][v]    <= va_vc[i*NVC+v];
            ovc_busy_q[va_port[i*NVC+v]][va_vc[i*NVC+v]] <= 1'b1;
          end
      // credits from downstream
      for (int o = 0; o < int'(NPORT); o++) begin
        for (int v = 0; v < int'(NVC); v++) begin
          logic [CW-1:0] c;
          c = cred_q[o][v];
          if (cr_in_valid[o] && int'(cr_in_vc[o]) == v) c = c + 1'b1;
          for (int i = 0; i < int'(NPORT); i++) begin
            if (sa_gnt_in[i] && int'(sa_gnt_out[i]) == o && int'(ovc_eff[i][sa_gnt_vc[i]]) == v)
              c = c - 1'b1;
            if (pc_go[i] && int'(pc_out[i]) == o && int'(ovc_eff[i][pc_vc[i]]) == v)
              c = c - 1'b1;
          end
          cred_q[o][v] <= c;
        end
      end
      // flits leaving an input VC: switch grant or pseudo-circuit traversal
      for (int i = 0; i < int'(NPORT); i++) begin
        st_valid_q[i] <= sa_gnt_in[i];
        cr_valid_q[i] <= 1'b0;
        if (sa_gnt_in[i]) begin
          st_flit_q[i]    <= buf_head[i][sa_gnt_vc[i]];
          st_flit_q[i].vc <= ovc_eff[i][sa_gnt_vc[i]];
          st_out_q[i]     <= sa_gnt_out[i];
          cr_valid_q[i]   <= 1'b1;
          cr_vc_q[i]      <= sa_gnt_vc[i];
          pc_ovc_q[i]     <= ovc_eff[i][sa_gnt_vc[i]];
          if (buf_head[i][sa_gnt_vc[i]].tail) begin
            vs_active_q[i][sa_gnt_vc[i]] <= 1'b0;
            ovc_busy_q[sa_gnt_out[i]][ovc_eff[i][sa_gnt_vc[i]]] <= 1'b0;
          end
        end
        if (pc_go[i]) begin
          cr_valid_q[i] <= 1'b1;
          cr_vc_q[i]    <= pc_vc[i];
          pc_ovc_q[i]   <= ovc_eff[i][pc_vc[i]];
          if (cand_flit[i].tail) begin
            vs_active_q[i][pc_vc[i]] <= 1'b0;
            ovc_busy_q[pc_out[i]][ovc_eff[i][pc_vc[i]]] <= 1'b0;
          end
        end
      end
      // history of terminated pseudo-circuits, per output port
      for (int i = 0; i < int'(NPORT); i++) begin
        if (pc_valid[i] && (pc_term[i] || (pc_create[i] && sa_gnt_out[i] != pc_out[i]))) begin
          hist_q[pc_out[i]]       <= PORT_W'(i);
          hist_valid_q[pc_out[i]] <= 1'b1;
        end
      end
      // output registers (link traversal starts next cycle)
      for (int o = 0; o < int'(NPORT); o++) begin
        out_valid_q[o] <= xout_v[o];
        out_flit_q[o]  <= xout[o];
        if (o < 4) out_flit_q[o].route <= lookahead_route(X, Y, PORT_W'(o), xout[o].dst);
        else       out_flit_q[o].route <= '0;
      end
    end
  end

  assign out_valid    = out_valid_q;
  assign out_flit     = out_flit_q;
  assign cr_out_valid = cr_valid_q;
  assign cr_out_vc    = cr_vc_q;

  assign ev_sa_grant      = sa_gnt_in;
  assign ev_pc_reuse      = pc_go & cand_buf;
  assign ev_bypass        = pc_go & cand_byp;
  assign ev_spec          = pc_restore & ~pc_create & ~pc_term;
  assign ev_term_conflict = t_conflict;
  assign ev_term_congest  = t_congest & ~t_conflict;

  a_one_pc_per_output: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(xsel_v & xout_v) == $countones(xout_v));
endmodule
