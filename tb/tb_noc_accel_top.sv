// tb_noc_accel_top: end-to-end test of the three side-by-side designs.
//  * Pseudo-circuit mesh (64 nodes): random packets of 1-5 flits between
//    mostly fixed partners; every packet must arrive once, in order, intact.
//  * Early-transition route selection at router (1,1): random destinations
//    and credit states; the transition rule is checked on every decision.
//  * Optical handshake network, 8 nodes, DHS with circulation: random traffic
//    with a slow sink; every flit must be delivered once at its destination.
// Each mechanism is counted and the test fails if one never happened: SA
// grant, pseudo-circuit reuse, bypass, speculative restore, conflict and
// congestion termination, early transition, escape on full normal VCs, token
// grant and re-injection. Drops, NACKs and retransmissions belong to the GHS
// and DHS modes and are covered by the channel and network testbenches.
module tb_noc_accel_top;
  import noc_pkg::*;
  import hs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NN = MESH_X * MESH_Y * CONC;
  localparam int NR = MESH_X * MESH_Y;
  localparam int NP = 10;
  localparam int HN = 8;
  localparam int HF = 30;

  // mesh
  logic [NN-1:0]   m_inj_valid, m_inj_cr_valid, m_ej_valid, m_ej_cr_valid;
  flit_t           m_inj_flit [NN], m_ej_flit [NN];
  logic [VC_W-1:0] m_inj_cr_vc [NN], m_ej_cr_vc [NN];
  logic [NR-1:0]   m_ev_sa_grant, m_ev_pc_reuse, m_ev_bypass, m_ev_spec, m_ev_term_conflict, m_ev_term_congest;
  // early transition
  dest_t             et_dst;
  logic              et_in_escape, et_in_vn, et_valid, et_to_escape, et_out_vn, et_early;
  logic [2:0]        et_credits [NPORT][NVC];
  logic [PORT_W-1:0] et_out_port;
  logic [VC_W-1:0]   et_out_vc;
  // handshake network
  logic [HN-1:0]        h_inj_valid, h_inj_ready, h_ej_valid, h_ej_ready, h_ev_grant, h_ev_retx, h_ev_drop, h_ev_reinject;
  logic [NID_W-1:0]     h_inj_dst [HN];
  logic [HS_DATA_W-1:0] h_inj_data [HN];
  hflit_t               h_ej_flit [HN];

  noc_accel_top #(.HS_N(HN)) dut (.*);

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------- mesh traffic
  int cred [NN][NVC];
  int pkt [NN], idx [NN], plen [NN], pvc [NN];
  int len_of [NN][NP], dst_of [NN][NP];
  int exp_idx [NN][NP], done [NN][NP], n_done;
  int crq [NN][$];
  int n_ev [6];

  function automatic dest_t node_dest(int n);
    int r;
    r = n / CONC;
    return '{x: XW'(r % MESH_X), y: YW'(r / MESH_X), loc: LW'(n % CONC)};
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (m_inj_cr_valid[n]) cred[n][m_inj_cr_vc[n]]++;
      if (m_inj_valid[n]) begin
        idx[n]++;
        if (idx[n] == plen[n]) begin pkt[n]++; idx[n] = 0; end
      end
      if (m_ej_valid[n]) begin
        int s, p, k;
        s = int'(m_ej_flit[n].data[7:0]);
        p = int'(m_ej_flit[n].data[19:8]);
        k = int'(m_ej_flit[n].data[23:20]);
        crq[n].push_back(int'(m_ej_flit[n].vc));
        ck(s < NN && p < NP, "mesh flit tag");
        if (s < NN && p < NP) begin
          ck(dst_of[s][p] == n, "mesh destination");
          ck(k == exp_idx[s][p] && done[s][p] == 0, "mesh flit order");
          ck(m_ej_flit[n].data[127:24] == ({13{s[7:0]}} ^ 104'(p)), "mesh payload");
          exp_idx[s][p] = k + 1;
          if (m_ej_flit[n].tail) begin done[s][p] = 1; n_done++; end
        end
      end
    end
    n_ev[0] += $countones(m_ev_sa_grant);
    n_ev[1] += $countones(m_ev_pc_reuse);
    n_ev[2] += $countones(m_ev_bypass);
    n_ev[3] += $countones(m_ev_spec);
    n_ev[4] += $countones(m_ev_term_conflict);
    n_ev[5] += $countones(m_ev_term_congest);
  end

  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      dest_t here, d;
      here = node_dest(n);
      m_inj_valid[n] = 1'b0;
      m_inj_flit[n]  = '0;
      if (rst_n && pkt[n] < NP) begin
        if (idx[n] == 0) begin
          plen[n] = len_of[n][pkt[n]];
          pvc[n]  = $urandom_range(0, NVC - 1);
        end
        d = node_dest(dst_of[n][pkt[n]]);
        if (cred[n][pvc[n]] > 0 && (idx[n] != 0 || $urandom_range(0, 3) == 0)) begin
          m_inj_valid[n]      = 1'b1;
          cred[n][pvc[n]]--;
          m_inj_flit[n].head  = (idx[n] == 0);
          m_inj_flit[n].tail  = (idx[n] == plen[n] - 1);
          m_inj_flit[n].vc    = VC_W'(pvc[n]);
          m_inj_flit[n].route = xy_route(here.x, here.y, d);
          m_inj_flit[n].dst   = d;
          m_inj_flit[n].data  = {{13{8'(n)}} ^ 104'(pkt[n]), 4'(idx[n]), 12'(pkt[n]), 8'(n)};
        end
      end
      m_ej_cr_valid[n] = 1'b0;
      m_ej_cr_vc[n]    = '0;
      if (crq[n].size() > 0 && $urandom_range(0, 2) != 0) begin
        m_ej_cr_valid[n] = 1'b1;
        m_ej_cr_vc[n]    = VC_W'(crq[n].pop_front());
      end
    end
  end

  // ------------------------------------------------------------- early transition
  int n_et_early = 0, n_et_full = 0, n_et_norm = 0;
  always @(negedge clk) begin
    et_dst       = dest_t'($urandom);
    et_in_escape = ($urandom_range(0, 3) == 0);
    et_in_vn     = $urandom_range(0, 1);
    for (int o = 0; o < int'(NPORT); o++)
      for (int v = 0; v < int'(NVC); v++) et_credits[o][v] = 3'($urandom_range(0, 4));
  end
  always @(posedge clk) if (rst_n && !et_in_escape && !(et_dst.x == 1 && et_dst.y == 1)) begin
    int nb;
    nb = 0;
    for (int v = 0; v < 2; v++) begin
      if (et_dst.x > 1 && int'(et_credits[P_E][v]) > nb) nb = et_credits[P_E][v];
      if (et_dst.x < 1 && int'(et_credits[P_W][v]) > nb) nb = et_credits[P_W][v];
      if (et_dst.y > 1 && int'(et_credits[P_S][v]) > nb) nb = et_credits[P_S][v];
      if (et_dst.y < 1 && int'(et_credits[P_N][v]) > nb) nb = et_credits[P_N][v];
    end
    if (et_to_escape) begin
      ck(et_credits[et_out_port][et_out_vc] > nb && et_out_vc >= 2, "early transition rule");
      if (et_early) n_et_early++; else n_et_full++;
    end else begin
      ck(et_out_vc < 2 && int'(et_credits[et_out_port][et_out_vc]) == nb, "normal VC choice");
      n_et_norm++;
    end
  end

  // ------------------------------------------------------------- handshake network
  int h_sent [HN], h_dst_of [HN][HF], h_got [HN][HF], h_n_got, h_n_grant, h_n_reinj;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < HN; n++) begin
      if (h_inj_valid[n] && h_inj_ready[n]) h_sent[n]++;
      if (h_ej_valid[n] && h_ej_ready[n]) begin
        int s, k;
        s = int'(h_ej_flit[n].src);
        k = int'(h_ej_flit[n].data[15:0]);
        ck(s < HN && k < HF && h_ej_flit[n].data[31:16] == 16'(s), "optical payload");
        if (s < HN && k < HF) begin
          ck(h_dst_of[s][k] == n && h_got[s][k] == 0, "optical delivery once at destination");
          h_got[s][k]++;
        end
        h_n_got++;
      end
    end
    h_n_grant += $countones(h_ev_grant);
    h_n_reinj += $countones(h_ev_reinject);
    ck(h_ev_drop == '0 && h_ev_retx == '0, "no drop with circulation");
  end
  always @(negedge clk) begin
    for (int n = 0; n < HN; n++) begin
      h_inj_valid[n] = rst_n && h_sent[n] < HF && ($urandom_range(0, 1) == 1);
      h_inj_dst[n]   = NID_W'((h_sent[n] < HF) ? h_dst_of[n][h_sent[n]] : 0);
      h_inj_data[n]  = {224'(0), 16'(n), 16'(h_sent[n])};
      h_ej_ready[n]  = ($urandom_range(0, 3) == 0);
    end
  end

  initial begin
    n_done = 0; h_n_got = 0; h_n_grant = 0; h_n_reinj = 0;
    for (int e = 0; e < 6; e++) n_ev[e] = 0;
    for (int n = 0; n < NN; n++) begin
      m_inj_valid[n] = 0; m_inj_flit[n] = '0; m_ej_cr_valid[n] = 0; m_ej_cr_vc[n] = '0;
      pkt[n] = 0; idx[n] = 0; plen[n] = 1; pvc[n] = 0;
      for (int v = 0; v < int'(NVC); v++) cred[n][v] = 4;
      for (int p = 0; p < NP; p++) begin
        len_of[n][p] = $urandom_range(1, 5);
        dst_of[n][p] = ($urandom_range(0, 3) != 0) ? (n * 7 + 13 + 16 * (p % 2)) % NN : $urandom_range(0, NN - 1);
        exp_idx[n][p] = 0; done[n][p] = 0;
      end
    end
    for (int n = 0; n < HN; n++) begin
      h_inj_valid[n] = 0; h_inj_dst[n] = '0; h_inj_data[n] = '0; h_ej_ready[n] = 0; h_sent[n] = 0;
      for (int k = 0; k < HF; k++) begin
        int d;
        d = $urandom_range(0, HN - 2);
        h_dst_of[n][k] = (d >= n) ? d + 1 : d;
        h_got[n][k] = 0;
      end
    end
    et_dst = '0; et_in_escape = 0; et_in_vn = 0;
    for (int o = 0; o < int'(NPORT); o++) for (int v = 0; v < int'(NVC); v++) et_credits[o][v] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_done == NN * NP && h_n_got == HN * HF);
    repeat (50) @(negedge clk);
    for (int n = 0; n < NN; n++) for (int p = 0; p < NP; p++) ck(done[n][p] == 1, "mesh packet delivered");
    for (int n = 0; n < NN; n++) for (int v = 0; v < int'(NVC); v++) ck(cred[n][v] == 4, "mesh credits returned");
    for (int n = 0; n < HN; n++) for (int k = 0; k < HF; k++) ck(h_got[n][k] == 1, "optical flit delivered");
    $display("mesh: packets=%0d sa_grant=%0d pc_reuse=%0d bypass=%0d spec=%0d term_conflict=%0d term_congest=%0d",
             n_done, n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5]);
    $display("early transition: normal=%0d early=%0d escape_on_full=%0d", n_et_norm, n_et_early, n_et_full);
    $display("optical: delivered=%0d grants=%0d reinjections=%0d", h_n_got, h_n_grant, h_n_reinj);
    ck(n_ev[0] > 0, "SA grant happened");
    ck(n_ev[1] > 0, "pseudo-circuit reuse happened");
    ck(n_ev[2] > 0, "buffer bypass happened");
    ck(n_ev[3] > 0, "speculative restore happened");
    ck(n_ev[4] > 0, "conflict termination happened");
    ck(n_ev[5] > 0, "congestion termination happened");
    ck(n_et_early > 0, "early transition happened");
    ck(n_et_full > 0, "escape on full normal VCs happened");
    ck(n_et_norm > 0, "normal adaptive choice happened");
    ck(h_n_grant > 0, "token grant happened");
    ck(h_n_reinj > 0, "re-injection happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("mesh packets=%0d of %0d, optical flits=%0d of %0d", n_done, NN * NP, h_n_got, HN * HF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
