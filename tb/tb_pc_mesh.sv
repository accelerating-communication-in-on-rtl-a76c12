// tb_pc_mesh: the 4x4 concentrated mesh (64 nodes) of pseudo-circuit routers
// under uniform random traffic with packets of 1 to 5 flits. Each node injects
// through a credit-counting network interface model and ejects into a sink
// that returns credits after a random delay, so buffers back up. Every packet
// must arrive once, at its destination, with its flits in order and intact.
// Pseudo-circuit reuse, buffer bypass, speculative restore and both kinds of
// termination are counted over all routers and must all occur.
module tb_pc_mesh;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NN = MESH_X * MESH_Y * CONC;
  localparam int NR = MESH_X * MESH_Y;
  localparam int NP = 24;          // packets per node

  logic [NN-1:0]   inj_valid, inj_cr_valid, ej_valid, ej_cr_valid;
  flit_t           inj_flit [NN], ej_flit [NN];
  logic [VC_W-1:0] inj_cr_vc [NN], ej_cr_vc [NN];
  logic [NR-1:0]   ev_sa_grant, ev_pc_reuse, ev_bypass, ev_spec, ev_term_conflict, ev_term_congest;

  pc_mesh dut (.*);

  // injector state
  int cred [NN][NVC];
  int pkt [NN], idx [NN], plen [NN], pvc [NN];
  int len_of [NN][NP], dst_of [NN][NP];
  // sink state
  int exp_idx [NN][NP], done [NN][NP], n_done;
  int crq [NN][$];
  int n_ev [6];

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic dest_t node_dest(int n);
    int r;
    r = n / CONC;
    return '{x: XW'(r % MESH_X), y: YW'(r / MESH_X), loc: LW'(n % CONC)};
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (inj_cr_valid[n]) cred[n][inj_cr_vc[n]]++;
      if (inj_valid[n]) begin
        idx[n]++;
        if (idx[n] == plen[n]) begin pkt[n]++; idx[n] = 0; end
      end
      if (ej_valid[n]) begin
        int s, p, k;
        s = int'(ej_flit[n].data[7:0]);
        p = int'(ej_flit[n].data[19:8]);
        k = int'(ej_flit[n].data[23:20]);
        crq[n].push_back(int'(ej_flit[n].vc));
        ck(s < NN && p < NP, "flit tag");
        if (s < NN && p < NP) begin
          ck(dst_of[s][p] == n, "delivered at its destination");
          ck(k == exp_idx[s][p] && done[s][p] == 0, "flit order");
          ck(ej_flit[n].head == (k == 0) && ej_flit[n].tail == (k == len_of[s][p] - 1), "head/tail");
          ck(ej_flit[n].data[127:24] == ({13{s[7:0]}} ^ 104'(p)), "payload");
          exp_idx[s][p] = k + 1;
          if (ej_flit[n].tail) begin done[s][p] = 1; n_done++; end
        end
      end
    end
    n_ev[0] += $countones(ev_sa_grant);
    n_ev[1] += $countones(ev_pc_reuse);
    n_ev[2] += $countones(ev_bypass);
    n_ev[3] += $countones(ev_spec);
    n_ev[4] += $countones(ev_term_conflict);
    n_ev[5] += $countones(ev_term_congest);
  end

  // drive injection and credit return for the next cycle
  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      dest_t here, d;
      here = node_dest(n);
      inj_valid[n] = 1'b0;
      inj_flit[n]  = '0;
      if (rst_n && pkt[n] < NP) begin
        if (idx[n] == 0) begin
          plen[n] = len_of[n][pkt[n]];
          pvc[n]  = $urandom_range(0, NVC - 1);
        end
        d = node_dest(dst_of[n][pkt[n]]);
        if (cred[n][pvc[n]] > 0 && (idx[n] != 0 || $urandom_range(0, 3) == 0)) begin
          inj_valid[n]       = 1'b1;
          cred[n][pvc[n]]--;
          inj_flit[n].head   = (idx[n] == 0);
          inj_flit[n].tail   = (idx[n] == plen[n] - 1);
          inj_flit[n].vc     = VC_W'(pvc[n]);
          inj_flit[n].route  = xy_route(here.x, here.y, d);
          inj_flit[n].dst    = d;
          inj_flit[n].data   = {{13{8'(n)}} ^ 104'(pkt[n]), 4'(idx[n]), 12'(pkt[n]), 8'(n)};
        end
      end
      ej_cr_valid[n] = 1'b0;
      ej_cr_vc[n]    = '0;
      if (crq[n].size() > 0 && $urandom_range(0, 2) != 0) begin
        ej_cr_valid[n] = 1'b1;
        ej_cr_vc[n]    = VC_W'(crq[n].pop_front());
      end
    end
  end

  initial begin
    n_done = 0;
    for (int e = 0; e < 6; e++) n_ev[e] = 0;
    for (int n = 0; n < NN; n++) begin
      inj_valid[n] = 0; inj_flit[n] = '0; ej_cr_valid[n] = 0; ej_cr_vc[n] = '0;
      pkt[n] = 0; idx[n] = 0; plen[n] = 1; pvc[n] = 0;
      for (int v = 0; v < int'(NVC); v++) cred[n][v] = 4;
      for (int p = 0; p < NP; p++) begin
        len_of[n][p] = $urandom_range(1, 5);
        // mostly a few fixed partners per node, so flows repeat and circuits form
        dst_of[n][p] = ($urandom_range(0, 3) != 0) ? (n * 7 + 13 + 16 * (p % 2)) % NN : $urandom_range(0, NN - 1);
        exp_idx[n][p] = 0; done[n][p] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_done == NN * NP);
    repeat (50) @(negedge clk);
    for (int n = 0; n < NN; n++) for (int p = 0; p < NP; p++) ck(done[n][p] == 1, "packet delivered");
    for (int n = 0; n < NN; n++) for (int v = 0; v < int'(NVC); v++) ck(cred[n][v] == 4, "injection credits returned");
    $display("packets=%0d sa_grant=%0d pc_reuse=%0d bypass=%0d spec=%0d term_conflict=%0d term_congest=%0d",
             n_done, n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5]);
    for (int e = 1; e < 6; e++) ck(n_ev[e] > 0, "pseudo-circuit mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("packets=%0d of %0d", n_done, NN * NP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
