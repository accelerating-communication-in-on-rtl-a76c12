// tb_hs_network: an 8-node optical crossbar (one MWSR channel per destination)
// in two instances, DHS with circulation and GHS with setaside. Every node
// sends numbered flits to random other destinations; each flit must be ejected
// exactly once, at the node it was sent to, with its source and payload.
// Event outputs are per node (ORed over channels), so they are counted as
// cycles with at least one event.
module tb_hs_network;
  import hs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N  = 8;
  localparam int NF = 30;

  logic [N-1:0]         inj_valid, inj_ready [2], ej_valid [2], ej_ready, ev_grant [2], ev_retx [2], ev_drop [2], ev_reinject [2];
  logic [NID_W-1:0]     inj_dst  [N];
  logic [HS_DATA_W-1:0] inj_data [N];
  hflit_t               ej_flit  [2][N];
  int                   sent [2][N], dst_of [N][NF], got [2][N][NF], n_got [2], n_ev [2][4];
  logic [N-1:0]         vld [2];

  hs_network #(.NODES(N), .MODE(HS_DHS_CIRC)) u_c (.clk, .rst_n, .inj_valid(vld[0]), .inj_dst, .inj_data, .inj_ready(inj_ready[0]),
    .ej_valid(ej_valid[0]), .ej_flit(ej_flit[0]), .ej_ready, .ev_grant(ev_grant[0]), .ev_retx(ev_retx[0]), .ev_drop(ev_drop[0]), .ev_reinject(ev_reinject[0]));
  hs_network #(.NODES(N), .MODE(HS_GHS), .SETASIDE(2)) u_g (.clk, .rst_n, .inj_valid(vld[1]), .inj_dst, .inj_data, .inj_ready(inj_ready[1]),
    .ej_valid(ej_valid[1]), .ej_flit(ej_flit[1]), .ej_ready, .ev_grant(ev_grant[1]), .ev_retx(ev_retx[1]), .ev_drop(ev_drop[1]), .ev_reinject(ev_reinject[1]));

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // both instances see the same request stream; each keeps its own progress
  always_comb for (int m = 0; m < 2; m++) for (int n = 0; n < N; n++)
    vld[m][n] = inj_valid[n] && sent[m][n] < NF && inj_data[n][15:0] == 16'(sent[m][n]);

  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < 2; m++) begin
      for (int n = 0; n < N; n++) begin
        if (vld[m][n] && inj_ready[m][n]) sent[m][n]++;
        if (ej_valid[m][n] && ej_ready[n]) begin
          int s, k;
          s = int'(ej_flit[m][n].src);
          k = int'(ej_flit[m][n].data[15:0]);
          ck(s < N && k < NF && ej_flit[m][n].data[31:16] == 16'(s), "payload");
          if (s < N && k < NF) begin
            ck(dst_of[s][k] == n, "delivered at its destination");
            ck(got[m][s][k] == 0, "delivered once");
            got[m][s][k]++;
          end
          n_got[m]++;
        end
      end
      n_ev[m][0] += $countones(ev_grant[m]);
      n_ev[m][1] += $countones(ev_retx[m]);
      n_ev[m][2] += $countones(ev_drop[m]);
      n_ev[m][3] += $countones(ev_reinject[m]);
    end
  end

  // each node offers the flit that the slower instance still has to send
  always @(negedge clk) begin
    for (int n = 0; n < N; n++) begin
      int k;
      k = (sent[0][n] < sent[1][n]) ? sent[0][n] : sent[1][n];
      inj_valid[n] = rst_n && k < NF && ($urandom_range(0, 1) == 1);
      inj_dst[n]   = NID_W'((k < NF) ? dst_of[n][k] : 0);
      inj_data[n]  = {224'(0), 16'(n), 16'(k)};
      ej_ready[n]  = ($urandom_range(0, 2) == 0);
    end
  end

  initial begin
    for (int n = 0; n < N; n++) begin
      inj_valid[n] = 0; inj_dst[n] = '0; inj_data[n] = '0; ej_ready[n] = 0;
      for (int k = 0; k < NF; k++) begin
        int d;
        d = $urandom_range(0, N - 2);
        dst_of[n][k] = (d >= n) ? d + 1 : d;
      end
      for (int m = 0; m < 2; m++) begin
        sent[m][n] = 0;
        for (int k = 0; k < NF; k++) got[m][n][k] = 0;
      end
    end
    for (int m = 0; m < 2; m++) begin n_got[m] = 0; for (int e = 0; e < 4; e++) n_ev[m][e] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_got[0] == N * NF && n_got[1] == N * NF);
    repeat (40) @(negedge clk);
    for (int m = 0; m < 2; m++) begin
      $display("network %0d: delivered=%0d grants=%0d retx=%0d drops=%0d reinjections=%0d",
               m, n_got[m], n_ev[m][0], n_ev[m][1], n_ev[m][2], n_ev[m][3]);
      for (int n = 0; n < N; n++) for (int k = 0; k < NF; k++) ck(got[m][n][k] == 1, "every flit delivered");
      ck(n_got[m] == N * NF, "no extra flit");
    end
    ck(n_ev[0][3] > 0 && n_ev[0][2] == 0, "circulation used");
    ck(n_ev[1][2] > 0 && n_ev[1][1] > 0, "GHS drops retransmitted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
