// tb_hs_channel: three 8-node data channels (GHS, DHS with setaside, DHS with
// circulation), each loaded by all seven senders with numbered flits while the
// home node drains slowly at random, so the home buffer overflows. Every flit
// must reach the home exactly once with its payload intact, in any order.
// Tokens grabbed, drops (NACKs), retransmissions and re-injections are counted
// and must all occur in the modes that have them.
module tb_hs_channel;
  import hs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N  = 8;
  localparam int NF = 40;      // flits per sender

  logic [N-1:0] enq_valid [3], enq_ready [3], ev_grant [3], ev_retx [3];
  hflit_t       enq_flit  [3][N];
  logic         ej_valid [3], ej_ready [3], ev_drop [3], ev_reinject [3];
  hflit_t       ej_flit [3];
  int           sent [3][N], got [3][N][NF];
  int           n_got [3], n_grant [3], n_retx [3], n_drop [3], n_reinj [3];

  hs_channel #(.NODES(N), .MODE(HS_GHS), .SETASIDE(2)) u_g (.clk, .rst_n,
    .enq_valid(enq_valid[0]), .enq_flit(enq_flit[0]), .enq_ready(enq_ready[0]), .ej_valid(ej_valid[0]), .ej_flit(ej_flit[0]),
    .ej_ready(ej_ready[0]), .ev_grant(ev_grant[0]), .ev_retx(ev_retx[0]), .ev_drop(ev_drop[0]), .ev_reinject(ev_reinject[0]));
  hs_channel #(.NODES(N), .MODE(HS_DHS), .SETASIDE(2)) u_d (.clk, .rst_n,
    .enq_valid(enq_valid[1]), .enq_flit(enq_flit[1]), .enq_ready(enq_ready[1]), .ej_valid(ej_valid[1]), .ej_flit(ej_flit[1]),
    .ej_ready(ej_ready[1]), .ev_grant(ev_grant[1]), .ev_retx(ev_retx[1]), .ev_drop(ev_drop[1]), .ev_reinject(ev_reinject[1]));
  hs_channel #(.NODES(N), .MODE(HS_DHS_CIRC))          u_c (.clk, .rst_n,
    .enq_valid(enq_valid[2]), .enq_flit(enq_flit[2]), .enq_ready(enq_ready[2]), .ej_valid(ej_valid[2]), .ej_flit(ej_flit[2]),
    .ej_ready(ej_ready[2]), .ev_grant(ev_grant[2]), .ev_retx(ev_retx[2]), .ev_drop(ev_drop[2]), .ev_reinject(ev_reinject[2]));

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < 3; m++) begin
      for (int n = 1; n < N; n++) if (enq_valid[m][n] && enq_ready[m][n]) sent[m][n]++;
      n_grant[m] += $countones(ev_grant[m]);
      n_retx[m]  += $countones(ev_retx[m]);
      if (ev_drop[m]) n_drop[m]++;
      if (ev_reinject[m]) n_reinj[m]++;
      if (ej_valid[m] && ej_ready[m]) begin
        int s, k;
        s = int'(ej_flit[m].src);
        k = int'(ej_flit[m].data[15:0]);
        ck(s >= 1 && s < N && k < NF && ej_flit[m].data[255:16] == {15{s[15:0]}}, "payload intact");
        if (s >= 1 && s < N && k < NF) begin
          ck(got[m][s][k] == 0, "delivered once");
          got[m][s][k]++;
        end
        n_got[m]++;
      end
    end
  end

  always @(negedge clk) begin
    for (int m = 0; m < 3; m++) begin
      ej_ready[m] = ($urandom_range(0, 3) == 0);
      for (int n = 0; n < N; n++) begin
        enq_valid[m][n] = rst_n && n != 0 && sent[m][n] < NF && ($urandom_range(0, 1) == 1);
        enq_flit[m][n]  = '{src: NID_W'(n), data: {{15{16'(n)}}, 16'(sent[m][n])}};
      end
    end
  end

  initial begin
    for (int m = 0; m < 3; m++) begin
      enq_valid[m] = '0; ej_ready[m] = 0;
      n_got[m] = 0; n_grant[m] = 0; n_retx[m] = 0; n_drop[m] = 0; n_reinj[m] = 0;
      for (int n = 0; n < N; n++) begin
        enq_flit[m][n] = '0; sent[m][n] = 0;
        for (int k = 0; k < NF; k++) got[m][n][k] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_got[0] == (N - 1) * NF && n_got[1] == (N - 1) * NF && n_got[2] == (N - 1) * NF);
    repeat (40) @(negedge clk);
    for (int m = 0; m < 3; m++) begin
      $display("channel %0d: delivered=%0d grants=%0d drops=%0d retx=%0d reinjections=%0d",
               m, n_got[m], n_grant[m], n_drop[m], n_retx[m], n_reinj[m]);
      for (int n = 1; n < N; n++) for (int k = 0; k < NF; k++) ck(got[m][n][k] == 1, "every flit delivered");
      ck(n_got[m] == (N - 1) * NF, "no extra flit");
    end
    ck(n_drop[0] > 0 && n_drop[1] > 0, "drops (NACK) in GHS and DHS");
    ck(n_retx[0] == n_drop[0] && n_retx[1] == n_drop[1], "one retransmission per drop");
    ck(n_grant[0] == (N - 1) * NF + n_retx[0], "GHS grants = sends");
    ck(n_reinj[2] > 0 && n_drop[2] == 0 && n_retx[2] == 0, "circulation re-injects, never drops");
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
