// tb_hs_home: the three home-node variants (GHS, DHS, DHS with circulation)
// receive the same random flit stream while the router side drains at random.
// A queue model per instance checks stored/ejected flits in order, the ACK/NACK
// bit and its addressee one cycle after arrival, the drop or re-injection of a
// flit that finds the buffer full, and the token emission rule of each mode.
module tb_hs_home;
  import hs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             rx_valid;
  hflit_t           rx_flit;
  logic             ej_valid [3], ej_ready [3], tok_gen [3], reinj_valid [3], hs_valid [3], hs_ack [3], ev_drop [3], ev_reinject [3];
  hflit_t           ej_flit [3], reinj_flit [3];
  logic [NID_W-1:0] hs_dst [3];
  hflit_t           q [3][$];
  int               n_drop [3], n_reinj [3], n_ack [3], n_nack [3], n_ej [3], n_tok [3];
  // expectations for the cycle after an arrival
  bit               exp_valid [3], exp_space [3];
  hflit_t           exp_flit [3];

  hs_home #(.MODE(HS_GHS))      u_g (.clk, .rst_n, .rx_valid, .rx_flit, .ej_valid(ej_valid[0]), .ej_flit(ej_flit[0]), .ej_ready(ej_ready[0]),
    .tok_gen(tok_gen[0]), .reinj_valid(reinj_valid[0]), .reinj_flit(reinj_flit[0]), .hs_valid(hs_valid[0]), .hs_dst(hs_dst[0]), .hs_ack(hs_ack[0]),
    .ev_drop(ev_drop[0]), .ev_reinject(ev_reinject[0]));
  hs_home #(.MODE(HS_DHS))      u_d (.clk, .rst_n, .rx_valid, .rx_flit, .ej_valid(ej_valid[1]), .ej_flit(ej_flit[1]), .ej_ready(ej_ready[1]),
    .tok_gen(tok_gen[1]), .reinj_valid(reinj_valid[1]), .reinj_flit(reinj_flit[1]), .hs_valid(hs_valid[1]), .hs_dst(hs_dst[1]), .hs_ack(hs_ack[1]),
    .ev_drop(ev_drop[1]), .ev_reinject(ev_reinject[1]));
  hs_home #(.MODE(HS_DHS_CIRC)) u_c (.clk, .rst_n, .rx_valid, .rx_flit, .ej_valid(ej_valid[2]), .ej_flit(ej_flit[2]), .ej_ready(ej_ready[2]),
    .tok_gen(tok_gen[2]), .reinj_valid(reinj_valid[2]), .reinj_flit(reinj_flit[2]), .hs_valid(hs_valid[2]), .hs_dst(hs_dst[2]), .hs_ack(hs_ack[2]),
    .ev_drop(ev_drop[2]), .ev_reinject(ev_reinject[2]));

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int m = 0; m < 3; m++) begin
      bit space;
      // answer of the previous arrival
      if (exp_valid[m]) begin
        if (m < 2) ck(hs_valid[m] && hs_ack[m] == exp_space[m] && hs_dst[m] == exp_flit[m].src, "handshake answer");
        else       ck(!hs_valid[m], "no handshake with circulation");
        if (m == 2) ck(reinj_valid[m] == !exp_space[m] && (exp_space[m] || reinj_flit[m] == exp_flit[m]), "re-injection");
        else        ck(!reinj_valid[m], "no re-injection without circulation");
      end else begin
        ck(!hs_valid[m] && !reinj_valid[m], "no answer without arrival");
      end
      // ejection
      ck(ej_valid[m] == (q[m].size() > 0), "ejection valid");
      if (ej_valid[m] && q[m].size() > 0) ck(ej_flit[m] == q[m][0], "ejection order");
      // tokens
      if (tok_gen[m]) n_tok[m]++;
      if (m == 0) ck(tok_gen[m] == (cyc == 1), "GHS emits one token");
      if (m == 1) ck(tok_gen[m], "DHS emits every cycle");
      space = q[m].size() < HS_HOME_BUF;
      if (m == 2) ck(tok_gen[m] == !(rx_valid && !space), "circulation suppresses the token");
      ck(ev_drop[m] == (m < 2 && rx_valid && !space), "drop event");
      ck(ev_reinject[m] == (m == 2 && rx_valid && !space), "re-injection event");
      if (rx_valid && !space) begin if (m < 2) n_drop[m]++; else n_reinj[m]++; end
      if (rx_valid) begin if (space) n_ack[m]++; else n_nack[m]++; end
      // model update
      exp_valid[m] = rx_valid;
      exp_space[m] = space;
      exp_flit[m]  = rx_flit;
      if (ej_valid[m] && ej_ready[m]) begin void'(q[m].pop_front()); n_ej[m]++; end
      if (rx_valid && space) q[m].push_back(rx_flit);
    end
  end

  always @(negedge clk) begin
    rx_valid = rst_n && ($urandom_range(0, 1) == 1);
    rx_flit  = '{src: NID_W'($urandom), data: {8{$urandom}}};
    for (int m = 0; m < 3; m++) ej_ready[m] = ($urandom_range(0, 2) == 0);
  end

  initial begin
    rx_valid = 0; rx_flit = '0;
    for (int m = 0; m < 3; m++) begin
      ej_ready[m] = 0; exp_valid[m] = 0; exp_space[m] = 0; exp_flit[m] = '0;
      n_drop[m] = 0; n_reinj[m] = 0; n_ack[m] = 0; n_nack[m] = 0; n_ej[m] = 0; n_tok[m] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (1000) @(negedge clk);
    for (int m = 0; m < 3; m++)
      $display("home %0d: stored=%0d full=%0d ejected=%0d drops=%0d reinjections=%0d tokens=%0d",
               m, n_ack[m], n_nack[m], n_ej[m], n_drop[m], n_reinj[m], n_tok[m]);
    ck(n_drop[0] > 0 && n_drop[1] > 0 && n_reinj[2] > 0, "full buffer cases seen");
    ck(n_ej[0] > 100, "traffic ejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
