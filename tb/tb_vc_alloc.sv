// tb_vc_alloc: static and dynamic VC allocation. Directed cases (static VC of
// the destination, busy VC, most-credit VC, no credit) and random requests
// checked for one grant per output VC, a free VC and, in the dynamic policy, a
// VC with the most credits among the free ones.
module tb_vc_alloc;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NREQ = NPORT * NVC;

  logic [NREQ-1:0]   req;
  logic [PORT_W-1:0] req_port [NREQ];
  dest_t             req_dst  [NREQ];
  logic [NVC-1:0]    ovc_busy [NPORT];
  logic [2:0]        credits  [NPORT][NVC];
  logic [NREQ-1:0]   gnt_s, gnt_d;
  logic [VC_W-1:0]   vc_s [NREQ], vc_d [NREQ];

  vc_alloc #(.STATIC_VA(1'b1)) u_s (.clk, .rst_n, .req, .req_port, .req_dst, .ovc_busy, .credits, .gnt(gnt_s), .gnt_vc(vc_s));
  vc_alloc #(.STATIC_VA(1'b0)) u_d (.clk, .rst_n, .req, .req_port, .req_dst, .ovc_busy, .credits, .gnt(gnt_d), .gnt_vc(vc_d));

  task automatic clear();
    req = '0;
    for (int r = 0; r < NREQ; r++) begin req_port[r] = '0; req_dst[r] = '0; end
    for (int o = 0; o < int'(NPORT); o++) begin
      ovc_busy[o] = '0;
      for (int v = 0; v < int'(NVC); v++) credits[o][v] = 3'd4;
    end
  endtask

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    dest_t d;
    clear();
    repeat (2) @(negedge clk);
    rst_n = 1;
    d = '{x: 2'd3, y: 2'd0, loc: 2'd1};
    req[5] = 1; req_port[5] = P_E; req_dst[5] = d;
    #1;
    ck(gnt_s[5] && vc_s[5] == static_vc(d), "static grant");
    req[9] = 1; req_port[9] = P_E; req_dst[9] = d;
    #1;
    ck($countones(gnt_s) == 1, "static contention: one winner");
    ovc_busy[P_E][static_vc(d)] = 1;
    #1;
    ck(gnt_s == '0, "static: busy VC refused");
    clear();
    req[3] = 1; req_port[3] = P_S;
    credits[P_S][0] = 1; credits[P_S][1] = 4; credits[P_S][2] = 2; credits[P_S][3] = 0;
    #1;
    ck(gnt_d[3] && vc_d[3] == 1, "dynamic: most credits");
    ovc_busy[P_S][1] = 1;
    #1;
    ck(gnt_d[3] && vc_d[3] == 2, "dynamic: most credits among free");
    for (int v = 0; v < int'(NVC); v++) credits[P_S][v] = 0;
    #1;
    ck(gnt_d == '0, "dynamic: no credit, no grant");

    // random
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      clear();
      for (int r = 0; r < NREQ; r++) begin
        req[r] = ($urandom_range(0, 2) == 0);
        req_port[r] = PORT_W'($urandom_range(0, NPORT - 1));
        req_dst[r] = dest_t'($urandom);
      end
      for (int o = 0; o < int'(NPORT); o++)
        for (int v = 0; v < int'(NVC); v++) begin
          ovc_busy[o][v] = ($urandom_range(0, 3) == 0);
          credits[o][v] = 3'($urandom_range(0, 4));
        end
      #1;
      begin
        bit used_s [NPORT][NVC], used_d [NPORT][NVC];
        for (int o = 0; o < int'(NPORT); o++) for (int v = 0; v < int'(NVC); v++) begin used_s[o][v] = 0; used_d[o][v] = 0; end
        for (int r = 0; r < NREQ; r++) begin
          if (gnt_s[r]) begin
            ck(req[r] && !ovc_busy[req_port[r]][vc_s[r]] && !used_s[req_port[r]][vc_s[r]]
               && vc_s[r] == static_vc(req_dst[r]), "random static grant");
            used_s[req_port[r]][vc_s[r]] = 1;
          end
          if (gnt_d[r]) begin
            ck(req[r] && !ovc_busy[req_port[r]][vc_d[r]] && !used_d[req_port[r]][vc_d[r]]
               && credits[req_port[r]][vc_d[r]] > 0, "random dynamic grant");
            used_d[req_port[r]][vc_d[r]] = 1;
          end
        end
        // dynamic: a granted VC has at least the credits of any VC left free and unclaimed
        for (int r = 0; r < NREQ; r++)
          if (gnt_d[r])
            for (int v = 0; v < int'(NVC); v++)
              if (!ovc_busy[req_port[r]][v] && !used_d[req_port[r]][v])
                ck(credits[req_port[r]][vc_d[r]] >= credits[req_port[r]][v], "dynamic: not the most credits");
        // a static request whose VC is free and unclaimed must be granted to someone
        for (int r = 0; r < NREQ; r++)
          if (req[r] && !ovc_busy[req_port[r]][static_vc(req_dst[r])])
            ck(used_s[req_port[r]][static_vc(req_dst[r])], "static: free VC left unallocated");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
