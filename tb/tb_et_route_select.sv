// tb_et_route_select: router at (1,1). Directed cases for staying in the normal
// VCs on equal occupancy, early transition on lower escape occupancy, the
// all-normal-full (Duato) case, staying in the chosen escape network (YX),
// local ejection and no credit. Random credits are then checked against the
// selection rules: productive port, VC class, credit and transition condition.
module tb_et_route_select;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_early = 0, n_esc = 0, n_norm = 0;

  dest_t             dst;
  logic              in_escape, in_vn;
  logic [2:0]        credits [NPORT][NVC];
  logic              valid, to_escape, out_vn, early;
  logic [PORT_W-1:0] out_port;
  logic [VC_W-1:0]   out_vc;

  et_route_select #(.X(2'd1), .Y(2'd1)) dut (.*);

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic set_all(input int c);
    for (int o = 0; o < int'(NPORT); o++)
      for (int v = 0; v < int'(NVC); v++) credits[o][v] = 3'(c);
  endtask

  function automatic bit productive(dest_t d, int p);
    case (p)
      P_E: return d.x > 1;
      P_W: return d.x < 1;
      P_S: return d.y > 1;
      P_N: return d.y < 1;
      default: return 0;
    endcase
  endfunction

  initial begin
    dst = '{x: 2'd3, y: 2'd1, loc: 2'd0};
    in_escape = 0; in_vn = 0;
    set_all(4);
    repeat (2) @(negedge clk);
    rst_n = 1;
    credits[P_E][1] = 2;
    #1;
    ck(valid && !to_escape && out_port == P_E && out_vc == 0, "equal occupancy stays normal");
    credits[P_E][0] = 1; credits[P_E][1] = 1;
    #1;
    ck(valid && to_escape && early && out_port == P_E && out_vc >= 2, "early transition");
    credits[P_E][0] = 0; credits[P_E][1] = 0;
    #1;
    ck(valid && to_escape && !early && out_vc >= 2, "normal full: escape (Duato)");
    set_all(4);
    dst = '{x: 2'd3, y: 2'd3, loc: 2'd0};
    in_escape = 1; in_vn = 1;
    #1;
    ck(valid && to_escape && out_vn && out_port == P_S && out_vc == 3, "escape YX keeps network");
    in_vn = 0;
    #1;
    ck(valid && out_port == P_E && out_vc == 2, "escape XY keeps network");
    in_escape = 0;
    dst = '{x: 2'd1, y: 2'd1, loc: 2'd2};
    credits[6][2] = 3'd4; credits[6][0] = 3'd1; credits[6][1] = 3'd2; credits[6][3] = 3'd3;
    #1;
    ck(valid && out_port == 6 && out_vc == 2, "local ejection, most credits");
    set_all(0);
    dst = '{x: 2'd0, y: 2'd2, loc: 2'd0};
    #1;
    ck(!valid, "no credit");

    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      dst = dest_t'($urandom);
      in_escape = ($urandom_range(0, 3) == 0);
      in_vn = $urandom_range(0, 1);
      for (int o = 0; o < int'(NPORT); o++)
        for (int v = 0; v < int'(NVC); v++) credits[o][v] = 3'($urandom_range(0, 4));
      #1;
      if (dst.x == 1 && dst.y == 1) begin
        ck(out_port == 4 + dst.loc, "random local port");
      end else begin
        int nb;
        nb = 0;
        for (int p = 0; p < 4; p++)
          if (productive(dst, p))
            for (int v = 0; v < 2; v++) if (credits[p][v] > nb) nb = credits[p][v];
        ck(productive(dst, out_port), "random productive port");
        if (valid) ck(credits[out_port][out_vc] != 0, "random credit");
        if (in_escape) ck(to_escape && out_vn == in_vn && out_vc == 2 + in_vn, "random stays in escape");
        else if (to_escape) begin
          ck(out_vc >= 2 && (4 - credits[out_port][out_vc]) < (4 - nb), "random transition rule");
          ck(early == (nb != 0), "random early flag");
          if (early) n_early++; else n_esc++;
          // dimension order of the chosen network
          if (dst.x != 1 && dst.y != 1)
            ck(out_port == (out_vn ? ((dst.y > 1) ? P_S : P_N) : ((dst.x > 1) ? P_E : P_W)), "random O1TURN order");
        end else begin
          n_norm++;
          ck(out_vc < 2 && credits[out_port][out_vc] == nb, "random most-credit normal VC");
        end
      end
    end
    ck(n_early > 0 && n_esc > 0 && n_norm > 0, "all three outcomes seen");
    $display("normal=%0d early=%0d escape_full=%0d", n_norm, n_early, n_esc);
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
