// tb_pc_router: self-checking test of the pseudo-circuit router.
//
// Three routers at mesh position (1,1) receive the same stimulus: `base` with
// pseudo-circuits disabled, `nb` with pseudo-circuits and speculation but no
// buffer bypassing, and `full` with all three schemes. Per-hop delays are
// checked against the pipeline: 3 cycles for the baseline (BW, VA/SA, ST),
// 2 when a pseudo-circuit is reused (BW, PC+ST), 1 with buffer bypassing
// (PC+ST). The test then creates a conflict (another input takes the output
// port), congestion (credits held back until the circuit is terminated) and
// checks that speculation restores the circuit once credits return. Every
// flit's payload, output VC (static VA) and lookahead route are checked, and
// credits sent upstream are counted.
module tb_pc_router;
  import noc_pkg::*;

  localparam int ND = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [NPORT-1:0] in_valid;
  flit_t            in_flit [NPORT];
  logic [NPORT-1:0] cr_in_valid [ND];
  logic [VC_W-1:0]  cr_in_vc    [ND][NPORT];
  logic [NPORT-1:0] cr_out_valid[ND];
  logic [VC_W-1:0]  cr_out_vc   [ND][NPORT];
  logic [NPORT-1:0] out_valid   [ND];
  flit_t            out_flit    [ND][NPORT];
  logic [NPORT-1:0] e_sa[ND], e_pc[ND], e_by[ND], e_sp[ND], e_tc[ND], e_tg[ND];

  pc_router #(.X(2'd1), .Y(2'd1), .EN_PC(1'b0), .EN_SPEC(1'b0), .EN_BYPASS(1'b0)) base (
    .clk, .rst_n, .in_valid, .in_flit,
    .cr_out_valid(cr_out_valid[0]), .cr_out_vc(cr_out_vc[0]),
    .out_valid(out_valid[0]), .out_flit(out_flit[0]),
    .cr_in_valid(cr_in_valid[0]), .cr_in_vc(cr_in_vc[0]),
    .ev_sa_grant(e_sa[0]), .ev_pc_reuse(e_pc[0]), .ev_bypass(e_by[0]), .ev_spec(e_sp[0]),
    .ev_term_conflict(e_tc[0]), .ev_term_congest(e_tg[0]));
  pc_router #(.X(2'd1), .Y(2'd1), .EN_BYPASS(1'b0)) nb (
    .clk, .rst_n, .in_valid, .in_flit,
    .cr_out_valid(cr_out_valid[1]), .cr_out_vc(cr_out_vc[1]),
    .out_valid(out_valid[1]), .out_flit(out_flit[1]),
    .cr_in_valid(cr_in_valid[1]), .cr_in_vc(cr_in_vc[1]),
    .ev_sa_grant(e_sa[1]), .ev_pc_reuse(e_pc[1]), .ev_bypass(e_by[1]), .ev_spec(e_sp[1]),
    .ev_term_conflict(e_tc[1]), .ev_term_congest(e_tg[1]));
  pc_router #(.X(2'd1), .Y(2'd1)) full (
    .clk, .rst_n, .in_valid, .in_flit,
    .cr_out_valid(cr_out_valid[2]), .cr_out_vc(cr_out_vc[2]),
    .out_valid(out_valid[2]), .out_flit(out_flit[2]),
    .cr_in_valid(cr_in_valid[2]), .cr_in_vc(cr_in_vc[2]),
    .ev_sa_grant(e_sa[2]), .ev_pc_reuse(e_pc[2]), .ev_bypass(e_by[2]), .ev_spec(e_sp[2]),
    .ev_term_conflict(e_tc[2]), .ev_term_congest(e_tg[2]));

  // ---------------------------------------------------------------- downstream model
  logic [NPORT-1:0] hold_cr = '0;          // hold credits of an output port
  int               owed [ND][NPORT][NVC];
  int               nout [ND], ncr [ND];
  int               cnt_pc [ND], cnt_by [ND], cnt_sp [ND], cnt_tc [ND], cnt_tg [ND];
  int               last_lat [ND];
  int               inj_cyc_of [int];     // payload tag -> injection cycle
  flit_t            exp_of [int];

  always @(posedge clk) begin
    for (int d = 0; d < ND; d++) begin
      cr_in_valid[d] <= '0;
      for (int o = 0; o < int'(NPORT); o++) begin
        cr_in_vc[d][o] <= '0;
        // return one owed credit per port and cycle unless held
        if (!hold_cr[o]) begin
          for (int v = 0; v < int'(NVC); v++)
            if (owed[d][o][v] > 0 && !cr_in_valid[d][o]) begin
              owed[d][o][v]--;
              cr_in_valid[d][o] <= 1'b1;
              cr_in_vc[d][o]    <= VC_W'(v);
              break;
            end
        end
        if (rst_n && out_valid[d][o]) begin
          int tag;
          flit_t f;
          tag = int'(out_flit[d][o].data[31:0]);
          nout[d]++;
          owed[d][o][out_flit[d][o].vc]++;
          checks++;
          if (!inj_cyc_of.exists(tag)) begin
            failures++;
            $display("FAIL dut%0d: unknown flit tag %0d on port %0d", d, tag, o);
          end else begin
            f = exp_of[tag];
            last_lat[d] = cyc - inj_cyc_of[tag];
            if (out_flit[d][o].data != f.data || o != int'(f.route)
                || out_flit[d][o].vc != static_vc(f.dst)
                || out_flit[d][o].route != lookahead_route(2'd1, 2'd1, PORT_W'(o), f.dst)
                || out_flit[d][o].head != f.head || out_flit[d][o].tail != f.tail) begin
              failures++;
              $display("FAIL dut%0d: flit %0d wrong on port %0d", d, tag, o);
            end
          end
        end
        if (rst_n && cr_out_valid[d][o]) ncr[d]++;
      end
      cnt_pc[d] += $countones(e_pc[d]);
      cnt_by[d] += $countones(e_by[d]);
      cnt_sp[d] += $countones(e_sp[d]);
      cnt_tc[d] += $countones(e_tc[d]);
      cnt_tg[d] += $countones(e_tg[d]);
    end
  end

  // ---------------------------------------------------------------- stimulus helpers
  int tag_ctr = 1;
  int nin = 0;

  task automatic send(input int port, input int vc, input dest_t dst, input bit head,
                      input bit tail);
    flit_t f;
    @(negedge clk);
    f       = '0;
    f.head  = head;
    f.tail  = tail;
    f.vc    = VC_W'(vc);
    f.dst   = dst;
    f.route = xy_route(2'd1, 2'd1, dst);
    f.data  = {$urandom, $urandom, $urandom, 32'(tag_ctr)};
    exp_of[tag_ctr]     = f;
    inj_cyc_of[tag_ctr] = cyc;
    tag_ctr++;
    nin++;
    in_valid[port] = 1'b1;
    in_flit[port]  = f;
    @(negedge clk);
    in_valid[port] = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic expect_lat(input int d, input int lat, input string what);
    checks++;
    if (last_lat[d] != lat) begin
      failures++;
      $display("FAIL %s: dut%0d latency %0d, expected %0d", what, d, last_lat[d], lat);
    end
  endtask

  localparam dest_t D_E  = '{x: 2'd2, y: 2'd1, loc: 2'd0};   // routes E
  localparam dest_t D_S  = '{x: 2'd1, y: 2'd3, loc: 2'd1};   // routes S

  initial begin
    in_valid = '0;
    for (int p = 0; p < int'(NPORT); p++) in_flit[p] = '0;
    for (int d = 0; d < ND; d++) begin
      nout[d] = 0; ncr[d] = 0; cnt_pc[d] = 0; cnt_by[d] = 0; cnt_sp[d] = 0;
      cnt_tc[d] = 0; cnt_tg[d] = 0; last_lat[d] = 0;
      cr_in_valid[d] = '0;
      for (int o = 0; o < int'(NPORT); o++) begin
        cr_in_vc[d][o] = '0;
        for (int v = 0; v < int'(NVC); v++) owed[d][o][v] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    idle(2);

    // 1. first packet W->E: no pseudo-circuit yet, baseline delay everywhere
    send(P_W, 0, D_E, 1, 1);
    idle(6);
    for (int d = 0; d < ND; d++) expect_lat(d, 3, "first packet");

    // 2. same flow again: pseudo-circuit reuse (nb) and bypass (full)
    send(P_W, 0, D_E, 1, 1);
    idle(6);
    expect_lat(0, 3, "repeat flow, baseline");
    expect_lat(1, 2, "repeat flow, pseudo-circuit");
    expect_lat(2, 1, "repeat flow, bypass");

    // 3. a 3-flit packet on the same flow
    send(P_W, 0, D_E, 1, 0);
    send(P_W, 0, D_E, 0, 0);
    send(P_W, 0, D_E, 0, 1);
    idle(8);
    expect_lat(1, 2, "body flits, pseudo-circuit");
    expect_lat(2, 1, "body flits, bypass");

    // 4. conflict: local port 0 claims output E, terminating W's circuit
    send(P_L0, 1, D_E, 1, 1);
    idle(6);
    checks++;
    if (cnt_tc[1] == 0 || cnt_tc[2] == 0) begin
      failures++;
      $display("FAIL no conflict termination");
    end
    send(P_W, 0, D_E, 1, 1);
    idle(6);
    expect_lat(2, 3, "after conflict termination");

    // 5. congestion: hold credits of E; the circuit ends when VC credits run out
    hold_cr[P_E] = 1'b1;
    for (int k = 0; k < 4; k++) send(P_W, 0, D_E, 1, 1);
    idle(6);
    checks++;
    if (cnt_tg[2] == 0 || cnt_tg[1] == 0) begin
      failures++;
      $display("FAIL no congestion termination");
    end
    // 6. credits return: speculation restores W->E, next flit bypasses again
    hold_cr[P_E] = 1'b0;
    idle(8);
    checks++;
    if (cnt_sp[2] == 0 || cnt_sp[1] == 0 || cnt_sp[0] != 0) begin
      failures++;
      $display("FAIL speculation count %0d/%0d/%0d", cnt_sp[0], cnt_sp[1], cnt_sp[2]);
    end
    send(P_W, 0, D_E, 1, 1);
    idle(6);
    expect_lat(2, 1, "after speculative restore");
    expect_lat(1, 2, "after speculative restore, no bypass");

    // 7. two inputs, two outputs at once: no interference
    fork
      send(P_W, 0, D_E, 1, 1);
      send(P_N, 2, D_S, 1, 1);
    join
    idle(8);

    // totals
    for (int d = 0; d < ND; d++) begin
      checks++;
      if (nout[d] != nin || ncr[d] != nin) begin
        failures++;
        $display("FAIL dut%0d: %0d in, %0d out, %0d credits", d, nin, nout[d], ncr[d]);
      end
    end
    checks++;
    if (cnt_pc[0] != 0 || cnt_by[0] != 0 || cnt_pc[1] == 0 || cnt_by[1] != 0 || cnt_by[2] == 0) begin
      failures++;
      $display("FAIL event counts pc %0d/%0d/%0d bypass %0d/%0d/%0d",
               cnt_pc[0], cnt_pc[1], cnt_pc[2], cnt_by[0], cnt_by[1], cnt_by[2]);
    end
    $display("pc_reuse=%0d bypass=%0d spec=%0d term_conflict=%0d term_congest=%0d",
             cnt_pc[1], cnt_by[2], cnt_sp[2], cnt_tc[2], cnt_tg[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
