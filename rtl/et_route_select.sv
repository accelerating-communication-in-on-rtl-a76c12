// et_route_select: route and VC selection of a fully adaptive router with
// early transition to the escape channels.
//
// The VCs of every port are split into normal VCs (0 .. NVC-N_ESC-1), used with
// minimal fully adaptive routing, and escape VCs (the top N_ESC), used with
// deadlock-free dimension-order routing. The escape VCs form two virtual
// networks as in O1TURN: the lower half routes XY, the upper half YX. A packet
// entering the escape VCs picks one of the two networks at random (a free
// running LFSR) and keeps it, and it stays in the escape VCs to its destination.
//
// For a packet in the normal VCs the unit looks at every productive mesh
// direction and every normal VC there and takes the one with the most credits
// (dynamic VC allocation). Early transition: the packet moves to the escape VCs
// when the occupancy of the chosen escape VC (BUF_DEPTH minus its credits) is
// smaller than the occupancy of the best normal VC. When the normal VCs are all
// full this is Duato's condition, so the deadlock-recovery guarantee is kept;
// on equal occupancy the packet stays in the normal VCs. `valid` is low when the
// selected VC class has no credit (VC allocation fails and is retried).
// Packets at their destination router take local port `dst.loc` and the local
// VC with the most credits.
//
// Combinational except for the LFSR; results are meant to be registered by the
// router's VA stage. Credits may be given at reduced precision (CW bits).
// The document sets the split (2 normal + 2 escape of 4 VCs), the transition
// rule, O1TURN in the escape VCs and the most-credits VC choice; the LFSR, the
// tie-breaking order (lowest port, then lowest VC) and the port numbering
// (noc_pkg) are this design's choices.
module et_route_select
  import noc_pkg::*;
#(
  parameter logic [XW-1:0] X         = '0,
  parameter logic [YW-1:0] Y         = '0,
  parameter int unsigned   BUF_DEPTH = 4,
  parameter int unsigned   N_ESC     = 2,
  parameter int unsigned   CW        = $clog2(BUF_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dest_t             dst,
  input  logic              in_escape,   // packet already uses escape VCs
  input  logic              in_vn,       // its escape network (0 XY, 1 YX)
  input  logic [CW-1:0]     credits [NPORT][NVC],
  output logic              valid,
  output logic [PORT_W-1:0] out_port,
  output logic [VC_W-1:0]   out_vc,
  output logic              to_escape,   // packet uses the escape VCs from here
  output logic              out_vn,
  output logic              early        // moved to escape VCs before normal VCs were full
);
  localparam int unsigned N_NORM = NVC - N_ESC;
  localparam int unsigned VN_SZ  = N_ESC / 2;

  logic [7:0] lfsr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr_q <= 8'h5a;
    else        lfsr_q <= {lfsr_q[6:0], lfsr_q[7] ^ lfsr_q[5] ^ lfsr_q[4] ^ lfsr_q[3]};
  end

  always_comb begin
    logic [PORT_W-1:0] cand [2];
    logic [1:0]        cand_ok;
    logic [CW-1:0]     n_best, e_best;
    logic [PORT_W-1:0] n_port, e_port;
    logic [VC_W-1:0]   n_vc, e_vc;
    logic              vn;
    int unsigned       n_occ, e_occ;
    logic [CW-1:0]     l_best;

    valid     = 1'b0;
    out_port  = '0;
    out_vc    = '0;
    to_escape = 1'b0;
    out_vn    = 1'b0;
    early     = 1'b0;
    l_best    = '0;

    // productive directions (minimal routing)
    cand[0] = (dst.x > X) ? PORT_W'(P_E) : PORT_W'(P_W);
    cand[1] = (dst.y > Y) ? PORT_W'(P_S) : PORT_W'(P_N);
    cand_ok = {dst.y != Y, dst.x != X};

    // best normal VC over productive directions
    n_best = '0; n_port = cand_ok[0] ? cand[0] : cand[1]; n_vc = '0;
    for (int c = 0; c < 2; c++)
      if (cand_ok[c])
        for (int v = 0; v < int'(N_NORM); v++)
          if (credits[cand[c]][v] > n_best) begin
            n_best = credits[cand[c]][v];
            n_port = cand[c];
            n_vc   = VC_W'(v);
          end

    // escape network and its dimension-order port
    vn = in_escape ? in_vn : lfsr_q[0];
    if (!vn) e_port = cand_ok[0] ? cand[0] : cand[1];   // XY
    else     e_port = cand_ok[1] ? cand[1] : cand[0];   // YX
    e_best = '0; e_vc = VC_W'(N_NORM + (vn ? VN_SZ : 0));
    for (int k = 0; k < int'(VN_SZ); k++) begin
      int unsigned v;
      v = N_NORM + (vn ? VN_SZ : 0) + k;
      if (credits[e_port][v] > e_best) begin
        e_best = credits[e_port][v];
        e_vc   = VC_W'(v);
      end
    end

    n_occ = BUF_DEPTH - int'(n_best);
    e_occ = BUF_DEPTH - int'(e_best);

    if (cand_ok == 2'b00) begin
      // destination router: eject on the local port
      l_best   = '0;
      out_port = PORT_W'(4 + int'(dst.loc));
      for (int v = 0; v < int'(NVC); v++)
        if (credits[out_port][v] > l_best) begin
          l_best = credits[out_port][v];
          out_vc = VC_W'(v);
        end
      valid = (l_best != '0);
    end else if (in_escape) begin
      valid     = (e_best != '0);
      out_port  = e_port;
      out_vc    = e_vc;
      to_escape = 1'b1;
      out_vn    = vn;
    end else if (e_occ < n_occ) begin
      valid     = (e_best != '0);
      out_port  = e_port;
      out_vc    = e_vc;
      to_escape = 1'b1;
      out_vn    = vn;
      early     = (n_best != '0);
    end else begin
      valid    = (n_best != '0);
      out_port = n_port;
      out_vc   = n_vc;
    end
  end
endmodule
