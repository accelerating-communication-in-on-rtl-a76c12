// vc_alloc: virtual-channel allocator of the router.
//
// Each input VC whose head flit is a header without an output VC raises `req`
// with the output port it routes to and its destination. The allocator picks
// an output VC of that port and resolves contention so that each output VC is
// given to at most one input VC per cycle, in round-robin order over the input
// VCs (the start position moves by one every cycle).
//
// Two policies, chosen by STATIC_VA:
//   static  (1): the output VC is a function of the destination only
//                (noc_pkg::static_vc); the request fails while that VC is busy.
//                This is the policy with which pseudo-circuits are reused most.
//   dynamic (0): the free output VC with the most credits is taken; the
//                request fails when no free VC has a credit.
// An output VC is busy from its allocation until the tail flit of the packet
// has left on it (`ovc_busy`, kept by the router). Purely combinational apart
// from the round-robin pointer; grants are valid in the cycle of the request.
module vc_alloc
  import noc_pkg::*;
#(
  parameter bit          STATIC_VA = 1'b1,
  parameter int unsigned CW        = 3      // width of a credit count
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NPORT*NVC-1:0] req,
  input  logic [PORT_W-1:0]    req_port [NPORT*NVC],
  input  dest_t                req_dst  [NPORT*NVC],
  input  logic [NVC-1:0]       ovc_busy [NPORT],
  input  logic [CW-1:0]        credits  [NPORT][NVC],
  output logic [NPORT*NVC-1:0] gnt,
  output logic [VC_W-1:0]      gnt_vc   [NPORT*NVC]
);
  localparam int unsigned NREQ = NPORT * NVC;
  localparam int unsigned RW   = $clog2(NREQ);

  logic [RW-1:0] ptr_q;

  // desired output VC of every requester
  logic [NREQ-1:0]   want;
  logic [VC_W-1:0]   want_vc [NREQ];

  always_comb begin
    for (int r = 0; r < int'(NREQ); r++) begin
      want[r]    = 1'b0;
      want_vc[r] = '0;
      if (req[r]) begin
        if (STATIC_VA) begin
          want_vc[r] = static_vc(req_dst[r]);
          want[r]    = !ovc_busy[req_port[r]][want_vc[r]];
        end else begin
          logic [CW-1:0] best;
          best = '0;
          for (int v = 0; v < int'(NVC); v++) begin
            if (!ovc_busy[req_port[r]][v] && credits[req_port[r]][v] > best) begin
              best       = credits[req_port[r]][v];
              want_vc[r] = VC_W'(v);
              want[r]    = 1'b1;
            end
          end
        end
      end
    end
  end

  // contention: one winner per output VC, round-robin over requesters
  always_comb begin
    logic [NVC-1:0] claimed [NPORT];
    for (int o = 0; o < int'(NPORT); o++) claimed[o] = '0;
    gnt = '0;
    for (int r = 0; r < int'(NREQ); r++) gnt_vc[r] = want_vc[r];
    for (int k = 0; k < int'(NREQ); k++) begin
      int unsigned r;
      r = (int'(ptr_q) + k) % NREQ;
      if (want[r] && !claimed[req_port[r]][want_vc[r]]) begin
        claimed[req_port[r]][want_vc[r]] = 1'b1;
        gnt[r] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else        ptr_q <= ptr_q + 1'b1;
  end
endmodule
