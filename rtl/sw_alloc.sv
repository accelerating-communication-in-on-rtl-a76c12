// sw_alloc: separable input-first switch arbiter.
//
// Stage 1 picks, at every input port, one of its requesting VCs (round-robin).
// Stage 2 picks, at every output port, one of the input ports whose stage-1
// winner asks for it (round-robin). A grant gives the input port the crossbar
// for the next cycle (switch traversal, ST). Round-robin pointers move only for
// grants that are used in both stages. Combinational from `req`; pointers
// update at the clock edge.
module sw_alloc
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NVC-1:0]    req      [NPORT],       // per input port, per VC
  input  logic [PORT_W-1:0] req_port [NPORT][NVC],  // output port of each VC
  output logic [NPORT-1:0]  gnt_in,                 // input port granted
  output logic [VC_W-1:0]   gnt_vc   [NPORT],       // its VC
  output logic [PORT_W-1:0] gnt_out  [NPORT],       // its output port
  output logic [NPORT-1:0]  out_used                // output port granted
);
  logic [VC_W-1:0]   s1_idx   [NPORT];
  logic [NPORT-1:0]  s1_valid;
  logic [NPORT-1:0]  s2_req   [NPORT];   // per output: requesting inputs
  logic [PORT_W-1:0] s2_idx   [NPORT];
  logic [NPORT-1:0]  s2_valid;
  logic [NPORT-1:0]  in_won;

  for (genvar i = 0; i < NPORT; i++) begin : g_in
    rr_arbiter #(.N(NVC)) u_arb (
      .clk, .rst_n,
      .req      (req[i]),
      .advance  (in_won[i]),
      .gnt      (),
      .gnt_idx  (s1_idx[i]),
      .gnt_valid(s1_valid[i])
    );
  end

  always_comb begin
    for (int o = 0; o < int'(NPORT); o++)
      for (int i = 0; i < int'(NPORT); i++)
        s2_req[o][i] = s1_valid[i] && (int'(req_port[i][s1_idx[i]]) == o);
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    rr_arbiter #(.N(NPORT)) u_arb (
      .clk, .rst_n,
      .req      (s2_req[o]),
      .advance  (1'b1),
      .gnt      (),
      .gnt_idx  (s2_idx[o]),
      .gnt_valid(s2_valid[o])
    );
  end

  always_comb begin
    in_won = '0;
    for (int o = 0; o < int'(NPORT); o++)
      if (s2_valid[o]) in_won[s2_idx[o]] = 1'b1;
    for (int i = 0; i < int'(NPORT); i++) begin
      gnt_in[i]  = in_won[i];
      gnt_vc[i]  = s1_idx[i];
      gnt_out[i] = req_port[i][s1_idx[i]];
    end
    out_used = s2_valid;
  end
endmodule
