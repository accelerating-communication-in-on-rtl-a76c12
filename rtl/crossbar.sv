// crossbar: NPORT x NPORT flit switch of the router.
//
// Output port o carries the flit of input port sel[o] when sel_valid[o] is
// high; otherwise its valid bit is low and its flit is zero. The allocators
// guarantee that an input feeds at most one output. Purely combinational.
module crossbar
  import noc_pkg::*;
(
  input  flit_t             in_flit   [NPORT],
  input  logic [PORT_W-1:0] sel       [NPORT],
  input  logic [NPORT-1:0]  sel_valid,
  output flit_t             out_flit  [NPORT],
  output logic [NPORT-1:0]  out_valid
);
  always_comb begin
    for (int o = 0; o < int'(NPORT); o++) begin
      out_valid[o] = sel_valid[o];
      out_flit[o]  = sel_valid[o] ? in_flit[sel[o]] : '0;
    end
  end
endmodule
