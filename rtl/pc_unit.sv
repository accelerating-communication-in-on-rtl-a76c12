// pc_unit: pseudo-circuit register and comparator of one router input port.
//
// A pseudo-circuit is a crossbar connection (this input port -> one output
// port) left connected after a flit used it. The unit holds the input VC and the
// output port of the last connection granted by the switch arbiter, plus a
// valid flag. A flit that arrives on the same VC and routes to the same output
// port "matches" and may cross the switch without switch arbitration.
//
// Updates, applied at the clock edge in this priority order:
//   create    - the switch arbiter granted this input port (VC, output port):
//               both registers are written and the flag set;
//   terminate - a conflict or congestion ends the circuit: only the flag is
//               cleared, the registers keep the last connection (history
//               used by pseudo-circuit speculation);
//   restore   - speculation reconnects the last connection: the flag is set
//               again without touching the registers.
// `match` and `mismatch` are combinational from the candidate flit (VC and
// routing information) and the registers. `mismatch` means a flit on the
// circuit's VC routes elsewhere. The registers hold nothing valid after reset.
// The structure (two registers, a flag, a comparator) follows the described
// comparator logic; the VC multiplexer sits in the router.
module pc_unit
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cand_valid,
  input  logic [VC_W-1:0]   cand_vc,
  input  logic [PORT_W-1:0] cand_route,
  input  logic              create,
  input  logic [VC_W-1:0]   create_vc,
  input  logic [PORT_W-1:0] create_out,
  input  logic              terminate,
  input  logic              restore,
  output logic              pc_valid,
  output logic [VC_W-1:0]   pc_vc,
  output logic [PORT_W-1:0] pc_out,
  output logic              pc_known,   // registers hold a past connection
  output logic              match,
  output logic              mismatch
);
  logic              valid_q, known_q;
  logic [VC_W-1:0]   vc_q;
  logic [PORT_W-1:0] out_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      known_q <= 1'b0;
      vc_q    <= '0;
      out_q   <= '0;
    end else if (create) begin
      valid_q <= 1'b1;
      known_q <= 1'b1;
      vc_q    <= create_vc;
      out_q   <= create_out;
    end else if (terminate) begin
      valid_q <= 1'b0;
    end else if (restore && known_q) begin
      valid_q <= 1'b1;
    end
  end

  assign pc_valid = valid_q;
  assign pc_vc    = vc_q;
  assign pc_out   = out_q;
  assign pc_known = known_q;
  assign match    = valid_q && cand_valid && (cand_vc == vc_q) && (cand_route == out_q);
  assign mismatch = valid_q && cand_valid && (cand_vc == vc_q) && (cand_route != out_q);
endmodule
