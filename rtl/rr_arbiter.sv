// rr_arbiter: round-robin arbiter used by the switch and VC allocators.
//
// Grants one of N requests, searching from the position after the last
// accepted grant. The grant is combinational from `req`; the priority pointer
// moves only when `advance` is high (the grant was used), so a requester that
// loses in a later stage keeps its priority. Reset puts the highest priority on
// requester 0.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 gnt_valid
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr_q;

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int k = 0; k < int'(N); k++) begin
      int unsigned idx;
      idx = (int'(ptr_q) + k) % N;
      if (!gnt_valid && req[idx]) begin
        gnt_valid    = 1'b1;
        gnt[idx]     = 1'b1;
        gnt_idx      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       ptr_q <= '0;
    else if (advance && gnt_valid)    ptr_q <= IW'((int'(gnt_idx) + 1) % N);
  end
endmodule
