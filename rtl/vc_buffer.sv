// vc_buffer: flit FIFO of one input virtual channel.
//
// DEPTH flits (4 in the evaluated router) held in a circular array with read
// and write pointers. The head flit is visible combinationally on `head` while
// `empty` is low; `rd_en` removes it at the clock edge. `wr_en` writes `wr_flit`
// at the clock edge (buffer write, BW). A write and a read may happen in the
// same cycle, also when the buffer is full. Writing a full buffer is a protocol error (credit flow control
// prevents it) and is flagged by an assertion; the write is then ignored.
module vc_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  flit_t wr_flit,
  input  logic  rd_en,
  output flit_t head,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  logic do_wr, do_rd;
  assign do_wr = wr_en && (!full || rd_en);
  assign do_rd = rd_en && (cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_wr) wr_ptr <= (int'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (int'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      cnt <= cnt + $bits(cnt)'(do_wr) - $bits(cnt)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_flit;
  end

  assign head  = mem[rd_ptr];
  assign empty = (cnt == '0);
  assign full  = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign count = cnt;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en))
    else $error("vc_buffer: write to a full buffer");
endmodule
