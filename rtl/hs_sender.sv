// hs_sender: output module of one node for one optical data channel (one
// destination): output queue, setaside buffer and handshake receiver.
//
// Flits wait in a FIFO (the virtual output queue of this destination). The
// sender raises `req` while it has a flit it may send; the channel answers with
// `grant` in a cycle in which this node captured a token, and the chosen flit is
// driven on `tx_flit` in the next cycle (E/O conversion and modulation).
// What happens after sending depends on the mode:
//   circulation (HS_DHS_CIRC): the flit leaves the queue at once; the home node
//       never drops it, so no handshake is expected.
//   basic handshake (HS_GHS/HS_DHS, SETASIDE = 0): the flit stays at the head
//       of the queue until its ACK; a NACK makes it eligible again. The queue
//       is blocked meanwhile (head-of-line blocking).
//   setaside (HS_GHS/HS_DHS, SETASIDE > 0): the flit moves from the queue head
//       into a free one-flit setaside slot and waits there; the next queued
//       flit may be sent at once. A NACKed slot is retransmitted before any new
//       flit. With all slots busy no new flit is sent.
// The handshake answer is one bit and arrives a fixed HS_DELAY cycles after the
// flit was on `tx_flit` (one ring round trip plus one cycle at the home node),
// so the sender identifies the flit it belongs to with a delay line of the
// slots it sent; no identifier travels with the answer.
// Following the document: the queue, setaside slots in parallel with it, the
// output multiplexer, single-bit ACK/NACK at a fixed delay. Own choices: queue
// depth, number of setaside slots, retransmission priority.
module hs_sender
  import hs_pkg::*;
#(
  parameter hs_mode_e    MODE     = HS_DHS_CIRC,
  parameter int unsigned QDEPTH   = 2,
  parameter int unsigned SETASIDE = 2,
  parameter int unsigned HS_DELAY = HS_SEGS + 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enq_valid,
  input  hflit_t enq_flit,
  output logic   enq_ready,
  output logic   req,
  input  logic   grant,
  output logic   tx_valid,
  output hflit_t tx_flit,
  input  logic   hs_valid,
  input  logic   hs_ack,
  output logic   ev_retx       // a retransmission was granted
);
  localparam bit          USE_SA = (MODE != HS_DHS_CIRC) && (SETASIDE > 0);
  localparam int unsigned NSA    = (SETASIDE > 0) ? SETASIDE : 1;
  localparam int unsigned QAW    = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;
  localparam int unsigned SAW    = (NSA > 1) ? $clog2(NSA) : 1;
  localparam int unsigned QCW    = $clog2(QDEPTH + 1);

  // ---------------------------------------------------------------- output queue
  hflit_t         q_mem [QDEPTH];
  logic [QAW-1:0] q_rd, q_wr;
  logic [QCW-1:0] q_cnt;
  logic           q_empty, q_deq, q_enq;

  assign q_empty   = (q_cnt == '0);
  assign enq_ready = (q_cnt != QCW'(QDEPTH));
  assign q_enq     = enq_valid && enq_ready;

  // ---------------------------------------------------------------- setaside slots
  logic [NSA-1:0] sa_valid_q, sa_wait_q;
  hflit_t         sa_flit_q [NSA];
  logic           head_wait_q;            // basic mode: head sent, awaiting answer

  // ---------------------------------------------------------------- delay line of sent slots
  logic [HS_DELAY-1:0] dl_valid_q;
  logic [SAW-1:0]      dl_slot_q [HS_DELAY];

  // ---------------------------------------------------------------- selection
  logic           retx_any, free_any;
  logic [SAW-1:0] retx_idx, free_idx;
  hflit_t         sel_flit;
  logic [SAW-1:0] sel_slot;
  logic [SAW-1:0] sel_slot_q;

  always_comb begin
    retx_any = 1'b0; retx_idx = '0;
    free_any = 1'b0; free_idx = '0;
    for (int k = NSA - 1; k >= 0; k--) begin
      if (sa_valid_q[k] && !sa_wait_q[k]) begin retx_any = 1'b1; retx_idx = SAW'(k); end
      if (!sa_valid_q[k])                 begin free_any = 1'b1; free_idx = SAW'(k); end
    end
    sel_flit = q_mem[q_rd];
    sel_slot = free_idx;
    if (MODE == HS_DHS_CIRC) begin
      req = !q_empty;
    end else if (!USE_SA) begin
      req = !q_empty && !head_wait_q;
    end else begin
      req = retx_any || (!q_empty && free_any);
      if (retx_any) begin
        sel_flit = sa_flit_q[retx_idx];
        sel_slot = retx_idx;
      end
    end
  end

  logic send;
  assign send  = grant && req;
  assign q_deq = (MODE == HS_DHS_CIRC) ? send
               : USE_SA ? (send && !retx_any)
               : (hs_valid && hs_ack && head_wait_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_rd        <= '0;
      q_wr        <= '0;
      q_cnt       <= '0;
      sa_valid_q  <= '0;
      sa_wait_q   <= '0;
      head_wait_q <= 1'b0;
      dl_valid_q  <= '0;
      tx_valid    <= 1'b0;
      tx_flit     <= '0;
      for (int k = 0; k < int'(HS_DELAY); k++) dl_slot_q[k] <= '0;
    end else begin
      // queue pointers
      if (q_enq) q_wr <= (int'(q_wr) == QDEPTH - 1) ? '0 : q_wr + 1'b1;
      if (q_deq) q_rd <= (int'(q_rd) == QDEPTH - 1) ? '0 : q_rd + 1'b1;
      q_cnt <= q_cnt + QCW'(q_enq) - QCW'(q_deq);

      // transmit register
      tx_valid <= send;
      if (send) tx_flit <= sel_flit;

      // delay line: entry k holds what was on tx k+1 cycles ago
      dl_valid_q[0] <= tx_valid && (MODE != HS_DHS_CIRC);
      dl_slot_q[0]  <= sel_slot_q;
      for (int k = 1; k < int'(HS_DELAY); k++) begin
        dl_valid_q[k] <= dl_valid_q[k-1];
        dl_slot_q[k]  <= dl_slot_q[k-1];
      end

      // sending
      if (send && MODE != HS_DHS_CIRC) begin
        if (USE_SA) begin
          sa_valid_q[sel_slot] <= 1'b1;
          sa_wait_q[sel_slot]  <= 1'b1;
        end else begin
          head_wait_q <= 1'b1;
        end
      end

      // handshake answer
      if (hs_valid) begin
        if (USE_SA) begin
          if (hs_ack) sa_valid_q[dl_slot_q[HS_DELAY-1]] <= 1'b0;
          else        sa_wait_q[dl_slot_q[HS_DELAY-1]]  <= 1'b0;
        end else begin
          head_wait_q <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sel_slot_q <= '0;
    else if (send) sel_slot_q <= sel_slot;
  end

  always_ff @(posedge clk) begin
    if (q_enq) q_mem[q_wr] <= enq_flit;
    if (USE_SA && send && !retx_any) sa_flit_q[sel_slot] <= q_mem[q_rd];
  end

  assign ev_retx = send && (USE_SA ? retx_any : 1'b0);

  a_hs_expected: assert property (@(posedge clk) disable iff (!rst_n)
    hs_valid |-> dl_valid_q[HS_DELAY-1])
    else $error("hs_sender: handshake answer without a flit in flight");
endmodule
