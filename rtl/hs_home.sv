// hs_home: input module of the home node of one optical data channel (the
// single reader of a Multiple-Write-Single-Read ring).
//
// A flit arriving from the ring (`rx_valid`, after O/E conversion) is stored in
// the node's input buffer (BUF slots, drained towards the router through
// `ej_*`) if a slot is free, judged on the registered occupancy. Otherwise:
//   HS_GHS / HS_DHS : the flit is dropped;
//   HS_DHS_CIRC     : the circulation controller re-injects it into the data
//                     channel in the next cycle, and in the arrival cycle no
//                     token is emitted so that the data slot the re-injected
//                     flit takes is not given to a sender.
// In HS_GHS and HS_DHS every arrival is answered in the next cycle with one
// bit on the handshake waveguide (`hs_ack` = 1 for ACK, 0 for NACK), addressed
// to the flit's source node.
// Tokens (`tok_gen`): in HS_GHS the home node emits the single channel token
// once, in the first cycle after reset, and the ring keeps it circulating;
// in HS_DHS it emits a token every cycle; in HS_DHS_CIRC every cycle except
// those in which it claims the slot for a re-injection.
// Following the document: drop/ACK/NACK, circulation, token rules. Own
// choices: one-cycle answer latency, the FIFO organisation of the buffer.
module hs_home
  import hs_pkg::*;
#(
  parameter hs_mode_e    MODE = HS_DHS_CIRC,
  parameter int unsigned BUF  = HS_HOME_BUF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx_valid,
  input  hflit_t           rx_flit,
  output logic             ej_valid,
  output hflit_t           ej_flit,
  input  logic             ej_ready,
  output logic             tok_gen,
  output logic             reinj_valid,
  output hflit_t           reinj_flit,
  output logic             hs_valid,
  output logic [NID_W-1:0] hs_dst,
  output logic             hs_ack,
  output logic             ev_drop,
  output logic             ev_reinject
);
  localparam int unsigned AW = (BUF > 1) ? $clog2(BUF) : 1;
  localparam int unsigned CW = $clog2(BUF + 1);

  hflit_t        mem [BUF];
  logic [AW-1:0] rd, wr;
  logic [CW-1:0] cnt;
  logic          space, store, deq, first_q;

  assign space = (cnt != CW'(BUF));
  assign store = rx_valid && space;
  assign deq   = ej_valid && ej_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd          <= '0;
      wr          <= '0;
      cnt         <= '0;
      first_q     <= 1'b1;
      hs_valid    <= 1'b0;
      hs_dst      <= '0;
      hs_ack      <= 1'b0;
      reinj_valid <= 1'b0;
      reinj_flit  <= '0;
    end else begin
      first_q <= 1'b0;
      if (store) wr <= (int'(wr) == BUF - 1) ? '0 : wr + 1'b1;
      if (deq)   rd <= (int'(rd) == BUF - 1) ? '0 : rd + 1'b1;
      cnt <= cnt + CW'(store) - CW'(deq);
      hs_valid    <= rx_valid && (MODE != HS_DHS_CIRC);
      hs_dst      <= rx_flit.src;
      hs_ack      <= space;
      reinj_valid <= rx_valid && !space && (MODE == HS_DHS_CIRC);
      reinj_flit  <= rx_flit;
    end
  end

  always_ff @(posedge clk) begin
    if (store) mem[wr] <= rx_flit;
  end

  assign ej_valid    = (cnt != '0);
  assign ej_flit     = mem[rd];
  assign ev_drop     = rx_valid && !space && (MODE != HS_DHS_CIRC);
  assign ev_reinject = rx_valid && !space && (MODE == HS_DHS_CIRC);

  always_comb begin
    case (MODE)
      HS_GHS:  tok_gen = first_q;
      HS_DHS:  tok_gen = 1'b1;
      default: tok_gen = !(rx_valid && !space);
    endcase
  end
endmodule
