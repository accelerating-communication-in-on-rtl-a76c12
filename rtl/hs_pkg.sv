// hs_pkg: types and constants of the nanophotonic handshake network.
//
// 64 nodes (each a router with four cores) share Multiple-Write-Single-Read
// optical rings: every node is the single reader ("home node") of one data
// channel and may write to all the others. The light needs 8 clock cycles for a
// full round trip, so a ring is modelled as 8 wave-pipelined segments and the
// nodes are spread evenly over them. A packet is one 256-bit flit. These
// numbers follow the evaluated configuration.
//
// Arbitration / flow-control modes:
//   HS_GHS      global handshake: one token circulates per channel; its holder
//               sends one flit per cycle until it has nothing left to send.
//   HS_DHS      distributed handshake: the home node emits a token every cycle;
//               each token allows one flit.
//   HS_DHS_CIRC distributed handshake with circulation: flits that find the home
//               buffer full are re-injected into the ring instead of dropped,
//               so no acknowledgement is needed.
// In HS_GHS and HS_DHS the home node answers every flit with one ACK/NACK bit
// on the handshake waveguide and the sender retransmits after a NACK.
package hs_pkg;

  localparam int unsigned HS_NODES  = 64;
  localparam int unsigned HS_SEGS   = 8;      // ring round trip in cycles
  localparam int unsigned HS_DATA_W = 256;    // flit size
  localparam int unsigned HS_HOME_BUF = 4;    // buffer slots per destination
  localparam int unsigned NID_W     = $clog2(HS_NODES);

  typedef enum logic [1:0] {
    HS_GHS      = 2'd0,
    HS_DHS      = 2'd1,
    HS_DHS_CIRC = 2'd2
  } hs_mode_e;

  typedef struct packed {
    logic [NID_W-1:0]     src;
    logic [HS_DATA_W-1:0] data;
  } hflit_t;

endpackage
