// tpbr_pkg: types and constants shared by the TPBR router-controller chip.
//
// The chip talks to its four port buffers (network interface cards) over a
// 16-bit bus and exchanges fixed 16-byte control packets with its neighbours.
// A packet is moved over the bus as eight 16-bit words, word 0 first; word w
// carries bits [127-16w -: 16] of pkt_t.
//
// Packet layout (one byte per field except the 64-bit data field):
//   src       node that created the packet
//   hop       node that transmitted this copy (last hop)
//   dest      destination node, 8'hFF for broadcast
//   ptype     packet type, see ptype_e
//   sub       type-specific: probe packets carry the port the probe left on
//   counter   degree packets: number of claimed slots; release packets: the
//             next token value; table packets: the step number t
//   data      degree packets: 16 slots of {R, W, degree-1}; slot n in
//             bits [63-4n -: 4]; table packets: the T vector in [15:0]
//   time_left hop budget, 8'h20 when created, decremented at each forward
//   crc       XOR of the other fifteen bytes
// The 16-byte size, the counter, the per-node {R, W, degree} slots, the
// time-left byte (20h) and the CRC byte follow the document; the field order,
// the type codes other than 1 and the XOR check are this design's choice.
package tpbr_pkg;

  localparam int NPORTS     = 4;          // network ports of a router
  localparam int PMAT       = NPORTS + 1; // P/R/D rows: 0 = local CPU, 1..4 = ports 0..3
  localparam int MAX_NODES  = 16;         // slots in a degree packet
  localparam int PKT_WORDS  = 8;          // 16-bit words per packet
  localparam logic [7:0] BCAST    = 8'hFF;
  localparam logic [7:0] TTL_INIT = 8'h20;
  localparam logic [7:0] NO_ROUTE = 8'hFF; // "X": undetermined R / D entry

  typedef enum logic [7:0] {
    PT_DEGREE  = 8'd1,  // degree claim packet (token unit)
    PT_PROBE   = 8'd2,  // flat packet used to find components of connectivity
    PT_RELEASE = 8'd3,  // token release, flooded to all nodes
    PT_SPECIAL = 8'd4,  // tells a neighbour it is a special node
    PT_TABLE   = 8'd5   // T vector of one routing-table step
  } ptype_e;

  typedef struct packed {
    logic [7:0]  src;
    logic [7:0]  hop;
    logic [7:0]  dest;
    ptype_e      ptype;
    logic [7:0]  sub;
    logic [7:0]  counter;
    logic [63:0] data;
    logic [7:0]  time_left;
    logic [7:0]  crc;
  } pkt_t;

  // One-cycle event strobes of a chip, for monitoring.
  typedef struct packed {
    logic deg_merge;    // degree packet changed the node's copy and is sent on
    logic deg_drop;     // degree packet brought nothing new
    logic probe_fwd;    // probe forwarded
    logic probe_drop;   // probe dropped (already forwarded, or node has run)
    logic probe_ret;    // own probe came back
    logic special_tx;   // special packet sent to a neighbour
    logic release_fwd;  // token release forwarded
    logic rt_step;      // routing-table step applied
    logic rt_write;     // that step wrote R entries
    logic crc_drop;     // received packet failed the crc check
    logic ttl_drop;     // received packet had no time left
    logic bus_wait;     // receive unit waiting while the transmit unit holds the bus
    logic pkt_sent;     // one packet copy written to a port buffer
  } chip_ev_t;

  // XOR of bytes 15..1 (everything but the crc byte itself).
  function automatic logic [7:0] pkt_crc(input pkt_t p);
    logic [127:0] b;
    logic [7:0]   c;
    b = p;
    c = '0;
    for (int i = 1; i < 16; i++) c ^= b[8*i +: 8];
    return c;
  endfunction

  // One 16-bit bus word of a packet.
  function automatic logic [15:0] pkt_word(input pkt_t p, input logic [2:0] w);
    logic [127:0] b;
    b = p;
    return b[127 - 16*w -: 16];
  endfunction

endpackage
