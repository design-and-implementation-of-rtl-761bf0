// noc_pkg: shared types and constants of the 8x8 mesh network-on-chip.
//
// A packet entering a node from its attached unit (the G input) is 14 bits:
//   [13:11] destination addr_x (row, grows towards the south)
//   [10:8]  destination addr_y (column, grows towards the east)
//   [7:0]   payload byte
// Between nodes one more bit travels on top, bit 14, the force-y bit: when it is
// set the receiving node moves the packet along Y before X. Field positions and
// widths follow the described packet format; the valid bit carried next to a
// packet on every link is this design's own addition.
package noc_pkg;

  localparam int unsigned ADDR_W    = 3;   // 3-bit addr_x and addr_y: 8 rows, 8 columns
  localparam int unsigned DATA_W    = 8;   // one data byte per packet
  localparam int unsigned NUM_DIRS  = 4;   // N, S, E, W neighbour ports
  localparam int unsigned NUM_PORTS = 5;   // neighbour ports plus the local port

  // Port numbering used for every per-port array in the design.
  typedef enum logic [2:0] {
    PORT_N = 3'd0,
    PORT_S = 3'd1,
    PORT_E = 3'd2,
    PORT_W = 3'd3,
    PORT_L = 3'd4    // local: G input / PROCOUT output
  } port_e;

  // The same numbering as plain integers, for indexing per-direction vectors.
  localparam int DIR_N = 0;
  localparam int DIR_S = 1;
  localparam int DIR_E = 2;
  localparam int DIR_W = 3;

  // 14-bit packet as presented on datain.
  typedef struct packed {
    logic [ADDR_W-1:0] dst_x;
    logic [ADDR_W-1:0] dst_y;
    logic [DATA_W-1:0] data;
  } flit_t;

  // 15-bit packet as carried between nodes (bit 14 = force-y).
  typedef struct packed {
    logic  force_y;
    flit_t flit;
  } pkt_t;

  // One node-to-node link: the packet and a valid strobe.
  typedef struct packed {
    logic valid;
    pkt_t pkt;
  } link_t;

  // Per-node event strobes, one half clock period wide, for observing the network.
  typedef struct packed {
    logic deliver;       // a packet left on PROCOUT
    logic detour_y;      // an east/west move was blocked: sent north/south with force-y
    logic detour_x;      // a north/south move was blocked: sent east/west
    logic force_y_used;  // a packet with force-y set was moved along Y first
    logic contention;    // a buffered packet waited for its output port
    logic inject_stall;  // datain was valid while the G buffer was full
  } node_events_t;

endpackage
