// noc_route_compute: output-port decision of one node for one packet.
//
// Shortest-path rule: the destination addr_x is compared with the node's addr_x
// first; a larger destination row goes SOUTH, a smaller one NORTH. When the rows
// are equal the addr_y values are compared: a larger destination column goes
// EAST, a smaller one WEST. Equal in both: the packet has arrived and leaves on
// the local port (PROCOUT). A packet whose force-y bit is set is moved along Y
// first, if it still has Y distance to cover; force-y is cleared on every move
// except the detour that sets it.
//
// Fault rule: nb_err[p] marks the neighbour behind port p as faulty. A faulty
// neighbour is not entered unless it is the packet's destination, and a port at
// the mesh boundary is never used.
//  * An EAST/WEST move into a faulty neighbour is replaced by a move NORTH (or
//    SOUTH if north is unusable) with force-y set, so that the next node first
//    steps past the faulty column instead of turning back.
//  * A NORTH/SOUTH move into a faulty neighbour is replaced by a move EAST/WEST,
//    towards the destination column first, the other side otherwise.
//  * If no alternative is usable, route_ok is low and the packet waits.
// The comparison table and the north detour with force-y follow the described
// node; the south fallback, the X-blocked detour and the boundary checks are this
// design's own completion of the rule.
//
// Purely combinational; ports: node address, the 15-bit packet, the four
// neighbour error flags; outputs: chosen port, packet with updated force-y,
// route_ok and which detour (if any) was taken.
module noc_route_compute
  import noc_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8
) (
  input  logic [ADDR_W-1:0]   addr_x,
  input  logic [ADDR_W-1:0]   addr_y,
  input  pkt_t                pkt_in,
  input  logic [NUM_DIRS-1:0] nb_err,     // indexed by port_e (N,S,E,W)
  output logic                route_ok,
  output port_e               port,
  output pkt_t                pkt_out,
  output logic                detour_y,   // E/W blocked, sent N/S with force-y
  output logic                detour_x,   // N/S blocked, sent E/W
  output logic                force_used  // force-y made this a Y move
);

  logic [NUM_DIRS-1:0] exists, is_dst, usable;
  logic                x_need, y_need, y_first;
  port_e               x_dir, y_dir, y_pref, y_other, primary;

  always_comb begin
    exists[DIR_N] = (addr_x != '0);
    exists[DIR_S] = (32'(addr_x) < ROWS - 1);
    exists[DIR_E] = (32'(addr_y) < COLS - 1);
    exists[DIR_W] = (addr_y != '0);

    // neighbour behind a port is the destination itself
    is_dst[DIR_N] = (pkt_in.flit.dst_x + 1'b1 == addr_x) && (pkt_in.flit.dst_y == addr_y);
    is_dst[DIR_S] = (addr_x + 1'b1 == pkt_in.flit.dst_x) && (pkt_in.flit.dst_y == addr_y);
    is_dst[DIR_E] = (addr_y + 1'b1 == pkt_in.flit.dst_y) && (pkt_in.flit.dst_x == addr_x);
    is_dst[DIR_W] = (pkt_in.flit.dst_y + 1'b1 == addr_y) && (pkt_in.flit.dst_x == addr_x);

    for (int p = 0; p < NUM_DIRS; p++)
      usable[p] = exists[p] && (!nb_err[p] || is_dst[p]);

    x_need  = (pkt_in.flit.dst_x != addr_x);
    y_need  = (pkt_in.flit.dst_y != addr_y);
    x_dir   = (pkt_in.flit.dst_x > addr_x) ? PORT_S : PORT_N;
    y_dir   = (pkt_in.flit.dst_y > addr_y) ? PORT_E : PORT_W;
    y_first = y_need && (pkt_in.force_y || !x_need);
    primary = y_first ? y_dir : x_dir;
    y_pref  = y_need ? y_dir : PORT_E;
    y_other = (y_pref == PORT_E) ? PORT_W : PORT_E;

    route_ok   = 1'b1;
    port       = PORT_L;
    pkt_out    = pkt_in;
    pkt_out.force_y = 1'b0;
    detour_y   = 1'b0;
    detour_x   = 1'b0;
    force_used = 1'b0;

    if (!x_need && !y_need) begin
      port = PORT_L;
    end else if (usable[primary[1:0]]) begin
      port       = primary;
      force_used = y_first && x_need;
    end else if (y_first) begin
      // Y move blocked: step north (south as fallback) and force Y next
      detour_y        = 1'b1;
      pkt_out.force_y = 1'b1;
      if (usable[DIR_N])      port = PORT_N;
      else if (usable[DIR_S]) port = PORT_S;
      else begin
        route_ok = 1'b0;
        detour_y = 1'b0;
      end
    end else begin
      // X move blocked: step sideways, towards the destination column first
      detour_x = 1'b1;
      if (usable[y_pref[1:0]])       port = y_pref;
      else if (usable[y_other[1:0]]) port = y_other;
      else begin
        route_ok = 1'b0;
        detour_x = 1'b0;
      end
    end
  end

endmodule
