// noc_node: one router node of the mesh.
//
// A node has four neighbour ports (N, S, E, W), each with a packet input and a
// packet output, plus a local port: the G input, on which the attached unit hands
// a 14-bit packet to the network, and PROCOUT, on which the byte of a packet
// addressed to this node comes out. The node knows its own position from the
// addr_x/addr_y inputs and the health of its neighbours from nb_err.
//
// Operation (one step on every clock edge, rising and falling):
//  * Each of the five inputs has a one-packet buffer. A buffer accepts a packet
//    only when it is empty; its emptiness is the ready signal shown to the
//    sender (nb_in_ready, g_ready). The ready signal depends on register state
//    only, so no combinational path runs from node to node.
//  * For every occupied buffer noc_route_compute picks an output port (X-first
//    shortest path, detour around a faulty neighbour with the force-y bit).
//  * Each output port grants one requesting buffer per step, round-robin. A
//    neighbour output may fire only when the neighbour's buffer is empty; the
//    local output always fires. A granted packet is on the output link during
//    the half period and is taken by the neighbour at the next edge, where this
//    buffer empties. Packets that lose or cannot route wait in their buffer: no
//    packet is dropped or copied.
//  * A packet for this node loads PROCOUT at the next edge; procout keeps the
//    last byte and procout_valid is high for the half period after delivery.
// Latency with no contention: a packet presented on g_in is buffered at the first
// edge, moves one hop per edge and appears on procout one edge after reaching
// its destination buffer, i.e. hops + 2 edges.
// The ports, the addressing and the routing rule follow the described node; the
// buffers, ready handshake, valid bits, round-robin arbitration, event outputs and
// asynchronous active-low reset are this design's own choices.
module noc_node
  import noc_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ADDR_W-1:0]   addr_x,
  input  logic [ADDR_W-1:0]   addr_y,
  // local port
  input  flit_t               g_in,
  input  logic                g_valid,
  output logic                g_ready,
  output logic [DATA_W-1:0]   procout,
  output logic                procout_valid,
  // neighbour ports, indexed DIR_N, DIR_S, DIR_E, DIR_W
  input  link_t               nb_in        [NUM_DIRS],
  output logic [NUM_DIRS-1:0] nb_in_ready,
  output link_t               nb_out       [NUM_DIRS],
  input  logic [NUM_DIRS-1:0] nb_out_ready,
  input  logic [NUM_DIRS-1:0] nb_err,
  output node_events_t        events
);

  localparam int unsigned NB = NUM_PORTS;          // buffers: 4 neighbours + G
  localparam int unsigned PW = $clog2(NUM_PORTS);  // arbiter pointer width
  localparam int          GB = NUM_PORTS - 1;      // index of the G buffer

  link_t          buf_q  [NB];
  link_t          buf_d  [NB];
  link_t          in_lnk [NB];

  logic  [NB-1:0] rc_ok, rc_dy, rc_dx, rc_force;
  port_e          rc_port [NB];
  pkt_t           rc_pkt  [NB];

  logic  [NB-1:0] req     [NUM_PORTS];   // req[output][buffer]
  logic  [NB-1:0] gnt     [NUM_PORTS];
  logic  [PW-1:0] gnt_idx [NUM_PORTS];
  logic  [PW-1:0] ptr_q   [NUM_PORTS];
  logic  [PW-1:0] ptr_d   [NUM_PORTS];
  logic  [NUM_PORTS-1:0] arb_any, can_send, fire;
  logic  [NB-1:0] granted;

  logic  [DATA_W:0] pout_q, pout_d;      // {valid, byte}

  // ---------------------------------------------------------------- inputs
  always_comb begin
    for (int i = 0; i < NUM_DIRS; i++) in_lnk[i] = nb_in[i];
    in_lnk[GB].valid        = g_valid;
    in_lnk[GB].pkt.force_y  = 1'b0;
    in_lnk[GB].pkt.flit     = g_in;
  end

  for (genvar i = 0; i < NB; i++) begin : g_buf
    noc_dual_edge_reg #(.W($bits(link_t))) u_buf (
      .clk, .rst_n, .d(buf_d[i]), .q(buf_q[i])
    );

    noc_route_compute #(.ROWS(ROWS), .COLS(COLS)) u_rc (
      .addr_x, .addr_y,
      .pkt_in    (buf_q[i].pkt),
      .nb_err,
      .route_ok  (rc_ok[i]),
      .port      (rc_port[i]),
      .pkt_out   (rc_pkt[i]),
      .detour_y  (rc_dy[i]),
      .detour_x  (rc_dx[i]),
      .force_used(rc_force[i])
    );
  end

  // ------------------------------------------------------------ arbitration
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++)
      for (int i = 0; i < NB; i++)
        req[o][i] = buf_q[i].valid && rc_ok[i] && (int'(rc_port[i]) == o);
    for (int o = 0; o < NUM_DIRS; o++) can_send[o] = nb_out_ready[o];
    can_send[NUM_PORTS-1] = 1'b1;
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    logic [NB-1:0] arb_gnt;
    noc_rr_arbiter #(.N(NB)) u_arb (
      .req(req[o]), .ptr(ptr_q[o]), .gnt(arb_gnt), .gnt_idx(gnt_idx[o]), .any(arb_any[o])
    );
    assign fire[o] = arb_any[o] && can_send[o];
    assign gnt[o]  = fire[o] ? arb_gnt : '0;
    assign ptr_d[o] = !fire[o] ? ptr_q[o]
                    : (32'(gnt_idx[o]) == NB - 1) ? '0 : gnt_idx[o] + 1'b1;
    noc_dual_edge_reg #(.W(PW)) u_ptr (.clk, .rst_n, .d(ptr_d[o]), .q(ptr_q[o]));
  end

  // --------------------------------------------------------------- outputs
  always_comb begin
    granted = '0;
    for (int o = 0; o < NUM_PORTS; o++) granted |= gnt[o];
    for (int o = 0; o < NUM_DIRS; o++) begin
      nb_out[o].valid = fire[o];
      nb_out[o].pkt   = rc_pkt[gnt_idx[o]];
    end
  end

  always_comb begin
    for (int i = 0; i < NB; i++) begin
      if (granted[i])                               buf_d[i] = '0;
      else if (!buf_q[i].valid && in_lnk[i].valid)  buf_d[i] = in_lnk[i];
      else                                          buf_d[i] = buf_q[i];
    end
    for (int i = 0; i < NUM_DIRS; i++) nb_in_ready[i] = !buf_q[i].valid;
    g_ready = !buf_q[GB].valid;
  end

  assign pout_d = fire[NUM_PORTS-1] ? {1'b1, rc_pkt[gnt_idx[NUM_PORTS-1]].flit.data}
                                    : {1'b0, pout_q[DATA_W-1:0]};
  noc_dual_edge_reg #(.W(DATA_W + 1)) u_pout (.clk, .rst_n, .d(pout_d), .q(pout_q));
  assign procout_valid = pout_q[DATA_W];
  assign procout       = pout_q[DATA_W-1:0];

  // ---------------------------------------------------------------- events
  always_comb begin
    events.deliver      = fire[NUM_PORTS-1];
    events.detour_y     = |(granted & rc_dy);
    events.detour_x     = |(granted & rc_dx);
    events.force_y_used = |(granted & rc_force);
    events.contention   = 1'b0;
    for (int i = 0; i < NB; i++)
      if (buf_q[i].valid && !granted[i]) events.contention = 1'b1;
    events.inject_stall = g_valid && !g_ready;
  end

  // A sender may only drive a packet into an empty buffer.
  for (genvar i = 0; i < NUM_DIRS; i++) begin : g_chk
    a_in_pos: assert property (@(posedge clk) disable iff (!rst_n)
                               !(nb_in[i].valid && buf_q[i].valid))
      else $error("noc_node: packet offered to full buffer %0d", i);
    a_in_neg: assert property (@(negedge clk) disable iff (!rst_n)
                               !(nb_in[i].valid && buf_q[i].valid))
      else $error("noc_node: packet offered to full buffer %0d", i);
  end

endmodule
