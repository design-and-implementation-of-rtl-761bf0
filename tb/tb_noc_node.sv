// tb_noc_node: self-check of one router node, the testbench acting as its four
// neighbours and its attached unit.
//
// Part 1 replays the three single-node cases of the described design (south,
// north, east blocked by a faulty neighbour) and checks the output port, the
// force-y bit and the timing: a packet taken from g_in at one edge is on the
// output link during the next half period.
// Part 2 checks arbitration: two inputs that want the same output both get
// through, one per edge, and a blocked output (ready low) holds the packet.
// Part 3 is random traffic into all five inputs of node (3,4) with random
// output backpressure; every packet is tagged by its payload byte and must leave
// exactly once, on the X-first port worked out by the testbench.
module tb_noc_node;
  import noc_pkg::*;

  localparam time HALF = 5;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic [ADDR_W-1:0]   addr_x, addr_y;
  flit_t               g_in;
  logic                g_valid, g_ready;
  logic [DATA_W-1:0]   procout;
  logic                procout_valid;
  link_t               nb_in  [NUM_DIRS];
  logic [NUM_DIRS-1:0] nb_in_ready;
  link_t               nb_out [NUM_DIRS];
  logic [NUM_DIRS-1:0] nb_out_ready;
  logic [NUM_DIRS-1:0] nb_err;
  node_events_t        events;

  int checks = 0, failures = 0;

  noc_node dut (.*);

  always #HALF clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic idle_inputs();
    g_valid = 1'b0; g_in = '0;
    for (int d = 0; d < NUM_DIRS; d++) nb_in[d] = '0;
  endtask

  function automatic flit_t mk(int dx, int dy, logic [7:0] data);
    flit_t f;
    f.dst_x = ADDR_W'(dx); f.dst_y = ADDR_W'(dy); f.data = data;
    return f;
  endfunction

  // after the next edge (either polarity), one time unit later
  task automatic next_edge();
    @(clk); #1;
  endtask

  task automatic do_reset();
    rst_n = 1'b0; idle_inputs(); nb_out_ready = '1; nb_err = '0;
    repeat (2) @(clk);              // one rising and one falling edge in reset
    #2 rst_n = 1'b1;                // released away from any edge
    next_edge();
  endtask

  // inject on G, expect the packet on output 'exp' one edge later
  task automatic single_case(string name, int ax, int ay, flit_t f, logic [3:0] err,
                             int exp, bit exp_fy);
    addr_x = ADDR_W'(ax); addr_y = ADDR_W'(ay);
    do_reset();
    nb_err = err;
    g_in = f; g_valid = 1'b1;
    check(g_ready, {name, ": g_ready"});
    next_edge();                               // edge 1: G buffer loaded
    g_valid = 1'b0;
    #1;
    if (exp < NUM_DIRS) begin
      for (int d = 0; d < NUM_DIRS; d++)
        check(nb_out[d].valid == (d == exp), $sformatf("%s: valid on port %0d", name, d));
      check(nb_out[exp].pkt.flit == f, {name, ": packet"});
      check(nb_out[exp].pkt.force_y == exp_fy, {name, ": force-y"});
      next_edge();                             // edge 2: sent
      check(!nb_out[exp].valid, {name, ": sent once"});
      check(g_ready, {name, ": G buffer empty"});
    end else begin
      next_edge();                             // edge 2: delivered
      check(procout_valid && procout == f.data, {name, ": procout"});
      next_edge();
      check(!procout_valid && procout == f.data, {name, ": procout held, strobe ends"});
    end
  endtask

  // ---------------------------------------------------------- random phase
  typedef struct { int exp_port; pkt_t pkt; } item_t;
  item_t inflight[int];           // keyed by payload byte
  int    tag = 0, sent = 0, received = 0;

  function automatic int xy_port(int ax, int ay, flit_t f);
    if (int'(f.dst_x) > ax) return DIR_S;
    if (int'(f.dst_x) < ax) return DIR_N;
    if (int'(f.dst_y) > ay) return DIR_E;
    if (int'(f.dst_y) < ay) return DIR_W;
    return 4;
  endfunction

  task automatic take(int port, logic [7:0] data, bit fy);
    checks++;
    if (!inflight.exists(int'(data))) begin
      failures++; $display("FAIL packet %0d on port %0d not in flight", data, port);
    end else begin
      if (inflight[int'(data)].exp_port != port || fy) begin
        failures++;
        $display("FAIL packet %0d left on %0d, expected %0d", data, port, inflight[int'(data)].exp_port);
      end
      inflight.delete(int'(data));
      received++;
    end
  endtask

  initial begin
    addr_x = '0; addr_y = '0; nb_err = '0; nb_out_ready = '1; idle_inputs();

    // Part 1: cases of the described node
    single_case("case1 00->45 south", 0, 0, mk(4, 5, 8'b01010111), 4'b0000, DIR_S, 0);
    single_case("case2 65->23 north", 6, 5, mk(2, 3, 8'b00010111), 4'b0000, DIR_N, 0);
    single_case("case3 34->37 east faulty", 3, 4, mk(3, 7, 8'b10101010), 4'b0100, DIR_N, 1);
    single_case("case3 04->07 east faulty, row 0", 0, 4, mk(0, 7, 8'b10101010), 4'b0100, DIR_S, 1);
    single_case("west", 5, 5, mk(5, 1, 8'h3C), 4'b0000, DIR_W, 0);
    single_case("local", 2, 6, mk(2, 6, 8'hC3), 4'b1111, 4, 0);

    // Part 2: two packets for the south port, south output blocked at first
    addr_x = 3; addr_y = 4; do_reset();
    nb_out_ready[DIR_S] = 1'b0;
    g_in = mk(7, 4, 8'h11); g_valid = 1'b1;
    nb_in[DIR_N].valid = 1'b1; nb_in[DIR_N].pkt = '{force_y: 1'b0, flit: mk(6, 4, 8'h22)};
    next_edge(); idle_inputs();
    #1;
    check(!nb_out[DIR_S].valid && events.contention, "blocked output holds both");
    next_edge(); #1;
    check(!nb_out[DIR_S].valid && !g_ready && !nb_in_ready[DIR_N], "still held");
    nb_out_ready[DIR_S] = 1'b1; #1;
    check(nb_out[DIR_S].valid && events.contention, "first granted, second waits");
    begin
      logic [7:0] first;
      first = nb_out[DIR_S].pkt.flit.data;
      next_edge(); #1;
      check(nb_out[DIR_S].valid && nb_out[DIR_S].pkt.flit.data != first &&
            (nb_out[DIR_S].pkt.flit.data inside {8'h11, 8'h22}), "second follows next edge");
      next_edge(); #1;
      check(!nb_out[DIR_S].valid && g_ready && nb_in_ready[DIR_N], "both gone");
    end

    // Part 3: random traffic at node (3,4)
    addr_x = 3; addr_y = 4; do_reset();
    for (int step = 0; step < 4000; step++) begin
      // new offers, only into empty buffers (the handshake rule)
      idle_inputs();
      if (step < 3800) begin
        if (g_ready && $urandom_range(1, 0) == 1 && inflight.size() < 200) begin
          g_in = mk($urandom_range(7, 0), $urandom_range(7, 0), 8'(tag));
          g_valid = 1'b1;
        end
        for (int d = 0; d < NUM_DIRS; d++)
          if (nb_in_ready[d] && $urandom_range(1, 0) == 1) begin
            nb_in[d].valid = 1'b1;
            nb_in[d].pkt = '{force_y: 1'b0,
                             flit: mk($urandom_range(7, 0), $urandom_range(7, 0), 8'(tag + 1 + d))};
          end
      end
      if (g_valid) begin
        inflight[int'(g_in.data)] = '{exp_port: xy_port(3, 4, g_in), pkt: '{1'b0, g_in}};
        sent++;
      end
      for (int d = 0; d < NUM_DIRS; d++)
        if (nb_in[d].valid) begin
          inflight[int'(nb_in[d].pkt.flit.data)] = '{exp_port: xy_port(3, 4, nb_in[d].pkt.flit),
                                                    pkt: nb_in[d].pkt};
          sent++;
        end
      tag = (tag + 5) % 250;
      nb_out_ready = 4'($urandom);
      #1;
      for (int d = 0; d < NUM_DIRS; d++)
        if (nb_out[d].valid) take(d, nb_out[d].pkt.flit.data, nb_out[d].pkt.force_y);
      next_edge();
      if (procout_valid) take(4, procout, 1'b0);
    end
    check(inflight.size() == 0, $sformatf("all packets left (%0d still inside)", inflight.size()));
    check(sent == received && sent > 1000, $sformatf("sent %0d received %0d", sent, received));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
