// tb_noc_mesh: end-to-end self-check of the full 8x8 mesh at its default size.
//
// Phase 1  the four simultaneous transfers of the described network example:
//          00->42 "11001100", 47->01 "10101010", 71->26 "11001001",
//          72->26 "11100011". Each byte must come out once at its destination;
//          the two transfers that share no path are also checked for the
//          contention-free latency of hops+1 edges from acceptance to PROCOUT.
// Phase 2  east neighbour faulty: 04->07 with node 05 faulty (detour with force-y);
//          the detour path is 5 hops, checked through the latency.
// Phase 3  south neighbour faulty: 13->63 with node 33 faulty (sideways detour),
//          7 hops.
// Phase 4  random traffic from all 64 nodes, no faults, until every packet is in.
// Phase 5  random traffic with three scattered faulty nodes (never addressed).
// A scoreboard keyed by destination checks every delivery: no loss, no copy.
// Each mechanism (delivery on rising and on falling edges, detour with force-y,
// force-y used, sideways detour, contention, injection stall) is counted; one
// that never happens counts as a failure.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int  ROWS = 8;
  localparam int  COLS = 8;
  localparam time HALF = 5;

  logic              clk = 1'b0, rst_n = 1'b0;
  flit_t             datain        [ROWS][COLS];
  logic              datain_valid  [ROWS][COLS];
  logic              datain_ready  [ROWS][COLS];
  logic              error         [ROWS][COLS];
  logic [DATA_W-1:0] procout       [ROWS][COLS];
  logic              procout_valid [ROWS][COLS];
  node_events_t      events        [ROWS][COLS];

  noc_mesh dut (.*);

  always #HALF clk = ~clk;

  int checks = 0, failures = 0;
  int edge_no = 0;

  // mechanism counters
  int n_deliver_pos = 0, n_deliver_neg = 0, n_detour_y = 0, n_detour_x = 0;
  int n_force_used = 0, n_contention = 0, n_inject_stall = 0;

  // scoreboard: expected bytes per destination, and accept edge per (dest, byte)
  int expect_q [ROWS*COLS][$];
  int accept_edge [ROWS*COLS][256];
  int last_latency [ROWS*COLS][256];
  int outstanding = 0;
  bit rdy_seen [ROWS][COLS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (edge %0d)", what, edge_no); end
  endtask

  function automatic flit_t mk(int dx, int dy, logic [7:0] data);
    flit_t f;
    f.dst_x = ADDR_W'(dx); f.dst_y = ADDR_W'(dy); f.data = data;
    return f;
  endfunction

  // one half period: edge, bookkeeping, then the caller sets new offers
  task automatic step();
    @(clk); #1;
    edge_no++;
    for (int x = 0; x < ROWS; x++)
      for (int y = 0; y < COLS; y++) begin
        int d = x * COLS + y;
        if (datain_valid[x][y] && rdy_seen[x][y]) begin
          int dd = int'(datain[x][y].dst_x) * COLS + int'(datain[x][y].dst_y);
          expect_q[dd].push_back(int'(datain[x][y].data));
          accept_edge[dd][datain[x][y].data] = edge_no;
          outstanding++;
          datain_valid[x][y] = 1'b0;
        end
        if (procout_valid[x][y]) begin
          int idx[$];
          if (clk) n_deliver_pos++; else n_deliver_neg++;
          idx = expect_q[d].find_first_index(v) with (v == int'(procout[x][y]));
          checks++;
          if (idx.size() == 0) begin
            failures++;
            $display("FAIL unexpected byte %h at node %0d%0d (edge %0d)", procout[x][y], x, y, edge_no);
          end else begin
            expect_q[d].delete(idx[0]);
            outstanding--;
            last_latency[d][procout[x][y]] = edge_no - accept_edge[d][procout[x][y]];
          end
        end
        if (events[x][y].detour_y)     n_detour_y++;
        if (events[x][y].detour_x)     n_detour_x++;
        if (events[x][y].force_y_used) n_force_used++;
        if (events[x][y].contention)   n_contention++;
        if (events[x][y].inject_stall) n_inject_stall++;
      end
  endtask

  // record ready after the caller has set this half period's offers
  task automatic sample_ready();
    #1;
    for (int x = 0; x < ROWS; x++)
      for (int y = 0; y < COLS; y++) rdy_seen[x][y] = datain_ready[x][y];
  endtask

  task automatic offer(int sx, int sy, int dx, int dy, logic [7:0] data);
    datain[sx][sy] = mk(dx, dy, data);
    datain_valid[sx][sy] = 1'b1;
  endtask

  task automatic drain(int max_steps, string what);
    int n = 0;
    while ((outstanding > 0 || any_offer()) && n < max_steps) begin
      sample_ready(); step(); n++;
    end
    check(outstanding == 0 && !any_offer(), $sformatf("%s: all delivered (%0d left)", what, outstanding));
  endtask

  function automatic bit any_offer();
    for (int x = 0; x < ROWS; x++)
      for (int y = 0; y < COLS; y++) if (datain_valid[x][y]) return 1;
    return 0;
  endfunction

  task automatic random_traffic(int steps, int pct, string what);
    for (int s = 0; s < steps; s++) begin
      for (int x = 0; x < ROWS; x++)
        for (int y = 0; y < COLS; y++)
          if (!datain_valid[x][y] && !error[x][y] && $urandom_range(99, 0) < pct) begin
            int dx, dy, dd;
            do begin
              dx = $urandom_range(ROWS - 1, 0); dy = $urandom_range(COLS - 1, 0);
            end while (error[dx][dy]);
            dd = dx * COLS + dy;
            // bytes unique per destination while in flight
            offer(x, y, dx, dy, 8'((s * 64 + x * COLS + y) % 256));
            if (expect_q[dd].size() > 0 &&
                expect_q[dd].find_first_index(v) with (v == int'(datain[x][y].data)) .size() > 0)
              datain_valid[x][y] = 1'b0;
          end
      sample_ready(); step();
    end
    drain(4000, what);
  endtask

  initial begin
    for (int x = 0; x < ROWS; x++)
      for (int y = 0; y < COLS; y++) begin
        datain[x][y] = '0; datain_valid[x][y] = 1'b0; error[x][y] = 1'b0;
      end
    #(3 * HALF + 2);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // Phase 1: the four transfers of the network example
    offer(0, 0, 4, 2, 8'b11001100);
    offer(4, 7, 0, 1, 8'b10101010);
    offer(7, 1, 2, 6, 8'b11001001);
    offer(7, 2, 2, 6, 8'b11100011);
    check({datain[0][0]} == 14'b10001011001100, "packet 1 bits");
    check({datain[4][7]} == 14'b00000110101010, "packet 2 bits");
    check({datain[7][1]} == 14'b01011011001001, "packet 3 bits");
    check({datain[7][2]} == 14'b01011011100011, "packet 4 bits");
    drain(200, "example transfers");
    check(last_latency[4*COLS+2][8'b11001100] == 6 + 1, $sformatf("00->42 latency %0d edges",
          last_latency[4*COLS+2][8'b11001100]));
    check(last_latency[0*COLS+1][8'b10101010] == 10 + 1, $sformatf("47->01 latency %0d edges",
          last_latency[0*COLS+1][8'b10101010]));

    // Phase 2: 04 -> 07, node 05 faulty
    error[0][5] = 1'b1;
    offer(0, 4, 0, 7, 8'b10101010);
    drain(200, "east fault detour");
    error[0][5] = 1'b0;
    // 04 -> 14 (south, force-y) -> 15 -> 16 (north blocked, sideways) -> 06 -> 07
    check(last_latency[0*COLS+7][8'b10101010] == 5 + 1, $sformatf("04->07 around 05: latency %0d edges",
          last_latency[0*COLS+7][8'b10101010]));
    check(n_detour_y > 0 && n_force_used > 0, "east fault: detour with force-y seen");

    // Phase 3: 13 -> 63, node 33 faulty
    error[3][3] = 1'b1;
    offer(1, 3, 6, 3, 8'h5A);
    drain(200, "south fault detour");
    error[3][3] = 1'b0;
    // 13 -> 23 -> 24 (sideways) -> 34 -> 44 -> 54 -> 64 -> 63
    check(last_latency[6*COLS+3][8'h5A] == 7 + 1, $sformatf("13->63 around 33: latency %0d edges",
          last_latency[6*COLS+3][8'h5A]));
    check(n_detour_x > 0, "south fault: sideways detour seen");

    // Phase 4: random traffic, no faults
    random_traffic(300, 30, "random traffic");

    // Phase 5: random traffic, three scattered faulty nodes
    error[2][2] = 1'b1; error[5][4] = 1'b1; error[3][6] = 1'b1;
    random_traffic(200, 2, "random traffic with faults");

    check(n_deliver_pos > 0,  $sformatf("deliveries on rising edges: %0d", n_deliver_pos));
    check(n_deliver_neg > 0,  $sformatf("deliveries on falling edges: %0d", n_deliver_neg));
    check(n_detour_y > 0,     $sformatf("detours with force-y: %0d", n_detour_y));
    check(n_force_used > 0,   $sformatf("force-y moves: %0d", n_force_used));
    check(n_detour_x > 0,     $sformatf("sideways detours: %0d", n_detour_x));
    check(n_contention > 0,   $sformatf("contention half-periods: %0d", n_contention));
    check(n_inject_stall > 0, $sformatf("injection stalls: %0d", n_inject_stall));
    $display("mechanisms: deliver+ %0d deliver- %0d detour_y %0d force_y %0d detour_x %0d contention %0d inject_stall %0d",
             n_deliver_pos, n_deliver_neg, n_detour_y, n_force_used, n_detour_x, n_contention, n_inject_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets outstanding", outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
