// tb_noc_route_compute: exhaustive self-check of the per-packet route decision.
//
// Every node position of an 8x8 mesh, every destination, both force-y values and
// all 16 neighbour-fault patterns are applied (131072 cases). The expected port,
// outgoing force-y and detour flags come from a reference model below that works
// from explicit neighbour coordinates. Directed cases from the described node
// operation (south, north, east-with-fault) are checked by name first.
module tb_noc_route_compute;
  import noc_pkg::*;

  localparam int ROWS = 8;
  localparam int COLS = 8;

  logic [ADDR_W-1:0]   addr_x, addr_y;
  pkt_t                pkt_in, pkt_out;
  logic [NUM_DIRS-1:0] nb_err;
  logic                route_ok, detour_y, detour_x, force_used;
  port_e               port;

  int checks = 0, failures = 0;

  noc_route_compute #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  // ---- reference model -------------------------------------------------
  function automatic bit can_enter(int x, int y, int dir, int dx, int dy, logic [3:0] err);
    int nx = x, ny = y;
    case (dir)
      0: nx = x - 1;
      1: nx = x + 1;
      2: ny = y + 1;
      default: ny = y - 1;
    endcase
    if (nx < 0 || nx >= ROWS || ny < 0 || ny >= COLS) return 0;
    if (nx == dx && ny == dy) return 1;
    return !err[dir];
  endfunction

  // returns port number (0..4) or -1 when the packet must wait; fy = force-y out
  function automatic int ref_route(int x, int y, int dx, int dy, bit force_in,
                                   logic [3:0] err, output bit fy, output int kind);
    int want;
    bit along_y;
    fy = 0; kind = 0;
    if (dx == x && dy == y) return 4;
    along_y = (dy != y) && (force_in || dx == x);
    if (along_y) want = (dy > y) ? 2 : 3;
    else         want = (dx > x) ? 1 : 0;
    if (can_enter(x, y, want, dx, dy, err)) return want;
    if (along_y) begin
      fy = 1; kind = 1;
      if (can_enter(x, y, 0, dx, dy, err)) return 0;
      if (can_enter(x, y, 1, dx, dy, err)) return 1;
    end else begin
      int first = (dy < y) ? 3 : 2;
      int second = (first == 2) ? 3 : 2;
      kind = 2;
      if (can_enter(x, y, first, dx, dy, err)) return first;
      if (can_enter(x, y, second, dx, dy, err)) return second;
    end
    fy = 0; kind = 0;
    return -1;
  endfunction

  task automatic apply(int x, int y, int dx, int dy, bit f, logic [3:0] err);
    addr_x = ADDR_W'(x); addr_y = ADDR_W'(y);
    pkt_in.force_y = f;
    pkt_in.flit.dst_x = ADDR_W'(dx); pkt_in.flit.dst_y = ADDR_W'(dy);
    pkt_in.flit.data = 8'($urandom);
    nb_err = err;
    #1;
  endtask

  task automatic expect_port(string what, port_e p, bit fy);
    checks++;
    if (!route_ok || port != p || pkt_out.force_y != fy || pkt_out.flit != pkt_in.flit) begin
      failures++;
      $display("FAIL %s: ok=%0b port=%s force_y=%0b", what, route_ok, port.name(), pkt_out.force_y);
    end
  endtask

  initial begin
    bit fy; int kind, exp;
    // Case 1: node 00 -> destination 45: destination row larger, go south
    apply(0, 0, 4, 5, 0, 4'b0000); expect_port("case1 south", PORT_S, 0);
    // Case 2: node 65 -> destination 23: destination row smaller, go north
    apply(6, 5, 2, 3, 0, 4'b0000); expect_port("case2 north", PORT_N, 0);
    // Rows equal, destination column larger: east
    apply(0, 4, 0, 7, 0, 4'b0000); expect_port("east", PORT_E, 0);
    apply(3, 4, 3, 1, 0, 4'b0000); expect_port("west", PORT_W, 0);
    // Case 3 shape: east neighbour faulty, packet sent north with force-y set
    apply(3, 4, 3, 7, 0, 4'b0100); expect_port("case3 north+force", PORT_N, 1);
    // Case 3 at row 0 (no north neighbour): sent south with force-y
    apply(0, 4, 0, 7, 0, 4'b0100); expect_port("case3 row0 south+force", PORT_S, 1);
    // force-y packet goes along Y first
    apply(2, 4, 3, 7, 1, 4'b0000); expect_port("force-y east first", PORT_E, 0);
    // arrived
    apply(4, 2, 4, 2, 0, 4'b1111); expect_port("local", PORT_L, 0);
    // faulty neighbour that is the destination is entered
    apply(4, 2, 4, 3, 0, 4'b0100); expect_port("faulty destination", PORT_E, 0);

    for (int x = 0; x < ROWS; x++)
      for (int y = 0; y < COLS; y++)
        for (int dx = 0; dx < ROWS; dx++)
          for (int dy = 0; dy < COLS; dy++)
            for (int f = 0; f < 2; f++)
              for (int e = 0; e < 16; e++) begin
                apply(x, y, dx, dy, f[0], 4'(e));
                exp = ref_route(x, y, dx, dy, f[0], 4'(e), fy, kind);
                checks++;
                if (exp < 0) begin
                  if (route_ok) begin
                    failures++;
                    if (failures < 10) $display("FAIL %0d%0d->%0d%0d f=%0d e=%b: expected wait", x, y, dx, dy, f, e);
                  end
                end else if (!route_ok || int'(port) != exp || pkt_out.force_y != fy ||
                             pkt_out.flit != pkt_in.flit ||
                             detour_y != (kind == 1) || detour_x != (kind == 2)) begin
                  failures++;
                  if (failures < 10)
                    $display("FAIL %0d%0d->%0d%0d f=%0d e=%b: got ok=%0b port=%0d fy=%0b, expected %0d fy=%0b",
                             x, y, dx, dy, f, e, route_ok, port, pkt_out.force_y, exp, fy);
                end
              end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
