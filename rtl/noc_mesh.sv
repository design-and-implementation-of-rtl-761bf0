// noc_mesh: ROWS x COLS mesh network-on-chip (8 x 8 = 64 nodes by default).
//
// Node (x, y) sits in row x (addr_x, growing towards the south) and column y
// (addr_y, growing towards the east). Its north port faces node (x-1, y), its
// south port (x+1, y), its east port (x, y+1) and its west port (x, y-1). Every
// node gets its own coordinates as constant addr_x/addr_y inputs.
//
// Per node the mesh brings out:
//  datain[x][y]        14-bit packet {dst_x, dst_y, byte} from the attached unit
//  datain_valid/ready  handshake: the packet is taken at an edge where both are high
//  procout[x][y]       last byte delivered to this node, procout_valid for the
//                      half period after each delivery
//  error[x][y]         the node is faulty: its neighbours route around it (a
//                      packet addressed to it is still handed to it)
//  events[x][y]        per-node event strobes (noc_pkg::node_events_t)
// Each node's nb_err input is the error flag of the node behind each port. Ports
// on the mesh boundary see no packets, no ready and an error flag of 1.
// Everything moves on both clock edges (one hop per half period). The mesh
// size, the address split, the G/PROCOUT/error signals per node and the both-edge
// operation follow the described network; the handshake and event outputs are
// this design's own additions.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  flit_t               datain        [ROWS][COLS],
  input  logic                datain_valid  [ROWS][COLS],
  output logic                datain_ready  [ROWS][COLS],
  input  logic                error         [ROWS][COLS],
  output logic [DATA_W-1:0]   procout       [ROWS][COLS],
  output logic                procout_valid [ROWS][COLS],
  output node_events_t        events        [ROWS][COLS]
);

  // out_l[x][y][d]: link leaving node (x,y) through port d; rdy_l: that node's
  // input-buffer ready on port d.
  link_t               out_l [ROWS][COLS][NUM_DIRS];
  logic [NUM_DIRS-1:0] rdy_l [ROWS][COLS];

  for (genvar x = 0; x < ROWS; x++) begin : g_row
    for (genvar y = 0; y < COLS; y++) begin : g_col
      link_t               in_l [NUM_DIRS];
      logic [NUM_DIRS-1:0] out_rdy, nb_err;

      // north neighbour (x-1, y): its south output feeds our north input
      if (x > 0) begin : g_n
        assign in_l[DIR_N]    = out_l[x-1][y][DIR_S];
        assign out_rdy[DIR_N] = rdy_l[x-1][y][DIR_S];
        assign nb_err[DIR_N]  = error[x-1][y];
      end else begin : g_n_edge
        assign in_l[DIR_N]    = '0;
        assign out_rdy[DIR_N] = 1'b0;
        assign nb_err[DIR_N]  = 1'b1;
      end
      if (x < ROWS - 1) begin : g_s
        assign in_l[DIR_S]    = out_l[x+1][y][DIR_N];
        assign out_rdy[DIR_S] = rdy_l[x+1][y][DIR_N];
        assign nb_err[DIR_S]  = error[x+1][y];
      end else begin : g_s_edge
        assign in_l[DIR_S]    = '0;
        assign out_rdy[DIR_S] = 1'b0;
        assign nb_err[DIR_S]  = 1'b1;
      end
      if (y < COLS - 1) begin : g_e
        assign in_l[DIR_E]    = out_l[x][y+1][DIR_W];
        assign out_rdy[DIR_E] = rdy_l[x][y+1][DIR_W];
        assign nb_err[DIR_E]  = error[x][y+1];
      end else begin : g_e_edge
        assign in_l[DIR_E]    = '0;
        assign out_rdy[DIR_E] = 1'b0;
        assign nb_err[DIR_E]  = 1'b1;
      end
      if (y > 0) begin : g_w
        assign in_l[DIR_W]    = out_l[x][y-1][DIR_E];
        assign out_rdy[DIR_W] = rdy_l[x][y-1][DIR_E];
        assign nb_err[DIR_W]  = error[x][y-1];
      end else begin : g_w_edge
        assign in_l[DIR_W]    = '0;
        assign out_rdy[DIR_W] = 1'b0;
        assign nb_err[DIR_W]  = 1'b1;
      end

      noc_node #(.ROWS(ROWS), .COLS(COLS)) u_node (
        .clk,
        .rst_n,
        .addr_x       (ADDR_W'(x)),
        .addr_y       (ADDR_W'(y)),
        .g_in         (datain[x][y]),
        .g_valid      (datain_valid[x][y]),
        .g_ready      (datain_ready[x][y]),
        .procout      (procout[x][y]),
        .procout_valid(procout_valid[x][y]),
        .nb_in        (in_l),
        .nb_in_ready  (rdy_l[x][y]),
        .nb_out       (out_l[x][y]),
        .nb_out_ready (out_rdy),
        .nb_err       (nb_err),
        .events       (events[x][y])
      );
    end
  end

endmodule
