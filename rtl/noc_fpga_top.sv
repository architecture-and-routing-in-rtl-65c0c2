// noc_fpga_top: network-on-chip for a hierarchical programmable chip.
//
// An N x N uniform mesh of hard routers (router), each with one
// configurable network interface (cni) on its local port. The regions that
// would sit behind the interfaces (programmable fabric or hard IP) are not
// part of this module: each interface's region-side packet port is brought
// out as one slice of the tx_* / rx_* arrays, indexed by node ID
// id = y*N + x. Router (x,y) links east to (x+1,y) and north to (x,y+1);
// links leaving the mesh edge are tied off.
//
// Configuration: cfg_mode picks the routing scheme (plain XY, plain YX,
// toggle, weighted toggle, source parity, per-destination table) and
// cfg_cxy the weighted-toggle threshold for every interface, as the scheme
// computes one weight for the whole chip. The per-destination (WOT) table
// is private to each interface and is written one bit at a time through
// cfg_wot_we / cfg_wot_node / cfg_wot_dest / cfg_wot_bit. The mesh, the hard
// routers with two VCs and the soft routing layer follow the architecture;
// one interface per router and the configuration port are this design's own.
//
// Timing: one clock per hop on a free path plus one cycle each to enter and
// leave; a packet is BODY_FLITS+1 flits long.
module noc_fpga_top
  import noc_pkg::*;
#(
  parameter int unsigned N          = noc_pkg::N,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  route_mode_e                                   cfg_mode,
  input  logic [RNG_W-1:0]                              cfg_cxy,
  input  logic                                          cfg_wot_we,
  input  logic [ID_W-1:0]                               cfg_wot_node,
  input  logic [ID_W-1:0]                               cfg_wot_dest,
  input  logic                                          cfg_wot_bit,
  input  logic [N*N-1:0]                                tx_valid,
  output logic [N*N-1:0]                                tx_ready,
  input  logic [N*N-1:0][ID_W-1:0]                      tx_dest,
  input  logic [N*N-1:0][BODY_FLITS-1:0][DATA_W-1:0]    tx_data,
  output logic [N*N-1:0]                                rx_valid,
  input  logic [N*N-1:0]                                rx_ready,
  output logic [N*N-1:0][ID_W-1:0]                      rx_src,
  output logic [N*N-1:0]                                rx_xy,
  output logic [N*N-1:0][BODY_FLITS-1:0][DATA_W-1:0]    rx_data
);
  localparam int unsigned NODES = N * N;

  // Node IDs are ID_W bits wide (5 bits for the 5x5 grid); a larger mesh
  // needs ID_W in noc_pkg raised to at least clog2(N*N).
  if (NODES > (1 << ID_W)) begin : g_size_check
    $error("noc_fpga_top: %0d nodes do not fit %0d-bit node IDs", NODES, ID_W);
  end

  link_t [NODES-1:0][NUM_PORTS-1:0]             r_in, r_out;
  logic  [NODES-1:0][NUM_PORTS-1:0][NUM_VC-1:0] r_in_ready, r_out_ready;

  for (genvar y = 0; y < N; y++) begin : g_y
    for (genvar x = 0; x < N; x++) begin : g_x
      localparam int unsigned ID = y * N + x;

      router #(.N(N), .X(x), .Y(y), .FIFO_DEPTH(FIFO_DEPTH)) u_router (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_link  (r_in[ID]),
        .in_ready (r_in_ready[ID]),
        .out_link (r_out[ID]),
        .out_ready(r_out_ready[ID])
      );

      cni #(.N(N), .MY_ID(ID)) u_cni (
        .clk          (clk),
        .rst_n        (rst_n),
        .cfg_mode     (cfg_mode),
        .cfg_cxy      (cfg_cxy),
        .cfg_wot_we   (cfg_wot_we && 32'(cfg_wot_node) == ID),
        .cfg_wot_dest (cfg_wot_dest),
        .cfg_wot_bit  (cfg_wot_bit),
        .tx_valid     (tx_valid[ID]),
        .tx_ready     (tx_ready[ID]),
        .tx_dest      (tx_dest[ID]),
        .tx_data      (tx_data[ID]),
        .rx_valid     (rx_valid[ID]),
        .rx_ready     (rx_ready[ID]),
        .rx_src       (rx_src[ID]),
        .rx_xy        (rx_xy[ID]),
        .rx_data      (rx_data[ID]),
        .net_out      (r_in[ID][P_LOCAL]),
        .net_out_ready(r_in_ready[ID][P_LOCAL]),
        .net_in       (r_out[ID][P_LOCAL]),
        .net_in_ready (r_out_ready[ID][P_LOCAL])
      );

      // North neighbour is (x, y+1); east neighbour is (x+1, y).
      if (y < N - 1) begin : g_n
        assign r_in[ID][P_NORTH]        = r_out[ID + N][P_SOUTH];
        assign r_out_ready[ID][P_NORTH] = r_in_ready[ID + N][P_SOUTH];
      end else begin : g_n_edge
        assign r_in[ID][P_NORTH]        = '0;
        assign r_out_ready[ID][P_NORTH] = '0;
      end
      if (y > 0) begin : g_s
        assign r_in[ID][P_SOUTH]        = r_out[ID - N][P_NORTH];
        assign r_out_ready[ID][P_SOUTH] = r_in_ready[ID - N][P_NORTH];
      end else begin : g_s_edge
        assign r_in[ID][P_SOUTH]        = '0;
        assign r_out_ready[ID][P_SOUTH] = '0;
      end
      if (x < N - 1) begin : g_e
        assign r_in[ID][P_EAST]         = r_out[ID + 1][P_WEST];
        assign r_out_ready[ID][P_EAST]  = r_in_ready[ID + 1][P_WEST];
      end else begin : g_e_edge
        assign r_in[ID][P_EAST]         = '0;
        assign r_out_ready[ID][P_EAST]  = '0;
      end
      if (x > 0) begin : g_w
        assign r_in[ID][P_WEST]         = r_out[ID - 1][P_EAST];
        assign r_out_ready[ID][P_WEST]  = r_in_ready[ID - 1][P_EAST];
      end else begin : g_w_edge
        assign r_in[ID][P_WEST]         = '0;
        assign r_out_ready[ID][P_WEST]  = '0;
      end
    end
  end
endmodule
