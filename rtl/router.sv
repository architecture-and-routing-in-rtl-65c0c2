// router: hard mesh router with wormhole switching and two virtual channels.
//
// Five ports (local, north, east, south, west), each with one input FIFO
// per virtual channel. A packet's VC is its XY/YX route bit and never
// changes: VC 1 holds XY-routed packets, VC 0 YX-routed ones. Keeping the
// two dimension orders on separate channels is what makes mixing XY and YX
// routes deadlock-free. The head flit is routed by dimension order: XY
// moves along x (east/west) until the column matches, then along y; YX does
// y first. When a head flit wins an output, that output VC is locked to its
// input until the tail flit passes (wormhole switching). Each output port
// sends at most one flit per cycle and picks among the ten input VCs with a
// round-robin arbiter. The wormhole switching and the two route-order VCs
// follow the architecture; the buffer depth, the round-robin switch
// allocation and the ready-based flow control are this design's own choices.
//
// Interface: in_link[p] carries a flit, its VC and a valid bit; in_ready[p][v]
// says input FIFO (p,v) has space, and a flit moves when valid and ready.
// out_link / out_ready are the same for outputs. Ready comes only from FIFO
// occupancy registers, so links have no combinational path back to the
// sender. Timing: a flit written into an input FIFO can leave on the next
// cycle; one hop therefore costs one clock when the path is free.
module router
  import noc_pkg::*;
#(
  parameter int unsigned N          = noc_pkg::N,
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  link_t [NUM_PORTS-1:0]          in_link,
  output logic  [NUM_PORTS-1:0][NUM_VC-1:0] in_ready,
  output link_t [NUM_PORTS-1:0]          out_link,
  input  logic  [NUM_PORTS-1:0][NUM_VC-1:0] out_ready
);
  localparam int unsigned NIN = NUM_PORTS * NUM_VC;  // input VCs, index p*2+v
  localparam int unsigned FW  = $bits(flit_t);

  // Dimension-order route of a head flit at this router.
  function automatic port_e route_port(input logic [ID_W-1:0] dst, input logic xy);
    int unsigned dx, dy;
    dx = 32'(dst) % N;
    dy = 32'(dst) / N;
    if (xy) begin
      if      (dx > X) return P_EAST;
      else if (dx < X) return P_WEST;
      else if (dy > Y) return P_NORTH;
      else if (dy < Y) return P_SOUTH;
      else                  return P_LOCAL;
    end else begin
      if      (dy > Y) return P_NORTH;
      else if (dy < Y) return P_SOUTH;
      else if (dx > X) return P_EAST;
      else if (dx < X) return P_WEST;
      else                  return P_LOCAL;
    end
  endfunction

  // Input buffers.
  flit_t [NIN-1:0] head;
  logic  [NIN-1:0] fifo_full, fifo_empty, fifo_pop;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      localparam int unsigned I = p * NUM_VC + v;
      logic [FW-1:0] rd;
      flit_fifo #(.W(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
        .clk    (clk),
        .rst_n  (rst_n),
        .push   (in_link[p].valid && in_link[p].vc == 1'(v)),
        .wr_data(in_link[p].flit),
        .pop    (fifo_pop[I]),
        .rd_data(rd),
        .full   (fifo_full[I]),
        .empty  (fifo_empty[I])
      );
      assign head[I]        = flit_t'(rd);
      assign in_ready[p][v] = !fifo_full[I];
    end
  end

  // Per input VC: output port of the packet in progress.
  port_e [NIN-1:0] cur_port;     // registered at head grant
  port_e [NIN-1:0] want_port;    // port requested by the flit at the FIFO head
  logic  [NIN-1:0] is_head;

  always_comb begin
    for (int i = 0; i < NIN; i++) begin
      header_t h;
      h          = header_t'(head[i].data);
      is_head[i] = (head[i].ftype == FT_HEAD);
      want_port[i] = is_head[i] ? route_port(h.dst, 1'(i % NUM_VC)) : cur_port[i];
    end
  end

  // Output VC locks: lock[o][v] set from head grant to tail grant.
  logic [NUM_PORTS-1:0][NUM_VC-1:0]        lock;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][2:0]   owner;  // input port holding the lock

  logic [NUM_PORTS-1:0][NIN-1:0] req, gnt;

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int i = 0; i < NIN; i++) begin
        int unsigned p, v;
        p = i / NUM_VC;
        v = i % NUM_VC;
        req[o][i] = !fifo_empty[i] && (want_port[i] == port_e'(o)) && out_ready[o][v] &&
                    (is_head[i] ? !lock[o][v] : (lock[o][v] && 32'(owner[o][v]) == p));
      end
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    rr_arbiter #(.NREQ(NIN)) u_arb (
      .clk    (clk),
      .rst_n  (rst_n),
      .req    (req[o]),
      .advance(1'b1),
      .grant  (gnt[o])
    );
  end

  // Crossbar and pops.
  always_comb begin
    fifo_pop = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_link[o] = '0;
      for (int i = 0; i < NIN; i++) begin
        if (gnt[o][i]) begin
          out_link[o].valid = 1'b1;
          out_link[o].vc    = 1'(i % NUM_VC);
          out_link[o].flit  = head[i];
          fifo_pop[i]       = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock     <= '0;
      owner    <= '0;
      cur_port <= {NIN{P_LOCAL}};
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int i = 0; i < NIN; i++) begin
          if (gnt[o][i]) begin
            if (is_head[i]) begin
              lock[o][i % NUM_VC]  <= 1'b1;
              owner[o][i % NUM_VC] <= 3'(i / NUM_VC);
              cur_port[i]          <= port_e'(o);
            end
            if (head[i].ftype == FT_TAIL) lock[o][i % NUM_VC] <= 1'b0;
          end
        end
      end
    end
  end

  // A flit may only be offered to a VC that has space.
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_chk
    a_in_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_link[p].valid |-> in_ready[p][in_link[p].vc]);
  end
endmodule
