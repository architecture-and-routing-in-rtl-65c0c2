// cni: configurable network interface between a region and its router.
//
// Send side: the region hands over one packet (destination and BODY_FLITS
// data words). The interface asks its routing layer (route_select) for the
// XY/YX bit, builds a head flit carrying destination, source and that bit,
// and injects head, body and tail flits into the router's local port on the
// VC equal to the route bit, one flit per cycle while the VC has space.
// Receive side: flits arriving from the router are reassembled per VC,
// because packets on the two VCs may interleave, into one packet buffer per
// VC; a complete packet is offered to the region and the VC accepts no new
// flit until it has been taken. The two VCs are served alternately.
// Only the routing layer is configurable; packing, unpacking and buffering
// are fixed. The packet format, the fixed packet length and the single
// packet buffer per VC are this design's own choices. Re-ordering of packets
// that took different routes is not done.
//
// Timing: tx_ready is high when the sender is idle; the head flit leaves in
// the cycle after acceptance, the tail BODY_FLITS cycles later if never
// stalled. rx_valid rises the cycle after the tail flit arrives.
module cni
  import noc_pkg::*;
#(
  parameter int unsigned N          = noc_pkg::N,
  parameter int unsigned MY_ID      = 0,
  parameter int unsigned BODY_FLITS = noc_pkg::BODY_FLITS
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // configuration of the routing layer
  input  route_mode_e                          cfg_mode,
  input  logic [RNG_W-1:0]                     cfg_cxy,
  input  logic                                 cfg_wot_we,
  input  logic [ID_W-1:0]                      cfg_wot_dest,
  input  logic                                 cfg_wot_bit,
  // region side, send
  input  logic                                 tx_valid,
  output logic                                 tx_ready,
  input  logic [ID_W-1:0]                      tx_dest,
  input  logic [BODY_FLITS-1:0][DATA_W-1:0]    tx_data,
  // region side, receive
  output logic                                 rx_valid,
  input  logic                                 rx_ready,
  output logic [ID_W-1:0]                      rx_src,
  output logic                                 rx_xy,
  output logic [BODY_FLITS-1:0][DATA_W-1:0]    rx_data,
  // router local port
  output link_t                                net_out,
  input  logic [NUM_VC-1:0]                    net_out_ready,
  input  link_t                                net_in,
  output logic [NUM_VC-1:0]                    net_in_ready
);
  localparam int unsigned CW = $clog2(BODY_FLITS + 1);

  // ---------------- send side ----------------
  logic                                 route_xy;
  logic                                 busy;
  logic [CW-1:0]                        tx_cnt;    // 0 = head, k = body word k-1
  logic                                 tx_vc;
  logic [ID_W-1:0]                      tx_dst_q;
  logic [BODY_FLITS-1:0][DATA_W-1:0]    tx_buf;
  logic                                 accept, flit_go;

  assign tx_ready = !busy;
  assign accept   = tx_valid && tx_ready;

  route_select #(.N(N), .ID_W(ID_W)) u_route (
    .clk     (clk),
    .rst_n   (rst_n),
    .mode    (cfg_mode),
    .cxy     (cfg_cxy),
    .wot_we  (cfg_wot_we),
    .wot_dest(cfg_wot_dest),
    .wot_bit (cfg_wot_bit),
    .src_id  (ID_W'(MY_ID)),
    .dst_id  (tx_dest),
    .pkt_sent(accept),
    .xy      (route_xy)
  );

  always_comb begin
    header_t h;
    h        = '0;
    h.dst    = tx_dst_q;
    h.src    = ID_W'(MY_ID);
    h.xy     = tx_vc;
    net_out  = '0;
    net_out.valid = busy && net_out_ready[tx_vc];
    net_out.vc    = tx_vc;
    if (tx_cnt == '0) begin
      net_out.flit.ftype = FT_HEAD;
      net_out.flit.data  = DATA_W'(h);
    end else begin
      net_out.flit.ftype = (32'(tx_cnt) == BODY_FLITS) ? FT_TAIL : FT_BODY;
      net_out.flit.data  = tx_buf[tx_cnt - 1'b1];
    end
  end
  assign flit_go = net_out.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      tx_cnt   <= '0;
      tx_vc    <= 1'b0;
      tx_dst_q <= '0;
      tx_buf   <= '0;
    end else if (accept) begin
      busy     <= 1'b1;
      tx_cnt   <= '0;
      tx_vc    <= route_xy;
      tx_dst_q <= tx_dest;
      tx_buf   <= tx_data;
    end else if (flit_go) begin
      if (32'(tx_cnt) == BODY_FLITS) begin
        busy   <= 1'b0;
        tx_cnt <= '0;
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
      end
    end
  end

  // ---------------- receive side ----------------
  logic [NUM_VC-1:0]                              done;
  logic [NUM_VC-1:0][CW-1:0]                      rx_cnt;
  logic [NUM_VC-1:0][ID_W-1:0]                    src_q;
  logic [NUM_VC-1:0][BODY_FLITS-1:0][DATA_W-1:0]  data_q;
  logic                                           sel, last_sel;
  logic                                           take;
  header_t                                        rx_head;

  assign rx_head = header_t'(net_in.flit.data);

  assign net_in_ready = ~done;

  // Alternate between the VCs when both hold a packet.
  always_comb begin
    if (done[0] && done[1]) sel = ~last_sel;
    else                    sel = done[1];
  end

  assign rx_valid = |done;
  assign rx_src   = src_q[sel];
  assign rx_xy    = sel;
  assign rx_data  = data_q[sel];
  assign take     = rx_valid && rx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done     <= '0;
      rx_cnt   <= '0;
      src_q    <= '0;
      data_q   <= '0;
      last_sel <= 1'b0;
    end else begin
      if (take) begin
        done[sel] <= 1'b0;
        last_sel  <= sel;
      end
      if (net_in.valid) begin
        if (net_in.flit.ftype == FT_HEAD) begin
          src_q[net_in.vc]  <= rx_head.src;
          rx_cnt[net_in.vc] <= '0;
        end else begin
          data_q[net_in.vc][rx_cnt[net_in.vc]] <= net_in.flit.data;
          rx_cnt[net_in.vc] <= rx_cnt[net_in.vc] + 1'b1;
          if (net_in.flit.ftype == FT_TAIL) done[net_in.vc] <= 1'b1;
        end
      end
    end
  end

  a_rx_space: assert property (@(posedge clk) disable iff (!rst_n)
                               net_in.valid |-> net_in_ready[net_in.vc]);
  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                net_out.valid |-> busy);
endmodule
