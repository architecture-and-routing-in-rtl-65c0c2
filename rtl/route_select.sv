// route_select: the configurable routing layer of a network interface.
//
// Holds the four route-bit circuits (toggle, weighted random, source
// parity, per-destination table) and a mode input that picks which one
// sets the XY/YX bit of each outgoing packet header; two further modes fix
// the route to plain XY or plain YX. In a programmable chip only the
// selected circuit would be configured into the soft interface; here all
// are built and the mode models that configuration choice.
//
// Interface: mode, cxy and the WOT write port are configuration; src_id
// (this node) and dst_id (the packet being sent) are inputs; xy is valid
// combinationally; pkt_sent pulses once per packet header sent and advances
// the toggle and random generators.
module route_select
  import noc_pkg::*;
#(
  parameter int unsigned N    = noc_pkg::N,
  parameter int unsigned ID_W = noc_pkg::ID_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  route_mode_e      mode,
  input  logic [RNG_W-1:0] cxy,
  input  logic             wot_we,
  input  logic [ID_W-1:0]  wot_dest,
  input  logic             wot_bit,
  input  logic [ID_W-1:0]  src_id,
  input  logic [ID_W-1:0]  dst_id,
  input  logic             pkt_sent,
  output logic             xy
);
  logic xy_txy, xy_wtxy, xy_stxy, xy_wot;

  txy_route u_txy (
    .clk(clk), .rst_n(rst_n), .pkt_sent(pkt_sent && mode == RM_TXY), .xy(xy_txy)
  );

  wtxy_route u_wtxy (
    .clk(clk), .rst_n(rst_n), .cxy(cxy), .pkt_sent(pkt_sent && mode == RM_WTXY), .xy(xy_wtxy)
  );

  stxy_route #(.ID_W(ID_W)) u_stxy (
    .src_id(src_id), .dst_id(dst_id), .xy(xy_stxy)
  );

  wot_route #(.N(N), .ID_W(ID_W)) u_wot (
    .clk(clk), .rst_n(rst_n), .cfg_we(wot_we), .cfg_dest(wot_dest), .cfg_bit(wot_bit),
    .dst_id(dst_id), .xy(xy_wot)
  );

  always_comb begin
    unique case (mode)
      RM_XY:   xy = 1'b1;
      RM_YX:   xy = 1'b0;
      RM_TXY:  xy = xy_txy;
      RM_WTXY: xy = xy_wtxy;
      RM_STXY: xy = xy_stxy;
      RM_WOT:  xy = xy_wot;
      default: xy = 1'b1;
    endcase
  end
endmodule
