// txy_route: Toggle XY route-bit circuit.
//
// A single flip-flop whose inverted output feeds its own input, clocked
// only when a packet header leaves the CNI, so consecutive packets
// alternate between the XY and YX routes. This is the circuit the routing
// scheme is defined by. Reset to XY is this design's own choice.
//
// Interface: pkt_sent (one cycle per packet sent) advances the state; xy
// is the route bit for the next packet (1 = XY, 0 = YX), valid in the
// same cycle, and flips on the clock edge that sees pkt_sent.
module txy_route (
  input  logic clk,
  input  logic rst_n,
  input  logic pkt_sent,
  output logic xy
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        xy <= 1'b1;
    else if (pkt_sent) xy <= ~xy;
  end
endmodule
