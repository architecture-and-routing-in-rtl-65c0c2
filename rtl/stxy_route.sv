// stxy_route: Source Toggle XY route-bit circuit.
//
// Pure combinational parity: the XOR of every bit of the source and the
// destination ID. Pairs with odd parity route XY, pairs with even parity
// route YX, so all packets of one source-destination pair take the same
// path and arrive in order. This follows the scheme; the ID encoding
// (y*N + x) is this design's own choice.
//
// Interface: src_id, dst_id in; xy out, with no clock.
module stxy_route #(
  parameter int unsigned ID_W = noc_pkg::ID_W
) (
  input  logic [ID_W-1:0] src_id,
  input  logic [ID_W-1:0] dst_id,
  output logic            xy
);
  assign xy = ^(src_id ^ dst_id);
endmodule
