// wtxy_route: Weighted Toggle XY route-bit circuit.
//
// A 16-bit LFSR draws a new pseudo-random number for every packet sent and
// a comparator checks it against the configured threshold cxy: a number
// larger than cxy selects XY, otherwise YX. The XY share of the traffic is
// therefore about (2^16-1-cxy)/(2^16-1), so configuration software that wants
// an XY fraction c loads cxy = (1-c)*(2^16-1). The RNG-plus-comparator
// structure and the 16-bit width follow the scheme; the LFSR polynomial and
// seed are this design's own choice.
//
// Interface: cxy is static configuration; pkt_sent advances the LFSR; xy
// is the route bit for the next packet (combinational from the LFSR state).
module wtxy_route #(
  parameter int unsigned RNG_W = noc_pkg::RNG_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RNG_W-1:0] cxy,
  input  logic             pkt_sent,
  output logic             xy
);
  logic [RNG_W-1:0] rnd;

  lfsr16 #(.W(RNG_W)) u_rng (
    .clk  (clk),
    .rst_n(rst_n),
    .step (pkt_sent),
    .rnd  (rnd)
  );

  assign xy = (rnd > cxy);
endmodule
