// wot_route: Weighted Ordered Toggle route-bit circuit.
//
// A lookup table of one route bit per destination node, written when the
// chip is configured with the result of the offline assignment (for
// example the min-max search), and read with the destination ID of each
// packet. In a programmable fabric this is a few 16-entry LUTs; here it is
// an N*N-bit register with a bit write port. The per-destination vector
// follows the scheme; the reset value (all XY) and reading out-of-range
// IDs as XY are this design's own choices.
//
// Interface: cfg_we/cfg_dest/cfg_bit write one entry at the clock edge;
// dst_id is looked up combinationally and xy is the stored bit.
module wot_route #(
  parameter int unsigned N    = noc_pkg::N,
  parameter int unsigned ID_W = noc_pkg::ID_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [ID_W-1:0] cfg_dest,
  input  logic            cfg_bit,
  input  logic [ID_W-1:0] dst_id,
  output logic            xy
);
  localparam int unsigned NODES = N * N;

  logic [NODES-1:0] vec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vec <= '1;
    else if (cfg_we && (32'(cfg_dest) < NODES)) vec[cfg_dest] <= cfg_bit;
  end

  assign xy = (32'(dst_id) < NODES) ? vec[dst_id] : 1'b1;
endmodule
