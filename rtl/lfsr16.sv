// lfsr16: random number generator for the weighted toggle XY circuit.
//
// A W-bit Fibonacci linear feedback shift register. With the default
// W = 16 the taps 16,14,13,11 give a maximal sequence of 2^16-1 states
// (every non-zero value once). The width follows the 16-bit generator the
// weighted scheme is sized for; the polynomial and seed are this design's
// own choice. A zero seed is replaced by 1 so the register never locks.
//
// Interface: step advances one state per clock; rnd is the current state.
module lfsr16 #(
  parameter int unsigned W    = 16,
  parameter logic [W-1:0] SEED = W'(16'hACE1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [W-1:0] rnd
);
  localparam logic [W-1:0] SAFE_SEED = (SEED == '0) ? W'(1) : SEED;

  logic fb;
  // Taps for W = 16: x^16 + x^14 + x^13 + x^11 + 1.
  assign fb = rnd[W-1] ^ rnd[W-3] ^ rnd[W-4] ^ rnd[W-6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rnd <= SAFE_SEED;
    else if (step) rnd <= {rnd[W-2:0], fb};
  end
endmodule
