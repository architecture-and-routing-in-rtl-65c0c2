// flit_fifo: synchronous first-in first-out buffer for one virtual channel.
//
// A circular array of DEPTH entries with read and write pointers and an
// occupancy counter. full and empty come straight from the counter, so a
// sender may use ~full as its ready signal without any combinational path
// through this buffer. Writing when full or reading when empty is a protocol
// error and is flagged by assertions. Depth and width are parameters; the
// router's input buffers use it with a depth of 4 flits, an assumed size.
//
// Timing: a push is visible at rd_data one clock later; rd_data shows the
// oldest entry whenever empty is low, and pop removes it at the clock edge.
module flit_fifo #(
  parameter int unsigned W     = 34,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wr_data,
  input  logic         pop,
  output logic [W-1:0] rd_data,
  output logic         full,
  output logic         empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full)  wr_ptr <= next_ptr(wr_ptr);
      if (pop && !empty)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop && !empty);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
