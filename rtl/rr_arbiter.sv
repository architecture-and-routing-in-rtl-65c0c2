// rr_arbiter: round-robin arbiter.
//
// Grants one of NREQ requesters per cycle, searching from the one after
// the last granted requester, so every requester that keeps asking is
// served within NREQ grants. The pointer moves only when advance is high
// (the grant was used). grant is one-hot or zero, combinational from req.
module rr_arbiter #(
  parameter int unsigned NREQ = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NREQ-1:0] req,
  input  logic            advance,
  output logic [NREQ-1:0] grant
);
  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic [IW-1:0] last;
  logic [IW-1:0] winner;
  logic          found;

  always_comb begin
    grant  = '0;
    found  = 1'b0;
    winner = last;
    for (int unsigned k = 1; k <= NREQ; k++) begin
      int unsigned idx;
      idx = (32'(last) + k) % NREQ;
      if (!found && req[idx]) begin
        found  = 1'b1;
        winner = IW'(idx);
      end
    end
    if (found) grant[winner] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  last <= IW'(NREQ - 1);
    else if (advance && found)   last <= winner;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
