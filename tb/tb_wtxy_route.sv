// tb_wtxy_route: checks the weighted toggle route bit. Over one full LFSR
// period (65535 packets) every non-zero 16-bit value is drawn once, so the
// number of XY decisions must be exactly 65535 - cxy for any threshold cxy.
// Three thresholds are run: XY fraction 2/3, 1/2 and 0 (cxy = 65535).
// It also checks the bit holds while no packet is sent.
module tb_wtxy_route;
  logic clk = 0, rst_n = 0, pkt_sent = 0, xy;
  logic [15:0] cxy;
  int checks = 0, failures = 0;

  wtxy_route dut (.clk(clk), .rst_n(rst_n), .cxy(cxy), .pkt_sent(pkt_sent), .xy(xy));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_period(input logic [15:0] thr);
    int n_xy = 0;
    logic held;
    cxy = thr;
    pkt_sent = 0;
    @(negedge clk);
    held = xy;
    repeat (4) @(negedge clk);
    checks++;
    if (xy != held) begin failures++; $display("bit changed with no packet"); end
    pkt_sent = 1;
    for (int i = 0; i < 65535; i++) begin
      if (xy) n_xy++;
      @(negedge clk);
    end
    pkt_sent = 0;
    checks++;
    if (n_xy != 65535 - int'(thr)) begin
      failures++;
      $display("cxy=%0d: %0d XY decisions, expected %0d", thr, n_xy, 65535 - int'(thr));
    end else
      $display("cxy=%0d: XY fraction %0d/65535", thr, n_xy);
  endtask

  initial begin
    cxy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_period(16'd21845);   // XY fraction 2/3
    run_period(16'd32767);   // about 1/2
    run_period(16'd65535);   // never XY
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
