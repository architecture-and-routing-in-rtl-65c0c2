// tb_txy_route: checks the toggle route bit. After reset the bit is XY;
// each pkt_sent pulse flips it and cycles without a pulse hold it. The
// expected value is a counter of pulses kept by the testbench.
module tb_txy_route;
  logic clk = 0, rst_n = 0, pkt_sent = 0, xy;
  int checks = 0, failures = 0, sent = 0;

  txy_route dut (.clk(clk), .rst_n(rst_n), .pkt_sent(pkt_sent), .xy(xy));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++;
      if (xy !== ((sent % 2) == 0)) begin
        failures++;
        $display("mismatch at %0d: xy=%b after %0d packets", i, xy, sent);
      end
      pkt_sent = ($urandom % 3) != 0;
      if (pkt_sent) sent++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
