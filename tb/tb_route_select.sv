// tb_route_select: checks that each configuration mode of the routing layer
// yields the route bit of its scheme: fixed XY and YX, alternating bits in
// toggle mode, source/destination parity, the loaded per-destination table,
// and in weighted mode the XY share over one full LFSR period (65535-cxy).
// It also checks that the toggle state does not move while another scheme
// is selected.
module tb_route_select;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, wbit = 0, pkt_sent = 0, xy;
  logic [4:0] wdest = 0, src = 0, dst = 0;
  logic [15:0] cxy = 0;
  route_mode_e mode = RM_XY;
  logic table_ref [25];
  int checks = 0, failures = 0;

  route_select dut (.clk(clk), .rst_n(rst_n), .mode(mode), .cxy(cxy), .wot_we(we),
                    .wot_dest(wdest), .wot_bit(wbit), .src_id(src), .dst_id(dst),
                    .pkt_sent(pkt_sent), .xy(xy));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic e, input string what);
    checks++;
    if (xy != e) begin failures++; $display("%s: xy=%b expected %b", what, xy, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fixed modes
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      src = 5'($urandom % 25); dst = 5'($urandom % 25);
      mode = RM_XY; #1 expect_bit(1'b1, "XY");
      mode = RM_YX; #1 expect_bit(1'b0, "YX");
      mode = RM_STXY; #1 expect_bit(1'(^{src, dst}), "STXY");
    end
    // toggle: sends in other modes must not move it
    @(negedge clk); mode = RM_STXY; pkt_sent = 1;
    repeat (3) @(negedge clk);
    pkt_sent = 0; mode = RM_TXY; #1 expect_bit(1'b1, "TXY after reset");
    for (int i = 0; i < 10; i++) begin
      pkt_sent = 1; @(negedge clk); pkt_sent = 0;
      expect_bit(1'((i + 1) % 2 == 0), "TXY toggle");
    end
    // WOT table
    mode = RM_WOT;
    for (int i = 0; i < 25; i++) begin
      @(negedge clk);
      we = 1; wdest = 5'(i); wbit = 1'($urandom); table_ref[i] = wbit;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 25; i++) begin dst = 5'(i); #1 expect_bit(table_ref[i], "WOT"); end
    // WTXY share over one period
    begin
      int n_xy = 0;
      mode = RM_WTXY; cxy = 16'd10000; pkt_sent = 1;
      for (int i = 0; i < 65535; i++) begin
        @(negedge clk);
        if (xy) n_xy++;
      end
      pkt_sent = 0;
      checks++;
      if (n_xy != 65535 - 10000) begin failures++; $display("WTXY share %0d", n_xy); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
