// tb_wot_route: loads random route vectors into the per-destination table
// and reads back every destination, compared with a copy the testbench
// keeps. Also checks the reset value (all XY) and that IDs beyond the 25
// nodes read as XY and are not written.
module tb_wot_route;
  logic clk = 0, rst_n = 0, we = 0, bitv = 0, xy;
  logic [4:0] wdest = 0, dst = 0;
  logic ref_vec [32];
  int checks = 0, failures = 0;

  wot_route dut (.clk(clk), .rst_n(rst_n), .cfg_we(we), .cfg_dest(wdest), .cfg_bit(bitv),
                 .dst_id(dst), .xy(xy));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 32; i++) begin
      dst = 5'(i);
      #1;
      checks++;
      if (xy != ((i < 25) ? ref_vec[i] : 1'b1)) begin
        failures++;
        $display("dest %0d: xy=%b expected %b", i, xy, ref_vec[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) ref_vec[i] = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < 32; i++) begin
        @(negedge clk);
        we    = 1;
        wdest = 5'(i);
        bitv  = 1'($urandom);
        if (i < 25) ref_vec[i] = bitv;
      end
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
