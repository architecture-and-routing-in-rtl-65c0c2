// tb_stxy_route: exhaustive check of the source-parity route bit over all
// 32 x 32 source/destination ID pairs. The expected bit counts the ones in
// both IDs: an odd count means XY.
module tb_stxy_route;
  logic [4:0] s, d;
  logic xy;
  int checks = 0, failures = 0;

  stxy_route dut (.src_id(s), .dst_id(d), .xy(xy));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        int ones;
        s = 5'(i);
        d = 5'(j);
        #1;
        ones = 0;
        for (int b = 0; b < 5; b++) ones += ((i >> b) & 1) + ((j >> b) & 1);
        checks++;
        if (xy != ((ones % 2) == 1)) begin
          failures++;
          $display("src %0d dst %0d: xy=%b", i, j, xy);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
