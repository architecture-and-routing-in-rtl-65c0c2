// tb_cni: checks both halves of the network interface on its own.
//
// Send side: the region offers random packets; the testbench stands in for
// the router, toggling the per-VC ready bits at random, and checks that each
// packet leaves as one head flit (destination, source, route bit) followed
// by BODY_FLITS data flits with the last marked tail, on the VC equal to the
// route bit, never while that VC is not ready. The route bit is compared
// with the testbench's own model of the configured scheme: toggle
// alternates, source parity, the loaded per-destination table, fixed XY/YX.
// With ready held high a packet takes BODY_FLITS+1 cycles from its head.
// Receive side: packets are fed on both VCs with their flits interleaved;
// each must come out whole, with the right source, VC and data, and no flit
// may be offered to a VC whose packet buffer is still full.
module tb_cni;
  import noc_pkg::*;
  localparam int unsigned MY_ID = 7, NB = BODY_FLITS;

  logic clk = 0, rst_n = 0;
  route_mode_e mode = RM_TXY;
  logic [RNG_W-1:0] cxy = '0;
  logic wot_we = 0, wot_bit = 0;
  logic [ID_W-1:0] wot_dest = '0;
  logic tx_valid = 0, tx_ready, rx_valid, rx_ready = 0, rx_xy;
  logic [ID_W-1:0] tx_dest = '0, rx_src;
  logic [NB-1:0][DATA_W-1:0] tx_data = '0, rx_data;
  link_t net_out, net_in;
  logic [NUM_VC-1:0] net_out_ready, net_in_ready;

  cni #(.MY_ID(MY_ID)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_mode(mode), .cfg_cxy(cxy), .cfg_wot_we(wot_we),
    .cfg_wot_dest(wot_dest), .cfg_wot_bit(wot_bit),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_dest(tx_dest), .tx_data(tx_data),
    .rx_valid(rx_valid), .rx_ready(rx_ready), .rx_src(rx_src), .rx_xy(rx_xy), .rx_data(rx_data),
    .net_out(net_out), .net_out_ready(net_out_ready), .net_in(net_in), .net_in_ready(net_in_ready));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0t: %s", $time, s);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic wot_ref [25];
  bit   rand_ready = 1;
  always @(negedge clk) net_out_ready <= rand_ready ? 2'($urandom) : 2'b11;

  // Send one packet and check its flits; returns the route bit used.
  task automatic send_check(input logic [ID_W-1:0] d, input logic exp_xy, input bit check_xy,
                            input bit check_time);
    logic [NB-1:0][DATA_W-1:0] w;
    int k, t0;
    for (int i = 0; i < NB; i++) w[i] = $urandom;
    @(negedge clk);
    tx_valid = 1; tx_dest = d; tx_data = w;
    while (!tx_ready) @(negedge clk);
    @(posedge clk);
    #1 tx_valid = 0;
    k = 0;
    t0 = -1;
    while (k <= NB) begin
      @(posedge clk);
      if (net_out.valid) begin
        checks++;
        if (!net_out_ready[net_out.vc]) fail("flit offered to a VC that is not ready");
        if (k == 0) begin
          header_t h;
          h = header_t'(net_out.flit.data);
          t0 = $time;
          checks++;
          if (net_out.flit.ftype != FT_HEAD || h.dst != d || h.src != MY_ID || h.xy != net_out.vc)
            fail("bad head flit");
          if (check_xy) begin
            checks++;
            if (h.xy != exp_xy) fail($sformatf("mode %s dst %0d: xy=%b expected %b", mode.name(), d, h.xy, exp_xy));
          end
        end else begin
          checks++;
          if (net_out.flit.data != w[k-1] || net_out.flit.ftype != ((k == NB) ? FT_TAIL : FT_BODY))
            fail($sformatf("bad data flit %0d", k));
        end
        k++;
      end
    end
    if (check_time) begin
      checks++;
      if (($time - t0) != NB * 10) fail($sformatf("packet took %0d cycles after head", ($time - t0) / 10));
    end
  endtask

  // Receive side driver: interleave two packets, one per VC.
  typedef struct { int src; logic [NB-1:0][DATA_W-1:0] w; } pkt_s;
  pkt_s exp_q [NUM_VC][$];
  int delivered = 0;

  always @(posedge clk) if (rst_n) begin
    if (net_in.valid) begin
      checks++;
      if (!net_in_ready[net_in.vc]) fail("flit driven into a full receive buffer");
    end
    if (rx_valid && rx_ready) begin
      int v;
      pkt_s e;
      v = rx_xy;
      checks++;
      if (exp_q[v].size() == 0) fail("unexpected packet delivered");
      else begin
        e = exp_q[v].pop_front();
        if (rx_src != ID_W'(e.src) || rx_data != e.w) fail($sformatf("vc %0d packet from %0d corrupted", v, e.src));
        delivered++;
      end
    end
  end

  initial begin
    net_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Timing with ready held high.
    rand_ready = 0;
    mode = RM_XY;
    send_check(5'd3, 1'b1, 1, 1);
    rand_ready = 1;
    // Fixed modes.
    for (int i = 0; i < 5; i++) send_check(5'($urandom % 25), 1'b1, 1, 0);
    mode = RM_YX;
    for (int i = 0; i < 5; i++) send_check(5'($urandom % 25), 1'b0, 1, 0);
    // Toggle: starts at XY and alternates.
    mode = RM_TXY;
    for (int i = 0; i < 8; i++) send_check(5'($urandom % 25), 1'((i % 2) == 0), 1, 0);
    // Source parity.
    mode = RM_STXY;
    for (int i = 0; i < 25; i++) send_check(5'(i), 1'($countones({5'(MY_ID), 5'(i)}) % 2), 1, 0);
    // Per-destination table.
    for (int i = 0; i < 25; i++) begin
      @(negedge clk);
      wot_we = 1; wot_dest = 5'(i); wot_bit = 1'($urandom); wot_ref[i] = wot_bit;
    end
    @(negedge clk); wot_we = 0;
    mode = RM_WOT;
    for (int i = 0; i < 25; i++) send_check(5'(i), wot_ref[i], 1, 0);
    // Weighted: threshold 0 is XY except on the single value 0, never drawn.
    mode = RM_WTXY; cxy = '0;
    for (int i = 0; i < 5; i++) send_check(5'($urandom % 25), 1'b1, 1, 0);
    cxy = '1;
    for (int i = 0; i < 5; i++) send_check(5'($urandom % 25), 1'b0, 1, 0);

    // Receive side: 40 packets per VC, flits interleaved between VCs.
    begin
      int sent [NUM_VC];
      int k [NUM_VC];
      pkt_s cur [NUM_VC];
      sent = '{0, 0}; k = '{0, 0};
      while (sent[0] < 40 || sent[1] < 40 || k[0] != 0 || k[1] != 0) begin
        int v;
        @(negedge clk);
        rx_ready = ($urandom % 3) != 0;
        net_in = '0;
        v = $urandom % 2;
        if ((sent[v] < 40 || k[v] != 0) && net_in_ready[v] && ($urandom % 4 != 0)) begin
          net_in.valid = 1;
          net_in.vc = 1'(v);
          if (k[v] == 0) begin
            header_t h;
            cur[v].src = $urandom % 25;
            for (int i = 0; i < NB; i++) cur[v].w[i] = $urandom;
            h = '0; h.src = ID_W'(cur[v].src); h.dst = ID_W'(MY_ID); h.xy = 1'(v);
            net_in.flit.ftype = FT_HEAD;
            net_in.flit.data = DATA_W'(h);
            k[v] = 1;
          end else begin
            net_in.flit.ftype = (k[v] == NB) ? FT_TAIL : FT_BODY;
            net_in.flit.data = cur[v].w[k[v]-1];
            if (k[v] == NB) begin
              exp_q[v].push_back(cur[v]);
              k[v] = 0;
              sent[v]++;
            end else k[v]++;
          end
        end
      end
      @(negedge clk);
      net_in = '0;
      rx_ready = 1;
      repeat (10) @(negedge clk);
      checks++;
      if (delivered != 80) fail($sformatf("%0d of 80 packets delivered", delivered));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
