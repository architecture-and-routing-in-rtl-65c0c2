// tb_router: random traffic through one router at the centre of a 5x5 mesh.
//
// Each of the five inputs sends packets with random destinations on a
// random VC (VC 1 = XY order, VC 0 = YX order) while the outputs' ready bits
// toggle at random. The testbench's own dimension-order model gives the
// output each packet must leave on. Checks: every packet leaves on that
// port and VC, exactly once; the flits of a packet are contiguous on their
// output VC (no other packet enters it between head and tail, the wormhole
// rule); packets of one input VC leave in the order they were sent; no flit
// is sent to a VC whose ready is low; and a flit entering an idle router
// leaves on the next clock. It also counts wormhole blocking (a head waiting
// for a locked output VC), backpressure stalls and cycles in which both VCs
// of one output carry interleaved packets, and requires each to happen.
module tb_router;
  import noc_pkg::*;
  localparam int unsigned X = 2, Y = 2, PKTS = 60, NB = BODY_FLITS;

  logic clk = 0, rst_n = 0;
  link_t [NUM_PORTS-1:0]             in_link, out_link;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0] in_ready, out_ready;

  router #(.X(X), .Y(Y)) dut (.clk(clk), .rst_n(rst_n), .in_link(in_link), .in_ready(in_ready),
                              .out_link(out_link), .out_ready(out_ready));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_block = 0, n_stall = 0, n_interleave = 0;

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0t: %s", $time, s);
  endtask

  // Expected output port: move along the first dimension until it matches.
  function automatic int exp_port(input int dst, input int xyb);
    int dx, dy, hx, hy;
    dx = dst % 5;
    dy = dst / 5;
    hx = (dx > X) ? 2 : (dx < X) ? 4 : -1;   // east / west
    hy = (dy > Y) ? 1 : (dy < Y) ? 3 : -1;   // north / south
    if (xyb == 1) return (hx >= 0) ? hx : (hy >= 0) ? hy : 0;
    else          return (hy >= 0) ? hy : (hx >= 0) ? hx : 0;
  endfunction

  // Packet plan per input.
  int plan_dst [NUM_PORTS][PKTS];
  int plan_vc  [NUM_PORTS][PKTS];
  int sent_flits [NUM_PORTS];
  int recv_cnt   [NUM_PORTS][PKTS];
  int next_seq   [NUM_PORTS][NUM_VC];
  // Output VC state for the contiguity check.
  int  cur_in  [NUM_PORTS][NUM_VC];
  int  cur_seq [NUM_PORTS][NUM_VC];
  int  cur_k   [NUM_PORTS][NUM_VC];
  int  total_rx = 0;
  bit  driving = 0;

  function automatic flit_t make_flit(input int p, input int s, input int k);
    flit_t f;
    header_t h;
    if (k == 0) begin
      h = '0;
      h.dst = ID_W'(plan_dst[p][s]);
      h.src = ID_W'(p);
      h.xy  = 1'(plan_vc[p][s]);
      h.pad = 21'(s);
      f.ftype = FT_HEAD;
      f.data  = DATA_W'(h);
    end else begin
      f.ftype = (k == NB) ? FT_TAIL : FT_BODY;
      f.data  = (p << 24) | (s << 8) | k;
    end
    return f;
  endfunction

  // Drivers: one flit per input per cycle when that VC has space.
  always_ff @(negedge clk) begin
    if (driving) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        int s, k;
        s = sent_flits[p] / (NB + 1);
        k = sent_flits[p] % (NB + 1);
        in_link[p] <= '0;
        if (s < PKTS && ($urandom % 4 != 0)) begin
          if (in_ready[p][plan_vc[p][s]]) begin
            in_link[p].valid <= 1'b1;
            in_link[p].vc    <= 1'(plan_vc[p][s]);
            in_link[p].flit  <= make_flit(p, s, k);
            sent_flits[p]    <= sent_flits[p] + 1;
          end
        end
      end
      for (int o = 0; o < NUM_PORTS; o++)
        for (int v = 0; v < NUM_VC; v++) out_ready[o][v] <= ($urandom % 3) != 0;
    end
  end

  // Monitor.
  always @(posedge clk) if (rst_n && driving) begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      // event counters
      for (int v = 0; v < NUM_VC; v++)
        if (!out_ready[o][v] && dut.lock[o][v]) n_stall++;
      if (dut.lock[o][0] && dut.lock[o][1] && out_link[o].valid) n_interleave++;
      for (int i = 0; i < 10; i++)
        if (!dut.fifo_empty[i] && dut.is_head[i] && dut.want_port[i] == port_e'(o) &&
            dut.lock[o][i % 2] && dut.owner[o][i % 2] != 3'(i / 2)) n_block++;
      if (out_link[o].valid) begin
        int v;
        flit_t f;
        v = out_link[o].vc;
        f = out_link[o].flit;
        checks++;
        if (!out_ready[o][v]) fail($sformatf("flit sent on out %0d vc %0d without ready", o, v));
        if (f.ftype == FT_HEAD) begin
          header_t h;
          int p, s;
          h = header_t'(f.data);
          p = h.src; s = h.pad;
          checks++;
          if (cur_in[o][v] >= 0) fail($sformatf("head on out %0d vc %0d inside another packet", o, v));
          if (exp_port(h.dst, v) != o || plan_vc[p][s] != v || plan_dst[p][s] != h.dst)
            fail($sformatf("packet %0d/%0d on port %0d vc %0d, expected port %0d", p, s, o, v, exp_port(h.dst, v)));
          checks++;
          if (s < next_seq[p][v]) fail($sformatf("input %0d vc %0d: packet %0d out of order (expected %0d or later)", p, v, s, next_seq[p][v]));
          next_seq[p][v] = s + 1;
          cur_in[o][v] = p; cur_seq[o][v] = s; cur_k[o][v] = 1;
        end else begin
          checks++;
          if (cur_in[o][v] < 0) fail($sformatf("body flit on out %0d vc %0d with no head", o, v));
          else begin
            int p, s, k;
            flit_t e;
            p = cur_in[o][v]; s = cur_seq[o][v]; k = cur_k[o][v];
            e = make_flit(p, s, k);
            if (f != e) fail($sformatf("out %0d vc %0d: flit %0d of packet %0d/%0d wrong", o, v, k, p, s));
            cur_k[o][v] = k + 1;
            if (f.ftype == FT_TAIL) begin
              recv_cnt[p][s]++;
              total_rx++;
              cur_in[o][v] = -1;
            end
          end
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_link = '0;
    out_ready = '1;
    for (int p = 0; p < NUM_PORTS; p++) begin
      sent_flits[p] = 0;
      for (int v = 0; v < NUM_VC; v++) next_seq[p][v] = 0;
      for (int s = 0; s < PKTS; s++) begin
        plan_dst[p][s] = $urandom % 25;
        plan_vc[p][s]  = $urandom % 2;
        recv_cnt[p][s] = 0;
      end
    end
    for (int o = 0; o < NUM_PORTS; o++) for (int v = 0; v < NUM_VC; v++) cur_in[o][v] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Latency: a head flit from the west to node (4,2) on XY leaves east one clock later.
    @(negedge clk);
    plan_dst[4][0] = 14; plan_vc[4][0] = 1;
    in_link[4].valid = 1; in_link[4].vc = 1; in_link[4].flit = make_flit(4, 0, 0);
    @(negedge clk);
    in_link = '0;
    checks++;
    if (!(out_link[2].valid && out_link[2].flit.ftype == FT_HEAD))
      fail("head flit did not reach east output one cycle after entering");
    // finish that packet
    for (int k = 1; k <= NB; k++) begin
      in_link[4].valid = 1; in_link[4].vc = 1; in_link[4].flit = make_flit(4, 0, k);
      @(negedge clk);
    end
    in_link = '0;
    @(negedge clk);
    // Reset so the random phase starts clean.
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < NUM_PORTS; o++) for (int v = 0; v < NUM_VC; v++) cur_in[o][v] = -1;
    next_seq[4][1] = 0; total_rx = 0; recv_cnt[4][0] = 0;
    plan_dst[4][0] = $urandom % 25;
    driving = 1;
    wait (total_rx == NUM_PORTS * PKTS);
    repeat (10) @(posedge clk);
    for (int p = 0; p < NUM_PORTS; p++)
      for (int s = 0; s < PKTS; s++) begin
        checks++;
        if (recv_cnt[p][s] != 1) fail($sformatf("packet %0d/%0d delivered %0d times", p, s, recv_cnt[p][s]));
      end
    $display("events: wormhole blocking %0d, backpressure stalls %0d, VC interleave %0d", n_block, n_stall, n_interleave);
    checks += 3;
    if (n_block == 0)      fail("no wormhole blocking seen");
    if (n_stall == 0)      fail("no backpressure stall seen");
    if (n_interleave == 0) fail("no VC interleaving seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
