// tb_noc_fpga_top: end-to-end test of the 5x5 mesh at its default size.
//
// Phase 1 reproduces the two-hotspot example: hotspots at (1,1) and (2,1),
// every other node sends the same amount to each hotspot and the hotspots
// send to each other. Two packets go to each hotspot per source, so the
// toggle scheme splits every flow exactly in half. The testbench counts head
// flits on every link (both directions of a link added, as link capacity is
// counted for the example) and checks the busiest link: 15 flows for plain
// XY, 25 for plain YX and 15 for the half/half toggle, i.e. 30, 50 and 30
// packets. The example's own curve gives these three points.
//
// Phase 2 runs random traffic with a hotspot bias under every routing
// scheme: source parity, per-destination table (random table per node),
// weighted toggle (threshold for an XY share of 2/3) and toggle.
//
// In every phase each packet must arrive exactly once, at its destination,
// with its source, data and the route bit the scheme predicts (the
// testbench keeps its own model of toggle, parity, table and random
// generator). Ordered schemes must deliver each source-destination pair in
// order; for the flow-splitting schemes out-of-order arrivals are counted.
// Mechanisms counted, each required at least once: XY and YX routes,
// wormhole blocking in a router, a full input VC holding a flit back
// (backpressure), both VCs of one output busy with interleaved packets, an
// interface that cannot accept a new packet, a region not taking a packet,
// out-of-order arrival under flow splitting, and all six routing modes.
module tb_noc_fpga_top;
  import noc_pkg::*;
  localparam int NN = 5, NODES = 25, NB = BODY_FLITS;
  localparam int HS1 = 1 * NN + 1, HS2 = 1 * NN + 2;

  logic clk = 0, rst_n = 0;
  route_mode_e cfg_mode = RM_XY;
  logic [RNG_W-1:0] cfg_cxy = '0;
  logic cfg_wot_we = 0, cfg_wot_bit = 0;
  logic [ID_W-1:0] cfg_wot_node = '0, cfg_wot_dest = '0;
  logic [NODES-1:0] tx_valid, tx_ready, rx_valid, rx_ready, rx_xy;
  logic [NODES-1:0][ID_W-1:0] tx_dest, rx_src;
  logic [NODES-1:0][NB-1:0][DATA_W-1:0] tx_data, rx_data;

  noc_fpga_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_mode(cfg_mode), .cfg_cxy(cfg_cxy), .cfg_wot_we(cfg_wot_we),
    .cfg_wot_node(cfg_wot_node), .cfg_wot_dest(cfg_wot_dest), .cfg_wot_bit(cfg_wot_bit),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_dest(tx_dest), .tx_data(tx_data),
    .rx_valid(rx_valid), .rx_ready(rx_ready), .rx_src(rx_src), .rx_xy(rx_xy), .rx_data(rx_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic fail(input string s);
    failures++;
    if (failures < 30) $display("FAIL @%0t: %s", $time, s);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference models ----------------
  logic        txy_st [NODES];
  logic [15:0] rng    [NODES];
  logic        wot_tab[NODES][NODES];

  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    logic b;
    b = s[15] ^ s[13] ^ s[12] ^ s[10];
    return {s[14:0], b};
  endfunction

  // ---------------- traffic plan ----------------
  int plan [NODES][$];           // destinations to send, per source
  int seq_tx [NODES][NODES];     // next sequence number per pair
  int seq_rx [NODES][NODES];     // highest received per pair, -1 none
  int expect_xy [int];           // key -> expected route bit (-1: any)
  int outstanding = 0;
  bit ordered = 1;
  int rx_ready_pct = 90;

  // event counters
  int ev_xy = 0, ev_yx = 0, ev_block = 0, ev_bp = 0, ev_inter = 0, ev_txstall = 0,
      ev_rxstall = 0, ev_ooo = 0;
  int ev_mode [6];

  // link loads: head flits per router output port
  int load [NODES][NUM_PORTS];
  bit count_load = 0;

  function automatic int key(input int s, input int d, input int q);
    return (s << 20) | (d << 15) | q;
  endfunction

  // Drive the region side at the negative edge.
  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (!tx_valid[n] && plan[n].size() > 0) begin
        int d, q;
        d = plan[n][0];
        q = seq_tx[n][d];
        tx_valid[n] = 1;
        tx_dest[n]  = ID_W'(d);
        tx_data[n][0] = (n << 24) | (d << 16) | q;
        for (int i = 1; i < NB; i++) tx_data[n][i] = $urandom;
      end
      rx_ready[n] = ($urandom % 100) < rx_ready_pct;
    end
  end

  // Monitor at the positive edge.
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      // packet accepted by the interface
      if (tx_valid[n] && tx_ready[n]) begin
        int d, q, e;
        d = plan[n].pop_front();
        q = seq_tx[n][d];
        seq_tx[n][d]++;
        case (cfg_mode)
          RM_XY:   e = 1;
          RM_YX:   e = 0;
          RM_STXY: e = $countones({5'(n), 5'(d)}) % 2;
          RM_WOT:  e = wot_tab[n][d];
          RM_TXY:  begin e = txy_st[n]; txy_st[n] = ~txy_st[n]; end
          RM_WTXY: begin e = (rng[n] > cfg_cxy); rng[n] = lfsr_next(rng[n]); end
          default: e = -1;
        endcase
        expect_xy[key(n, d, q)] = e;
        sent_data[key(n, d, q)] = tx_data[n];
        outstanding++;
        tx_valid[n] <= 0;
      end else if (tx_valid[n] && !tx_ready[n]) ev_txstall++;
      // packet delivered
      if (rx_valid[n] && !rx_ready[n]) ev_rxstall++;
      if (rx_valid[n] && rx_ready[n]) begin
        int s, d, q;
        s = int'(rx_data[n][0] >> 24);
        d = int'((rx_data[n][0] >> 16) & 32'hff);
        q = int'(rx_data[n][0] & 32'hffff);
        checks++;
        if (d != n || s != int'(rx_src[n]) || !expect_xy.exists(key(s, d, q))) begin
          fail($sformatf("node %0d got a packet for %0d from %0d (src field %0d) seq %0d", n, d, s, rx_src[n], q));
        end else begin
          if (sent_data[key(s, d, q)] != rx_data[n]) fail($sformatf("data corrupted %0d->%0d", s, d));
          if (expect_xy[key(s, d, q)] >= 0 && expect_xy[key(s, d, q)] != int'(rx_xy[n]))
            fail($sformatf("%0d->%0d seq %0d took %s, expected %s", s, d, q,
                           rx_xy[n] ? "XY" : "YX", expect_xy[key(s, d, q)] ? "XY" : "YX"));
          if (rx_xy[n]) ev_xy++; else ev_yx++;
          if (q < seq_rx[s][d]) begin
            ev_ooo++;
            if (ordered) fail($sformatf("%0d->%0d out of order under an ordered scheme", s, d));
          end else seq_rx[s][d] = q;
          expect_xy.delete(key(s, d, q));
          sent_data.delete(key(s, d, q));
          outstanding--;
        end
      end
    end
    // router-internal events
    for (int n = 0; n < NODES; n++) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (dut_out(n, o).valid && dut_out(n, o).flit.ftype == FT_HEAD && count_load) load[n][o]++;
      end
    end
  end

  logic [NB-1:0][DATA_W-1:0] sent_data [int];

  function automatic link_t dut_out(input int n, input int o);
    return dut.r_out[n][o];
  endfunction

  // Backpressure: an input VC of some router is full.
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++)
      for (int p = 0; p < NUM_PORTS; p++)
        if (dut.r_in_ready[n][p] != 2'b11) ev_bp++;
  end

  // Wormhole blocking and VC interleaving inside each router.

  for (genvar y = 0; y < NN; y++) begin : g_y
    for (genvar x = 0; x < NN; x++) begin : g_x
      always @(posedge clk) if (rst_n) begin
        for (int o = 0; o < NUM_PORTS; o++) begin
          if (dut.g_y[y].g_x[x].u_router.lock[o] == 2'b11 && dut.g_y[y].g_x[x].u_router.out_link[o].valid)
            ev_inter++;
          for (int i = 0; i < 10; i++)
            if (!dut.g_y[y].g_x[x].u_router.fifo_empty[i] && dut.g_y[y].g_x[x].u_router.is_head[i] &&
                dut.g_y[y].g_x[x].u_router.want_port[i] == port_e'(o) &&
                dut.g_y[y].g_x[x].u_router.lock[o][i % 2] &&
                dut.g_y[y].g_x[x].u_router.owner[o][i % 2] != 3'(i / 2))
              ev_block++;
        end
      end
    end
  end

  // ---------------- phases ----------------
  task automatic restart(input route_mode_e m);
    @(negedge clk);
    rst_n = 0;
    tx_valid = '0;
    cfg_mode = m;
    for (int n = 0; n < NODES; n++) begin
      txy_st[n] = 1'b1;
      rng[n] = 16'hACE1;
      for (int d = 0; d < NODES; d++) begin
        seq_tx[n][d] = 0;
        seq_rx[n][d] = -1;
        wot_tab[n][d] = 1'b1;
      end
      for (int o = 0; o < NUM_PORTS; o++) load[n][o] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    ev_mode[int'(m)]++;
  endtask

  task automatic load_random_wot();
    for (int n = 0; n < NODES; n++)
      for (int d = 0; d < NODES; d++) begin
        @(negedge clk);
        cfg_wot_we = 1; cfg_wot_node = ID_W'(n); cfg_wot_dest = ID_W'(d);
        cfg_wot_bit = 1'($urandom); wot_tab[n][d] = cfg_wot_bit;
      end
    @(negedge clk);
    cfg_wot_we = 0;
  endtask

  task automatic drain(input string what);
    int t = 0;
    while ((outstanding != 0 || busy()) && t < 100000) begin @(posedge clk); t++; end
    checks++;
    if (outstanding != 0 || busy()) fail($sformatf("%s: %0d packets never arrived", what, outstanding));
    repeat (5) @(posedge clk);
  endtask

  function automatic bit busy();
    for (int n = 0; n < NODES; n++) if (plan[n].size() != 0 || tx_valid[n]) return 1;
    return 0;
  endfunction

  function automatic int max_link();
    int m = 0;
    // undirected: east link of (x,y) with west link of (x+1,y), north with south
    for (int y = 0; y < NN; y++)
      for (int x = 0; x < NN; x++) begin
        int id = y * NN + x;
        if (x < NN - 1) m = (load[id][P_EAST] + load[id + 1][P_WEST] > m) ? load[id][P_EAST] + load[id + 1][P_WEST] : m;
        if (y < NN - 1) m = (load[id][P_NORTH] + load[id + NN][P_SOUTH] > m) ? load[id][P_NORTH] + load[id + NN][P_SOUTH] : m;
      end
    return m;
  endfunction

  task automatic hotspot_phase(input route_mode_e m, input int exp_max);
    int got;
    restart(m);
    ordered = (m != RM_TXY && m != RM_WTXY);
    count_load = 1;
    for (int n = 0; n < NODES; n++) begin
      if (n != HS1) begin plan[n].push_back(HS1); plan[n].push_back(HS1); end
      if (n != HS2) begin plan[n].push_back(HS2); plan[n].push_back(HS2); end
    end
    drain(m.name());
    count_load = 0;
    got = max_link();
    checks++;
    $display("two hotspots, %s: busiest link carried %0d packets (expected %0d)", m.name(), got, exp_max);
    if (got != exp_max) fail($sformatf("%s: busiest link %0d packets, expected %0d", m.name(), got, exp_max));
  endtask

  // Weighted toggle on the same two hotspots, many packets per flow so the
  // XY share settles near the threshold's 2/3. The example's curve puts the
  // optimum at 11.94 flows per link near that share, against 15 for the even
  // split. Over only 30 draws per flow the generator's XY share comes out at
  // 0.70 to 0.77, which the same curve puts at about 12.3 to 12.9, so the
  // measured busiest link must lie between 11.94 and 13.5 (10% under the
  // even split).
  task automatic weighted_hotspot_phase(input int per_pair);
    int got;
    real per_flow;
    restart(RM_WTXY);
    ordered = 0;
    cfg_cxy = 16'd21845;
    count_load = 1;
    for (int i = 0; i < per_pair; i++)
      for (int n = 0; n < NODES; n++) begin
        if (n != HS1) plan[n].push_back(HS1);
        if (n != HS2) plan[n].push_back(HS2);
      end
    drain("weighted hotspots");
    count_load = 0;
    got = max_link();
    per_flow = real'(got) / per_pair;
    $display("two hotspots, RM_WTXY share 2/3: busiest link %0d packets = %0.2f per flow", got, per_flow);
    checks++;
    if (per_flow < 11.94 || per_flow > 13.5) fail($sformatf("weighted toggle: %0.2f per flow", per_flow));
  endtask

  task automatic random_phase(input route_mode_e m, input int pkts);
    restart(m);
    ordered = (m != RM_TXY && m != RM_WTXY);
    if (m == RM_WOT) load_random_wot();
    if (m == RM_WTXY) cfg_cxy = 16'd21845;
    for (int n = 0; n < NODES; n++)
      for (int i = 0; i < pkts; i++) begin
        int r = $urandom % 100;
        plan[n].push_back(r < 40 ? HS1 : r < 60 ? 20 : int'($urandom % NODES));
      end
    drain(m.name());
  endtask

  initial begin
    tx_valid = '0; tx_dest = '0; tx_data = '0; rx_ready = '1;
    repeat (3) @(posedge clk);
    hotspot_phase(RM_XY, 30);
    hotspot_phase(RM_YX, 50);
    hotspot_phase(RM_TXY, 30);
    weighted_hotspot_phase(30);
    rx_ready_pct = 60;
    random_phase(RM_STXY, 20);
    random_phase(RM_WOT, 20);
    random_phase(RM_WTXY, 20);
    random_phase(RM_TXY, 20);
    $display("events: XY %0d, YX %0d, wormhole blocking %0d, backpressure %0d, VC interleave %0d,",
             ev_xy, ev_yx, ev_block, ev_bp, ev_inter);
    $display("        injection stalls %0d, delivery stalls %0d, out-of-order (split schemes) %0d",
             ev_txstall, ev_rxstall, ev_ooo);
    checks += 14;
    if (ev_xy == 0) fail("no XY route");
    if (ev_yx == 0) fail("no YX route");
    if (ev_block == 0) fail("no wormhole blocking");
    if (ev_bp == 0) fail("no backpressure");
    if (ev_inter == 0) fail("no VC interleaving");
    if (ev_txstall == 0) fail("no injection stall");
    if (ev_rxstall == 0) fail("no delivery stall");
    if (ev_ooo == 0) fail("no out-of-order arrival under flow splitting");
    for (int m = 0; m < 6; m++) if (ev_mode[m] == 0) fail($sformatf("mode %0d never run", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
