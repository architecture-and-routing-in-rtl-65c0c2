// tb_complex_traffic: random hotspot traffic on the full 5x5 mesh.
//
// The pattern follows a three-parameter random model: each node is a
// hotspot with probability 0.1 (at least one is forced), every node sends
// to each hotspot with probability 0.8 and to each other node with
// probability 0.05. Every chosen source-destination pair carries K packets.
// The testbench keeps its own link-load model (both directions of a link
// added) and checks, for plain XY, plain YX, source parity and route
// tables, that the busiest link measured on the RTL equals K times the
// model's value. The route tables come from a min-max local search in the
// model: start from source parity, flip any single pair's route that lowers
// the busiest link, stop when no flip helps. The searched tables must not
// be worse than source parity. Three random patterns are run; every packet
// must arrive once, at its destination.
module tb_complex_traffic;
  import noc_pkg::*;
  localparam int NN = 5, NODES = 25, NB = BODY_FLITS, K = 2, PATTERNS = 3;

  logic clk = 0, rst_n = 0;
  route_mode_e cfg_mode = RM_XY;
  logic cfg_wot_we = 0, cfg_wot_bit = 0;
  logic [ID_W-1:0] cfg_wot_node = '0, cfg_wot_dest = '0;
  logic [NODES-1:0] tx_valid, tx_ready, rx_valid, rx_ready, rx_xy;
  logic [NODES-1:0][ID_W-1:0] tx_dest, rx_src;
  logic [NODES-1:0][NB-1:0][DATA_W-1:0] tx_data, rx_data;

  noc_fpga_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_mode(cfg_mode), .cfg_cxy(16'd0), .cfg_wot_we(cfg_wot_we),
    .cfg_wot_node(cfg_wot_node), .cfg_wot_dest(cfg_wot_dest), .cfg_wot_bit(cfg_wot_bit),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_dest(tx_dest), .tx_data(tx_data),
    .rx_valid(rx_valid), .rx_ready(rx_ready), .rx_src(rx_src), .rx_xy(rx_xy), .rx_data(rx_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // Loop bounds held in variables keep the simulator from unrolling the
  // 25 x 25 loops below.
  int nodes_v = NODES, nn_v = NN, ports_v = NUM_PORTS, k_v = K;
  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0t: %s", $time, s);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // traffic pattern: pair_on[s][d] and route assignment rt[s][d] (1 = XY)
  bit pair_on [NODES][NODES];
  bit rt      [NODES][NODES];
  int hl [NN][NN];
  int vl [NN][NN];

  function automatic void add_route(input int s, input int d, input bit xy);
    int x, y, dx, dy;
    x = s % NN; y = s / NN; dx = d % NN; dy = d / NN;
    for (int phase = 0; phase < 2; phase++) begin
      if ((phase == 0) == xy) begin
        while (x != dx) begin
          if (dx > x) begin hl[x][y]++; x++; end
          else begin hl[x-1][y]++; x--; end
        end
      end else begin
        while (y != dy) begin
          if (dy > y) begin vl[x][y]++; y++; end
          else begin vl[x][y-1]++; y--; end
        end
      end
    end
  endfunction

  function automatic int model_max();
    int m = 0;
    for (int x = 0; x < nn_v; x++) for (int y = 0; y < nn_v; y++) begin hl[x][y] = 0; vl[x][y] = 0; end
    for (int s = 0; s < nodes_v; s++) for (int d = 0; d < nodes_v; d++)
      if (pair_on[s][d]) add_route(s, d, rt[s][d]);
    for (int x = 0; x < nn_v; x++) for (int y = 0; y < nn_v; y++) begin
      if (hl[x][y] > m) m = hl[x][y];
      if (vl[x][y] > m) m = vl[x][y];
    end
    return m;
  endfunction

  // ---- RTL run
  int load [NODES][NUM_PORTS];
  int plan [NODES][$];
  int sent_total = 0, received = 0;

  always @(negedge clk) if (rst_n)
    for (int n = 0; n < nodes_v; n++)
      if (!tx_valid[n] && plan[n].size() > 0) begin
        tx_valid[n] = 1;
        tx_dest[n]  = ID_W'(plan[n][0]);
        tx_data[n][0] = 32'(n);
      end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < nodes_v; n++) begin
      for (int o = 0; o < ports_v; o++)
        if (dut.r_out[n][o].valid && dut.r_out[n][o].flit.ftype == FT_HEAD) load[n][o]++;
      if (tx_valid[n] && tx_ready[n]) begin
        void'(plan[n].pop_front());
        tx_valid[n] <= 0;
      end
      if (rx_valid[n] && rx_ready[n]) begin
        int s;
        s = int'(rx_src[n]);
        checks++;
        if (rx_data[n][0] != 32'(s) || !pair_on[s][n]) fail($sformatf("bad delivery %0d->%0d", s, n));
        received++;
      end
    end
  end

  function automatic int rtl_max();
    int m = 0;
    for (int y = 0; y < nn_v; y++) for (int x = 0; x < nn_v; x++) begin
      int id = y * NN + x;
      if (x < NN - 1 && load[id][P_EAST] + load[id + 1][P_WEST] > m) m = load[id][P_EAST] + load[id + 1][P_WEST];
      if (y < NN - 1 && load[id][P_NORTH] + load[id + NN][P_SOUTH] > m) m = load[id][P_NORTH] + load[id + NN][P_SOUTH];
    end
    return m;
  endfunction

  task automatic run(input route_mode_e m, input int exp_flows);
    int got, t;
    @(negedge clk);
    rst_n = 0; cfg_mode = m; tx_valid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    if (m == RM_WOT) begin
      for (int s = 0; s < nodes_v; s++) for (int d = 0; d < nodes_v; d++) begin
        @(negedge clk);
        cfg_wot_we = 1; cfg_wot_node = ID_W'(s); cfg_wot_dest = ID_W'(d); cfg_wot_bit = rt[s][d];
      end
      @(negedge clk);
      cfg_wot_we = 0;
    end
    for (int n = 0; n < nodes_v; n++) for (int o = 0; o < ports_v; o++) load[n][o] = 0;
    sent_total = 0; received = 0;
    for (int k = 0; k < k_v; k++)
      for (int s = 0; s < nodes_v; s++) for (int d = 0; d < nodes_v; d++)
        if (pair_on[s][d]) begin plan[s].push_back(d); sent_total++; end
    t = 0;
    while (received < sent_total && t < 50000) begin @(posedge clk); t++; end
    repeat (5) @(posedge clk);
    checks++;
    if (received != sent_total) fail($sformatf("%s: %0d of %0d packets arrived", m.name(), received, sent_total));
    got = rtl_max();
    checks++;
    $display("  %s: busiest link %0d packets = %0d flows (model %0d)", m.name(), got, got / K, exp_flows);
    if (got != K * exp_flows) fail($sformatf("%s: busiest link %0d, expected %0d", m.name(), got, K * exp_flows));
  endtask

  initial begin
    tx_valid = '0; tx_dest = '0; tx_data = '0; rx_ready = '1;
    repeat (3) @(posedge clk);
    for (int p = 0; p < PATTERNS; p++) begin
      bit hot [NODES];
      int n_hot = 0, n_pairs = 0, m_xy, m_yx, m_st, m_wot, v;
      bit improved;
      for (int n = 0; n < nodes_v; n++) begin hot[n] = ($urandom % 100) < 10; n_hot += hot[n]; end
      if (n_hot == 0) begin hot[$urandom % NODES] = 1; n_hot = 1; end
      for (int s = 0; s < nodes_v; s++) for (int d = 0; d < nodes_v; d++) begin
        pair_on[s][d] = (s != d) && (($urandom % 100) < (hot[d] ? 80 : 5));
        n_pairs += pair_on[s][d];
      end
      for (int s = 0; s < nodes_v; s++) for (int d = 0; d < nodes_v; d++) rt[s][d] = 1;
      m_xy = model_max();
      for (int s = 0; s < nodes_v; s++) for (int d = 0; d < nodes_v; d++) rt[s][d] = 0;
      m_yx = model_max();
      for (int s = 0; s < nodes_v; s++) for (int d = 0; d < nodes_v; d++) rt[s][d] = 1'($countones({5'(s), 5'(d)}) % 2);
      m_st = model_max();
      // min-max local search over single-pair flips
      m_wot = m_st;
      improved = 1;
      while (improved) begin
        improved = 0;
        for (int s = 0; s < nodes_v; s++) for (int d = 0; d < nodes_v; d++) if (pair_on[s][d]) begin
          rt[s][d] = ~rt[s][d];
          v = model_max();
          if (v < m_wot) begin m_wot = v; improved = 1; end
          else rt[s][d] = ~rt[s][d];
        end
      end
      $display("pattern %0d: %0d hotspots, %0d pairs; model busiest link XY %0d, YX %0d, parity %0d, tables %0d",
               p, n_hot, n_pairs, m_xy, m_yx, m_st, m_wot);
      checks++;
      if (m_wot > m_st) fail("searched tables worse than parity");
      run(RM_WOT, m_wot);
      run(RM_XY, m_xy);
      run(RM_YX, m_yx);
      run(RM_STXY, m_st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
