// tb_wot_hotspot: single-hotspot workload on the full 5x5 mesh.
//
// Every node sends K packets to one hotspot at (4,1). The testbench first
// builds per-destination route tables the way an offline tool would: it
// starts from the source-parity assignment and flips one source's route
// whenever that lowers the busiest link, until no single flip helps (a
// min-max local search over its own link-load model). It loads the tables
// into the interfaces, runs the traffic through the RTL and counts head
// flits on every link, both directions of a link added together.
// Checks: the measured busiest link equals K times the model's value for
// plain XY (15 flows), plain YX (20), source parity (13) and the table
// (10, the best value known for this placement); every packet arrives.
module tb_wot_hotspot;
  import noc_pkg::*;
  localparam int NN = 5, NODES = 25, NB = BODY_FLITS, K = 4;
  localparam int HX = 4, HY = 1, HS = HY * NN + HX;

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
  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0t: %s", $time, s);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- link-load model: hl[x][y] = link (x,y)-(x+1,y), vl[x][y] = (x,y)-(x,y+1)
  int hl [NN][NN];
  int vl [NN][NN];

  function automatic void add_route(input int sx, input int sy, input bit xy);
    int x = sx, y = sy;
    for (int phase = 0; phase < 2; phase++) begin
      if ((phase == 0) == xy) begin
        while (x != HX) begin
          if (HX > x) begin hl[x][y]++; x++; end
          else begin hl[x-1][y]++; x--; end
        end
      end else begin
        while (y != HY) begin
          if (HY > y) begin vl[x][y]++; y++; end
          else begin vl[x][y-1]++; y--; end
        end
      end
    end
  endfunction

  function automatic int model_max(input bit a [NODES]);
    int m = 0;
    for (int x = 0; x < NN; x++) for (int y = 0; y < NN; y++) begin hl[x][y] = 0; vl[x][y] = 0; end
    for (int s = 0; s < NODES; s++) if (s != HS) add_route(s % NN, s / NN, a[s]);
    for (int x = 0; x < NN; x++) for (int y = 0; y < NN; y++) begin
      if (hl[x][y] > m) m = hl[x][y];
      if (vl[x][y] > m) m = vl[x][y];
    end
    return m;
  endfunction

  // ---- RTL run
  int load [NODES][NUM_PORTS];
  int pending [NODES];
  int received = 0;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      for (int o = 0; o < NUM_PORTS; o++)
        if (dut.r_out[n][o].valid && dut.r_out[n][o].flit.ftype == FT_HEAD) load[n][o]++;
      if (tx_valid[n] && tx_ready[n]) begin
        pending[n]--;
        tx_valid[n] <= (pending[n] > 0);
      end
      if (rx_valid[n] && rx_ready[n]) begin
        checks++;
        if (n != HS || rx_data[n][0] != 32'(rx_src[n])) fail($sformatf("bad delivery at node %0d", n));
        received++;
      end
    end
  end

  function automatic int rtl_max();
    int m = 0;
    for (int y = 0; y < NN; y++) for (int x = 0; x < NN; x++) begin
      int id = y * NN + x;
      if (x < NN - 1 && load[id][P_EAST] + load[id + 1][P_WEST] > m) m = load[id][P_EAST] + load[id + 1][P_WEST];
      if (y < NN - 1 && load[id][P_NORTH] + load[id + NN][P_SOUTH] > m) m = load[id][P_NORTH] + load[id + NN][P_SOUTH];
    end
    return m;
  endfunction

  task automatic run(input route_mode_e m, input bit tab [NODES], input int exp_flows);
    int got, t;
    @(negedge clk);
    rst_n = 0; cfg_mode = m; tx_valid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    if (m == RM_WOT) begin
      for (int s = 0; s < NODES; s++) begin
        @(negedge clk);
        cfg_wot_we = 1; cfg_wot_node = ID_W'(s); cfg_wot_dest = ID_W'(HS); cfg_wot_bit = tab[s];
      end
      @(negedge clk);
      cfg_wot_we = 0;
    end
    for (int n = 0; n < NODES; n++) begin
      for (int o = 0; o < NUM_PORTS; o++) load[n][o] = 0;
      pending[n] = (n == HS) ? 0 : K;
      tx_dest[n] = ID_W'(HS);
      tx_data[n] = '0;
      tx_data[n][0] = 32'(n);
    end
    received = 0;
    @(negedge clk);
    for (int n = 0; n < NODES; n++) tx_valid[n] = (pending[n] > 0);
    t = 0;
    while (received < (NODES - 1) * K && t < 20000) begin @(posedge clk); t++; end
    repeat (5) @(posedge clk);
    checks++;
    if (received != (NODES - 1) * K) fail($sformatf("%s: %0d of %0d packets arrived", m.name(), received, (NODES - 1) * K));
    got = rtl_max();
    checks++;
    $display("hotspot (4,1), %s: busiest link %0d packets = %0d flows (expected %0d)", m.name(), got, got / K, exp_flows);
    if (got != K * exp_flows) fail($sformatf("%s: busiest link %0d, expected %0d", m.name(), got, K * exp_flows));
  endtask

  initial begin
    bit a [NODES];
    bit dummy [NODES];
    int best, v;
    bit improved;
    tx_valid = '0; tx_dest = '0; tx_data = '0; rx_ready = '1;
    for (int s = 0; s < NODES; s++) begin
      a[s] = 1'($countones({5'(s), 5'(HS)}) % 2);
      dummy[s] = 1'b1;
    end
    // Model values for the fixed schemes.
    begin
      bit allxy [NODES], allyx [NODES];
      for (int s = 0; s < NODES; s++) begin allxy[s] = 1; allyx[s] = 0; end
      checks += 3;
      if (model_max(allxy) != 15) fail("model: XY should give 15");
      if (model_max(allyx) != 20) fail("model: YX should give 20");
      if (model_max(a) != 13) fail("model: parity should give 13");
    end
    // Min-max local search from the parity assignment.
    best = model_max(a);
    improved = 1;
    while (improved) begin
      improved = 0;
      for (int s = 0; s < NODES; s++) if (s != HS) begin
        a[s] = ~a[s];
        v = model_max(a);
        if (v < best) begin best = v; improved = 1; end
        else a[s] = ~a[s];
      end
    end
    $display("table search: busiest link %0d flows", best);
    checks++;
    if (best != 10) fail($sformatf("table search reached %0d flows, expected 10", best));
    repeat (3) @(posedge clk);
    run(RM_XY, dummy, 15);
    run(RM_YX, dummy, 20);
    run(RM_STXY, dummy, 13);
    run(RM_WOT, a, best);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
