// tb_echelon_top: end-to-end test of the tiled processor on a 3 x 2 mesh with
// small 8-4-2 cores. Every used core is loaded so that input neuron a makes
// its output neuron a mod 2 fire. Two spike paths are routed:
//   A: host -> tile(0,0) NPU0 -> bus -> tile(0,0) SFU -> NI -> NoC ->
//      tile(1,0) NPU1 -> NoC (east, then north) -> tile(2,1) NPU2 -> host row 1
//   B: host -> tile(0,0) NPU1 -> NI -> NoC -> host row 0
// Phase 1 (no learning) checks every host output packet: header, address
// a mod 2 and order per path; the host output ports are held off for a while
// so that back-pressure reaches the layers. Phase 2 sends a packet to the
// OLU of tile (0,0) to train NPU0 and checks that weights are written back.
// The mechanisms of the design are counted and each must occur: layer stall,
// concurrent bus transfers, a bus request refused, multi-hop NoC routing,
// host output on both rows, leak steps, LTP and LTD updates, write-backs,
// OLU selection and every configuration kind.
module tb_echelon_top;
  import echelon_pkg::*;
  localparam int MX = 3, MY = 2, N2 = 8, N1 = 4, N0 = 2;
  logic clk = 0, rst_n = 0, tick = 0;
  logic host_in_valid = 0, host_in_ready;
  spike_pkt_t host_in_data = '0;
  logic [MY-1:0] host_out_valid, host_out_ready = '1;
  spike_pkt_t host_out_data [MY];
  logic cfg_valid = 0, cfg_ready;
  cfg_t cfg = '0;
  int checks = 0, failures = 0, cyc = 0;
  int exp_a[$], exp_b[$];
  bit exact = 1;
  int n_out [MY];
  // mechanism counters
  int c_stall = 0, c_bus_multi = 0, c_blocked = 0, c_leak = 0, c_ltp = 0, c_ltd = 0;
  int c_wb = 0, c_hop = 0, c_cfg[4];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  echelon_top #(.MESH_X(MX), .MESH_Y(MY), .N2(N2), .N1(N1), .N0(N0)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0d)", m, cyc); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time steps
  always begin
    repeat (40) @(negedge clk);
    tick = 1;
    @(negedge clk);
    tick = 0;
  end

  // mechanism counters, sampled between clock edges
  always @(negedge clk) if (rst_n) begin
    if (|{dut.g_y[0].g_x[0].u_tile.g_core[0].stall_unused, dut.g_y[0].g_x[0].u_tile.g_core[1].stall_unused,
          dut.g_y[0].g_x[0].u_tile.g_core[2].stall_unused, dut.g_y[0].g_x[0].u_tile.g_core[3].stall_unused})
      c_stall++;
    if ($countones(dut.g_y[0].g_x[0].u_tile.tx_ready) > 1) c_bus_multi++;
    if (|dut.g_y[0].g_x[0].u_tile.blocked) c_blocked++;
    if (dut.g_y[0].g_x[0].u_tile.g_core[0].u_core.u_l2.u_lif.tick_pend &&
        !(|dut.g_y[0].g_x[0].u_tile.g_core[0].u_core.u_l2.u_lif.ph) &&
        !dut.g_y[0].g_x[0].u_tile.g_core[0].u_core.u_l2.u_lif.start) c_leak++;
    if (dut.g_y[0].g_x[0].u_tile.u_olu.d1_v)
      for (int j = 0; j < N1; j++)
        if (dut.g_y[0].g_x[0].u_tile.u_olu.m1[j]) begin
          if (signed'(dut.g_y[0].g_x[0].u_tile.u_olu.d1[j]) > 0) c_ltp++;
          if (signed'(dut.g_y[0].g_x[0].u_tile.u_olu.d1[j]) < 0) c_ltd++;
        end
    if (dut.g_y[0].g_x[0].u_tile.wb1_en || dut.g_y[0].g_x[0].u_tile.wb0_en) c_wb++;
    // a packet leaving router (2,0) northwards or southwards has made a turn
    if ((dut.r_out_valid[0][2][P_NORTH] && dut.r_out_ready[0][2][P_NORTH]) ||
        (dut.r_out_valid[0][2][P_SOUTH] && dut.r_out_ready[0][2][P_SOUTH])) c_hop++;
    if (cfg_valid && cfg_ready) c_cfg[int'(cfg.kind)]++;
  end

  // host outputs
  for (genvar y = 0; y < MY; y++) begin : g_mon
    always @(posedge clk) if (rst_n && host_out_valid[y] && host_out_ready[y]) begin
      n_out[y]++;
      chk(int'(host_out_data[y].x) == MX && int'(host_out_data[y].y) == y,
          $sformatf("host packet header row %0d", y));
      if (exact) begin
        if (y == 1) begin
          if (exp_a.size() == 0) chk(0, "unexpected packet on path A");
          else begin int e; e = exp_a.pop_front();
            chk(int'(host_out_data[y].addr) == e, $sformatf("path A address %0d exp %0d", host_out_data[y].addr, e)); end
        end else begin
          if (exp_b.size() == 0) chk(0, "unexpected packet on path B");
          else begin int e; e = exp_b.pop_front();
            chk(int'(host_out_data[y].addr) == e, $sformatf("path B address %0d exp %0d", host_out_data[y].addr, e)); end
        end
      end
    end
  end

  task automatic cfgw(input int x, input int y, input logic [2:0] comp, input cfg_kind_e k,
                      input int layer, input int r, input int c, input int d);
    @(negedge clk);
    cfg_valid = 1;
    cfg = '{x: 3'(x), y: 3'(y), comp: comp, kind: k, layer: 2'(layer),
            row: 8'(r), col: 8'(c), data: 16'(d)};
    #1;
    while (!cfg_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cfg_valid = 0;
  endtask

  task automatic load_core(input int x, input int y, input logic [2:0] comp);
    for (int i = 0; i < N2; i++) cfgw(x, y, comp, CFG_WEIGHT, 2, i, 0, 100);
    for (int i = 0; i < N2; i++) cfgw(x, y, comp, CFG_WEIGHT, 1, i, i % N1, 100);
    for (int i = 0; i < N1; i++) cfgw(x, y, comp, CFG_WEIGHT, 0, i, i % N0, 100);
    for (int l = 0; l < 3; l++) begin
      cfgw(x, y, comp, CFG_THRESH, l, 0, 0, 64);
      cfgw(x, y, comp, CFG_LEAK, l, 0, 0, 1);
    end
  endtask

  task automatic route(input int x, input int y, input logic [2:0] comp,
                       input int dx, input int dy, input logic [2:0] dc);
    cfgw(x, y, comp, CFG_ROUTE, 0, 0, 0, {7'd0, 3'(dx), 3'(dy), dc});
  endtask

  task automatic host_send(input spike_pkt_t p);
    @(negedge clk);
    host_in_valid = 1; host_in_data = p;
    #1;
    while (!host_in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 host_in_valid = 0;
  endtask

  task automatic traffic(input int n, input bit keep);
    for (int i = 0; i < n; i++) begin
      int a;
      bit b;
      a = $urandom_range(0, N2 - 1);
      b = 1'($urandom_range(0, 1));
      if (keep) begin
        if (b) exp_b.push_back(a % N0);
        else   exp_a.push_back(a % N0);
      end
      host_send('{x: 3'd0, y: 3'd0, comp: b ? COMP_NPU1 : COMP_NPU0, addr: 8'(a)});
      repeat ($urandom_range(0, 8)) @(negedge clk);
    end
  endtask

  initial begin
    n_out[0] = 0; n_out[1] = 0;
    for (int k = 0; k < 4; k++) c_cfg[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_core(0, 0, COMP_NPU0);
    load_core(0, 0, COMP_SFU);
    load_core(0, 0, COMP_NPU1);
    load_core(1, 0, COMP_NPU1);
    load_core(2, 1, COMP_NPU2);
    route(0, 0, COMP_NPU0, 0, 0, COMP_SFU);
    route(0, 0, COMP_SFU,  1, 0, COMP_NPU1);
    route(1, 0, COMP_NPU1, 2, 1, COMP_NPU2);
    route(2, 1, COMP_NPU2, MX, 1, COMP_NPU0);
    route(0, 0, COMP_NPU1, MX, 0, COMP_NPU0);
    // phase 1: exact outputs
    traffic(80, 1);
    // hold the host outputs off so that the paths back up
    host_out_ready = '0;
    traffic(40, 1);
    repeat (300) @(negedge clk);
    host_out_ready = '1;
    repeat (1500) @(negedge clk);
    chk(exp_a.size() == 0 && exp_b.size() == 0,
        $sformatf("all packets out (%0d, %0d left)", exp_a.size(), exp_b.size()));
    chk(c_wb == 0, "no write-back while learning is off");
    // phase 2: learning for NPU0 of tile (0,0)
    exact = 0;
    host_send('{x: 3'd0, y: 3'd0, comp: COMP_OLU, addr: 8'h80});
    traffic(80, 0);
    repeat (1500) @(negedge clk);
    chk(dut.g_y[0].g_x[0].u_tile.olu_en && dut.g_y[0].g_x[0].u_tile.olu_sel == 2'd0,
        "OLU enabled for NPU0");
    $display("mechanisms: stall=%0d bus_multi=%0d blocked=%0d hop=%0d out0=%0d out1=%0d leak=%0d ltp=%0d ltd=%0d wb=%0d cfg=%0d/%0d/%0d/%0d",
             c_stall, c_bus_multi, c_blocked, c_hop, n_out[0], n_out[1], c_leak, c_ltp, c_ltd,
             c_wb, c_cfg[0], c_cfg[1], c_cfg[2], c_cfg[3]);
    chk(c_stall > 0, "layer stall");
    chk(c_bus_multi > 0, "concurrent bus transfers");
    chk(c_blocked > 0, "bus request refused");
    chk(c_hop > 0, "multi-hop NoC route with a turn");
    chk(n_out[0] > 0 && n_out[1] > 0, "host output on both rows");
    chk(c_leak > 0, "leak steps");
    chk(c_ltp > 0, "LTP updates");
    chk(c_ltd > 0, "LTD updates");
    chk(c_wb > 0, "weight write-backs");
    for (int k = 0; k < 4; k++) chk(c_cfg[k] > 0, $sformatf("configuration kind %0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
