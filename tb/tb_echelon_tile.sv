// tb_echelon_tile: one tile with small 8-4-2 cores. NPU0 and the SFU are
// loaded with weights that make input neuron a fire output neuron a mod 2;
// NPU0's spikes are routed over the bus to the SFU of the same tile, the
// SFU's spikes to NPU1 of tile (1,0), i.e. out through the network
// interface. Spikes arrive from the network. Phase 1: every input yields one
// network packet with the right header and address, in order, and nothing is
// written back. Phase 2: a packet to the OLU turns on learning for NPU0; the
// OLU must write weights back, potentiating the driving weights and
// depressing others below zero. Also checks that the bus carried more than
// one transfer in some cycle.
module tb_echelon_tile;
  import echelon_pkg::*;
  localparam int N2 = 8, N1 = 4, N0 = 2;
  logic clk = 0, rst_n = 0, tick = 0;
  logic noc_out_valid, noc_out_ready = 1, noc_in_valid = 0, noc_in_ready;
  spike_pkt_t noc_out_data, noc_in_data = '0;
  logic cfg_valid = 0, cfg_ready;
  cfg_t cfg = '0;
  int checks = 0, failures = 0, cyc = 0, wb_count = 0, bus_multi = 0;
  int exp_q[$];
  bit exact = 1;
  int n_out = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  echelon_tile #(.X(0), .Y(0), .N2(N2), .N1(N1), .N0(N0)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0d)", m, cyc); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (dut.wb1_en || dut.wb0_en) wb_count++;
    if ($countones(dut.tx_ready) > 1) bus_multi++;
  end

  always @(posedge clk) if (rst_n && noc_out_valid && noc_out_ready) begin
    chk(noc_out_data.x == 3'd1 && noc_out_data.y == 3'd0 && noc_out_data.comp == COMP_NPU1,
        "packet header from SFU route");
    n_out++;
    if (!exact) begin end
    else if (exp_q.size() == 0) chk(0, "unexpected packet");
    else begin int e; e = exp_q.pop_front(); chk(int'(noc_out_data.addr) == e, $sformatf("packet address %0d exp %0d", noc_out_data.addr, e)); end
  end

  task automatic cfgw(input logic [2:0] comp, input cfg_kind_e k, input int layer,
                      input int r, input int c, input int d);
    @(negedge clk);
    cfg_valid = 1;
    cfg = '{x: 3'd0, y: 3'd0, comp: comp, kind: k, layer: 2'(layer),
            row: 8'(r), col: 8'(c), data: 16'(d)};
    #1;
    while (!cfg_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cfg_valid = 0;
  endtask

  task automatic load_core(input logic [2:0] comp);
    for (int i = 0; i < N2; i++) cfgw(comp, CFG_WEIGHT, 2, i, 0, 100);
    for (int i = 0; i < N2; i++) cfgw(comp, CFG_WEIGHT, 1, i, i % N1, 100);
    for (int i = 0; i < N1; i++) cfgw(comp, CFG_WEIGHT, 0, i, i % N0, 100);
  endtask

  task automatic net_in(input spike_pkt_t p);
    @(negedge clk);
    noc_in_valid = 1; noc_in_data = p;
    #1;
    while (!noc_in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 noc_in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_core(COMP_NPU0);
    load_core(COMP_SFU);
    cfgw(COMP_NPU0, CFG_ROUTE, 0, 0, 0, {7'd0, 3'd0, 3'd0, COMP_SFU});
    cfgw(COMP_SFU,  CFG_ROUTE, 0, 0, 0, {7'd0, 3'd1, 3'd0, COMP_NPU1});
    // phase 1, no learning: exact output sequence
    for (int n = 0; n < 100; n++) begin
      int a;
      a = $urandom_range(0, N2 - 1);
      exp_q.push_back(a % N0);
      net_in('{x: 3'd0, y: 3'd0, comp: COMP_NPU0, addr: 8'(a)});
      repeat ($urandom_range(0, 12)) @(negedge clk);
    end
    repeat (600) @(negedge clk);
    chk(exp_q.size() == 0, "all packets out");
    chk(wb_count == 0, "no write-back while learning is off");
    // phase 2: learning on for NPU0; depression changes which neurons fire,
    // so only headers and the weights are checked
    exact = 0;
    net_in('{x: 3'd0, y: 3'd0, comp: COMP_OLU, addr: 8'h80});
    for (int n = 0; n < 60; n++) begin
      net_in('{x: 3'd0, y: 3'd0, comp: COMP_NPU0, addr: 8'($urandom_range(0, N2 - 1))});
      repeat ($urandom_range(0, 12)) @(negedge clk);
    end
    repeat (600) @(negedge clk);
    chk(n_out > 110, "packets in the learning phase");
    chk(dut.olu_en && dut.olu_sel == 2'd0, "OLU enabled for NPU0");
    chk(wb_count > 50, $sformatf("OLU write-backs %0d", wb_count));
    begin
      int neg, high;
      neg = 0; high = 0;
      for (int i = 0; i < N2; i++)
        for (int j = 0; j < N1; j++) begin
          int w;
          w = int'(signed'(dut.g_core[0].u_core.u_l1.u_mem.mem[i][j]));
          if (j == i % N1) high += (w > 100);
          else neg += (w < 0);
        end
      chk(high > N2 / 2, $sformatf("driving weights potentiated (%0d rows)", high));
      chk(neg > 4, $sformatf("other weights depressed (%0d)", neg));
    end
    chk(bus_multi > 0, "concurrent bus transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

