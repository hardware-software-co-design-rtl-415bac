// tb_echelon_top_full: the processor at its default size (3 x 2 mesh of
// tiles, 256-64-16 cores) taken through one complete operation. NPU0 of
// tile (0,0) is configured so that input neuron a fires hidden neuron
// a mod 64 and then output neuron a mod 16; its spikes are routed to tile
// (2,1) NPU2, configured the same way, whose spikes leave the mesh towards
// the host on row 1. The host sends spikes into tile (0,0) and every output
// packet must carry the expected neuron, in order. Then learning is turned
// on for NPU0 and the test checks that the on-chip learning unit writes
// weights back.
module tb_echelon_top_full;
  import echelon_pkg::*;
  localparam int N2 = 256, N1 = 64, N0 = 16, MX = 3;
  logic clk = 0, rst_n = 0, tick = 0;
  logic host_in_valid = 0, host_in_ready;
  spike_pkt_t host_in_data = '0;
  logic [1:0] host_out_valid, host_out_ready = '1;
  spike_pkt_t host_out_data [2];
  logic cfg_valid = 0, cfg_ready;
  cfg_t cfg = '0;
  int checks = 0, failures = 0, cyc = 0, n_out = 0, wb = 0;
  int exp_q[$];
  bit exact = 1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  echelon_top dut (.*);

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

  always @(negedge clk) if (rst_n && dut.g_y[0].g_x[0].u_tile.wb1_en) wb++;

  always @(posedge clk) if (rst_n && host_out_valid[1]) begin
    n_out++;
    chk(int'(host_out_data[1].x) == MX && host_out_data[1].y == 3'd1, "output header");
    if (!exact) begin end
    else if (exp_q.size() == 0) chk(0, "unexpected output");
    else begin int e; e = exp_q.pop_front();
      chk(int'(host_out_data[1].addr) == e, $sformatf("output %0d exp %0d", host_out_data[1].addr, e)); end
  end
  always @(posedge clk) if (rst_n && host_out_valid[0]) chk(0, "output on row 0");

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
  endtask

  task automatic host_send(input spike_pkt_t p);
    @(negedge clk);
    host_in_valid = 1; host_in_data = p;
    #1;
    while (!host_in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 host_in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_core(0, 0, COMP_NPU0);
    load_core(2, 1, COMP_NPU2);
    cfgw(0, 0, COMP_NPU0, CFG_ROUTE, 0, 0, 0, {7'd0, 3'd2, 3'd1, COMP_NPU2});
    cfgw(2, 1, COMP_NPU2, CFG_ROUTE, 0, 0, 0, {7'd0, 3'(MX), 3'd1, COMP_NPU0});
    for (int n = 0; n < 60; n++) begin
      int a;
      a = $urandom_range(0, N2 - 1);
      exp_q.push_back(a % N0);
      host_send('{x: 3'd0, y: 3'd0, comp: COMP_NPU0, addr: 8'(a)});
      repeat ($urandom_range(0, 15)) @(negedge clk);
    end
    repeat (1000) @(negedge clk);
    chk(exp_q.size() == 0 && n_out == 60, $sformatf("all outputs (%0d)", n_out));
    chk(wb == 0, "no write-back while learning is off");
    exact = 0;
    host_send('{x: 3'd0, y: 3'd0, comp: COMP_OLU, addr: 8'h80});
    for (int n = 0; n < 20; n++) begin
      host_send('{x: 3'd0, y: 3'd0, comp: COMP_NPU0, addr: 8'($urandom_range(0, N2 - 1))});
      repeat (15) @(negedge clk);
    end
    repeat (500) @(negedge clk);
    chk(wb > 0, $sformatf("learning write-backs (%0d)", wb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
