// tb_ubrain_core: a small 8-4-2 core. Weights of all three layers are loaded
// through configuration; random input events are sent while the output is
// randomly back-pressured. The expected output sequence comes from a layer
// by layer model in the testbench (each layer handles its input stream in
// order, so the streams can be computed one layer after the other). Also
// checks the 33-cycle latency of one spike through three idle layers and the
// learning-interface pulses of the two plastic layers.
module tb_ubrain_core;
  import echelon_pkg::*;
  localparam int N2 = 8, N1 = 4, N0 = 2, W = 8, TH = 20;
  logic clk = 0, rst_n = 0, tick = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [7:0] in_addr = '0, out_addr;
  logic cfg_valid = 0, cfg_ready;
  cfg_kind_e cfg_kind = CFG_WEIGHT;
  logic [1:0] cfg_layer = '0;
  logic [7:0] cfg_row = '0, cfg_col = '0;
  logic [15:0] cfg_data = '0;
  logic l1_start, l1_fire_valid, l0_start, l0_fire_valid;
  logic [7:0] l1_pre, l0_pre;
  logic [N1*W-1:0] l1_row;
  logic [N0*W-1:0] l0_row;
  logic [N1-1:0] l1_fire;
  logic [N0-1:0] l0_fire;
  logic [2:0] stall;
  int checks = 0, failures = 0, cyc = 0;
  int w2 [N2];
  int w1 [N2][N1];
  int w0 [N1][N0];
  int v2 [N2];
  int v1 [N1];
  int v0 [N0];
  int exp_q[$];
  int n_l1 = 0, n_l0 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ubrain_core #(.N2(N2), .N1(N1), .N0(N0), .THRESH(TH), .LEAK(0)) dut (
    .*,
    .l1_wb_en(1'b0), .l1_wb_addr('0), .l1_wb_mask('0), .l1_wb_row('0),
    .l0_wb_en(1'b0), .l0_wb_addr('0), .l0_wb_mask('0), .l0_wb_row('0)
  );

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

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (exp_q.size() == 0) chk(0, "unexpected output");
    else chk(int'(out_addr) == exp_q.pop_front(), "output address");
  end
  always @(negedge clk) if (rst_n) begin
    if (l1_start) n_l1++;
    if (l0_start) n_l0++;
  end

  task automatic cfgw(input int layer, input int r, input int c, input int d);
    @(negedge clk);
    cfg_valid = 1; cfg_kind = CFG_WEIGHT; cfg_layer = 2'(layer);
    cfg_row = 8'(r); cfg_col = 8'(c); cfg_data = 16'(d);
    @(negedge clk);
    cfg_valid = 0;
  endtask

  // the three-layer model: returns the output addresses of one input event
  task automatic model(input int a);
    int s2[$], s1[$];
    begin
      int s;
      s = v2[a] + w2[a];
      if (s > TH) begin v2[a] = 0; s2.push_back(a); end else v2[a] = s;
    end
    foreach (s2[k])
      for (int j = 0; j < N1; j++) begin
        int s;
        s = v1[j] + w1[s2[k]][j];
        if (s > TH) begin v1[j] = 0; s1.push_back(j); end else v1[j] = s;
      end
    foreach (s1[k])
      for (int j = 0; j < N0; j++) begin
        int s;
        s = v0[j] + w0[s1[k]][j];
        if (s > TH) begin v0[j] = 0; exp_q.push_back(j); end else v0[j] = s;
      end
  endtask

  task automatic send(input int a);
    @(negedge clk);
    in_valid = 1; in_addr = 8'(a);
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    model(a);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    foreach (v2[i]) v2[i] = 0;
    foreach (v1[i]) v1[i] = 0;
    foreach (v0[i]) v0[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // strong path for the latency check: input 0 -> l1 neuron 0 -> l0 neuron 1
    for (int i = 0; i < N2; i++) begin w2[i] = $urandom_range(5, 25); cfgw(2, i, 0, w2[i]); end
    for (int i = 0; i < N2; i++)
      for (int j = 0; j < N1; j++) begin w1[i][j] = $urandom_range(0, 30) - 8; cfgw(1, i, j, w1[i][j]); end
    for (int i = 0; i < N1; i++)
      for (int j = 0; j < N0; j++) begin w0[i][j] = $urandom_range(0, 30) - 8; cfgw(0, i, j, w0[i][j]); end
    w2[0] = 100; cfgw(2, 0, 0, 100);
    w1[0][0] = 100; cfgw(1, 0, 0, 100);
    w0[0][1] = 100; cfgw(0, 0, 1, 100);
    begin
      int t0;
      send(0);
      t0 = cyc - 1;
      while (!out_valid) @(negedge clk);
      chk(cyc - t0 == 33, $sformatf("core latency %0d", cyc - t0));
      repeat (30) @(negedge clk);
    end
    begin
      bit done_s;
      done_s = 0;
      fork
        begin
          for (int n = 0; n < 200; n++) send($urandom_range(0, N2 - 1));
          done_s = 1;
        end
        while (!done_s) begin
          @(negedge clk);
          out_ready = $urandom_range(0, 3) != 0;
        end
      join
    end
    out_ready = 1;
    repeat (2000) @(negedge clk);
    chk(exp_q.size() == 0, "all outputs seen");
    chk(n_l1 > 20 && n_l0 > 10, "learning interface pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
