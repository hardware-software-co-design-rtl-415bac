// tb_ubrain_layer: an 8-input, 4-neuron layer. Weights and threshold are
// loaded through the configuration port, then random address events are sent
// under random output back-pressure. A neuron model in the testbench predicts
// which neurons fire for each event; the output addresses must match in
// order. Also checked: 11 cycles from an accepted event to its first output
// in an idle layer, one event started every 11 cycles under backlog, the
// learning interface (start, presynaptic index, row), a write-back through
// wb_* changing the weights the next event uses, and a stall when the
// scheduler queue is full.
module tb_ubrain_layer;
  import echelon_pkg::*;
  localparam int NI = 8, NO = 4, W = 8, TH = 20;
  logic clk = 0, rst_n = 0, tick = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [7:0] in_addr = '0, out_addr;
  logic cfg_valid = 0, cfg_ready;
  cfg_kind_e cfg_kind = CFG_WEIGHT;
  logic [7:0] cfg_row = '0, cfg_col = '0;
  logic [15:0] cfg_data = '0;
  logic learn_start, learn_fire_valid, stall;
  logic [7:0] learn_pre;
  logic [NO*W-1:0] learn_row;
  logic [NO-1:0] learn_fire;
  logic wb_en = 0;
  logic [7:0] wb_addr = '0;
  logic [NO-1:0] wb_mask = '0;
  logic [NO*W-1:0] wb_row = '0;
  int checks = 0, failures = 0, cyc = 0;
  int wt [NI][NO];
  int vm [NO];
  int exp_q[$];
  int last_start = -100, starts_11 = 0, stalls = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ubrain_layer #(.N_IN(NI), .N_OUT(NO), .DIAG(1'b0), .THRESH(TH), .LEAK(1)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0d)", m, cyc); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (exp_q.size() == 0) chk(0, "unexpected output");
    else chk(int'(out_addr) == exp_q.pop_front(), "output address");
  end
  // learning interface and period
  always @(negedge clk) if (rst_n) begin
    if (learn_start) begin
      int p;
      p = int'(learn_pre);
      for (int j = 0; j < NO; j++)
        chk(int'(signed'(learn_row[j*W +: W])) == wt[p][j], "learning row = weights");
      if (cyc - last_start < 11) chk(0, "period shorter than 11");
      if (cyc - last_start == 11) starts_11++;
      last_start = cyc;
    end
    if (stall) stalls++;
  end

  // model of one event
  task automatic model_event(input int p);
    for (int j = 0; j < NO; j++) begin
      int s;
      s = vm[j] + wt[p][j];
      if (s > TH) begin vm[j] = 0; exp_q.push_back(j); end
      else vm[j] = s;
    end
  endtask

  task automatic send(input int p);
    @(negedge clk);
    in_valid = 1; in_addr = 8'(p);
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    model_event(p);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    for (int j = 0; j < NO; j++) vm[j] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // configuration
    for (int r = 0; r < NI; r++)
      for (int c = 0; c < NO; c++) begin
        @(negedge clk);
        cfg_valid = 1; cfg_kind = CFG_WEIGHT; cfg_row = 8'(r); cfg_col = 8'(c);
        wt[r][c] = $urandom_range(0, 40) - 10;
        cfg_data = 16'(wt[r][c]);
      end
    @(negedge clk);
    cfg_kind = CFG_THRESH; cfg_data = 16'(TH);
    @(negedge clk);
    cfg_valid = 0;
    // latency: an event that surely fires (weight > threshold on column 0)
    @(negedge clk);
    cfg_valid = 1; cfg_kind = CFG_WEIGHT; cfg_row = 8'd7; cfg_col = 8'd0; cfg_data = 16'd100;
    wt[7][0] = 100;
    @(negedge clk);
    cfg_valid = 0;
    begin
      int t0;
      send(7);
      t0 = cyc - 1;                      // cycle in which the event was accepted
      while (!out_valid) @(negedge clk);
      chk(cyc - t0 == 11, $sformatf("layer latency %0d", cyc - t0));
      repeat (20) @(negedge clk);
    end
    // random traffic with back-pressure
    begin
      bit sends_done;
      sends_done = 0;
      fork
        begin
          for (int n = 0; n < 150; n++) send($urandom_range(0, NI - 1));
          sends_done = 1;
        end
        while (!sends_done) begin
          @(negedge clk);
          out_ready = $urandom_range(0, 4) != 0;
        end
      join
    end
    out_ready = 1;
    repeat (300) @(negedge clk);
    // stall: block the output until the scheduler queue fills
    out_ready = 0;
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      cfg_valid = 1; cfg_kind = CFG_WEIGHT; cfg_row = 8'd3; cfg_col = 8'(n % NO); cfg_data = 16'd100;
      wt[3][n % NO] = 100;
    end
    @(negedge clk); cfg_valid = 0;
    for (int n = 0; n < 7; n++) send(3);
    repeat (150) @(negedge clk);
    out_ready = 1;
    repeat (300) @(negedge clk);
    // write-back: new row 5 through the learning port
    @(negedge clk);
    wb_en = 1; wb_addr = 8'd5; wb_mask = 4'b0101;
    for (int j = 0; j < NO; j++) wb_row[j*W +: W] = 8'(j * 7 - 3);
    wt[5][0] = -3; wt[5][2] = 11;
    @(negedge clk);
    wb_en = 0;
    send(5);
    repeat (300) @(negedge clk);
    chk(exp_q.size() == 0, "all outputs seen");
    chk(starts_11 > 5, "back-to-back events every 11 cycles");
    chk(stalls > 0, "scheduler-full stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
