// tb_aer_decoder: queues address events, starts decodes as soon as one is
// pending and checks the memory read address, the hit flag for in-range and
// out-of-range addresses, the order of events, and the three-cycle delay from
// acceptance of an event into an empty queue to `done`.
module tb_aer_decoder;
  localparam int N_IN = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, pending, start, rd_en, done, hit;
  logic [7:0] in_addr = '0, rd_addr, pre_addr;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [7:0] sent[$];
  int t_acc[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  aer_decoder #(.N_IN(N_IN), .DEPTH(4)) dut (.*);

  // start every pending event immediately (one per cycle)
  assign start = pending;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0d)", m, cyc); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: rd_en one cycle before done, done with hit and address
  logic       exp_rd_q;
  logic [7:0] exp_addr_q;
  always @(negedge clk) if (rst_n) begin
    if (done) begin
      logic [7:0] a;
      int ta;
      a  = sent.pop_front();
      ta = t_acc.pop_front();
      chk(pre_addr == a, "pre_addr order");
      chk(hit == (a < N_IN), "hit flag");
      if (ta >= 0) chk(cyc - ta == 3, $sformatf("decoder delay %0d", cyc - ta));
    end
    if (rd_en) chk(rd_addr < N_IN, "read only in range");
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // isolated events: delay check
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_addr  = 8'($urandom_range(0, N_IN + 3));
      @(posedge clk);
      #1;
      sent.push_back(in_addr);
      t_acc.push_back(cyc - 1);   // cycle in which the event was accepted
      in_valid = 0;
      repeat (4) @(posedge clk);
    end
    // back-to-back burst: order
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_addr  = 8'($urandom_range(0, N_IN + 3));
      #1;
      if (in_ready) begin
        sent.push_back(in_addr);
        t_acc.push_back(-1);
      end
      @(posedge clk);
    end
    #1 in_valid = 0;
    repeat (10) @(posedge clk);
    chk(sent.size() == 0, "all events decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
