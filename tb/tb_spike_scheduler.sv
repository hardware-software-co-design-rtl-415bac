// tb_spike_scheduler: pushes random spike vectors and checks that every set
// bit comes out as an address, lowest first and vector by vector, under
// random back-pressure; checks the 3-cycle delay to the first address of a
// vector pushed into an idle scheduler and that `full` stops at DEPTH.
module tb_spike_scheduler;
  localparam int N = 16, D = 4;
  logic clk = 0, rst_n = 0;
  logic vec_valid = 0, full, aer_valid, aer_ready = 1;
  logic [N-1:0] vec = '0;
  logic [7:0] aer_addr;
  int checks = 0, failures = 0, cyc = 0;
  int exp_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  spike_scheduler #(.N(N), .DEPTH(D)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0d)", m, cyc); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && aer_valid && aer_ready) begin
    if (exp_q.size() == 0) chk(0, "unexpected address");
    else chk(int'(aer_addr) == exp_q.pop_front(), "address order");
  end

  task automatic push(input logic [N-1:0] v);
    @(negedge clk);
    vec_valid = 1;
    vec = v;
    @(posedge clk);
    if (!full) for (int i = 0; i < N; i++) if (v[i]) exp_q.push_back(i);
    #1 vec_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency from an idle scheduler
    for (int n = 0; n < 10; n++) begin
      int t0;
      push(N'(1) << $urandom_range(0, N-1));
      t0 = cyc;
      while (!aer_valid) @(negedge clk);
      chk(cyc - t0 == 2, $sformatf("first address delay %0d", cyc - t0 + 1));
      repeat (3) @(posedge clk);
    end
    // fill without draining: full after D vectors
    aer_ready = 0;
    for (int n = 0; n < D + 2; n++) push(N'($urandom) | 1);
    @(negedge clk);
    chk(full, "full after DEPTH vectors");
    // random traffic with back-pressure
    fork
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        aer_ready = $urandom_range(0, 3) != 0;
      end
      for (int n = 0; n < 60; n++) begin
        logic [N-1:0] v;
        v = N'($urandom) & N'($urandom);
        while (full) @(posedge clk);
        push(v);
      end
    join
    aer_ready = 1;
    repeat (200) @(posedge clk);
    chk(exp_q.size() == 0, "all addresses out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
