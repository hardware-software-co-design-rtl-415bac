// tb_lif_array: drives spikes (weight rows) and leak ticks into an 8-neuron
// array and compares fire vector, output spikes, any-spike flag and every
// membrane potential with a neuron model kept in the testbench; checks that
// the fire vector comes 2 cycles and the output 5 cycles after the start.
module tb_lif_array;
  localparam int N = 8, W = 8, V = 16;
  logic clk = 0, rst_n = 0;
  logic start = 0, leak_tick = 0;
  logic [N*W-1:0] row = '0;
  logic signed [V-1:0] thresh = 16'sd30, leak = 16'sd2;
  logic busy, fire_valid, out_valid, any_spike;
  logic [N-1:0] fire, spikes;
  logic [N-1:0][V-1:0] v_o;
  int checks = 0, failures = 0, cyc = 0;
  int vm [N];
  logic [N-1:0] exp_fire;
  int fires_seen = 0, leaks = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  lif_array #(.N(N), .W_W(W), .V_W(V)) dut (.*);

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

  initial begin
    for (int i = 0; i < N; i++) vm[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int t0;
      @(negedge clk);
      // one event
      start = 1;
      for (int i = 0; i < N; i++) row[i*W +: W] = W'($urandom_range(0, 40) - 15);
      exp_fire = '0;
      for (int i = 0; i < N; i++) begin
        int s;
        s = vm[i] + int'(signed'(row[i*W +: W]));
        if (s > 30) begin exp_fire[i] = 1'b1; vm[i] = 0; end
        else vm[i] = s;
      end
      @(posedge clk);
      t0 = cyc;
      #1 start = 0;
      @(negedge clk);                           // cycle 1
      @(negedge clk);                           // cycle 2
      chk(fire_valid, "fire_valid at cycle 2");
      chk(fire == exp_fire, "fire vector");
      repeat (3) @(negedge clk);                // cycle 5
      chk(out_valid, "out_valid at cycle 5");
      chk(spikes == exp_fire, "output spikes");
      chk(any_spike == (|exp_fire), "any spike");
      if (|exp_fire) fires_seen++;
      for (int i = 0; i < N; i++) chk(int'(signed'(v_o[i])) == vm[i], "potential");
      // sometimes a leak step
      if ($urandom_range(0, 2) == 0) begin
        leak_tick = 1;
        @(negedge clk);
        leak_tick = 0;
        for (int i = 0; i < N; i++)
          vm[i] = (vm[i] > 2) ? vm[i] - 2 : (vm[i] < -2) ? vm[i] + 2 : 0;
        leaks++;
        repeat (2) @(negedge clk);
        chk(!busy, "leak done");
        for (int i = 0; i < N; i++) chk(int'(signed'(v_o[i])) == vm[i], "leaked potential");
      end
    end
    chk(fires_seen > 10 && leaks > 10, "fires and leaks exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
