// tb_noc_router: router at (1,1) of a 3 x 3 neighbourhood. Random packets
// enter on all five ports under random output back-pressure. Each must
// leave on the port given by XY routing (x first, then y; y grows south),
// unchanged, and packets from one input to one output keep their order.
// Also checks that one packet crosses the router in one cycle when idle.
module tb_noc_router;
  import echelon_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  spike_pkt_t in_data [5];
  spike_pkt_t out_data [5];
  spike_pkt_t q [5][5][$];     // [input][output]
  int checks = 0, failures = 0, delivered = 0, sent = 0, contention = 0;

  always #5 clk = ~clk;

  noc_router #(.X(1), .Y(1), .DEPTH(4)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic int xy(input spike_pkt_t p);
    if (p.x > 1) return P_EAST;
    if (p.x < 1) return P_WEST;
    if (p.y > 1) return P_SOUTH;
    if (p.y < 1) return P_NORTH;
    return P_LOCAL;
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic observe();
    for (int o = 0; o < 5; o++)
      if (out_valid[o] && out_ready[o]) begin
        bit found;
        found = 0;
        for (int i = 0; i < 5 && !found; i++)
          if (q[i][o].size() > 0 && q[i][o][0] == out_data[o]) begin
            void'(q[i][o].pop_front());
            found = 1;
          end
        chk(found, $sformatf("packet on port %0d is the oldest routed there", o));
        delivered++;
      end
  endtask

  initial begin
    for (int p = 0; p < 5; p++) in_data[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // one packet, idle router: through in one cycle
    @(negedge clk);
    in_valid[P_WEST] = 1;
    in_data[P_WEST] = '{x: 3'd2, y: 3'd0, comp: 3'd1, addr: 8'h5a};
    @(negedge clk);
    in_valid = '0;
    chk(out_valid[P_EAST] && out_data[P_EAST].addr == 8'h5a, "one cycle through, routed east");
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 5; p++) begin
        in_valid[p]  = $urandom_range(0, 1);
        in_data[p]   = '{x: 3'($urandom_range(0, 2)), y: 3'($urandom_range(0, 2)),
                         comp: 3'($urandom), addr: 8'($urandom)};
        out_ready[p] = $urandom_range(0, 3) != 0;
      end
      #1;
      observe();
      if (out_valid != '0 && in_ready != '1) contention++;
      for (int p = 0; p < 5; p++)
        if (in_valid[p] && in_ready[p]) begin
          q[p][xy(in_data[p])].push_back(in_data[p]);
          sent++;
        end
    end
    @(posedge clk);
    #1 in_valid = '0;
    out_ready = '1;
    for (int n = 0; n < 50; n++) begin @(negedge clk); #1; observe(); end
    chk(delivered == sent, $sformatf("all delivered %0d/%0d", delivered, sent));
    chk(contention > 100, "contention exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
