// tb_seg_bus: random packets between the 6 components of a 2-lane bus.
// Every packet offered is held until granted; each delivered packet is
// matched against the packet granted to that destination in the same cycle,
// and at the end every packet must have arrived exactly once.
module tb_seg_bus;
  import echelon_pkg::*;
  localparam int NC = 6, NL = 2;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0] tx_valid = '0, tx_ready, rx_valid, rx_ready = '1, blocked;
  logic [NC-1:0][2:0] tx_dst = '0;
  spike_pkt_t tx_data [NC];
  spike_pkt_t rx_data [NC];
  int checks = 0, failures = 0, sent = 0, got = 0, multi = 0;

  always #5 clk = ~clk;

  seg_bus #(.NC(NC), .NL(NL)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NC; i++) tx_data[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int ng;
      @(negedge clk);
      for (int i = 0; i < NC; i++) begin
        rx_ready[i] = $urandom_range(0, 4) != 0;
        if (!tx_valid[i] && $urandom_range(0, 1)) begin
          int d;
          d = $urandom_range(0, NC - 2);
          if (d >= i) d++;
          tx_valid[i] = 1;
          tx_dst[i]   = 3'(d);
          tx_data[i]  = '{x: 3'(i), y: 3'($urandom), comp: 3'(d), addr: 8'($urandom)};
          sent++;
        end
      end
      #1;
      ng = 0;
      for (int d = 0; d < NC; d++) begin
        int src;
        src = -1;
        for (int i = 0; i < NC; i++) if (tx_ready[i] && int'(tx_dst[i]) == d) src = i;
        chk(rx_valid[d] == (src >= 0), "delivery iff granted");
        if (src >= 0) begin
          chk(rx_data[d] == tx_data[src], "packet intact");
          got++;
        end
      end
      for (int i = 0; i < NC; i++) if (tx_ready[i]) ng++;
      if (ng > 1) multi++;
      @(posedge clk);
      for (int i = 0; i < NC; i++) if (tx_ready[i]) tx_valid[i] = 0;
    end
    // drain
    rx_ready = '1;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk); #1;
      for (int i = 0; i < NC; i++) if (tx_ready[i]) got++;
      @(posedge clk);
      for (int i = 0; i < NC; i++) if (tx_ready[i]) tx_valid[i] = 0;
    end
    chk(got == sent, $sformatf("all packets delivered %0d/%0d", got, sent));
    chk(multi > 100, "concurrent transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
