// tb_network_interface: random packets in both directions with random
// back-pressure on both sides. Packets from the bus must reach the router
// port in order and unchanged; packets from the router must reach the bus in
// order, with the bus destination taken from the packet's component field.
module tb_network_interface;
  import echelon_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bus_rx_valid = 0, bus_rx_ready, bus_tx_valid, bus_tx_ready = 0;
  logic noc_out_valid, noc_out_ready = 0, noc_in_valid = 0, noc_in_ready;
  logic [2:0] bus_tx_dst;
  spike_pkt_t bus_rx_data = '0, bus_tx_data, noc_out_data, noc_in_data = '0;
  spike_pkt_t q_out[$], q_in[$];
  int checks = 0, failures = 0, n_out = 0, n_in = 0, bp = 0;

  always #5 clk = ~clk;

  network_interface #(.DEPTH(4)) dut (.*);

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (!bus_rx_valid || bus_rx_ready) begin end
      bus_rx_valid  = $urandom_range(0, 1);
      bus_rx_data   = spike_pkt_t'($urandom);
      noc_in_valid  = $urandom_range(0, 1);
      noc_in_data   = spike_pkt_t'($urandom);
      noc_out_ready = $urandom_range(0, 2) != 0;
      bus_tx_ready  = $urandom_range(0, 2) != 0;
      #1;
      if (!bus_rx_ready || !noc_in_ready) bp++;
      if (noc_out_valid && noc_out_ready) begin
        chk(q_out.size() > 0 && noc_out_data == q_out[0], "bus to network order");
        void'(q_out.pop_front());
        n_out++;
      end
      if (bus_tx_valid && bus_tx_ready) begin
        chk(q_in.size() > 0 && bus_tx_data == q_in[0], "network to bus order");
        chk(bus_tx_dst == bus_tx_data.comp, "bus destination");
        void'(q_in.pop_front());
        n_in++;
      end
      if (bus_rx_valid && bus_rx_ready) q_out.push_back(bus_rx_data);
      if (noc_in_valid && noc_in_ready) q_in.push_back(noc_in_data);
    end
    chk(n_out > 500 && n_in > 500 && bp > 50, "traffic and back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
