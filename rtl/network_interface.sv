// network_interface: the tile's gateway between its segmented bus and the
// network-on-chip router. Packets the bus delivers to the NI (spikes bound
// for another tile) are queued and sent to the router's local port; packets
// arriving from the router are queued and put on the bus towards the
// component named in the packet. Both directions use a DEPTH-entry FIFO and
// valid/ready handshakes; the bus side accepts while its FIFO has room.
module network_interface #(
  parameter int DEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // bus side
  input  logic                    bus_rx_valid,
  input  echelon_pkg::spike_pkt_t bus_rx_data,
  output logic                    bus_rx_ready,
  output logic                    bus_tx_valid,
  output logic [echelon_pkg::COMP_W-1:0] bus_tx_dst,
  output echelon_pkg::spike_pkt_t bus_tx_data,
  input  logic                    bus_tx_ready,
  // router local port
  output logic                    noc_out_valid,
  output echelon_pkg::spike_pkt_t noc_out_data,
  input  logic                    noc_out_ready,
  input  logic                    noc_in_valid,
  input  echelon_pkg::spike_pkt_t noc_in_data,
  output logic                    noc_in_ready
);
  import echelon_pkg::*;
  logic o_full, o_empty, i_full, i_empty;
  logic [$clog2(DEPTH+1)-1:0] o_cnt_unused, i_cnt_unused;

  // bus -> network
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_out (
    .clk, .rst_n,
    .wr_en(bus_rx_valid && !o_full), .wr_data(bus_rx_data),
    .rd_en(noc_out_valid && noc_out_ready), .rd_data(noc_out_data),
    .full(o_full), .empty(o_empty), .count(o_cnt_unused)
  );
  assign bus_rx_ready  = !o_full;
  assign noc_out_valid = !o_empty;

  // network -> bus
  sync_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_in (
    .clk, .rst_n,
    .wr_en(noc_in_valid && !i_full), .wr_data(noc_in_data),
    .rd_en(bus_tx_valid && bus_tx_ready), .rd_data(bus_tx_data),
    .full(i_full), .empty(i_empty), .count(i_cnt_unused)
  );
  assign noc_in_ready = !i_full;
  assign bus_tx_valid = !i_empty;
  assign bus_tx_dst   = bus_tx_data.comp;
endmodule
