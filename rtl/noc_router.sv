// noc_router: switch of the 2-D mesh network-on-chip that connects the tiles.
// Five ports (local tile, north, east, south, west), a DEPTH-entry FIFO on
// every input, dimension-ordered XY routing (first along x, then along y;
// y grows southwards) and a round-robin arbiter per output. One packet per
// output per cycle; a packet spends at least one cycle per router. A packet
// whose x lies beyond the mesh leaves through the east edge, which is how
// spikes are sent off-chip. Routing, buffering and arbitration are this
// design's choices.
module noc_router #(
  parameter int X     = 0,
  parameter int Y     = 0,
  parameter int DEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [4:0]              in_valid,
  input  echelon_pkg::spike_pkt_t in_data [5],
  output logic [4:0]              in_ready,
  output logic [4:0]              out_valid,
  output echelon_pkg::spike_pkt_t out_data [5],
  input  logic [4:0]              out_ready
);
  import echelon_pkg::*;

  spike_pkt_t head [5];
  logic [4:0] empty, full, pop;
  logic [2:0] route [5];
  logic [2:0] rr    [5];
  logic [2:0] gsel  [5];   // input granted to each output
  logic [4:0] gv;          // output has a grant

  for (genvar p = 0; p < 5; p++) begin : g_in
    logic [$clog2(DEPTH+1)-1:0] cnt_unused;
    sync_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(in_valid[p] && !full[p]), .wr_data(in_data[p]),
      .rd_en(pop[p]), .rd_data(head[p]),
      .full(full[p]), .empty(empty[p]), .count(cnt_unused)
    );
    assign in_ready[p] = !full[p];
  end

  // XY routing of every head packet
  always_comb
    for (int p = 0; p < 5; p++) begin
      if (int'(head[p].x) > X)      route[p] = 3'(P_EAST);
      else if (int'(head[p].x) < X) route[p] = 3'(P_WEST);
      else if (int'(head[p].y) > Y) route[p] = 3'(P_SOUTH);
      else if (int'(head[p].y) < Y) route[p] = 3'(P_NORTH);
      else                          route[p] = 3'(P_LOCAL);
    end

  // round-robin output arbitration
  always_comb begin
    pop = '0;
    gv  = '0;
    for (int o = 0; o < 5; o++) begin
      gsel[o] = '0;
      for (int k = 0; k < 5; k++) begin
        int i;
        i = (int'(rr[o]) + k) % 5;
        if (!gv[o] && !empty[i] && int'(route[i]) == o) begin
          gv[o]   = 1'b1;
          gsel[o] = 3'(i);
        end
      end
      out_valid[o] = gv[o];
      out_data[o]  = head[gsel[o]];
      if (gv[o] && out_ready[o]) pop[gsel[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < 5; o++) rr[o] <= '0;
    end else begin
      for (int o = 0; o < 5; o++)
        if (gv[o] && out_ready[o]) rr[o] <= (gsel[o] == 3'd4) ? 3'd0 : gsel[o] + 3'd1;
    end
  end
endmodule
