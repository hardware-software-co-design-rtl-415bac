// echelon_top: the tiled neuromorphic processor with on-chip learning. A
// MESH_X x MESH_Y array of tiles, each attached to the local port of a
// network-on-chip router; routers are linked to their north, east, south and
// west neighbours. Spikes travel as packets {x, y, component, neuron}.
// A host injects packets at the west edge of router (0,0) (host_in_*) and
// receives packets addressed to x = MESH_X at the east edge of row y
// (host_out_*[y]). Weights, thresholds, leaks and spike routes are written
// through cfg_*, one word per cycle while cfg_ready is high. tick marks a
// neuron time step (leak). The 3 x 2 mesh is the one drawn for the
// architecture; all other sizes come from the core and tile parameters.
module echelon_top #(
  parameter int MESH_X = 3,
  parameter int MESH_Y = 2,
  parameter int N2     = 256,
  parameter int N1     = 64,
  parameter int N0     = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tick,
  input  logic                    host_in_valid,
  input  echelon_pkg::spike_pkt_t host_in_data,
  output logic                    host_in_ready,
  output logic [MESH_Y-1:0]       host_out_valid,
  output echelon_pkg::spike_pkt_t host_out_data [MESH_Y],
  input  logic [MESH_Y-1:0]       host_out_ready,
  input  logic                    cfg_valid,
  input  echelon_pkg::cfg_t       cfg,
  output logic                    cfg_ready
);
  import echelon_pkg::*;

  logic [4:0]  r_in_valid  [MESH_Y][MESH_X];
  logic [4:0]  r_in_ready  [MESH_Y][MESH_X];
  logic [4:0]  r_out_valid [MESH_Y][MESH_X];
  logic [4:0]  r_out_ready [MESH_Y][MESH_X];
  spike_pkt_t  r_in_data   [MESH_Y][MESH_X][5];
  spike_pkt_t  r_out_data  [MESH_Y][MESH_X][5];
  logic [MESH_X*MESH_Y-1:0] t_cfg_ready;

  assign cfg_ready = &t_cfg_ready;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      noc_router #(.X(x), .Y(y)) u_router (
        .clk, .rst_n,
        .in_valid(r_in_valid[y][x]), .in_data(r_in_data[y][x]), .in_ready(r_in_ready[y][x]),
        .out_valid(r_out_valid[y][x]), .out_data(r_out_data[y][x]), .out_ready(r_out_ready[y][x])
      );

      echelon_tile #(.X(x), .Y(y), .N2(N2), .N1(N1), .N0(N0)) u_tile (
        .clk, .rst_n, .tick,
        .noc_out_valid(r_in_valid[y][x][P_LOCAL]), .noc_out_data(r_in_data[y][x][P_LOCAL]),
        .noc_out_ready(r_in_ready[y][x][P_LOCAL]),
        .noc_in_valid(r_out_valid[y][x][P_LOCAL]), .noc_in_data(r_out_data[y][x][P_LOCAL]),
        .noc_in_ready(r_out_ready[y][x][P_LOCAL]),
        .cfg_valid, .cfg, .cfg_ready(t_cfg_ready[y*MESH_X + x])
      );

      // west side
      if (x == 0) begin : g_west_edge
        if (y == 0) begin : g_host_in
          assign r_in_valid[y][x][P_WEST] = host_in_valid;
          assign r_in_data[y][x][P_WEST]  = host_in_data;
          assign host_in_ready            = r_in_ready[y][x][P_WEST];
        end else begin : g_tie_w
          assign r_in_valid[y][x][P_WEST] = 1'b0;
          assign r_in_data[y][x][P_WEST]  = '0;
        end
        assign r_out_ready[y][x][P_WEST] = 1'b1;   // nothing is routed off the west edge
      end else begin : g_west
        assign r_in_valid[y][x][P_WEST]  = r_out_valid[y][x-1][P_EAST];
        assign r_in_data[y][x][P_WEST]   = r_out_data[y][x-1][P_EAST];
        assign r_out_ready[y][x-1][P_EAST] = r_in_ready[y][x][P_WEST];
        assign r_in_valid[y][x-1][P_EAST]  = r_out_valid[y][x][P_WEST];
        assign r_in_data[y][x-1][P_EAST]   = r_out_data[y][x][P_WEST];
        assign r_out_ready[y][x][P_WEST]   = r_in_ready[y][x-1][P_EAST];
      end

      // east edge: off-chip output of this row
      if (x == MESH_X - 1) begin : g_east_edge
        assign host_out_valid[y]         = r_out_valid[y][x][P_EAST];
        assign host_out_data[y]          = r_out_data[y][x][P_EAST];
        assign r_out_ready[y][x][P_EAST] = host_out_ready[y];
        assign r_in_valid[y][x][P_EAST]  = 1'b0;
        assign r_in_data[y][x][P_EAST]   = '0;
      end

      // north side
      if (y == 0) begin : g_north_edge
        assign r_in_valid[y][x][P_NORTH]  = 1'b0;
        assign r_in_data[y][x][P_NORTH]   = '0;
        assign r_out_ready[y][x][P_NORTH] = 1'b1;
      end else begin : g_north
        assign r_in_valid[y][x][P_NORTH]   = r_out_valid[y-1][x][P_SOUTH];
        assign r_in_data[y][x][P_NORTH]    = r_out_data[y-1][x][P_SOUTH];
        assign r_out_ready[y-1][x][P_SOUTH] = r_in_ready[y][x][P_NORTH];
        assign r_in_valid[y-1][x][P_SOUTH]  = r_out_valid[y][x][P_NORTH];
        assign r_in_data[y-1][x][P_SOUTH]   = r_out_data[y][x][P_NORTH];
        assign r_out_ready[y][x][P_NORTH]   = r_in_ready[y-1][x][P_SOUTH];
      end
      if (y == MESH_Y - 1) begin : g_south_edge
        assign r_in_valid[y][x][P_SOUTH]  = 1'b0;
        assign r_in_data[y][x][P_SOUTH]   = '0;
        assign r_out_ready[y][x][P_SOUTH] = 1'b1;
      end
    end
  end
endmodule
