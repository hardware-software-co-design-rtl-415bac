// echelon_tile: one tile of the neuromorphic array. Three neuron cores as
// neural processing units (NPU0, NPU1, NPU2), a fourth core as special
// function unit (SFU), an on-chip learning unit (OLU) and a network interface
// (NI) share a parallel segmented bus, switch positions 0..5 in the order
// NPU0, SFU, NPU1, OLU, NPU2, NI.
//
// Every core's output spikes are wrapped in a packet whose destination
// (tile x, y, component) comes from that core's routing register, written by
// configuration (kind CFG_ROUTE, data[8:0] = {x, y, comp}). A packet for
// this tile goes straight over the bus to its component; any other goes to
// the NI and into the network. Packets arriving from the network are put on
// the bus by the NI. A packet addressed to the OLU selects the NPU it trains
// and turns learning on or off; the tile then connects that NPU's learning
// interface to the OLU. Configuration writes addressed to this tile (x, y)
// go to the named core.
module echelon_tile #(
  parameter int X  = 0,
  parameter int Y  = 0,
  parameter int N2 = 256,
  parameter int N1 = 64,
  parameter int N0 = 16,
  parameter int NL = 2,
  localparam int W_W    = echelon_pkg::W_W,
  localparam int ADDR_W = echelon_pkg::ADDR_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tick,
  // router local port
  output logic                    noc_out_valid,
  output echelon_pkg::spike_pkt_t noc_out_data,
  input  logic                    noc_out_ready,
  input  logic                    noc_in_valid,
  input  echelon_pkg::spike_pkt_t noc_in_data,
  output logic                    noc_in_ready,
  // configuration
  input  logic                    cfg_valid,
  input  echelon_pkg::cfg_t       cfg,
  output logic                    cfg_ready
);
  import echelon_pkg::*;

  localparam int NCORE = 4;
  // bus position of core k: NPU0, SFU, NPU1, NPU2
  localparam logic [COMP_W-1:0] CORE_COMP [NCORE] = '{COMP_NPU0, COMP_SFU, COMP_NPU1, COMP_NPU2};

  // ---------------- bus ----------------
  logic [NCOMP-1:0]             tx_valid, tx_ready, rx_valid, rx_ready, blocked;
  logic [NCOMP-1:0][COMP_W-1:0] tx_dst;
  spike_pkt_t                   tx_data [NCOMP];
  spike_pkt_t                   rx_data [NCOMP];

  seg_bus #(.NC(NCOMP), .NL(NL)) u_bus (
    .clk, .rst_n, .tx_valid, .tx_dst, .tx_data, .tx_ready,
    .rx_valid, .rx_data, .rx_ready, .blocked
  );

  // ---------------- cores ----------------
  logic [NCORE-1:0] core_cfg_ready;
  logic [1:0]       olu_sel;
  logic             olu_en;

  // learning interfaces of the cores
  logic                   c_l1_start [NCORE];
  logic [ADDR_W-1:0]      c_l1_pre   [NCORE];
  logic [N1*W_W-1:0]      c_l1_row   [NCORE];
  logic                   c_l1_fv    [NCORE];
  logic [N1-1:0]          c_l1_fire  [NCORE];
  logic                   c_l0_start [NCORE];
  logic [ADDR_W-1:0]      c_l0_pre   [NCORE];
  logic [N0*W_W-1:0]      c_l0_row   [NCORE];
  logic                   c_l0_fv    [NCORE];
  logic [N0-1:0]          c_l0_fire  [NCORE];
  // OLU side
  logic                   o_l1_start, o_l1_fv, o_l0_start, o_l0_fv;
  logic [ADDR_W-1:0]      o_l1_pre, o_l0_pre;
  logic [N1*W_W-1:0]      o_l1_row;
  logic [N0*W_W-1:0]      o_l0_row;
  logic [N1-1:0]          o_l1_fire;
  logic [N0-1:0]          o_l0_fire;
  logic                   wb1_en, wb0_en;
  logic [ADDR_W-1:0]      wb1_addr, wb0_addr;
  logic [N1-1:0]          wb1_mask;
  logic [N0-1:0]          wb0_mask;
  logic [N1*W_W-1:0]      wb1_row;
  logic [N0*W_W-1:0]      wb0_row;

  // core index trained by the OLU: NPU0 = core 0, NPU1 = core 2, NPU2 = core 3
  logic [1:0] olu_core;
  always_comb
    unique case (olu_sel)
      2'd1:    olu_core = 2'd2;
      2'd2:    olu_core = 2'd3;
      default: olu_core = 2'd0;
    endcase

  logic cfg_here;
  assign cfg_here  = cfg_valid && int'(cfg.x) == X && int'(cfg.y) == Y;
  assign cfg_ready = &core_cfg_ready;

  for (genvar k = 0; k < NCORE; k++) begin : g_core
    localparam int C = int'(CORE_COMP[k]);
    logic              o_valid, o_ready, sel;
    logic [ADDR_W-1:0] o_addr;
    spike_pkt_t        route_q;
    logic [2:0]        stall_unused;

    assign sel = cfg_here && cfg.comp == CORE_COMP[k];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        route_q <= '0;
      end else if (sel && cfg.kind == CFG_ROUTE) begin
        route_q <= spike_pkt_t'({cfg.data[COORD_W*2 + COMP_W - 1:0], ADDR_W'(0)});
      end
    end

    ubrain_core #(.N2(N2), .N1(N1), .N0(N0)) u_core (
      .clk, .rst_n, .tick,
      .in_valid(rx_valid[C]), .in_addr(rx_data[C].addr), .in_ready(rx_ready[C]),
      .out_valid(o_valid), .out_addr(o_addr), .out_ready(o_ready),
      .cfg_valid(sel && cfg.kind != CFG_ROUTE), .cfg_kind(cfg.kind), .cfg_layer(cfg.layer),
      .cfg_row(cfg.row), .cfg_col(cfg.col), .cfg_data(cfg.data),
      .cfg_ready(core_cfg_ready[k]),
      .l1_start(c_l1_start[k]), .l1_pre(c_l1_pre[k]), .l1_row(c_l1_row[k]),
      .l1_fire_valid(c_l1_fv[k]), .l1_fire(c_l1_fire[k]),
      .l1_wb_en(wb1_en && olu_en && olu_core == 2'(k)), .l1_wb_addr(wb1_addr),
      .l1_wb_mask(wb1_mask), .l1_wb_row(wb1_row),
      .l0_start(c_l0_start[k]), .l0_pre(c_l0_pre[k]), .l0_row(c_l0_row[k]),
      .l0_fire_valid(c_l0_fv[k]), .l0_fire(c_l0_fire[k]),
      .l0_wb_en(wb0_en && olu_en && olu_core == 2'(k)), .l0_wb_addr(wb0_addr),
      .l0_wb_mask(wb0_mask), .l0_wb_row(wb0_row),
      .stall(stall_unused)
    );

    // output spikes onto the bus
    assign tx_valid[C] = o_valid;
    assign tx_data[C]  = '{x: route_q.x, y: route_q.y, comp: route_q.comp, addr: o_addr};
    assign tx_dst[C]   = (int'(route_q.x) == X && int'(route_q.y) == Y) ? route_q.comp : COMP_NI;
    assign o_ready     = tx_ready[C];
  end

  // ---------------- learning unit ----------------
  assign o_l1_start = olu_en && c_l1_start[olu_core];
  assign o_l1_pre   = c_l1_pre[olu_core];
  assign o_l1_row   = c_l1_row[olu_core];
  assign o_l1_fv    = olu_en && c_l1_fv[olu_core];
  assign o_l1_fire  = c_l1_fire[olu_core];
  assign o_l0_start = olu_en && c_l0_start[olu_core];
  assign o_l0_pre   = c_l0_pre[olu_core];
  assign o_l0_row   = c_l0_row[olu_core];
  assign o_l0_fv    = olu_en && c_l0_fv[olu_core];
  assign o_l0_fire  = c_l0_fire[olu_core];

  olu #(.N2(N2), .N1(N1), .N0(N0)) u_olu (
    .clk, .rst_n,
    .rx_valid(rx_valid[COMP_OLU]), .rx_data(rx_data[COMP_OLU]), .rx_ready(rx_ready[COMP_OLU]),
    .sel(olu_sel), .learn_en(olu_en),
    .l1_start(o_l1_start), .l1_pre(o_l1_pre), .l1_row(o_l1_row),
    .l1_fire_valid(o_l1_fv), .l1_fire(o_l1_fire),
    .l1_wb_en(wb1_en), .l1_wb_addr(wb1_addr), .l1_wb_mask(wb1_mask), .l1_wb_row(wb1_row),
    .l0_start(o_l0_start), .l0_pre(o_l0_pre), .l0_row(o_l0_row),
    .l0_fire_valid(o_l0_fv), .l0_fire(o_l0_fire),
    .l0_wb_en(wb0_en), .l0_wb_addr(wb0_addr), .l0_wb_mask(wb0_mask), .l0_wb_row(wb0_row)
  );
  // the OLU only receives
  assign tx_valid[COMP_OLU] = 1'b0;
  assign tx_dst[COMP_OLU]   = '0;
  assign tx_data[COMP_OLU]  = '0;

  // ---------------- network interface ----------------
  network_interface u_ni (
    .clk, .rst_n,
    .bus_rx_valid(rx_valid[COMP_NI]), .bus_rx_data(rx_data[COMP_NI]), .bus_rx_ready(rx_ready[COMP_NI]),
    .bus_tx_valid(tx_valid[COMP_NI]), .bus_tx_dst(tx_dst[COMP_NI]), .bus_tx_data(tx_data[COMP_NI]),
    .bus_tx_ready(tx_ready[COMP_NI]),
    .noc_out_valid, .noc_out_data, .noc_out_ready,
    .noc_in_valid, .noc_in_data, .noc_in_ready
  );
endmodule
