// olu: on-chip learning unit of a tile. It holds one STDP unit with its
// write-back for each plastic weight matrix of a neuron core: N2 x N1
// (N2 presynaptic time/spike registers) and N1 x N0 (N1 registers), i.e.
// N2 + N1 learning units, 320 for the 256-64-16 core. It trains one core at a
// time; which one, and whether learning is on, is set by a packet the OLU
// receives on the tile bus: addr[1:0] = core (0 = NPU0, 1 = NPU1, 2 = NPU2),
// addr[7] = learning enable. The tile steers the chosen core's learning
// interface to the OLU and the write-back to that core. Timing is that of
// stdp_unit (5 cycles) followed by weight_wb (2 cycles). The selection by bus
// packet is this design's choice.
module olu #(
  parameter int N2     = 256,
  parameter int N1     = 64,
  parameter int N0     = 16,
  parameter int W_W    = echelon_pkg::W_W,
  parameter int ADDR_W = echelon_pkg::ADDR_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // tile bus receive port
  input  logic                   rx_valid,
  input  echelon_pkg::spike_pkt_t rx_data,
  output logic                   rx_ready,
  output logic [1:0]             sel,
  output logic                   learn_en,
  // N2 x N1 matrix of the selected core
  input  logic                   l1_start,
  input  logic [ADDR_W-1:0]      l1_pre,
  input  logic [N1*W_W-1:0]      l1_row,
  input  logic                   l1_fire_valid,
  input  logic [N1-1:0]          l1_fire,
  output logic                   l1_wb_en,
  output logic [ADDR_W-1:0]      l1_wb_addr,
  output logic [N1-1:0]          l1_wb_mask,
  output logic [N1*W_W-1:0]      l1_wb_row,
  // N1 x N0 matrix of the selected core
  input  logic                   l0_start,
  input  logic [ADDR_W-1:0]      l0_pre,
  input  logic [N0*W_W-1:0]      l0_row,
  input  logic                   l0_fire_valid,
  input  logic [N0-1:0]          l0_fire,
  output logic                   l0_wb_en,
  output logic [ADDR_W-1:0]      l0_wb_addr,
  output logic [N0-1:0]          l0_wb_mask,
  output logic [N0*W_W-1:0]      l0_wb_row
);
  logic                  d1_v, d0_v;
  logic [N1-1:0][W_W:0]  d1;
  logic [N0-1:0][W_W:0]  d0;
  logic [N1-1:0]         m1;
  logic [N0-1:0]         m0;
  logic [ADDR_W-1:0]     p1, p0;
  logic [N1*W_W-1:0]     o1;
  logic [N0*W_W-1:0]     o0;
  logic [echelon_pkg::T_W-1:0] now1_unused, now0_unused;

  assign rx_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel      <= 2'd0;
      learn_en <= 1'b0;
    end else if (rx_valid) begin
      sel      <= rx_data.addr[1:0];
      learn_en <= rx_data.addr[7];
    end
  end

  stdp_unit #(.N_PRE(N2), .N_POST(N1), .W_W(W_W), .ADDR_W(ADDR_W)) u_stdp1 (
    .clk, .rst_n, .enable(learn_en),
    .start(l1_start), .pre_addr(l1_pre), .old_row(l1_row),
    .fire_valid(l1_fire_valid), .fire(l1_fire),
    .dw_valid(d1_v), .dw(d1), .dw_mask(m1), .pre_addr_o(p1), .old_row_o(o1),
    .now_o(now1_unused)
  );
  weight_wb #(.N(N1), .W_W(W_W), .ADDR_W(ADDR_W)) u_wb1 (
    .clk, .rst_n, .dw_valid(d1_v), .dw(d1), .dw_mask(m1), .addr(p1), .old_row(o1),
    .wr_en(l1_wb_en), .wr_addr(l1_wb_addr), .wr_mask(l1_wb_mask), .wr_row(l1_wb_row)
  );

  stdp_unit #(.N_PRE(N1), .N_POST(N0), .W_W(W_W), .ADDR_W(ADDR_W)) u_stdp0 (
    .clk, .rst_n, .enable(learn_en),
    .start(l0_start), .pre_addr(l0_pre), .old_row(l0_row),
    .fire_valid(l0_fire_valid), .fire(l0_fire),
    .dw_valid(d0_v), .dw(d0), .dw_mask(m0), .pre_addr_o(p0), .old_row_o(o0),
    .now_o(now0_unused)
  );
  weight_wb #(.N(N0), .W_W(W_W), .ADDR_W(ADDR_W)) u_wb0 (
    .clk, .rst_n, .dw_valid(d0_v), .dw(d0), .dw_mask(m0), .addr(p0), .old_row(o0),
    .wr_en(l0_wb_en), .wr_addr(l0_wb_addr), .wr_mask(l0_wb_mask), .wr_row(l0_wb_row)
  );
endmodule
