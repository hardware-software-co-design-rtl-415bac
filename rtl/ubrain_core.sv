// ubrain_core: a three-layer spiking neuron core (256-64-16 neurons by
// default), used as the tile's neural processing unit (NPU) and, loaded with
// pooling or concatenation weights, as its special function unit (SFU).
//
// Address events enter layer 2, the input layer, which is one-to-one: input i
// drives neuron i through its own weight. Layer 2's spikes drive layer 1
// through a fully connected N2 x N1 weight matrix, layer 1's spikes drive
// layer 0 through N1 x N0 weights, and layer 0's spikes leave as output
// events. Between layers the scheduler output of one layer wakes the decoder
// of the next ("next enable", a valid/ready handshake), so the layers work on
// different spikes at the same time. With idle layers a spike that fires a
// neuron in every layer leaves 33 cycles after it entered (3 x 11).
//
// The two fully connected matrices are plastic: their learning interfaces
// (l1_* for the N2 x N1 matrix, l0_* for N1 x N0) are brought out for an
// on-chip learning unit. cfg_layer selects the layer a configuration write
// goes to (2, 1 or 0).
module ubrain_core #(
  parameter int N2     = 256,
  parameter int N1     = 64,
  parameter int N0     = 16,
  parameter int THRESH = 64,
  parameter int LEAK   = 1,
  parameter int W_W    = echelon_pkg::W_W,
  parameter int ADDR_W = echelon_pkg::ADDR_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tick,
  input  logic                   in_valid,
  input  logic [ADDR_W-1:0]      in_addr,
  output logic                   in_ready,
  output logic                   out_valid,
  output logic [ADDR_W-1:0]      out_addr,
  input  logic                   out_ready,
  input  logic                   cfg_valid,
  input  echelon_pkg::cfg_kind_e cfg_kind,
  input  logic [1:0]             cfg_layer,
  input  logic [7:0]             cfg_row,
  input  logic [7:0]             cfg_col,
  input  logic [15:0]            cfg_data,
  output logic                   cfg_ready,
  // learning interface, N2 x N1 matrix
  output logic                   l1_start,
  output logic [ADDR_W-1:0]      l1_pre,
  output logic [N1*W_W-1:0]      l1_row,
  output logic                   l1_fire_valid,
  output logic [N1-1:0]          l1_fire,
  input  logic                   l1_wb_en,
  input  logic [ADDR_W-1:0]      l1_wb_addr,
  input  logic [N1-1:0]          l1_wb_mask,
  input  logic [N1*W_W-1:0]      l1_wb_row,
  // learning interface, N1 x N0 matrix
  output logic                   l0_start,
  output logic [ADDR_W-1:0]      l0_pre,
  output logic [N0*W_W-1:0]      l0_row,
  output logic                   l0_fire_valid,
  output logic [N0-1:0]          l0_fire,
  input  logic                   l0_wb_en,
  input  logic [ADDR_W-1:0]      l0_wb_addr,
  input  logic [N0-1:0]          l0_wb_mask,
  input  logic [N0*W_W-1:0]      l0_wb_row,
  output logic [2:0]             stall
);
  logic              n2_valid, n2_ready, n1_valid, n1_ready;   // next enable
  logic [ADDR_W-1:0] n2_addr, n1_addr;
  logic [2:0]        cfg_rdy;
  logic              l2_start_unused, l2_fv_unused;
  logic [ADDR_W-1:0] l2_pre_unused;
  logic [N2*W_W-1:0] l2_row_unused;
  logic [N2-1:0]     l2_fire_unused;

  assign cfg_ready = &cfg_rdy;

  ubrain_layer #(.N_IN(N2), .N_OUT(N2), .DIAG(1'b1), .THRESH(THRESH), .LEAK(LEAK),
                 .W_W(W_W), .ADDR_W(ADDR_W)) u_l2 (
    .clk, .rst_n, .tick,
    .in_valid, .in_addr, .in_ready,
    .out_valid(n2_valid), .out_addr(n2_addr), .out_ready(n2_ready),
    .cfg_valid(cfg_valid && cfg_layer == 2'd2), .cfg_kind, .cfg_row, .cfg_col, .cfg_data,
    .cfg_ready(cfg_rdy[2]),
    .learn_start(l2_start_unused), .learn_pre(l2_pre_unused), .learn_row(l2_row_unused),
    .learn_fire_valid(l2_fv_unused), .learn_fire(l2_fire_unused),
    .wb_en(1'b0), .wb_addr('0), .wb_mask('0), .wb_row('0),
    .stall(stall[2])
  );

  ubrain_layer #(.N_IN(N2), .N_OUT(N1), .DIAG(1'b0), .THRESH(THRESH), .LEAK(LEAK),
                 .W_W(W_W), .ADDR_W(ADDR_W)) u_l1 (
    .clk, .rst_n, .tick,
    .in_valid(n2_valid), .in_addr(n2_addr), .in_ready(n2_ready),
    .out_valid(n1_valid), .out_addr(n1_addr), .out_ready(n1_ready),
    .cfg_valid(cfg_valid && cfg_layer == 2'd1), .cfg_kind, .cfg_row, .cfg_col, .cfg_data,
    .cfg_ready(cfg_rdy[1]),
    .learn_start(l1_start), .learn_pre(l1_pre), .learn_row(l1_row),
    .learn_fire_valid(l1_fire_valid), .learn_fire(l1_fire),
    .wb_en(l1_wb_en), .wb_addr(l1_wb_addr), .wb_mask(l1_wb_mask), .wb_row(l1_wb_row),
    .stall(stall[1])
  );

  ubrain_layer #(.N_IN(N1), .N_OUT(N0), .DIAG(1'b0), .THRESH(THRESH), .LEAK(LEAK),
                 .W_W(W_W), .ADDR_W(ADDR_W)) u_l0 (
    .clk, .rst_n, .tick,
    .in_valid(n1_valid), .in_addr(n1_addr), .in_ready(n1_ready),
    .out_valid, .out_addr, .out_ready,
    .cfg_valid(cfg_valid && cfg_layer == 2'd0), .cfg_kind, .cfg_row, .cfg_col, .cfg_data,
    .cfg_ready(cfg_rdy[0]),
    .learn_start(l0_start), .learn_pre(l0_pre), .learn_row(l0_row),
    .learn_fire_valid(l0_fire_valid), .learn_fire(l0_fire),
    .wb_en(l0_wb_en), .wb_addr(l0_wb_addr), .wb_mask(l0_wb_mask), .wb_row(l0_wb_row),
    .stall(stall[0])
  );
endmodule
