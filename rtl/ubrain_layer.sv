// ubrain_layer: one layer of the neuron core: AER decoder, weight memory,
// LIF neuron array and spike scheduler, sequenced by a small controller, with
// the interface through which an on-chip learning unit observes each spike
// and writes changed weights back.
//
// Each incoming address event (a presynaptic neuron index) is processed as
//   decoder 3 cycles -> LIF 5 cycles -> scheduler 3 cycles
// so the first outgoing event appears 11 cycles after the incoming one was
// accepted (for an idle layer), and the controller starts at most one event
// every 11 cycles (the execution period). Learning runs beside LIF and the
// scheduler: learn_start comes with the weight row (cycle 3 after
// acceptance), the fire vector two cycles later; a write-back (wb_*) arriving
// five cycles after learn_start updates the row before the next event reads
// it. The controller does not start an event while the scheduler queue is
// full (stall) or while a leak step is pending.
//
// DIAG = 1 makes the layer one-to-one (input i drives only neuron i through
// its own weight), used for the input layer; the memory then holds one
// weight per row. Weights, threshold and leak are written through cfg_*.
// cfg_ready is low while a write-back owns the memory port.
// The weight memory has no reset, so rst_n also gates its write enable
// combinationally: no write can happen while reset is held, even from
// registers that have not been reset yet. rst_n is therefore used both as
// an asynchronous reset and as a plain signal, on purpose.
module ubrain_layer #(
  parameter int N_IN   = 256,
  parameter int N_OUT  = 64,
  parameter bit DIAG   = 1'b0,
  parameter int THRESH = 64,
  parameter int LEAK   = 1,
  parameter int W_W    = echelon_pkg::W_W,
  parameter int V_W    = echelon_pkg::V_W,
  parameter int ADDR_W = echelon_pkg::ADDR_W,
  parameter int IN_DEPTH  = 8,
  parameter int OUT_DEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tick,        // time step: apply leak
  // AER in / out
  input  logic                    in_valid,
  input  logic [ADDR_W-1:0]       in_addr,
  output logic                    in_ready,
  output logic                    out_valid,
  output logic [ADDR_W-1:0]       out_addr,
  input  logic                    out_ready,
  // configuration
  input  logic                    cfg_valid,
  input  echelon_pkg::cfg_kind_e  cfg_kind,
  input  logic [7:0]              cfg_row,
  input  logic [7:0]              cfg_col,
  input  logic [15:0]             cfg_data,
  output logic                    cfg_ready,
  // learning interface
  output logic                    learn_start,
  output logic [ADDR_W-1:0]       learn_pre,
  output logic [N_OUT*W_W-1:0]    learn_row,
  output logic                    learn_fire_valid,
  output logic [N_OUT-1:0]        learn_fire,
  input  logic                    wb_en,
  input  logic [ADDR_W-1:0]       wb_addr,
  input  logic [N_OUT-1:0]        wb_mask,
  input  logic [N_OUT*W_W-1:0]    wb_row,
  // status
  output logic                    stall
);
  import echelon_pkg::*;

  localparam int MC = DIAG ? 1 : N_OUT;           // stored weights per row
  localparam int RA = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int PERIOD = 11;

  logic              dec_pending, dec_start, dec_done, dec_hit, rd_en;
  logic [ADDR_W-1:0] rd_addr, pre_addr;
  logic [MC*W_W-1:0] mem_row;
  logic [N_OUT*W_W-1:0] row;
  logic              m_we;
  logic [RA-1:0]     m_waddr;
  logic [MC-1:0]     m_wmask;
  logic [MC*W_W-1:0] m_wrow;
  logic              lif_busy, lif_fire_valid, lif_out_valid, lif_any;
  logic [N_OUT-1:0]  lif_fire, lif_spikes;
  logic [N_OUT-1:0][V_W-1:0] v_unused;
  logic              sched_full;
  logic signed [V_W-1:0] thresh_q, leak_q;
  logic [3:0]        cnt;
  logic              active;

  // ---------------- controller ----------------
  assign dec_start = dec_pending && !active && !lif_busy && !sched_full;
  assign stall     = dec_pending && !active && sched_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      active <= 1'b0;
    end else if (dec_start) begin
      cnt    <= 4'd1;
      active <= 1'b1;
    end else if (active) begin
      if (cnt == 4'(PERIOD - 1)) active <= 1'b0;
      cnt <= cnt + 1'b1;
    end
  end

  // ---------------- decoder + weight memory ----------------
  aer_decoder #(.N_IN(N_IN), .DEPTH(IN_DEPTH), .ADDR_W(ADDR_W)) u_dec (
    .clk, .rst_n,
    .in_valid, .in_addr, .in_ready,
    .pending(dec_pending), .start(dec_start),
    .rd_en, .rd_addr,
    .done(dec_done), .hit(dec_hit), .pre_addr
  );

  weight_memory #(.N_ROWS(N_IN), .N_COLS(MC), .W_W(W_W)) u_mem (
    .clk,
    .rd_en, .rd_addr(RA'(rd_addr)), .rd_row(mem_row),
    .wr_en(m_we), .wr_addr(m_waddr), .wr_mask(m_wmask), .wr_row(m_wrow)
  );

  // write port: STDP write-back first, then configuration
  assign cfg_ready = !wb_en;
  always_comb begin
    m_we    = 1'b0;
    m_waddr = RA'(cfg_row);
    m_wmask = '0;
    m_wrow  = '0;
    if (wb_en && !DIAG) begin
      m_we    = 1'b1;
      m_waddr = RA'(wb_addr);
      m_wmask = MC'(wb_mask);
      m_wrow  = (MC*W_W)'(wb_row);
    end else if (cfg_valid && cfg_kind == CFG_WEIGHT) begin
      m_we    = 1'b1;
      m_waddr = RA'(cfg_row);
      for (int c = 0; c < MC; c++)
        if (DIAG || c == int'(cfg_col)) begin
          m_wmask[c]          = 1'b1;
          m_wrow[c*W_W +: W_W] = cfg_data[W_W-1:0];
        end
    end
    if (!rst_n) m_we = 1'b0;  // no writes while reset is held
  end

  // weight row seen by the neurons
  always_comb begin
    if (DIAG) begin
      row = '0;
      for (int c = 0; c < N_OUT; c++)
        if (c == int'(pre_addr)) row[c*W_W +: W_W] = mem_row[W_W-1:0];
    end else begin
      row = (N_OUT*W_W)'(mem_row);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thresh_q <= V_W'(THRESH);
      leak_q   <= V_W'(LEAK);
    end else if (cfg_valid && cfg_ready) begin
      if (cfg_kind == CFG_THRESH) thresh_q <= signed'(cfg_data[V_W-1:0]);
      if (cfg_kind == CFG_LEAK)   leak_q   <= signed'(cfg_data[V_W-1:0]);
    end
  end

  // ---------------- neurons ----------------
  lif_array #(.N(N_OUT), .W_W(W_W), .V_W(V_W)) u_lif (
    .clk, .rst_n,
    .start(dec_done && dec_hit), .row,
    .thresh(thresh_q), .leak(leak_q), .leak_tick(tick),
    .busy(lif_busy),
    .fire_valid(lif_fire_valid), .fire(lif_fire),
    .out_valid(lif_out_valid), .spikes(lif_spikes), .any_spike(lif_any),
    .v_o(v_unused)
  );

  // ---------------- scheduler ----------------
  spike_scheduler #(.N(N_OUT), .DEPTH(OUT_DEPTH), .ADDR_W(ADDR_W)) u_sched (
    .clk, .rst_n,
    .vec_valid(lif_out_valid && lif_any), .vec(lif_spikes),
    .full(sched_full),
    .aer_valid(out_valid), .aer_addr(out_addr), .aer_ready(out_ready)
  );

  // ---------------- learning interface ----------------
  assign learn_start      = dec_done && dec_hit;
  assign learn_pre        = pre_addr;
  assign learn_row        = row;
  assign learn_fire_valid = lif_fire_valid;
  assign learn_fire       = lif_fire;

  a_period: assert property (@(posedge clk) disable iff (!rst_n) dec_start |-> !active);
endmodule
