// stdp_unit: spike-timing-dependent plasticity for one weight matrix
// (N_PRE presynaptic x N_POST postsynaptic neurons), built from the parts of
// the STDP unit drawing: a time counter, time and spike registers for the
// pre- and postsynaptic side, a subtractor, the increment/decrement select,
// increment and decrement weight stages and the adder producing dW.
//
// Operation. Each incoming presynaptic spike (an event of the layer) starts
// the unit with the event's presynaptic index p and its weight row. The unit
// stamps the pre time register of p, takes the layer's fire vector two cycles
// later and stamps the post time register of every neuron that fired. Then,
// for every postsynaptic neuron j whose spike register says it fired within
// the spike window:
//     dt = t_post[j] - t_pre[p]
//     dt >  0 (pre before post, LTP): dW = +A_PLUS  >> (dt  >> TAU_P_LOG2)
//     dt <= 0 (pre after post,  LTD): dW = -A_MINUS >> (-dt >> TAU_M_LOG2)
// The shifts stand in for A*exp(-|dt|/tau) (exponential STDP with a power-of-
// two decay per tau). The time counter counts clock cycles, so a neuron fired
// by this very spike has dt = +2 (potentiation). Spike registers are cleared
// once a spike is WINDOW cycles old.
//
// Timing: `start` in cycle 0, `fire_valid` must be high in cycle 2, `dw_valid`
// is high in cycle 5 (the documented five-cycle learning delay) together with
// dw, dw_mask (columns to update), the presynaptic index and the old row for
// the write-back. `enable` low suppresses all updates.
module stdp_unit #(
  parameter int N_PRE      = 256,
  parameter int N_POST     = 64,
  parameter int W_W        = echelon_pkg::W_W,
  parameter int T_W        = echelon_pkg::T_W,
  parameter int ADDR_W     = echelon_pkg::ADDR_W,
  parameter int A_PLUS     = 8,
  parameter int A_MINUS    = 4,
  parameter int TAU_P_LOG2 = 3,
  parameter int TAU_M_LOG2 = 3,
  parameter int WINDOW     = 64
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  input  logic                        start,
  input  logic [ADDR_W-1:0]           pre_addr,
  input  logic [N_POST*W_W-1:0]       old_row,
  input  logic                        fire_valid,
  input  logic [N_POST-1:0]           fire,
  output logic                        dw_valid,
  output logic [N_POST-1:0][W_W:0]    dw,
  output logic [N_POST-1:0]           dw_mask,
  output logic [ADDR_W-1:0]           pre_addr_o,
  output logic [N_POST*W_W-1:0]       old_row_o,
  output logic [T_W-1:0]              now_o
);
  logic [T_W-1:0]     now;                     // time counter
  logic [T_W-1:0]     pre_time  [N_PRE];
  logic [N_PRE-1:0]   pre_spk;                 // pre spike register
  logic [T_W-1:0]     post_time [N_POST];
  logic [N_POST-1:0]  post_spk;                // post spike register
  logic [4:0]         ph;
  logic [T_W-1:0]     t_pre;
  logic               pre_det;
  logic [N_POST-1:0]  incr_en, decr_en;
  logic [T_W-1:0]     mag [N_POST];            // |dt|

  function automatic logic [W_W:0] decay(input int amp, input logic [T_W-1:0] d, input int tl2);
    logic [T_W-1:0] sh;
    sh = d >> tl2;
    if (sh >= T_W'(W_W + 1)) return '0;
    return (W_W+1)'(amp) >> sh;
  endfunction

  assign now_o = now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now        <= '0;
      ph         <= '0;
      pre_spk    <= '0;
      post_spk   <= '0;
      t_pre      <= '0;
      pre_det    <= 1'b0;
      incr_en    <= '0;
      decr_en    <= '0;
      dw_valid   <= 1'b0;
      dw         <= '0;
      dw_mask    <= '0;
      pre_addr_o <= '0;
      old_row_o  <= '0;
      for (int i = 0; i < N_PRE; i++)  pre_time[i]  <= '0;
      for (int j = 0; j < N_POST; j++) begin
        post_time[j] <= '0;
        mag[j]       <= '0;
      end
    end else begin
      now <= now + 1'b1;
      ph  <= {ph[3:0], start};
      // spike window: forget spikes that are WINDOW cycles old
      for (int i = 0; i < N_PRE; i++)
        if (now - pre_time[i] >= T_W'(WINDOW)) pre_spk[i] <= 1'b0;
      for (int j = 0; j < N_POST; j++)
        if (now - post_time[j] >= T_W'(WINDOW)) post_spk[j] <= 1'b0;
      // cycle 0: presynaptic spike
      if (start) begin
        pre_time[pre_addr] <= now;
        pre_spk[pre_addr]  <= 1'b1;
        t_pre              <= now;
        pre_addr_o         <= pre_addr;
        old_row_o          <= old_row;
      end
      // cycle 2: postsynaptic spikes of this event
      if (fire_valid)
        for (int j = 0; j < N_POST; j++)
          if (fire[j]) begin
            post_time[j] <= now;
            post_spk[j]  <= 1'b1;
          end
      // cycle 3: subtract and increment/decrement select
      if (ph[2]) begin
        pre_det <= pre_spk[pre_addr_o];
        for (int j = 0; j < N_POST; j++) begin
          logic signed [T_W-1:0] dt;
          dt = signed'(post_time[j] - t_pre);
          incr_en[j] <= enable && post_spk[j] && (dt > 0);
          decr_en[j] <= enable && post_spk[j] && (dt <= 0);
          mag[j]     <= (dt > 0) ? T_W'(dt) : T_W'(-dt);
        end
      end
      // cycle 4: increment / decrement weight and ADD
      dw_valid <= ph[3];
      if (ph[3])
        for (int j = 0; j < N_POST; j++) begin
          logic [W_W:0] dwp, dwm;
          dwp = (pre_det && incr_en[j]) ? decay(A_PLUS,  mag[j], TAU_P_LOG2) : '0;
          dwm = (pre_det && decr_en[j]) ? decay(A_MINUS, mag[j], TAU_M_LOG2) : '0;
          dw[j]      <= dwp - dwm;
          dw_mask[j] <= pre_det && (incr_en[j] || decr_en[j]);
        end
    end
  end

  a_fire_timing: assert property (@(posedge clk) disable iff (!rst_n) fire_valid |-> ph[1]);
endmodule
