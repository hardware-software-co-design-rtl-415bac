// lif_array: the N leaky integrate-and-fire neurons of one layer, one adder
// ("ALU") and one threshold comparator per neuron, and an OR over all fire
// outputs, as in the layer drawing. One incoming spike is processed in five
// cycles (the documented LIF delay), starting in the cycle `start` is high
// with the weight row on `row`:
//   cycle 0  integrate  v_sum = sat(v + w)
//   cycle 1  compare    gt    = v_sum > thresh
//   cycle 2  fire       `fire` / `fire_valid` show the fire vector; potentials
//                       commit, fired neurons reset to 0
//   cycle 3  OR-reduce  any-spike flag
//   cycle 4  output     `spikes`, `any_spike`, `out_valid` high in cycle 5
// Leak: a `leak_tick` (one per time step) is remembered and applied when the
// pipeline is idle, moving every potential `leak` closer to zero; `busy`
// is high while a spike is in flight or a leak is waiting; a spike start
// takes precedence over a waiting leak. Reset to
// zero, subtractive leak and saturation are this design's choices.
module lif_array #(
  parameter int N   = 64,
  parameter int W_W = echelon_pkg::W_W,
  parameter int V_W = echelon_pkg::V_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [N*W_W-1:0]   row,
  input  logic signed [V_W-1:0] thresh,
  input  logic signed [V_W-1:0] leak,
  input  logic               leak_tick,
  output logic               busy,
  output logic               fire_valid,
  output logic [N-1:0]       fire,
  output logic               out_valid,
  output logic [N-1:0]       spikes,
  output logic               any_spike,
  output logic [N-1:0][V_W-1:0] v_o
);
  localparam logic signed [V_W:0] VMAX = (V_W+1)'((1 <<< (V_W-1)) - 1);
  localparam logic signed [V_W:0] VMIN = -(V_W+1)'(1 <<< (V_W-1));

  logic signed [V_W-1:0] v     [N];
  logic signed [V_W-1:0] v_sum [N];
  logic [N-1:0]          gt, spk_q;
  logic [4:0]            ph;        // one-hot phase of the spike in flight
  logic                  tick_pend, any_q;

  function automatic logic signed [V_W-1:0] sat_add(input logic signed [V_W-1:0] a,
                                                    input logic signed [W_W-1:0] b);
    logic signed [V_W:0] s;
    s = (V_W+1)'(a) + (V_W+1)'(b);
    if (s > VMAX) return VMAX[V_W-1:0];
    if (s < VMIN) return VMIN[V_W-1:0];
    return s[V_W-1:0];
  endfunction

  function automatic logic signed [V_W-1:0] do_leak(input logic signed [V_W-1:0] a,
                                                    input logic signed [V_W-1:0] l);
    if (a > l)       return a - l;
    else if (a < -l) return a + l;
    else             return '0;
  endfunction

  assign busy = (|ph) || tick_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph         <= '0;
      tick_pend  <= 1'b0;
      gt         <= '0;
      spk_q      <= '0;
      any_q      <= 1'b0;
      spikes     <= '0;
      any_spike  <= 1'b0;
      out_valid  <= 1'b0;
      for (int i = 0; i < N; i++) begin
        v[i]     <= '0;
        v_sum[i] <= '0;
      end
    end else begin
      ph <= {ph[3:0], start};
      if (leak_tick) tick_pend <= 1'b1;
      // cycle 0: integrate
      if (start)
        for (int i = 0; i < N; i++) v_sum[i] <= sat_add(v[i], row[i*W_W +: W_W]);
      // cycle 1: compare
      if (ph[0])
        for (int i = 0; i < N; i++) gt[i] <= (v_sum[i] > thresh);
      // cycle 2: fire, reset, commit
      if (ph[1]) begin
        spk_q <= gt;
        for (int i = 0; i < N; i++) v[i] <= gt[i] ? '0 : v_sum[i];
      end
      // cycle 3: OR
      if (ph[2]) any_q <= |spk_q;
      // cycle 4: output
      out_valid <= ph[3];
      if (ph[3]) begin
        spikes    <= spk_q;
        any_spike <= any_q;
      end
      // leak between spikes
      if (tick_pend && !(|ph) && !start) begin
        tick_pend <= leak_tick;
        for (int i = 0; i < N; i++) v[i] <= do_leak(v[i], leak);
      end
    end
  end

  assign fire_valid = ph[1];
  assign fire       = gt;

  always_comb
    for (int i = 0; i < N; i++) v_o[i] = v[i];

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !(|ph));
endmodule
