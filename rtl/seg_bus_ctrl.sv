// seg_bus_ctrl: coordination and control of the parallel segmented bus. Each
// cycle it takes the components' transfer requests (destination component),
// visits them in round-robin order and gives each the first lane on which
// the span of switches between source and destination is still free, so
// transfers whose spans do not overlap run at the same time on one lane.
// A request is also refused when its destination cannot accept (rx_ready low)
// or already receives in this cycle. For each granted transfer it sets the
// source switch to drive towards the destination, the switches in between to
// pass, and the destination switch to deliver. Combinational; the
// round-robin pointer advances every cycle with a grant. Round-robin order
// and first-free-lane allocation are this design's choices.
module seg_bus_ctrl #(
  parameter int NC = echelon_pkg::NCOMP,
  parameter int NL = 2,
  localparam int CW = echelon_pkg::COMP_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NC-1:0]          tx_valid,
  input  logic [NC-1:0][CW-1:0]  tx_dst,
  input  logic [NC-1:0]          rx_ready,
  output logic [NC-1:0]          grant,
  output logic [NC-1:0][$clog2(NL+1)-1:0] lane_of,
  output echelon_pkg::sw_mode_e  mode [NL][NC],
  output logic [NC-1:0]          blocked     // valid request refused for lack of a free span
);
  import echelon_pkg::*;

  logic [$clog2(NC)-1:0] rr;
  logic [NL-1:0][NC-1:0] used;
  logic [NC-1:0]         dst_taken;

  always_comb begin
    int i, d, lo, hi;
    logic done, free;
    grant     = '0;
    blocked   = '0;
    lane_of   = '0;
    used      = '0;
    dst_taken = '0;
    for (int l = 0; l < NL; l++)
      for (int s = 0; s < NC; s++) mode[l][s] = SW_OFF;
    free = 1'b0;
    for (int k = 0; k < NC; k++) begin
      i = (int'(rr) + k) % NC;
      d = int'(tx_dst[i]);
      lo = (i < d) ? i : d;
      hi = (i < d) ? d : i;
      done = 1'b0;
      if (tx_valid[i] && d != i && d < NC && rx_ready[d] && !dst_taken[d]) begin
        for (int l = 0; l < NL; l++) begin
          free = 1'b1;
          for (int s = 0; s < NC; s++)
            if (s >= lo && s <= hi && used[l][s]) free = 1'b0;
          if (free && !done) begin
            done         = 1'b1;
            grant[i]     = 1'b1;
            lane_of[i]   = ($clog2(NL+1))'(l);
            dst_taken[d] = 1'b1;
            for (int s = 0; s < NC; s++)
              if (s >= lo && s <= hi) begin
                used[l][s] = 1'b1;
                mode[l][s] = SW_PASS;
              end
            mode[l][i] = (d > i) ? SW_C2B : SW_C2A;
            mode[l][d] = (d > i) ? SW_A2C : SW_B2C;
          end
        end
        if (!done) blocked[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (|grant) rr <= (int'(rr) == NC - 1) ? '0 : rr + 1'b1;
  end
endmodule
