// seg_bus: the tile's parallel segmented bus. NL lanes, each a chain of NC
// segmentation switches (one per component, position = component index),
// set every cycle by the coordination-and-control unit. A granted packet
// travels from its source switch through the joined segments to the
// destination switch within the same cycle: tx_ready (the grant) and
// rx_valid are both combinational. Several transfers are carried at once when
// their spans do not overlap on a lane or when they use different lanes.
module seg_bus #(
  parameter int NC = echelon_pkg::NCOMP,
  parameter int NL = 2,
  localparam int CW = echelon_pkg::COMP_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NC-1:0]                tx_valid,
  input  logic [NC-1:0][CW-1:0]        tx_dst,
  input  echelon_pkg::spike_pkt_t      tx_data [NC],
  output logic [NC-1:0]                tx_ready,
  output logic [NC-1:0]                rx_valid,
  output echelon_pkg::spike_pkt_t      rx_data [NC],
  input  logic [NC-1:0]                rx_ready,
  output logic [NC-1:0]                blocked
);
  import echelon_pkg::*;
  localparam int DW = PKT_W + 1;

  logic [NC-1:0][$clog2(NL+1)-1:0] lane_of;
  sw_mode_e   mode [NL][NC];
  logic [DW-1:0] c_out [NL][NC];

  seg_bus_ctrl #(.NC(NC), .NL(NL)) u_ctrl (
    .clk, .rst_n, .tx_valid, .tx_dst, .rx_ready,
    .grant(tx_ready), .lane_of, .mode, .blocked
  );

  for (genvar l = 0; l < NL; l++) begin : g_lane
    for (genvar s = 0; s < NC; s++) begin : g_sw
      // segment wires of this switch: a_* to the left neighbour, b_* to the right
      logic [DW-1:0] a_i, a_o, b_i, b_o, c_i;
      if (s == 0) begin : g_left_end
        assign a_i = '0;
      end else begin : g_left
        assign a_i = g_sw[s-1].b_o;
      end
      if (s == NC - 1) begin : g_right_end
        assign b_i = '0;
      end else begin : g_right
        assign b_i = g_sw[s+1].a_o;
      end
      assign c_i = (tx_ready[s] && int'(lane_of[s]) == l) ? {1'b1, tx_data[s]} : '0;
      seg_switch #(.DW(DW)) u_sw (
        .mode(mode[l][s]),
        .a_in(a_i), .a_out(a_o),
        .b_in(b_i), .b_out(b_o),
        .c_in(c_i), .c_out(c_out[l][s])
      );
    end
  end

  always_comb begin
    for (int s = 0; s < NC; s++) begin
      logic [DW-1:0] acc;
      acc = '0;
      for (int l = 0; l < NL; l++) acc = acc | c_out[l][s];
      rx_valid[s] = acc[DW-1];
      rx_data[s]  = acc[DW-2:0];
    end
  end

  a_rx_ready: assert property (@(posedge clk) disable iff (!rst_n) (rx_valid & ~rx_ready) == '0);
endmodule
