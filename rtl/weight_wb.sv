// weight_wb: write-back of STDP weight changes. From the old weight row and
// the change dW computed by the STDP unit it forms, for every masked column,
//     W_new = sat( W_old + BETA + (ALPHA * dW) >>> ALPHA_SHIFT )
// (the weight update rule with learning rate alpha and offset beta; alpha is
// a fixed-point factor here) and writes the row back to the weight memory at
// the presynaptic neuron's address. Two cycles, the documented write-back
// delay: dw_valid in cycle 0, new row registered, wr_en high in cycle 1 so the
// memory holds the new weights from cycle 2.
module weight_wb #(
  parameter int N           = 64,
  parameter int W_W         = echelon_pkg::W_W,
  parameter int ADDR_W      = echelon_pkg::ADDR_W,
  parameter int ALPHA       = 1,
  parameter int ALPHA_SHIFT = 0,
  parameter int BETA        = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   dw_valid,
  input  logic [N-1:0][W_W:0]    dw,
  input  logic [N-1:0]           dw_mask,
  input  logic [ADDR_W-1:0]      addr,
  input  logic [N*W_W-1:0]       old_row,
  output logic                   wr_en,
  output logic [ADDR_W-1:0]      wr_addr,
  output logic [N-1:0]           wr_mask,
  output logic [N*W_W-1:0]       wr_row
);
  localparam int SW = W_W + 12;
  localparam logic signed [SW-1:0] WMAX = SW'((1 <<< (W_W-1)) - 1);
  localparam logic signed [SW-1:0] WMIN = -SW'(1 <<< (W_W-1));

  function automatic logic [W_W-1:0] upd(input logic signed [W_W-1:0] w_old,
                                         input logic signed [W_W:0] d);
    logic signed [SW-1:0] s;
    s = SW'(w_old) + SW'(BETA) + ((SW'(ALPHA) * SW'(d)) >>> ALPHA_SHIFT);
    if (s > WMAX) return WMAX[W_W-1:0];
    if (s < WMIN) return WMIN[W_W-1:0];
    return s[W_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_mask <= '0;
      wr_row  <= '0;
    end else begin
      wr_en <= dw_valid && (|dw_mask);
      if (dw_valid) begin
        wr_addr <= addr;
        wr_mask <= dw_mask;
        for (int j = 0; j < N; j++)
          wr_row[j*W_W +: W_W] <= dw_mask[j] ? upd(old_row[j*W_W +: W_W], dw[j])
                                             : old_row[j*W_W +: W_W];
      end
    end
  end
endmodule
