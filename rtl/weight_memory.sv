// weight_memory: synaptic weight store of one layer. Row r holds the N_COLS
// signed weights from presynaptic neuron r to the layer's neurons, so one
// incoming spike needs one row read. The read is registered (data on rd_row
// the cycle after rd_en). The write port takes a whole row with a per-column
// mask; it is shared by the STDP write-back and by configuration writes of a
// single weight. Contents start at zero. Signed weights and the row
// organisation are this design's choices; the 8-bit width is the documented
// weight precision.
module weight_memory #(
  parameter int N_ROWS = 256,
  parameter int N_COLS = 64,
  parameter int W_W    = echelon_pkg::W_W,
  localparam int AW    = (N_ROWS > 1) ? $clog2(N_ROWS) : 1
) (
  input  logic                  clk,
  input  logic                  rd_en,
  input  logic [AW-1:0]         rd_addr,
  output logic [N_COLS*W_W-1:0] rd_row,
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_addr,
  input  logic [N_COLS-1:0]     wr_mask,
  input  logic [N_COLS*W_W-1:0] wr_row
);
  logic [N_COLS-1:0][W_W-1:0] mem [N_ROWS];

  initial begin
    for (int r = 0; r < N_ROWS; r++) mem[r] = '0;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_row <= mem[rd_addr];
    if (wr_en)
      for (int c = 0; c < N_COLS; c++)
        if (wr_mask[c]) mem[wr_addr][c] <= wr_row[c*W_W +: W_W];
  end
endmodule
