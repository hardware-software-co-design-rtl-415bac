// aer_decoder: input side of one neuron layer. Address events (AER, one
// presynaptic neuron index per spike) are queued in a FIFO; when the layer
// controller raises `start` the head event is popped, its address is checked
// against the layer's input range and turned into a weight-memory row read.
//
// Timing (three cycles, counting the FIFO write as the first): an event
// accepted in cycle k can be started in cycle k+1, the memory read is issued
// in cycle k+2 and `done` is high in cycle k+3, when the weight row is on the
// memory output. The split into queue + decode follows the layer drawing; the
// three-cycle delay follows the documented per-stage delays. Events with an
// address >= N_IN are dropped: `done` comes with `hit` low.
module aer_decoder #(
  parameter int N_IN   = 256,
  parameter int DEPTH  = 8,
  parameter int ADDR_W = echelon_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // AER input
  input  logic              in_valid,
  input  logic [ADDR_W-1:0] in_addr,
  output logic              in_ready,
  // controller
  output logic              pending,   // an event is waiting
  input  logic              start,     // pop and decode the head event
  // weight memory read port
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  // result
  output logic              done,      // row valid on the memory output
  output logic              hit,       // address was in range
  output logic [ADDR_W-1:0] pre_addr   // presynaptic neuron of this row
);
  logic              full, empty;
  logic [ADDR_W-1:0] head;
  logic              dec_v, dec_hit;
  logic [$clog2(DEPTH+1)-1:0] count_unused;

  sync_fifo #(.WIDTH(ADDR_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(in_valid), .wr_data(in_addr),
    .rd_en(start && !empty), .rd_data(head),
    .full, .empty, .count(count_unused)
  );

  assign in_ready = !full;
  assign pending  = !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_v    <= 1'b0;
      dec_hit  <= 1'b0;
      rd_addr  <= '0;
      done     <= 1'b0;
      hit      <= 1'b0;
      pre_addr <= '0;
    end else begin
      // decode
      dec_v   <= start && !empty;
      dec_hit <= (32'(head) < N_IN);
      if (start && !empty) rd_addr <= head;
      // memory read cycle
      done     <= dec_v;
      hit      <= dec_hit;
      if (dec_v) pre_addr <= rd_addr;
    end
  end

  assign rd_en = dec_v && dec_hit;

  a_start_needs_event: assert property (@(posedge clk) disable iff (!rst_n) start |-> !empty);
endmodule
