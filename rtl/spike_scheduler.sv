// spike_scheduler: output side of one neuron layer. Each spike vector from
// the LIF array that holds at least one spike is queued in a FIFO; the
// schedule stage takes the head vector and sends its set bits one per cycle
// as address events (lowest index first) on a valid/ready port.
// Timing: a vector pushed in cycle k gives its first address valid in cycle
// k+3 (push, load, issue), the documented scheduler delay; further addresses
// follow one per cycle while aer_ready is high, with one idle cycle between
// vectors. `full` tells the layer controller not to start a new spike.
module spike_scheduler #(
  parameter int N      = 64,
  parameter int DEPTH  = 4,
  parameter int ADDR_W = echelon_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              vec_valid,
  input  logic [N-1:0]      vec,
  output logic              full,
  output logic              aer_valid,
  output logic [ADDR_W-1:0] aer_addr,
  input  logic              aer_ready
);
  logic [N-1:0] head, pend;
  logic         empty, pop, issue;
  logic [$clog2(DEPTH+1)-1:0] count_unused;
  logic [ADDR_W-1:0] first_idx;

  sync_fifo #(.WIDTH(N), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(vec_valid && (|vec)), .wr_data(vec),
    .rd_en(pop), .rd_data(head),
    .full, .empty, .count(count_unused)
  );

  // lowest set bit of the pending vector
  always_comb begin
    first_idx = '0;
    for (int i = N - 1; i >= 0; i--)
      if (pend[i]) first_idx = ADDR_W'(i);
  end

  // the output register is free when empty or being taken
  assign issue = (|pend) && (!aer_valid || aer_ready);
  assign pop   = !empty && (pend == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= '0;
      aer_valid <= 1'b0;
      aer_addr  <= '0;
    end else begin
      if (pop) pend <= head;
      else if (issue) pend <= pend & (pend - 1'b1);  // clear lowest set bit
      if (issue) begin
        aer_valid <= 1'b1;
        aer_addr  <= first_idx;
      end else if (aer_ready) begin
        aer_valid <= 1'b0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           aer_valid && !aer_ready |=> aer_valid && $stable(aer_addr));
endmodule
