// tb_weight_memory: random masked row writes and row reads against an array
// model; checks the registered read timing and the initial zero contents.
module tb_weight_memory;
  localparam int R = 16, C = 8, W = 8;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [3:0] rd_addr = '0, wr_addr = '0;
  logic [C*W-1:0] rd_row, wr_row = '0;
  logic [C-1:0] wr_mask = '0;
  logic [C*W-1:0] model [R];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  weight_memory #(.N_ROWS(R), .N_COLS(C), .W_W(W)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < R; r++) model[r] = '0;
    for (int n = 0; n < 1500; n++) begin
      logic [3:0] ra;
      @(negedge clk);
      rd_en   = $urandom_range(0, 1);
      rd_addr = 4'($urandom);
      ra      = rd_addr;
      wr_en   = $urandom_range(0, 1);
      wr_addr = 4'($urandom);
      wr_mask = C'($urandom);
      wr_row  = {$urandom, $urandom};
      @(posedge clk);
      if (wr_en)
        for (int c = 0; c < C; c++)
          if (wr_mask[c]) model[wr_addr][c*W +: W] = wr_row[c*W +: W];
      if (rd_en) begin
        logic [C*W-1:0] exp_row;
        exp_row = model[ra];
        // a read in the same cycle as a write to that row returns the old
        // row for the written columns; compare only untouched columns then
        @(negedge clk);
        for (int c = 0; c < C; c++)
          if (!(wr_en && wr_addr == ra && wr_mask[c]))
            chk(rd_row[c*W +: W] == exp_row[c*W +: W], "row read");
        rd_en = 0; wr_en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
