// tb_weight_wb: random old rows, weight changes and masks; checks the new
// row against W_new = sat(W_old + BETA + (ALPHA*dW) >>> ALPHA_SHIFT) for
// masked columns and unchanged weights elsewhere, the write address and mask,
// and that the write comes one cycle after dw_valid (two-cycle write-back).
module tb_weight_wb;
  localparam int N = 8, W = 8, ALPHA = 3, ASH = 1, BETA = -1;
  logic clk = 0, rst_n = 0;
  logic dw_valid = 0, wr_en;
  logic [N-1:0][W:0] dw = '0;
  logic [N-1:0] dw_mask = '0, wr_mask;
  logic [7:0] addr = '0, wr_addr;
  logic [N*W-1:0] old_row = '0, wr_row;
  int checks = 0, failures = 0, sat_hits = 0;

  always #5 clk = ~clk;

  weight_wb #(.N(N), .W_W(W), .ALPHA(ALPHA), .ALPHA_SHIFT(ASH), .BETA(BETA)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int e [N];
      @(negedge clk);
      dw_valid = 1;
      addr     = 8'($urandom);
      old_row  = {$urandom, $urandom};
      dw_mask  = N'($urandom) | 1;
      for (int j = 0; j < N; j++) dw[j] = (W+1)'($urandom_range(0, 80) - 40);
      for (int j = 0; j < N; j++) begin
        int o, d, s;
        o = int'(signed'(old_row[j*W +: W]));
        d = int'(signed'(dw[j]));
        s = o + BETA + ((ALPHA * d) >>> ASH);
        if (s > 127) begin s = 127; sat_hits++; end
        if (s < -128) begin s = -128; sat_hits++; end
        e[j] = dw_mask[j] ? s : o;
      end
      @(negedge clk);
      dw_valid = 0;
      chk(wr_en, "write one cycle after dw_valid");
      chk(wr_addr == addr, "write address");
      chk(wr_mask == dw_mask, "write mask");
      for (int j = 0; j < N; j++)
        chk(int'(signed'(wr_row[j*W +: W])) == e[j], $sformatf("new weight col %0d", j));
      @(negedge clk);
      chk(!wr_en, "single write");
    end
    chk(sat_hits > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
