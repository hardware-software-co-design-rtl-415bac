// tb_olu: selects and enables learning with a bus packet, then plays one
// presynaptic event on each plastic matrix with one postsynaptic neuron
// firing. The fired column must be potentiated by A_PLUS (dt = 2 cycles is
// below one tau step) and written in cycle 6 after the start (5 learning cycles,
// then the 2-cycle write-back whose second cycle is the memory write); a second event on the same neuron after the first fired
// must depress it by A_MINUS. With learning disabled no write-back appears.
module tb_olu;
  import echelon_pkg::*;
  localparam int N2 = 4, N1 = 4, N0 = 2, W = 8;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, learn_en;
  spike_pkt_t rx_data = '0;
  logic [1:0] sel;
  logic l1_start = 0, l1_fire_valid = 0, l0_start = 0, l0_fire_valid = 0;
  logic [7:0] l1_pre = '0, l0_pre = '0, l1_wb_addr, l0_wb_addr;
  logic [N1*W-1:0] l1_row = '0, l1_wb_row;
  logic [N0*W-1:0] l0_row = '0, l0_wb_row;
  logic [N1-1:0] l1_fire = '0, l1_wb_mask;
  logic [N0-1:0] l0_fire = '0, l0_wb_mask;
  logic l1_wb_en, l0_wb_en;
  int checks = 0, failures = 0, cyc = 0, wb1 = 0, wb0 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    if (l1_wb_en) wb1++;
    if (l0_wb_en) wb0++;
  end

  olu #(.N2(N2), .N1(N1), .N0(N0)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0d)", m, cyc); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one event on the N2 x N1 matrix; returns after checking the write-back
  task automatic ev1(input int p, input logic [N1-1:0] f, input int exp_delta, input bit expect_wb);
    logic [N1*W-1:0] row;
    row = {$urandom} & 32'h3f3f3f3f;
    @(negedge clk);
    l1_start = 1; l1_pre = 8'(p); l1_row = row;
    @(negedge clk); l1_start = 0;
    @(negedge clk); l1_fire_valid = 1; l1_fire = f;
    @(negedge clk); l1_fire_valid = 0; l1_fire = '0;
    repeat (2) @(negedge clk);                      // cycle 5
    chk(!l1_wb_en, "no early write-back");
    @(negedge clk);                                 // cycle 6
    chk(l1_wb_en == expect_wb, "write-back in cycle 6");
    if (expect_wb) begin
      chk(int'(l1_wb_addr) == p, "write-back address");
      chk(l1_wb_mask == 4'b0010, "write-back mask");
      chk(int'(signed'(l1_wb_row[W +: W])) == int'(signed'(row[W +: W])) + exp_delta, "new weight");
    end
  endtask

  task automatic ev0(input int p, input logic [N0-1:0] f, input int exp_delta);
    logic [N0*W-1:0] row;
    row = 16'h1020;
    @(negedge clk);
    l0_start = 1; l0_pre = 8'(p); l0_row = row;
    @(negedge clk); l0_start = 0;
    @(negedge clk); l0_fire_valid = 1; l0_fire = f;
    @(negedge clk); l0_fire_valid = 0; l0_fire = '0;
    repeat (3) @(negedge clk);                      // cycle 6
    chk(l0_wb_en, "l0 write-back in cycle 6");
    chk(l0_wb_mask == 2'b01, "l0 mask");
    chk(int'(signed'(l0_wb_row[0 +: W])) == 32 + exp_delta, "l0 new weight");
    chk(l0_wb_row[W +: W] == 8'h10, "l0 other column unchanged");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk(!learn_en, "learning off after reset");
    @(negedge clk);
    rx_valid = 1; rx_data = '{x: 3'd0, y: 3'd0, comp: COMP_OLU, addr: 8'h82};
    @(negedge clk);
    rx_valid = 0;
    chk(learn_en && sel == 2'd2, "select NPU2 and enable");
    ev1(1, 4'b0010, 8, 1);        // post 1 fires after pre 1: +A_PLUS
    ev1(2, 4'b0000, -4, 1);       // pre 2 after post 1 (dt in 0..-7): -A_MINUS
    ev0(3, 2'b01, 8);
    @(negedge clk);
    rx_valid = 1; rx_data.addr = 8'h00;
    @(negedge clk);
    rx_valid = 0;
    chk(!learn_en && sel == 2'd0, "learning disabled");
    ev1(0, 4'b0010, 0, 0);
    chk(wb1 == 2 && wb0 == 1, "write-back count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
