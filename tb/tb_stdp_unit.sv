// tb_stdp_unit: a 4 x 4 STDP unit. A sequence of presynaptic events with
// chosen fire vectors is applied; the testbench keeps its own record of the
// pre and post spike times (read from the unit's time counter at the moments
// it drives start and fire) and computes the expected weight change of every
// column: potentiation for posts fired by the event, depression for posts
// that fired earlier within the window, nothing for others. Checks dw,
// dw_mask, the 5-cycle delay and that enable low suppresses updates.
module tb_stdp_unit;
  localparam int NP = 4, NQ = 4, W = 8, T = 16;
  localparam int AP = 8, AM = 4, TL = 3, WIN = 64;
  logic clk = 0, rst_n = 0;
  logic enable = 1, start = 0, fire_valid = 0;
  logic [7:0] pre_addr = '0, pre_addr_o;
  logic [NQ*W-1:0] old_row = '0, old_row_o;
  logic [NQ-1:0] fire = '0, dw_mask;
  logic dw_valid;
  logic [NQ-1:0][W:0] dw;
  logic [T-1:0] now_o;
  int checks = 0, failures = 0;
  int post_t [NQ];
  bit post_v [NQ];
  int ltp = 0, ltd = 0;

  always #5 clk = ~clk;

  stdp_unit #(.N_PRE(NP), .N_POST(NQ), .W_W(W), .T_W(T), .A_PLUS(AP), .A_MINUS(AM),
              .TAU_P_LOG2(TL), .TAU_M_LOG2(TL), .WINDOW(WIN)) dut (.*);

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

  task automatic event_(input int p, input logic [NQ-1:0] f, input int gap);
    int tp, tf;
    int exp_dw [NQ];
    bit exp_m [NQ];
    @(negedge clk);
    start = 1; pre_addr = 8'(p); old_row = {$urandom};
    tp = int'(now_o);                         // time stamped at the start edge
    @(negedge clk); start = 0;
    @(negedge clk);                           // cycle 2
    fire_valid = 1; fire = f;
    tf = int'(now_o);
    for (int j = 0; j < NQ; j++) if (f[j]) begin post_t[j] = tf; post_v[j] = 1; end
    @(negedge clk); fire_valid = 0; fire = '0;
    // expected result (window measured at cycle 3, when the select is made)
    for (int j = 0; j < NQ; j++) begin
      int dt, m, sh;
      exp_dw[j] = 0; exp_m[j] = 0;
      if (post_v[j] && (tf - post_t[j]) < WIN && enable) begin
        dt = post_t[j] - tp;
        m  = dt > 0 ? dt : -dt;
        sh = m >> TL;
        exp_m[j]  = 1;
        exp_dw[j] = (dt > 0) ? ((sh > W) ? 0 : (AP >> sh)) : -((sh > W) ? 0 : (AM >> sh));
      end
    end
    @(negedge clk);                           // cycle 4
    chk(!dw_valid, "no early result");
    @(negedge clk);                           // cycle 5
    chk(dw_valid, "dw_valid at cycle 5");
    chk(int'(pre_addr_o) == p, "pre address");
    for (int j = 0; j < NQ; j++) begin
      chk(dw_mask[j] == exp_m[j], $sformatf("mask col %0d", j));
      if (exp_m[j]) begin
        chk(int'(signed'(dw[j])) == exp_dw[j],
            $sformatf("dw col %0d got %0d exp %0d", j, int'(signed'(dw[j])), exp_dw[j]));
        if (exp_dw[j] > 0) ltp++;
        if (exp_dw[j] < 0) ltd++;
      end
    end
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    for (int j = 0; j < NQ; j++) begin post_t[j] = 0; post_v[j] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    event_(0, 4'b0010, 3);     // post 1 fires: LTP dt = 2
    event_(1, 4'b0000, 5);     // post 1 earlier: LTD
    event_(2, 4'b0101, 20);    // LTP on 0, 2; LTD on 1
    event_(3, 4'b0000, 80);    // all beyond ... some within window
    event_(0, 4'b0000, 2);     // window expired: nothing
    for (int n = 0; n < 60; n++) event_($urandom_range(0, NP-1), NQ'($urandom & $urandom), $urandom_range(0, 30));
    enable = 0;
    event_(1, 4'b1111, 2);     // learning off
    chk(ltp > 5 && ltd > 5, "both LTP and LTD exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
