// tb_seg_bus_ctrl: random request patterns for 6 components and 2 lanes.
// For every cycle it checks the rules of the segmented bus: only valid
// requests to a ready destination other than the source are granted, no
// destination gets two packets, granted spans on a lane do not overlap, the
// switch settings form exactly the granted paths (drive at the source, pass
// in between, deliver at the destination, off elsewhere), and a refused
// request really had no free span on any lane. Also counts cycles with two
// transfers on one lane and with both lanes in use.
module tb_seg_bus_ctrl;
  import echelon_pkg::*;
  localparam int NC = 6, NL = 2;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0] tx_valid = '0, rx_ready = '1, grant, blocked;
  logic [NC-1:0][2:0] tx_dst = '0;
  logic [NC-1:0][1:0] lane_of;
  sw_mode_e mode [NL][NC];
  int checks = 0, failures = 0, same_lane = 0, both_lanes = 0, refusals = 0;

  always #5 clk = ~clk;

  seg_bus_ctrl #(.NC(NC), .NL(NL)) dut (.*);

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

  task automatic check_cycle();
    sw_mode_e em [NL][NC];
    bit used [NL][NC];
    int per_lane [NL];
    bit dtaken [NC];
    for (int l = 0; l < NL; l++) begin
      per_lane[l] = 0;
      for (int s = 0; s < NC; s++) begin em[l][s] = SW_OFF; used[l][s] = 0; end
    end
    for (int s = 0; s < NC; s++) dtaken[s] = 0;
    for (int i = 0; i < NC; i++) if (grant[i]) begin
      int d, l, lo, hi;
      d = int'(tx_dst[i]); l = int'(lane_of[i]);
      chk(tx_valid[i] && d != i && d < NC && rx_ready[d], "grant only legal requests");
      chk(!dtaken[d], "one packet per destination");
      dtaken[d] = 1;
      lo = i < d ? i : d; hi = i < d ? d : i;
      for (int s = lo; s <= hi; s++) begin
        chk(!used[l][s], "spans do not overlap");
        used[l][s] = 1;
        em[l][s] = SW_PASS;
      end
      em[l][i] = d > i ? SW_C2B : SW_C2A;
      em[l][d] = d > i ? SW_A2C : SW_B2C;
      per_lane[l]++;
    end
    for (int l = 0; l < NL; l++)
      for (int s = 0; s < NC; s++) chk(mode[l][s] == em[l][s], "switch setting");
    for (int i = 0; i < NC; i++)
      if (tx_valid[i] && !grant[i] && int'(tx_dst[i]) != i && tx_dst[i] < NC &&
          rx_ready[tx_dst[i]] && !dtaken[tx_dst[i]]) begin
        int d, lo, hi;
        bit any_free;
        d = int'(tx_dst[i]);
        lo = i < d ? i : d; hi = i < d ? d : i;
        any_free = 0;
        for (int l = 0; l < NL; l++) begin
          bit f;
          f = 1;
          for (int s = lo; s <= hi; s++) if (used[l][s]) f = 0;
          if (f) any_free = 1;
        end
        chk(!any_free && blocked[i], "refused only without a free span");
        refusals++;
      end
    if (per_lane[0] > 1 || per_lane[1] > 1) same_lane++;
    if (per_lane[0] > 0 && per_lane[1] > 0) both_lanes++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed, in round-robin order from 0: 0->1 and 2->5 share lane 0; 3->4 overlaps 2->5 and takes lane 1
    @(negedge clk);
    tx_valid = '0;
    tx_valid[0] = 1; tx_dst[0] = 3'd1;
    tx_valid[3] = 1; tx_dst[3] = 3'd4;
    tx_valid[2] = 1; tx_dst[2] = 3'd5;
    #1;
    chk(grant[0] && grant[3] && grant[2], "three concurrent transfers");
    chk(lane_of[0] == lane_of[2] && lane_of[3] != lane_of[2], "lane assignment");
    check_cycle();
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < NC; i++) begin
        tx_valid[i] = $urandom_range(0, 1);
        tx_dst[i]   = 3'($urandom_range(0, NC - 1));
        rx_ready[i] = $urandom_range(0, 5) != 0;
      end
      #1;
      check_cycle();
    end
    chk(same_lane > 50 && both_lanes > 50 && refusals > 50, "concurrency and refusals exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
