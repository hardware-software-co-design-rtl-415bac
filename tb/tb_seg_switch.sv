// tb_seg_switch: every control setting with random data on all three
// inputs; checks each output against the connection the setting makes.
module tb_seg_switch;
  import echelon_pkg::*;
  localparam int DW = 18;
  sw_mode_e mode = SW_OFF;
  logic [DW-1:0] a_in = '0, a_out, b_in = '0, b_out, c_in = '0, c_out;
  int checks = 0, failures = 0;

  seg_switch #(.DW(DW)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s mode=%0d", m, mode); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      mode = sw_mode_e'(n % 6);
      a_in = DW'($urandom); b_in = DW'($urandom); c_in = DW'($urandom);
      #1;
      chk(a_out == ((mode == SW_PASS) ? b_in : (mode == SW_C2A) ? c_in : '0), "A output");
      chk(b_out == ((mode == SW_PASS) ? a_in : (mode == SW_C2B) ? c_in : '0), "B output");
      chk(c_out == ((mode == SW_A2C) ? a_in : (mode == SW_B2C) ? b_in : '0), "C output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
