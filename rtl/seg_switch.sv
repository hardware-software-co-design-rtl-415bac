// seg_switch: three-way bus segmentation switch. Side A is the bus segment to
// the left, side B the segment to the right, side C the local component. The
// control input either isolates the two segments, joins them, or connects
// the component to one side in one direction. Each side has a separate
// input and output (valid bit + data), so the tri-state buffers of a
// transistor-level switch become multiplexers here. Purely combinational.
module seg_switch #(
  parameter int DW = echelon_pkg::PKT_W + 1
) (
  input  echelon_pkg::sw_mode_e mode,
  input  logic [DW-1:0] a_in,    // arriving from the left
  output logic [DW-1:0] a_out,   // leaving to the left
  input  logic [DW-1:0] b_in,    // arriving from the right
  output logic [DW-1:0] b_out,   // leaving to the right
  input  logic [DW-1:0] c_in,    // from the component
  output logic [DW-1:0] c_out    // to the component
);
  import echelon_pkg::*;

  always_comb begin
    a_out = '0;
    b_out = '0;
    c_out = '0;
    unique case (mode)
      SW_PASS: begin
        b_out = a_in;
        a_out = b_in;
      end
      SW_C2A:  a_out = c_in;
      SW_C2B:  b_out = c_in;
      SW_A2C:  c_out = a_in;
      SW_B2C:  c_out = b_in;
      default: ;
    endcase
  end
endmodule
