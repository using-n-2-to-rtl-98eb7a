// sic_c_lf: link flag of the microprogrammed SIC.
//
// On the falling edge of `clk`: c[0] clears the link, c[1] sets it, c[2]
// loads in1 (O-bus bit 0, the bit shifted out by a right rotate) and c[3]
// loads in2 (O-bus bit 18, the carry or the bit shifted out by a left
// rotate); a later control wins when several are set.  This follows the SIC
// link-flag definition; the reset is this design's addition.
module sic_c_lf (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] c,
  input  logic       in1,
  input  logic       in2,
  output logic       out
);
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n)    out <= 1'b0;
    else if (c[3]) out <= in2;
    else if (c[2]) out <= in1;
    else if (c[1]) out <= 1'b1;
    else if (c[0]) out <= 1'b0;
endmodule
