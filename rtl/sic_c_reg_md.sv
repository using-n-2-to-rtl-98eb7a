// sic_c_reg_md: memory data register of the microprogrammed SIC.
//
// Loads from the O bus (en1, which has priority) or from the I/O data bus
// (en2) on the falling edge of `clk`, and drives the B bus (oe1) and the I/O
// bus (oe2); an output that is not enabled is all zeros.  This follows the
// SIC MD definition; the reset is this design's addition.
module sic_c_reg_md (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en1,
  input  logic        en2,
  input  logic        oe1,
  input  logic        oe2,
  input  logic [17:0] in1,
  input  logic [17:0] in2,
  output logic [17:0] out1,
  output logic [17:0] out2,
  output logic [17:0] q
);
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n)   q <= '0;
    else if (en1) q <= in1;
    else if (en2) q <= in2;
  assign out1 = oe1 ? q : '0;
  assign out2 = oe2 ? q : '0;
endmodule
