// sic_c_reg: bus register of the microprogrammed SIC datapath (used for AC,
// IA, IB, PC and BWC).
//
// Loads `in` on the falling edge of `clk` while `en` is high and drives its
// contents on `out` while `oe` is high; with `oe` low the output is all
// zeros so that several registers can share a wired-OR bus.  Falling-edge
// loading, the load enable and the output enable follow the SIC register
// definition; the asynchronous reset to zero is this design's addition.
module sic_c_reg #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         oe,
  input  logic [W-1:0] in,
  output logic [W-1:0] out,
  output logic [W-1:0] q
);
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n)  q <= '0;
    else if (en) q <= in;
  assign out = oe ? q : '0;
endmodule
