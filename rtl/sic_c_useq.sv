// sic_c_useq: micro sequencer of the microprogrammed SIC.
//
// Produces the microprogram ROM address.  On each falling edge of `clk` the
// address becomes the next-address field of the current microword when the
// branch condition is true, and the current address plus one otherwise.
// The choice between "next address" and "last address + 1" follows the SIC
// sequencer; registering the address on the falling edge follows the SIC
// microcycle timing.  Reset to address 0 is this design's addition.
module sic_c_useq #(
  parameter int unsigned ADDR_W = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] in,
  input  logic              branch,
  output logic [ADDR_W-1:0] out
);
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n)      out <= '0;
    else if (branch) out <= in;
    else             out <= out + 1'b1;
endmodule
