// sic_c_reg_ma: memory address register of the microprogrammed SIC.
//
// Takes the low 13 bits of the 19-bit O bus on the falling edge of `clk`
// while `en` is high and always drives the memory address bus.  This follows
// the SIC MA definition; the reset is this design's addition.
module sic_c_reg_ma (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [18:0] in,
  output logic [12:0] out
);
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n)  out <= '0;
    else if (en) out <= in[12:0];
endmodule
