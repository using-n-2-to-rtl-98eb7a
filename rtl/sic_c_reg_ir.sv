// sic_c_reg_ir: instruction register of the microprogrammed SIC.
//
// Loads all 18 bits from the O bus (en1) or only the 13-bit address part
// (en2) on the falling edge of `clk`, drives the A bus while `oe` is high
// and presents its contents (q) and decoded bits for the condition
// multiplexer:
//   cont[x] = IR[x] for x = 2..17,  cont[1] = IR17 & IR16,
//   cont[0] = IR17 & IR16 & IR15 (opcode 7: operate, I/O or interrupt).
// The two load enables and the decoded outputs follow the SIC IR definition;
// the reset is this design's addition.
module sic_c_reg_ir (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en1,
  input  logic        en2,
  input  logic        oe,
  input  logic [17:0] in,
  output logic [17:0] out,
  output logic [17:0] cont,
  output logic [17:0] q
);
  logic [17:0] r;
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n)   r <= '0;
    else if (en1) r <= in;
    else if (en2) r[12:0] <= in[12:0];
  assign q    = r;
  assign out  = oe ? r : '0;
  assign cont = {r[17:2], r[17] & r[16], r[17] & r[16] & r[15]};
endmodule
