// sic_c_alu: arithmetic-logic unit of the microprogrammed SIC datapath.
//
// Combinational.  Inputs are the 18-bit A and B buses and the link flag; the
// 19-bit result goes on the O bus, whose bit 18 is the carry of an add or the
// bit rotated out of a rotate.  Function codes (alu_func, microword bits
// 11:9) and their results follow the SIC ALU definition:
//   0 A   1 B   2 not A   3 not B      (bit 18 = 0)
//   4 A + B with carry   5 A and B
//   6 rotate left  = {A, lf}   (bit 18 = A[17], bits 0 = lf)
//   7 rotate right = {lf, A}   (bit 18 = lf; the AC takes bits 18:1 and the
//                               link takes bit 0)
module sic_c_alu (
  input  logic [2:0]  alu_func,
  input  logic [17:0] ina,
  input  logic [17:0] inb,
  input  logic        lf,
  output logic [18:0] out
);
  always_comb begin
    unique case (alu_func)
      3'd0: out = {1'b0, ina};
      3'd1: out = {1'b0, inb};
      3'd2: out = {1'b0, ~ina};
      3'd3: out = {1'b0, ~inb};
      3'd4: out = {1'b0, ina} + {1'b0, inb};
      3'd5: out = {1'b0, ina & inb};
      3'd6: out = {ina, lf};
      default: out = {lf, ina};
    endcase
  end
endmodule
