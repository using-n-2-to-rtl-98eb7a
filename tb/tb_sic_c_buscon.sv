// tb_sic_c_buscon: exhaustive test of the bus-control decoder: every code
// of each field selects exactly its own bit; O codes above 15 select none.
`timescale 1ns/1ps
module tb_sic_c_buscon;
  `include "tb_util.svh"
  logic [2:0] c1, c2;
  logic [5:0] c3;
  logic [7:0] a, b;
  logic [15:0] o;
  sic_c_buscon dut (.con1(c1), .con2(c2), .con3(c3), .a_con(a), .b_con(b), .o_con(o));
  initial begin
    for (int i = 0; i < 64; i++) begin
      c1 = 3'(i); c2 = 3'(7 - i % 8); c3 = 6'(i);
      #1;
      check("a", a, 8'(1) << c1);
      check("b", b, 8'(1) << c2);
      check("o", o, (i < 16) ? 16'(1) << i : 16'h0);
    end
    finish_tb();
  end
endmodule
