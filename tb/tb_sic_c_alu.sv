// tb_sic_c_alu: random and corner-case test of the Class C ALU against a
// reference model of its eight functions.
`timescale 1ns/1ps
module tb_sic_c_alu;
  `include "tb_util.svh"
  logic [2:0]  f;
  logic [17:0] a, b;
  logic        lf;
  logic [18:0] out, exp;
  sic_c_alu dut (.alu_func(f), .ina(a), .inb(b), .lf, .out);
  function automatic logic [18:0] model(logic [2:0] f, logic [17:0] a, logic [17:0] b, logic l);
    case (f)
      0: return {1'b0, a};
      1: return {1'b0, b};
      2: return {1'b0, ~a};
      3: return {1'b0, ~b};
      4: return 19'(a) + 19'(b);
      5: return {1'b0, a & b};
      6: return {a[17:0], l};
      default: return {l, a};
    endcase
  endfunction
  initial begin
    for (int i = 0; i < 4000; i++) begin
      f = 3'(i % 8);
      a = (i < 64) ? ((i & 8) ? '1 : 18'd0) : 18'($urandom);
      b = (i < 64) ? ((i & 16) ? '1 : 18'd1) : 18'($urandom);
      lf = 1'($urandom);
      #1 check($sformatf("f%0d a%0h b%0h", f, a, b), out, model(f, a, b, lf));
    end
    // carry out of the adder
    f = 4; a = '1; b = 1; #1 check("carry", out, 19'h40000);
    finish_tb();
  end
endmodule
