// tb_sic_c_reg_ir: random test of the instruction register: full load,
// address-part load, bus drive and the decoded condition bits.
`timescale 1ns/1ps
module tb_sic_c_reg_ir;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0, en1 = 0, en2 = 0, oe = 0;
  logic [17:0] in = '0, out, cont, q, m;
  always #50 clk = ~clk;
  sic_c_reg_ir dut (.clk, .rst_n, .en1, .en2, .oe, .in, .out, .cont, .q);
  initial begin
    #120 check("reset", q, 0);
    rst_n = 1; m = '0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #5;
      en1 = 1'($urandom); en2 = 1'($urandom); oe = 1'($urandom); in = 18'($urandom);
      @(negedge clk);
      if (en1) m = in; else if (en2) m[12:0] = in[12:0];
      #5;
      check("q", q, m);
      check("out", out, oe ? m : 18'h0);
      check("cont", cont, {m[17:2], m[17] & m[16], m[17] & m[16] & m[15]});
    end
    finish_tb();
  end
endmodule
