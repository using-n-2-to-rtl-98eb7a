// tb_sic_c_reg_md: random test of the memory data register with its two
// inputs (O bus has priority) and two bus outputs.
`timescale 1ns/1ps
module tb_sic_c_reg_md;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0, en1 = 0, en2 = 0, oe1 = 0, oe2 = 0;
  logic [17:0] in1 = '0, in2 = '0, out1, out2, q, m;
  always #50 clk = ~clk;
  sic_c_reg_md dut (.clk, .rst_n, .en1, .en2, .oe1, .oe2, .in1, .in2, .out1, .out2, .q);
  initial begin
    #120 check("reset", q, 0);
    rst_n = 1; m = '0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #5;
      en1 = 1'($urandom); en2 = 1'($urandom); oe1 = 1'($urandom); oe2 = 1'($urandom);
      in1 = 18'($urandom); in2 = 18'($urandom);
      @(negedge clk);
      if (en1) m = in1; else if (en2) m = in2;
      #5;
      check("q", q, m);
      check("out1", out1, oe1 ? m : 18'h0);
      check("out2", out2, oe2 ? m : 18'h0);
    end
    finish_tb();
  end
endmodule
