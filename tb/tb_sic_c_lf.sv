// tb_sic_c_lf: random test of the link flag and the priority of its four
// controls (load O[18], load O[0], set, clear).
`timescale 1ns/1ps
module tb_sic_c_lf;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0, in1 = 0, in2 = 0, out, m;
  logic [3:0] c = '0;
  always #50 clk = ~clk;
  sic_c_lf dut (.clk, .rst_n, .c, .in1, .in2, .out);
  initial begin
    #120 check("reset", out, 0);
    rst_n = 1; m = 0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #5;
      c = 4'($urandom); in1 = 1'($urandom); in2 = 1'($urandom);
      @(negedge clk);
      if (c[3]) m = in2; else if (c[2]) m = in1; else if (c[1]) m = 1; else if (c[0]) m = 0;
      #5 check("lf", out, m);
    end
    finish_tb();
  end
endmodule
