// tb_sic_c_reg_ma: random test of the memory address register: takes the
// low 13 bits of the O bus on the falling edge when enabled.
`timescale 1ns/1ps
module tb_sic_c_reg_ma;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0, en = 0;
  logic [18:0] in = '0;
  logic [12:0] out, m;
  always #50 clk = ~clk;
  sic_c_reg_ma dut (.clk, .rst_n, .en, .in, .out);
  initial begin
    #120 check("reset", out, 0);
    rst_n = 1; m = '0;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #5;
      en = 1'($urandom); in = 19'($urandom);
      @(negedge clk); if (en) m = in[12:0];
      #5 check("ma", out, m);
    end
    finish_tb();
  end
endmodule
