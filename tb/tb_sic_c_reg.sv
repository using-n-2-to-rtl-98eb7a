// tb_sic_c_reg: random test of the general register: loads on the falling
// edge when enabled, holds otherwise, drives `out` only while `oe` is high.
`timescale 1ns/1ps
module tb_sic_c_reg;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0, en = 0, oe = 0;
  logic [17:0] in = '0, out, q, model;
  always #50 clk = ~clk;
  sic_c_reg #(.W(18)) dut (.clk, .rst_n, .en, .oe, .in, .out, .q);
  initial begin
    #120 check("reset", q, 0);
    rst_n = 1; model = '0;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #5;
      en = 1'($urandom); oe = 1'($urandom); in = 18'($urandom);
      @(negedge clk); if (en) model = in;
      #5;
      check("q", q, model);
      check("out", out, oe ? model : 18'h0);
    end
    finish_tb();
  end
endmodule
