// tb_sic_c_pipe: the pipeline register takes a new microword on every
// rising edge and holds it through the falling edge.
`timescale 1ns/1ps
module tb_sic_c_pipe;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0;
  logic [47:0] in = '0, out, m;
  always #50 clk = ~clk;
  sic_c_pipe dut (.clk, .rst_n, .in, .out);
  initial begin
    #120 check("reset", out, 0);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); #5 in = {16'($urandom), $urandom};
      @(posedge clk); m = in; #5 check("rise", out, m);
      in = ~in;
      @(negedge clk); #5 check("hold", out, m);
    end
    finish_tb();
  end
endmodule
