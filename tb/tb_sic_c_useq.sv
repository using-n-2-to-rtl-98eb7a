// tb_sic_c_useq: the micro sequencer steps by one, or loads the next-address
// field when the branch condition holds, on each falling edge.
`timescale 1ns/1ps
module tb_sic_c_useq;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0, branch = 0;
  logic [8:0] in = '0, out, m;
  always #50 clk = ~clk;
  sic_c_useq #(.ADDR_W(9)) dut (.clk, .rst_n, .in, .branch, .out);
  initial begin
    #120 check("reset", out, 0);
    rst_n = 1; m = 0;
    for (int i = 0; i < 800; i++) begin
      @(posedge clk); #5 branch = ($urandom % 4) == 0; in = 9'($urandom);
      @(negedge clk); m = branch ? in : m + 1'b1;
      #5 check("uaddr", out, m);
    end
    finish_tb();
  end
endmodule
