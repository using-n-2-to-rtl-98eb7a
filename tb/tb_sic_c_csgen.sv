// tb_sic_c_csgen: exhaustive test of the control-signal generator.
`timescale 1ns/1ps
module tb_sic_c_csgen;
  `include "tb_util.svh"
  logic [8:0]  cont;
  logic [15:0] outa, outb, ea;
  sic_c_csgen dut (.cont, .outa, .outb);
  initial begin
    for (int i = 0; i < 512; i++) begin
      cont = 9'(i);
      #1;
      ea = 16'(1) << cont[3:0];
      if (cont[3:0] == 1) ea[2] = 1'b1;
      check("outa", outa, ea);
      check("outb", outb, 16'(1) << cont[7:4]);
    end
    finish_tb();
  end
endmodule
