// tb_sic_c_ccgen: random test of the condition multiplexer:
// cc = invert ^ (A[selA] | B[selB]).
`timescale 1ns/1ps
module tb_sic_c_ccgen;
  `include "tb_util.svh"
  logic [7:0]  ina;
  logic [31:0] inb;
  logic [11:0] cond;
  logic        cc;
  sic_c_ccgen dut (.ina, .inb, .cond, .cc);
  initial begin
    for (int i = 0; i < 3000; i++) begin
      ina = 8'($urandom); inb = $urandom; cond = 12'($urandom);
      #1 check("cc", cc, cond[8] ^ (ina[cond[2:0]] | inb[cond[7:3]]));
    end
    // one-hot sweeps: only the selected bit matters
    for (int s = 0; s < 32; s++) begin
      ina = '0; inb = 32'(1) << s; cond = {4'b0, 5'(s), 3'd0};
      #1 check("b select", cc, 1);
      cond[8] = 1; #1 check("b select inverted", cc, 0);
      cond = {4'b0, 5'((s + 1) % 32), 3'd0}; #1 check("b other", cc, 0);
    end
    for (int s = 0; s < 8; s++) begin
      inb = '0; ina = 8'(1) << s; cond = {4'b0, 5'd0, 3'(s)};
      #1 check("a select", cc, 1);
      cond[2:0] = 3'((s + 1) % 8); #1 check("a other", cc, 0);
    end
    finish_tb();
  end
endmodule
