// tb_sic_c_urom: the microprogram ROM returns the microprogram at every
// address; spot checks of the fetch routine and of the halt loop.
`timescale 1ns/1ps
module tb_sic_c_urom;
  import sic_c_ucode_pkg::*;
  `include "tb_util.svh"
  logic [8:0]  addr;
  logic [47:0] data;
  int nonzero = 0;
  sic_c_urom dut (.addr, .data);
  initial begin
    for (int i = 0; i < 512; i++) begin
      addr = 9'(i);
      #1 check("word", data, ucode(addr));
      if (data != 0) nonzero++;
    end
    check("program present", nonzero > 80, 1);
    addr = 0;   #1 check("fetch: PC to MA", {data[23:18], data[17:12], data[11:9]}, {3'd0, 3'd7, 6'd12, 3'd1});
    addr = 511; #1 check("halt loop", data, {9'd511, 39'd0});
    finish_tb();
  end
endmodule
