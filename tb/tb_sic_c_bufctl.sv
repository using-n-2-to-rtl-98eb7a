// tb_sic_c_bufctl: random test of the buffer-channel registers (BCR, BIOR,
// CC) and of the BUFRDY line of the selected channel.
`timescale 1ns/1ps
module tb_sic_c_bufctl;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  logic [3:0] bcrdy = '0, bufrdy;
  logic bior_set = 0, bcr_clr = 0, bcr_set = 0, bufrdy_c = 0, cc_inc = 0;
  logic bcr_any, bcr_cc, bior_cc;
  logic [1:0] cc;
  sic_c_bufctl dut (.clk, .rst_n, .bcrdy, .bior_set, .bcr_clr, .bcr_set, .bufrdy_c,
                    .cc_inc, .bufrdy, .bcr_any, .bcr_cc, .bior_cc, .cc);
  logic [3:0] m_bcr = 0, m_bior = 0, m_q = 0;
  logic [1:0] m_cc = 0;
  initial begin
    #120 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk); #5;
      bcrdy = 4'($urandom) & 4'($urandom);
      {bior_set, bcr_clr, bcr_set, bufrdy_c, cc_inc} = 5'($urandom) & 5'($urandom);
      #1 check("bufrdy", bufrdy, bufrdy_c ? 4'(1) << m_cc : 4'h0);
      @(negedge clk);
      m_bcr = m_bcr | (bcrdy & ~m_q);
      if (bcr_set) m_bcr[m_cc] = 1;
      if (bcr_clr) m_bcr[m_cc] = 0;
      m_q = bcrdy;
      if (bior_set) m_bior[m_cc] = 1;
      if (cc_inc) m_cc = m_cc + 1'b1;
      #5;
      check("cc", cc, m_cc);
      check("bcr_any", bcr_any, |m_bcr);
      check("bcr_cc", bcr_cc, m_bcr[m_cc]);
      check("bior_cc", bior_cc, m_bior[m_cc]);
    end
    finish_tb();
  end
endmodule
