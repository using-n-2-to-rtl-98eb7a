// tb_sic_c_iohandle: random test of the I/O handler against a reference
// model of its registers (MR, INTR, CSR, intf, enif, datavalid) and its
// combinational bus and handshake outputs.
`timescale 1ns/1ps
module tb_sic_c_iohandle;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  logic [7:0]  intline = '0;
  logic [11:0] in = '0, csbus_i = '0, csbus_o, csr;
  logic csrdy, acc, dv, rdy, intf, enif;
  logic [7:0] mr, intr;
  logic [12:0] s = '0;   // strobes
  sic_c_iohandle dut (
    .clk, .rst_n, .intline, .in, .csbus_i, .csbus_o, .csrdy,
    .accept_o(acc), .datavalid_o(dv), .ready_o(rdy),
    .clr_intf(s[0]), .clr_enif(s[1]), .set_enif(s[2]), .upd_intf(s[3]),
    .load_mr(s[4]), .and_intr(s[5]), .load_csr(s[6]), .cap_csr(s[7]),
    .drive_cs(s[8]), .accept_c(s[9]), .dv_set(s[10]), .dv_clr(s[11]), .ready_c(s[12]),
    .intf, .enif, .csr, .mr, .intr
  );
  logic [7:0] m_mr = 0, m_intr = 0, m_il = 0;
  logic [11:0] m_csr = 0;
  logic m_intf = 0, m_enif = 0, m_dv = 0;
  int intf_seen = 0;
  initial begin
    #120 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk); #5;
      s = 13'($urandom) & 13'($urandom);   // sparse strobes
      intline = 8'($urandom) & 8'($urandom) & 8'($urandom);
      in = 12'($urandom); csbus_i = 12'($urandom);
      #1;
      check("csbus", csbus_o, s[8] ? m_csr : 12'h0);
      check("csrdy", csrdy, s[8]);
      check("accept", acc, s[9]);
      check("ready", rdy, s[12]);
      @(negedge clk);
      // every register samples the values from before the edge
      if (s[0]) m_intf = 0; else if (s[3]) m_intf = (|(m_intr & m_mr)) && m_enif;
      m_intr = (s[5] ? (m_intr & in[7:0]) : m_intr) | (intline & ~m_il);
      m_il = intline;
      if (s[4]) m_mr = in[7:0];
      if (s[6]) m_csr = in; else if (s[7]) m_csr = csbus_i;
      if (s[1]) m_enif = 0; else if (s[2]) m_enif = 1;
      if (s[10]) m_dv = 1; else if (s[11]) m_dv = 0;
      #5;
      check("mr", mr, m_mr); check("intr", intr, m_intr); check("csr", csr, m_csr);
      check("intf", intf, m_intf); check("enif", enif, m_enif); check("dv", dv, m_dv);
      if (intf) intf_seen++;
    end
    check("interrupt flag raised", intf_seen > 0, 1);
    finish_tb();
  end
endmodule
