// tb_sic_a_cpu: self-checking test of the instruction-level SIC model.
// A program uses every memory-reference instruction and address type and
// every operate instruction; the test checks memory, registers, the number
// of executed instructions and that every skip skipped its halt.
`timescale 1ns/1ps
module tb_sic_a_cpu;
  import sic_pkg::*;
  `include "sic_asm.svh"
  `include "tb_util.svh"

  logic clk = 0, rst_n = 0, start = 0, running, lf;
  word_t ac;
  addr_t pc, ia, ib;
  logic [31:0] n;
  always #50 clk = ~clk;
  sic_a_cpu dut (.clk, .rst_n, .start, .running, .ac, .pc, .ia, .ib, .lf, .instr_count(n));

  function automatic word_t op_a(input logic [13:0] code);
    return {3'd7, 1'b0, code};
  endfunction
  localparam word_t HLT = 18'h38C00;

  int a;
  initial begin
    for (int i = 0; i < 8192; i++) dut.mem[i] = '0;
    a = 0;
    dut.mem[a++] = mri(OP_LAC, AM_DIRECT, 100);   // 0  AC=5
    dut.mem[a++] = mri(OP_TAD, AM_DIRECT, 101);   // 1  AC=12
    dut.mem[a++] = mri(OP_DAC, AM_DIRECT, 102);   // 2  M102=12
    dut.mem[a++] = mri(OP_AND, AM_DIRECT, 103);   // 3  AC=4
    dut.mem[a++] = op_a(14'h0040);                // 4  DTA IA=4
    dut.mem[a++] = mri(OP_LAC, AM_INDEX_A, 100);  // 5  AC=M104=9
    dut.mem[a++] = mri(OP_DAC, AM_INDIRECT, 105); // 6  M110=9
    dut.mem[a++] = mri(OP_ISZ, AM_DIRECT, 106);   // 7  skip
    dut.mem[a++] = HLT;                           // 8
    dut.mem[a++] = op_a(14'h0300);                // 9  CMA AC=3FFF6
    dut.mem[a++] = op_a(14'h2000);                // 10 RAL AC=3FFEC lf=1
    dut.mem[a++] = op_a(14'h0010);                // 11 SZL no skip
    dut.mem[a++] = op_a(14'h0800);                // 12 CLL
    dut.mem[a++] = op_a(14'h0010);                // 13 SZL skip
    dut.mem[a++] = HLT;                           // 14
    dut.mem[a++] = mri(OP_JMS, AM_DIRECT, 200);   // 15 M200=16
    dut.mem[a++] = op_a(14'h0200);                // 16 CLA
    dut.mem[a++] = op_a(14'h0002);                // 17 SKZ skip
    dut.mem[a++] = HLT;                           // 18
    dut.mem[a++] = op_a(14'h0003);                // 19 SKP skip (AC=0)
    dut.mem[a++] = HLT;                           // 20
    dut.mem[a++] = op_a(14'h0100);                // 21 STA
    dut.mem[a++] = op_a(14'h0003);                // 22 SKP no skip
    dut.mem[a++] = op_a(14'h0400);                // 23 STL
    dut.mem[a++] = op_a(14'h0020);                // 24 DFA AC=4
    dut.mem[a++] = op_a(14'h3000);                // 25 RAR AC=20002 lf=0
    dut.mem[a++] = mri(OP_DAC, AM_INDEX_B, 102);  // 26 M(102+IB=103)=20002
    dut.mem[a++] = op_a(14'h0060);                // 27 DTB IB=2
    dut.mem[a++] = op_a(14'h0050);                // 28 INA IA=5
    dut.mem[a++] = op_a(14'h0030);                // 29 DFB AC=2
    dut.mem[a++] = op_a(14'h0000);                // 30 NOP
    dut.mem[a++] = mri(OP_JMP, AM_DIRECT, 40);    // 31
    dut.mem[40]  = HLT;                           // 40
    dut.mem[100] = 5; dut.mem[101] = 7; dut.mem[103] = 6; dut.mem[104] = 9;
    dut.mem[105] = 110; dut.mem[106] = 18'h3FFFF;
    dut.mem[201] = op_a(14'h0070);                // INB IB=1
    dut.mem[202] = mri(OP_JMP, AM_INDIRECT, 200);
    #120 rst_n = 1;
    @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
    while (running) @(posedge clk);
    check("PC after HLT", pc, 41);
    check("instructions", n, 31);
    check("M102", dut.mem[102], 12);
    check("M110", dut.mem[110], 9);
    check("M106", dut.mem[106], 0);
    check("M200", dut.mem[200], 16);
    check("M103", dut.mem[103], 18'h20002);
    check("AC", ac, 2);
    check("IA", ia, 5);
    check("IB", ib, 2);
    check("lf", lf, 0);
    finish_tb();
  end
endmodule
