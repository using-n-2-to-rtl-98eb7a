// tb_sic_b_cpu: self-checking test of the pin-level SIC processor.
//
// The testbench models the program memory (combinational read, write on the
// clock edge) and plays an I/O device and a buffered device by hand through
// the handshake lines.  Four programs run in turn from one memory image:
//   1. every MRI instruction and addressing mode and the OPERATE events;
//      results and the exact number of clocks are checked against values
//      worked out by hand from the one-transfer-per-clock sequences;
//   2. an interrupt on line 2 is taken through vector 12;
//   3. output, input and status-skip I/O with the testbench device;
//   4. buffered input on channel 1 (two words) and output on channel 0.
`timescale 1ns/1ps
module tb_sic_b_cpu;
  import sic_pkg::*;
  `include "sic_asm.svh"

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #100 clk = ~clk;

  logic [7:0]  intline = '0;
  logic [3:0]  bcrdy = '0, bufrdy;
  logic        bufend, csrdy;
  logic        ready_o, dv_o, acc_o;
  logic        tb_ready = 0, tb_dv = 0, tb_acc = 0;
  word_t       iobus_o, tb_iobus = '0, mem_out;
  logic [11:0] csbus_o, tb_csbus = '0;
  addr_t       mabus;
  logic        mwrite, menable, running;
  word_t       ac;
  addr_t       pc, ia, ib;
  logic        lf, enif;

  word_t mem [8192];
  always @(posedge clk) if (menable && mwrite) mem[mabus] <= iobus_o;
  assign mem_out = (menable && !mwrite) ? mem[mabus] : '0;

  wire         ready = ready_o | tb_ready;
  wire         dv    = dv_o | tb_dv;
  wire         acc   = acc_o | tb_acc;
  wire word_t  iobus = iobus_o | mem_out | tb_iobus;
  wire [11:0]  csbus = csbus_o | tb_csbus;

  sic_b_cpu dut (
    .clk, .rst_n, .start, .intline, .bcrdy, .bufrdy, .bufend, .csrdy,
    .ready_i(ready), .ready_o, .datavalid_i(dv), .datavalid_o(dv_o),
    .accept_i(acc), .accept_o(acc_o), .iobus_i(iobus), .iobus_o,
    .csbus_i(csbus), .csbus_o, .mabus, .mwrite, .menable,
    .running, .ac_o(ac), .pc_o(pc), .ia_o(ia), .ib_o(ib), .lf_o(lf), .enif_o(enif)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bufrdy_seen = 0, bufend_seen = 0;
  always @(posedge clk) begin
    if (|bufrdy) bufrdy_seen++;
    if (bufend)  bufend_seen++;
  end

  // ---- device tasks
  task automatic dev_cs(output logic [11:0] cmd);
    while (!csrdy) @(posedge clk);
    cmd = csbus;
    #1 tb_acc = 1;
    @(posedge clk); #1 tb_acc = 0;
  endtask
  task automatic dev_recv(output word_t d);
    #1 tb_ready = 1;
    do @(posedge clk); while (!dv);
    d = iobus;
    #1 tb_acc = 1;
    do @(posedge clk); while (dv);
    #1 tb_acc = 0; tb_ready = 0;
  endtask
  task automatic dev_send(input word_t d, input logic stat);
    do @(posedge clk); while (!ready);
    #1 if (stat) tb_csbus = d[11:0]; else tb_iobus = d;
    @(posedge clk); #1 tb_dv = 1;
    do @(posedge clk); while (!acc);
    #1 tb_dv = 0; tb_iobus = '0; tb_csbus = '0;
  endtask

  int run_cycles = 0;
  always @(posedge clk) if (running) run_cycles++;
  task automatic run_to_halt(output int n);
    int n0;
    @(posedge clk); #1 start = 1;
    n0 = run_cycles;
    @(posedge clk); #1 start = 0;
    while (running) @(posedge clk);
    #1 n = run_cycles - n0;
  endtask

  int a, ncyc;
  logic [11:0] cmd;
  word_t d;

  initial begin
    for (int i = 0; i < 8192; i++) mem[i] = '0;
    // ---------------- program 1 at 64
    mem[0] = mri(OP_JMP, AM_DIRECT, 64);
    a = 64;
    mem[a++] = mri(OP_LAC, AM_DIRECT, 100);     // AC=5
    mem[a++] = mri(OP_TAD, AM_DIRECT, 101);     // AC=12
    mem[a++] = mri(OP_DAC, AM_DIRECT, 102);     // M102=12
    mem[a++] = mri(OP_AND, AM_DIRECT, 103);     // AC=12&6=4
    mem[a++] = opr(14'h0040);                   // DTA: IA=4
    mem[a++] = mri(OP_LAC, AM_INDEX_A, 100);    // AC=M104=9
    mem[a++] = mri(OP_DAC, AM_INDIRECT, 105);   // M110=9
    mem[a++] = mri(OP_ISZ, AM_DIRECT, 106);     // M106 -> 0, skip
    mem[a++] = opr(14'h0C00);                   // HLT (skipped)
    mem[a++] = opr(14'h0300);                   // CMA: AC=3FFF6
    mem[a++] = opr(14'h1000);                   // RAL: AC=3FFEC lf=1
    mem[a++] = opr(14'h0010);                   // SZL: no skip
    mem[a++] = opr(14'h0800);                   // CLL
    mem[a++] = opr(14'h0010);                   // SZL: skip
    mem[a++] = opr(14'h0C00);                   // HLT (skipped)
    mem[a++] = mri(OP_JMS, AM_DIRECT, 200);     // M200=ret, go 201
    mem[a++] = opr(14'h0202);                   // CLA, SKZ: skip
    mem[a++] = opr(14'h0C00);                   // HLT (skipped)
    mem[a++] = opr(14'h0104);                   // STA, skip if AC<0
    mem[a++] = opr(14'h0C00);                   // HLT (skipped)
    mem[a++] = opr(14'h0020);                   // DFA: AC=4
    mem[a++] = opr(14'h3000);                   // RAR: AC=2 lf=0
    mem[a++] = mri(OP_DAC, AM_DIRECT, 103);     // M103=2
    mem[a++] = opr(14'h0C00);                   // HLT -> PC=88
    mem[100] = 5; mem[101] = 7; mem[103] = 6; mem[104] = 9; mem[105] = 110;
    mem[106] = 18'h3FFFF;
    mem[201] = opr(14'h0070);                   // INB
    mem[202] = mri(OP_JMP, AM_INDIRECT, 200);
    // ---------------- program 2 at 88: interrupts
    mem[88] = intcmd(INT_LMI, 8'h04);
    mem[89] = intcmd(INT_EAI, 8'h00);
    mem[90] = mri(OP_TAD, AM_DIRECT, 101);
    mem[91] = mri(OP_JMP, AM_DIRECT, 90);
    mem[13] = intcmd(INT_CLI, 8'h04);          // handler at vector 12 + 1
    mem[14] = mri(OP_DAC, AM_DIRECT, 120);
    mem[15] = opr(14'h0C00);
    // ---------------- program 3 at 140: I/O
    mem[16]  = mri(OP_JMP, AM_DIRECT, 140);
    mem[140] = mri(OP_LAC, AM_DIRECT, 101);     // AC=7
    mem[141] = iocmd(3'd3, 2'd0, 1'b0, 6'h00);  // OD3
    mem[142] = iocmd(3'd3, 2'd0, 1'b1, 6'h00);  // ID3
    mem[143] = mri(OP_DAC, AM_DIRECT, 121);
    mem[144] = iocmd(3'd3, 2'd1, 1'b1, 6'h01);  // IS3, skip if status bit 0
    mem[145] = opr(14'h0C00);                   // skipped
    mem[146] = iocmd(3'd1, 2'd2, 1'b1, 6'h00);  // IB1: channel 1 input
    mem[147] = mri(OP_JMP, AM_DIRECT, 147);
    // buffer descriptors
    mem[34] = 18'h01FFE; mem[35] = 400;         // ch1: -2 words, base 400
    mem[32] = 18'h01FFF; mem[33] = 501;         // ch0: -1 word, base 501
    mem[500] = 18'h00777;

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- program 1
    run_to_halt(ncyc);
    check("cycles program 1", ncyc, 148);
    check("M102", mem[102], 12);
    check("M110", mem[110], 9);
    check("M106", mem[106], 0);
    check("M200", mem[200], 80);
    check("M103", mem[103], 2);
    check("AC", ac, 2);
    check("IA", ia, 4);
    check("IB", ib, 1);
    check("lf", lf, 0);
    check("PC", pc, 88);

    // ---- program 2: interrupt
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    repeat (40) @(posedge clk);
    check("enif set", enif, 1);
    #1 intline[2] = 1;
    @(posedge clk); #1 intline[2] = 0;
    while (running) @(posedge clk);
    check("PC after handler", pc, 16);
    check("return address", (mem[12] == 90 || mem[12] == 91), 1);
    check("enif cleared", enif, 0);
    check("saved AC", mem[120], ac);
    check("AC grew", ac > 2, 1);

    // ---- program 3: I/O and buffers
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    dev_cs(cmd);  check("OD command", cmd, {3'd3, 2'd0, 1'b0, 6'h00});
    dev_recv(d);  check("OD data", d, 7);
    dev_cs(cmd);  check("ID command", cmd, {3'd3, 2'd0, 1'b1, 6'h00});
    dev_send(18'h01234, 1'b0);
    dev_cs(cmd);  check("IS command", cmd, {3'd3, 2'd1, 1'b1, 6'h01});
    dev_send(18'h00001, 1'b1);
    dev_cs(cmd);  check("IB command", cmd, {3'd1, 2'd2, 1'b1, 6'h00});
    repeat (10) @(posedge clk);
    check("M121", mem[121], 18'h01234);
    check("skip taken", running, 1);
    // buffered input, channel 1, two requests
    #1 bcrdy[1] = 1; @(posedge clk); #1 bcrdy[1] = 0;
    dev_send(18'h00ABC, 1'b0);
    repeat (10) @(posedge clk);
    check("buffer word 1", mem[398], 18'h00ABC);
    check("count written back", mem[34], 18'h01FFF);
    check("bufrdy seen", bufrdy_seen > 0, 1);
    check("no bufend yet", bufend_seen, 0);
    #1 bcrdy[1] = 1; @(posedge clk); #1 bcrdy[1] = 0;
    dev_send(18'h00DEF, 1'b0);
    repeat (10) @(posedge clk);
    check("buffer word 2", mem[399], 18'h00DEF);
    check("bufend seen", bufend_seen, 1);
    // buffered output, channel 0
    #1 bcrdy[0] = 1; @(posedge clk); #1 bcrdy[0] = 0;
    dev_recv(d);
    check("buffer output word", d, 18'h00777);
    repeat (10) @(posedge clk);
    check("bufend seen twice", bufend_seen, 2);
    check("still looping", running, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
