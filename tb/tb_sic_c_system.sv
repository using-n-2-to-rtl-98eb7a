// tb_sic_c_system: self-checking test of the microprogrammed SIC.
//
// Loads a program into the system's memory that uses every memory-reference
// instruction, every address type and the operate events (link and AC
// operations, rotates both ways, index-register transfers, SZL and the
// compare skips, a skipped halt after ISZ), runs it until the microprogram
// reaches its halt loop and checks memory, AC, PC, IA, IB and the link.  It
// also checks that the micro sequencer both branched and stepped.  A second
// program, after a reset, sends an operand twice to the multiplier device,
// reads the product back, tests its status with IS (the device answers only
// when done, so no skip), enables interrupts, loads the interrupt mask,
// reads it back with LAM, clears four of its bits with MII and halts.  The device command
// time is lengthened to 40 clocks so that the second command finds it busy
// and the processor must wait.  A third program, after another reset,
// enables interrupt line 2, sets channel 0 to input with IB, and loops
// adding to AC.  The testbench, acting as the buffered device, requests
// two words on channel 0 (each is stored at end address + count, the count
// is written back after the first, BUFEND follows the second), then takes
// one output word on channel 1, whose direction bit stays 0, and raises
// line 2.  The handler at vector 12 + 1 clears the request, stores AC and
// halts; the return address saved at 12 and the cleared enif are checked.
`timescale 1ns/1ps
module tb_sic_c_system;
  import sic_pkg::*;
  `include "sic_asm.svh"

  logic clk = 1'b0, rst_n = 1'b0;
  always #100 clk = ~clk;

  logic [3:0] bufrdy;
  logic       bufend, csrdy, ready, datavalid, accept, mwrite, menable, lf, enif, io_busy;
  word_t      iobus, ac;
  logic [11:0] csbus;
  addr_t      mabus, pc, ia, ib;
  logic [8:0] uaddr;

  logic [7:0] intline = '0;
  logic [3:0] bcrdy = '0;
  word_t      ext_iobus = '0;
  logic       ext_dv = 1'b0, ext_rdy = 1'b0;
  // the testbench plays device 2: it accepts every command sent to it
  wire        ext_acc = (csrdy && csbus[11:9] == 3'd2) || ext_acc_d;
  logic       ext_acc_d = 1'b0;

  sic_c_system #(.CMD_CYCLES(40)) dut (
    .clk, .rst_n, .intline, .bcrdy, .bufrdy, .bufend,
    .ext_iobus, .ext_csbus('0), .ext_ready(ext_rdy), .ext_datavalid(ext_dv),
    .ext_accept(ext_acc), .iobus, .csbus, .csrdy, .ready, .datavalid, .accept,
    .mabus, .mwrite, .menable, .uaddr, .ac, .pc, .ia, .ib, .lf, .enif, .io_busy
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int branches = 0, steps = 0;
  logic [8:0] last_ua = '0;
  always @(negedge clk) begin
    #1;
    if (rst_n) begin
      if (uaddr == last_ua + 1'b1) steps++; else branches++;
    end
    last_ua = uaddr;
  end

  int a;
  initial begin
    for (int i = 0; i < 8192; i++) dut.u_ram.mem[i] = '0;
    dut.u_ram.mem[0] = mri(OP_JMP, AM_DIRECT, 64);
    a = 64;
    dut.u_ram.mem[a++] = mri(OP_LAC, AM_DIRECT, 100);     // AC=5
    dut.u_ram.mem[a++] = mri(OP_TAD, AM_DIRECT, 101);     // AC=12
    dut.u_ram.mem[a++] = mri(OP_DAC, AM_DIRECT, 102);     // M102=12
    dut.u_ram.mem[a++] = mri(OP_AND, AM_DIRECT, 103);     // AC=4
    dut.u_ram.mem[a++] = opr(14'h0040);                   // DTA: IA=4
    dut.u_ram.mem[a++] = mri(OP_LAC, AM_INDEX_A, 100);    // AC=M104=9
    dut.u_ram.mem[a++] = mri(OP_DAC, AM_INDIRECT, 105);   // M110=9
    dut.u_ram.mem[a++] = mri(OP_ISZ, AM_DIRECT, 106);     // M106 -> 0, skip
    dut.u_ram.mem[a++] = opr(14'h0C00);                   // HLT (skipped)
    dut.u_ram.mem[a++] = opr(14'h0300);                   // CMA
    dut.u_ram.mem[a++] = opr(14'h1000);                   // RAL, lf=1
    dut.u_ram.mem[a++] = opr(14'h0010);                   // SZL: no skip
    dut.u_ram.mem[a++] = opr(14'h0800);                   // CLL
    dut.u_ram.mem[a++] = opr(14'h0010);                   // SZL: skip
    dut.u_ram.mem[a++] = opr(14'h0C00);                   // HLT (skipped)
    dut.u_ram.mem[a++] = mri(OP_JMS, AM_DIRECT, 200);     // M200=80
    dut.u_ram.mem[a++] = opr(14'h0202);                   // CLA, skip if 0
    dut.u_ram.mem[a++] = opr(14'h0C00);                   // HLT (skipped)
    dut.u_ram.mem[a++] = opr(14'h0104);                   // STA, skip if <0
    dut.u_ram.mem[a++] = opr(14'h0C00);                   // HLT (skipped)
    dut.u_ram.mem[a++] = opr(14'h0020);                   // DFA: AC=4
    dut.u_ram.mem[a++] = opr(14'h3000);                   // RAR: AC=2, lf=0
    dut.u_ram.mem[a++] = mri(OP_DAC, AM_DIRECT, 103);     // M103=2
    dut.u_ram.mem[a++] = opr(14'h0C00);                   // HLT
    dut.u_ram.mem[100] = 5; dut.u_ram.mem[101] = 7; dut.u_ram.mem[103] = 6;
    dut.u_ram.mem[104] = 9; dut.u_ram.mem[105] = 110; dut.u_ram.mem[106] = 18'h3FFFF;
    dut.u_ram.mem[201] = opr(14'h0070);                   // INB
    dut.u_ram.mem[202] = mri(OP_JMP, AM_INDIRECT, 200);

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (uaddr != 9'h1FF) @(posedge clk);
    repeat (2) @(posedge clk);
    check("M102", dut.u_ram.mem[102], 12);
    check("M110", dut.u_ram.mem[110], 9);
    check("M106", dut.u_ram.mem[106], 0);
    check("M200", dut.u_ram.mem[200], 80);
    check("M103", dut.u_ram.mem[103], 2);
    check("AC", ac, 2);
    check("IA", ia, 4);
    check("IB", ib, 1);
    check("lf", lf, 0);
    check("PC", pc, 88);
    check("micro branches", branches > 50, 1);
    check("micro steps", steps > 50, 1);

    // ---- second program: I/O with the multiplier device, interrupt control
    #1 rst_n = 0;
    for (int i = 0; i < 8192; i++) dut.u_ram.mem[i] = '0;
    dut.u_ram.mem[0]  = mri(OP_LAC, AM_DIRECT, 100);
    dut.u_ram.mem[1]  = iocmd(3'd1, 2'd0, 1'b0, 6'd0);   // OD1
    dut.u_ram.mem[2]  = iocmd(3'd1, 2'd0, 1'b0, 6'd0);   // OD1, device busy
    dut.u_ram.mem[3]  = iocmd(3'd1, 2'd0, 1'b1, 6'd0);   // ID1
    dut.u_ram.mem[4]  = mri(OP_DAC, AM_DIRECT, 102);
    dut.u_ram.mem[5]  = iocmd(3'd1, 2'd1, 1'b1, 6'h01);  // IS1: device done, no skip
    dut.u_ram.mem[6]  = intcmd(INT_EAI, 8'h00);
    dut.u_ram.mem[7]  = intcmd(INT_LMI, 8'h5A);          // MR = 5A
    dut.u_ram.mem[8]  = intcmd(INT_LAM, 8'h00);          // AC = 5A
    dut.u_ram.mem[9]  = intcmd(INT_MII, 8'h0F);          // MR = 50
    dut.u_ram.mem[10] = opr(14'h0C00);                   // HLT at 10
    dut.u_ram.mem[100] = 18'd321;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (uaddr != 9'h1FF) @(posedge clk);
    repeat (2) @(posedge clk);
    check("IO: product stored", dut.u_ram.mem[102], 18'(321 * 321));
    check("IO: status DONE, no skip, halted at 10", pc, 11);
    check("INT: LAM read the mask loaded by LMI", ac, 18'h0005A);
    check("INT: MII cleared mask bits", dut.u_ioh.mr, 8'h50);
    check("INT: enif set by EAI", enif, 1);
    check("IO: status handshakes stalled", stall > 0, 1);

    // ---- third program: buffered input on channel 0, interrupt on line 2
    #1 rst_n = 0;
    for (int i = 0; i < 8192; i++) dut.u_ram.mem[i] = '0;
    dut.u_ram.mem[0]  = intcmd(INT_LMI, 8'h04);
    dut.u_ram.mem[1]  = intcmd(INT_EAI, 8'h00);
    dut.u_ram.mem[2]  = iocmd(3'd2, 2'd2, 1'b1, 6'd0);   // IB: channel 0 input
    dut.u_ram.mem[3]  = mri(OP_TAD, AM_DIRECT, 101);
    dut.u_ram.mem[4]  = mri(OP_JMP, AM_DIRECT, 3);
    dut.u_ram.mem[13] = intcmd(INT_CLI, 8'h04);          // handler: vector 12 + 1
    dut.u_ram.mem[14] = mri(OP_DAC, AM_DIRECT, 120);
    dut.u_ram.mem[15] = opr(14'h0C00);
    dut.u_ram.mem[32] = 18'h01FFE;                        // channel 0: -2 words
    dut.u_ram.mem[33] = 18'd400;                          // end address
    dut.u_ram.mem[34] = 18'h01FFF;                        // channel 1: -1 word
    dut.u_ram.mem[35] = 18'd501;                          // output from 500
    dut.u_ram.mem[500] = 18'h00777;
    dut.u_ram.mem[101] = 18'd3;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (60) @(posedge clk);
    buf_word(18'h00ABC);
    check("BUF: word 1 at end - 2", dut.u_ram.mem[398], 18'h00ABC);
    check("BUF: count written back", dut.u_ram.mem[32], 18'h01FFF);
    check("BUF: no bufend yet", bufend_seen, 0);
    buf_word(18'h00DEF);
    check("BUF: word 2 at end - 1", dut.u_ram.mem[399], 18'h00DEF);
    check("BUF: bufend once", bufend_seen, 1);
    check("BUF: bufrdy seen", bufrdy_seen > 0, 1);
    check("BUF: descriptor kept at the end", dut.u_ram.mem[32], 18'h01FFF);
    buf_out(d);
    check("BUF: channel 1 output word", d, 18'h00777);
    check("BUF: bufend after the single output word", bufend_seen, 2);
    check("INT: enabled before the request", enif, 1);
    @(posedge clk); #1 intline[2] = 1;
    repeat (2) @(posedge clk); #1 intline[2] = 0;
    while (uaddr != 9'h1FF) @(posedge clk);
    repeat (2) @(posedge clk);
    check("INT: handler ran and halted", pc, 16);
    check("INT: return address saved at vector",
          (dut.u_ram.mem[12] == 3 || dut.u_ram.mem[12] == 4), 1);
    check("INT: enif cleared by service", enif, 0);
    check("INT: request cleared by CLI", dut.u_ioh.intr, 0);
    check("INT: AC saved by handler", dut.u_ram.mem[120], ac);
    check("INT: loop ran", (ac != 0) && (ac % 3 == 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bufend_seen = 0, bufrdy_seen = 0;
  always @(negedge clk) begin
    if (bufend) bufend_seen++;
    if (|bufrdy) bufrdy_seen++;
  end

  // one buffered word: request on BCRDY[0], then send it when the processor
  // is ready; signals change just after a rising edge and are sampled on
  // falling edges, where the microprogram acts
  task automatic buf_word(input word_t d);
    @(posedge clk); #1 bcrdy[0] = 1;
    repeat (2) @(posedge clk); #1 bcrdy[0] = 0;
    do @(negedge clk); while (!ready);
    @(posedge clk); #1 ext_iobus = d; ext_dv = 1;
    do @(negedge clk); while (!accept);
    @(posedge clk); #1 ext_iobus = '0; ext_dv = 0;
    repeat (12) @(posedge clk);
  endtask

  // one buffered output word on channel 1 (its BIOR bit is 0)
  word_t d;
  task automatic buf_out(output word_t w);
    @(posedge clk); #1 bcrdy[1] = 1;
    repeat (2) @(posedge clk); #1 bcrdy[1] = 0;
    do @(negedge clk); while (!bufrdy[1]);
    @(posedge clk); #1 ext_rdy = 1;
    do @(negedge clk); while (!datavalid);
    w = iobus;
    @(posedge clk); #1 ext_acc_d = 1; ext_rdy = 0;
    do @(negedge clk); while (datavalid);
    @(posedge clk); #1 ext_acc_d = 0;
    repeat (12) @(posedge clk);
  endtask

  int stall = 0;
  always @(posedge clk) if (csrdy && io_busy) stall++;
endmodule
