// tb_sic_top: end-to-end test of both SIC systems at their default
// parameters.
//
// Pin-level system: a program loads interrupt mask and enable, sends an
// operand twice to the multiplier device (the second command finds the
// device busy, so the processor stalls in the status handshake), reads back
// the product, skips over a halt with ISZ, starts buffered input on channel
// 2 and loops.  The testbench plays the buffered device on the external
// lines (one word through BCRDY/BUFRDY), then raises interrupt line 2; the
// handler clears the request, stores AC and halts.
// Microprogrammed system: runs a memory-reference and operate program, then
// enables line 2 and waits in a loop; the same interrupt pulse enters its
// handler, which stores AC and halts in the microprogram's halt loop.
// Each mechanism is counted (stall, skip, buffer request, buffer word,
// buffer end, interrupt entry, device transfer, halt, micro branch, micro
// skip) and the test fails if any count stays zero.
`timescale 1ns/1ps
module tb_sic_top;
  import sic_pkg::*;
  import sic_c_ucode_pkg::*;
  `include "sic_asm.svh"

  logic clk = 0, rst_n = 0, b_start = 0;
  always #100 clk = ~clk;

  logic [7:0]  b_intline = '0;
  logic [7:0]  c_intline = '0;
  logic [3:0]  b_bcrdy = '0, b_bufrdy, c_bufrdy;
  word_t       b_ext_iobus = '0;
  logic        b_ext_dv = 0;
  logic        b_bufend, b_csrdy, b_ready, b_dv, b_acc, b_mwrite, b_menable, b_running, b_lf, b_busy;
  logic        c_bufend, c_csrdy, c_ready, c_dv, c_acc, c_mwrite, c_menable, c_lf, c_enif, c_busy;
  word_t       b_iobus, b_ac, c_iobus, c_ac;
  logic [11:0] b_csbus, c_csbus;
  addr_t       b_mabus, b_pc, c_mabus, c_pc, c_ia, c_ib;
  logic [8:0]  c_uaddr;

  logic a_start = 0, a_running;
  word_t a_ac;
  addr_t a_pc;
  logic [31:0] a_n;

  sic_top dut (
    .clk, .rst_n,
    .a_start, .a_running, .a_ac, .a_pc, .a_instr_count(a_n),
    .b_start, .b_intline, .b_bcrdy, .b_bufrdy, .b_bufend,
    .b_ext_iobus, .b_ext_csbus('0), .b_ext_ready(1'b0), .b_ext_datavalid(b_ext_dv),
    .b_ext_accept(1'b0),
    .b_iobus, .b_csbus, .b_csrdy, .b_ready, .b_datavalid(b_dv), .b_accept(b_acc),
    .b_mabus, .b_mwrite, .b_menable, .b_running, .b_ac, .b_pc, .b_lf, .b_io_busy(b_busy),
    .c_intline, .c_bcrdy('0), .c_bufrdy, .c_bufend,
    .c_ext_iobus('0), .c_ext_csbus('0), .c_ext_ready(1'b0), .c_ext_datavalid(1'b0),
    .c_ext_accept(1'b0),
    .c_iobus, .c_csbus, .c_csrdy, .c_ready, .c_datavalid(c_dv), .c_accept(c_acc),
    .c_mabus, .c_mwrite, .c_menable, .c_uaddr, .c_ac, .c_pc, .c_ia, .c_ib, .c_lf,
    .c_enif, .c_io_busy(c_busy)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters
  int n_stall = 0, n_skip = 0, n_bufreq = 0, n_bufword = 0, n_bufend = 0, n_int = 0;
  int n_xfer = 0, n_halt = 0, n_ubranch = 0, n_uskip = 0;
  logic fetched_71 = 0, fetched_72 = 0, b_run_q = 0;
  logic [8:0] ua_q = '0;
  always @(posedge clk) begin
    if (b_csrdy && b_busy) n_stall++;
    if (b_menable && !b_mwrite && b_mabus == 71) fetched_71 <= 1;
    if (b_menable && !b_mwrite && b_mabus == 72) fetched_72 <= 1;
    if (|b_bufrdy) n_bufreq++;
    if (b_bufend) n_bufend++;
    if (b_menable && b_mwrite && b_mabus == 12) n_int++;         // return address saved
    if (b_dv && b_acc) n_xfer++;
    if (b_run_q && !b_running) n_halt++;
    b_run_q <= rst_n && b_running;
  end
  always @(negedge clk) begin
    #1;
    if (rst_n) begin
      if (c_uaddr != ua_q + 1'b1) n_ubranch++;
      if (c_uaddr == UA_SKIP) n_uskip++;
    end
    ua_q = c_uaddr;
  end

  // ---------------- buffered device on channel 2 of the pin-level system
  task automatic buf_send(input word_t d);
    #1 b_bcrdy[2] = 1; @(posedge clk); #1 b_bcrdy[2] = 0;
    do @(posedge clk); while (!b_bufrdy[2]);
    do @(posedge clk); while (!b_ready);
    #1 b_ext_iobus = d;
    @(posedge clk); #1 b_ext_dv = 1;
    do @(posedge clk); while (!b_acc);
    #1 b_ext_dv = 0; b_ext_iobus = '0;
    n_bufword++;
  endtask

  int a;
  initial begin
    for (int i = 0; i < 8192; i++) begin dut.u_b.u_ram.mem[i] = '0; dut.u_c.u_ram.mem[i] = '0; end
    // ---- pin-level program
    dut.u_b.u_ram.mem[0]  = mri(OP_JMP, AM_DIRECT, 64);
    a = 64;
    dut.u_b.u_ram.mem[a++] = intcmd(INT_LMI, 8'h04);            // 64 mask: line 2
    dut.u_b.u_ram.mem[a++] = mri(OP_LAC, AM_DIRECT, 100);       // 65
    dut.u_b.u_ram.mem[a++] = iocmd(3'd1, 2'd0, 1'b0, 6'd0);     // 66 OD1
    dut.u_b.u_ram.mem[a++] = iocmd(3'd1, 2'd0, 1'b0, 6'd0);     // 67 OD1, device busy
    dut.u_b.u_ram.mem[a++] = iocmd(3'd1, 2'd0, 1'b1, 6'd0);     // 68 ID1
    dut.u_b.u_ram.mem[a++] = mri(OP_DAC, AM_DIRECT, 102);       // 69
    dut.u_b.u_ram.mem[a++] = mri(OP_ISZ, AM_DIRECT, 103);       // 70 -1 -> 0, skip
    dut.u_b.u_ram.mem[a++] = opr(14'h0C00);                     // 71 HLT, skipped
    dut.u_b.u_ram.mem[a++] = iocmd(3'd2, 2'd2, 1'b1, 6'd0);     // 72 IB2: channel 2 in
    dut.u_b.u_ram.mem[a++] = intcmd(INT_EAI, 8'h00);            // 73
    dut.u_b.u_ram.mem[a++] = mri(OP_JMP, AM_DIRECT, 74);        // 74 wait
    dut.u_b.u_ram.mem[100] = 18'd321;
    dut.u_b.u_ram.mem[103] = 18'h3FFFF;
    dut.u_b.u_ram.mem[36]  = 18'h01FFF;                         // ch2: one word
    dut.u_b.u_ram.mem[37]  = 18'd401;                           //      into 400
    dut.u_b.u_ram.mem[13]  = intcmd(INT_CLI, 8'h04);            // handler
    dut.u_b.u_ram.mem[14]  = mri(OP_DAC, AM_DIRECT, 120);
    dut.u_b.u_ram.mem[15]  = opr(14'h0C00);
    // ---- microprogrammed program
    dut.u_c.u_ram.mem[0] = mri(OP_JMP, AM_DIRECT, 64);
    a = 64;
    dut.u_c.u_ram.mem[a++] = mri(OP_LAC, AM_DIRECT, 100);       // AC=5
    dut.u_c.u_ram.mem[a++] = mri(OP_TAD, AM_DIRECT, 101);       // AC=12
    dut.u_c.u_ram.mem[a++] = opr(14'h0040);                     // DTA: IA=12
    dut.u_c.u_ram.mem[a++] = mri(OP_LAC, AM_INDEX_A, 100);      // AC=M112=3
    dut.u_c.u_ram.mem[a++] = mri(OP_DAC, AM_INDIRECT, 105);     // M110=3
    dut.u_c.u_ram.mem[a++] = mri(OP_ISZ, AM_DIRECT, 106);       // skip
    dut.u_c.u_ram.mem[a++] = opr(14'h0C00);
    dut.u_c.u_ram.mem[a++] = mri(OP_JMS, AM_DIRECT, 200);       // M200=72
    dut.u_c.u_ram.mem[a++] = intcmd(INT_LMI, 8'h04);            // 72 mask: line 2
    dut.u_c.u_ram.mem[a++] = intcmd(INT_EAI, 8'h00);            // 73
    dut.u_c.u_ram.mem[a++] = mri(OP_JMP, AM_DIRECT, 74);        // 74 wait
    dut.u_c.u_ram.mem[13]  = intcmd(INT_CLI, 8'h04);            // handler
    dut.u_c.u_ram.mem[14]  = mri(OP_DAC, AM_DIRECT, 120);
    dut.u_c.u_ram.mem[15]  = opr(14'h0C00);
    dut.u_c.u_ram.mem[100] = 5; dut.u_c.u_ram.mem[101] = 7; dut.u_c.u_ram.mem[112] = 3;
    dut.u_c.u_ram.mem[105] = 110; dut.u_c.u_ram.mem[106] = 18'h3FFFF;
    dut.u_c.u_ram.mem[201] = opr(14'h0070);                     // INB
    dut.u_c.u_ram.mem[202] = mri(OP_JMP, AM_INDIRECT, 200);

    // ---- instruction-level program: sum 1..10 in a loop with ISZ
    for (int i = 0; i < 8192; i++) dut.u_a.mem[i] = '0;
    dut.u_a.mem[0] = mri(OP_LAC, AM_DIRECT, 50);        // AC = sum
    dut.u_a.mem[1] = mri(OP_TAD, AM_DIRECT, 51);        // + k
    dut.u_a.mem[2] = mri(OP_DAC, AM_DIRECT, 50);
    dut.u_a.mem[3] = mri(OP_ISZ, AM_DIRECT, 51);        // k + 1
    dut.u_a.mem[4] = mri(OP_ISZ, AM_DIRECT, 52);        // count up to 0
    dut.u_a.mem[5] = mri(OP_JMP, AM_DIRECT, 0);
    dut.u_a.mem[6] = 18'h38C00;                         // HLT
    dut.u_a.mem[51] = 1; dut.u_a.mem[52] = 18'h3FFF6;   // -10

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 b_start = 1; a_start = 1;
    @(posedge clk); #1 b_start = 0; a_start = 0;

    // buffered input once the processor is waiting in its loop
    while (!(b_menable && b_mabus == 74)) @(posedge clk);
    buf_send(18'h0BEEF);
    repeat (20) @(posedge clk);
    check("buffer word stored", dut.u_b.u_ram.mem[400], 18'h0BEEF);
    check("descriptor kept at buffer end", dut.u_b.u_ram.mem[36], 18'h01FFF);
    // interrupt
    while (!c_enif) @(posedge clk);
    repeat (20) @(posedge clk);
    check("C waiting in its loop", (c_pc == 74 || c_pc == 75), 1);
    #1 b_intline[2] = 1; c_intline[2] = 1;
    @(posedge clk); #1 b_intline[2] = 0; c_intline[2] = 0;
    while (b_running) @(posedge clk);
    check("product", dut.u_b.u_ram.mem[102], 18'(321 * 321));
    check("ISZ result", dut.u_b.u_ram.mem[103], 0);
    check("handler saved AC", dut.u_b.u_ram.mem[120], b_ac);
    check("halted in handler", b_pc, 16);
    n_skip += int'(fetched_72 && !fetched_71);

    // microprogrammed system
    while (c_uaddr != UA_HALT) @(posedge clk);
    check("C M110", dut.u_c.u_ram.mem[110], 3);
    check("C M106", dut.u_c.u_ram.mem[106], 0);
    check("C M200", dut.u_c.u_ram.mem[200], 72);
    check("C IA", c_ia, 12);
    check("C IB", c_ib, 1);
    check("C PC, halted in handler", c_pc, 16);
    check("C AC", c_ac, 3);
    check("C return address at vector", dut.u_c.u_ram.mem[12], 74);
    check("C handler saved AC", dut.u_c.u_ram.mem[120], 3);
    check("C enif cleared by service", c_enif, 0);
    n_int += int'(dut.u_c.u_ram.mem[12] == 74);
    if (c_uaddr == UA_HALT) n_halt++;
    // instruction-level model
    check("A halted", a_running, 0);
    check("A sum 1..10", dut.u_a.mem[50], 55);
    check("A AC", a_ac, 55);
    check("A PC", a_pc, 7);
    check("A instructions", a_n, 60);

    $display("mechanisms: stall=%0d skip=%0d bufreq=%0d bufword=%0d bufend=%0d int=%0d xfer=%0d halt=%0d ubranch=%0d uskip=%0d",
             n_stall, n_skip, n_bufreq, n_bufword, n_bufend, n_int, n_xfer, n_halt, n_ubranch, n_uskip);
    check("stall happened", n_stall > 0, 1);
    check("skip happened", n_skip > 0, 1);
    check("buffer request happened", n_bufreq > 0, 1);
    check("buffer word happened", n_bufword > 0, 1);
    check("buffer end happened", n_bufend > 0, 1);
    check("interrupt happened", n_int > 0, 1);
    check("device transfer happened", n_xfer > 0, 1);
    check("halts happened", n_halt, 2);
    check("micro branch happened", n_ubranch > 0, 1);
    check("micro skip happened", n_uskip > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
