// tb_sic_b_system: the pin-level SIC system running a program against its
// multiplier device.  The program sends two operands with OD1, reads the
// product with ID1, stores it, tests the device status with IS1 and halts.
// The second OD1 is issued while the device is still busy with the first
// command, so the processor must wait in the status handshake (a stall);
// the testbench counts the clocks spent waiting there.
`timescale 1ns/1ps
module tb_sic_b_system;
  import sic_pkg::*;
  `include "sic_asm.svh"

  logic clk = 0, rst_n = 0, start = 0;
  always #100 clk = ~clk;
  logic [3:0] bufrdy;
  logic bufend, csrdy, ready, datavalid, accept, mwrite, menable, running, lf, io_busy;
  word_t iobus, ac;
  logic [11:0] csbus;
  addr_t mabus, pc;

  sic_b_system dut (.clk, .rst_n, .start, .intline('0), .bcrdy('0), .bufrdy, .bufend,
                    .ext_iobus('0), .ext_csbus('0), .ext_ready(1'b0), .ext_datavalid(1'b0),
                    .ext_accept(1'b0), .iobus, .csbus, .csrdy, .ready, .datavalid, .accept,
                    .mabus, .mwrite, .menable, .running, .ac, .pc, .lf, .io_busy);

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %0h != %0h", what, got, exp); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stall = 0;
  always @(posedge clk) if (csrdy && io_busy) stall++;

  initial begin
    for (int i = 0; i < 8192; i++) dut.u_ram.mem[i] = '0;
    dut.u_ram.mem[0] = mri(OP_LAC, AM_DIRECT, 100);
    dut.u_ram.mem[1] = iocmd(3'd1, 2'd0, 1'b0, 6'd0);   // OD1
    dut.u_ram.mem[2] = iocmd(3'd1, 2'd0, 1'b0, 6'd0);   // OD1 again, device busy
    dut.u_ram.mem[3] = iocmd(3'd1, 2'd0, 1'b1, 6'd0);   // ID1
    dut.u_ram.mem[4] = mri(OP_DAC, AM_DIRECT, 102);
    dut.u_ram.mem[5] = iocmd(3'd1, 2'd1, 1'b1, 6'h01);  // IS1: skip if busy
    dut.u_ram.mem[6] = opr(14'h0C00);                  // HLT (device done: not skipped)
    dut.u_ram.mem[7] = opr(14'h0C00);
    dut.u_ram.mem[100] = 18'd321;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    while (running) @(posedge clk);
    // after OD 321 twice: DATA = 321 * 321, OLD = 321
    check("product stored", dut.u_ram.mem[102], 18'(321 * 321));
    check("AC", ac, 18'(321 * 321));
    check("halted at 6", pc, 7);
    check("stalled on busy device", stall > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
