// tb_sic_io_mult: drives the multiplier I/O device through its handshake
// the way the SIC processor does.  It sends a series of random data words,
// reads back the data register after each and checks that it holds the
// product of the last two words received (mod 2^18), reads the BUSY/DONE
// status, checks that the command time is CMD_CYCLES clocks, and checks that
// a command for another device number is acknowledged but ignored.
`timescale 1ns/1ps
module tb_sic_io_mult;
  logic clk = 0, rst_n = 0;
  always #100 clk = ~clk;

  logic [11:0] cs_o, tb_cs = '0;
  logic [17:0] io_o, tb_io = '0;
  logic csrdy = 0, tb_ready = 0, tb_dv = 0, tb_acc = 0;
  logic d_ready, d_dv, d_acc, busy;
  wire ready = d_ready | tb_ready, dv = d_dv | tb_dv, acc = d_acc | tb_acc;
  wire [11:0] cs = cs_o | tb_cs;
  wire [17:0] io = io_o | tb_io;

  sic_io_mult dut (.clk, .rst_n, .csbus_i(cs), .csbus_o(cs_o), .iobus_i(io), .iobus_o(io_o),
                   .csrdy_i(csrdy), .ready_i(ready), .ready_o(d_ready),
                   .datavalid_i(dv), .datavalid_o(d_dv), .accept_i(acc), .accept_o(d_acc),
                   .busy);

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %0h != %0h", what, got, exp); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(input logic [11:0] c);
    #1 tb_cs = c; csrdy = 1;
    do @(posedge clk); while (!acc);
    #1 tb_cs = '0; csrdy = 0;
  endtask
  task automatic put(input logic [17:0] d);
    do @(posedge clk); while (!ready);
    #1 tb_io = d; tb_dv = 1;
    do @(posedge clk); while (!acc);
    #1 tb_dv = 0; tb_io = '0;
  endtask
  task automatic get(input logic stat, output logic [17:0] d);
    #1 tb_ready = 1;
    do @(posedge clk); while (!dv);
    d = stat ? 18'(cs) : io;
    #1 tb_acc = 1;
    do @(posedge clk); while (dv);
    #1 tb_acc = 0; tb_ready = 0;
  endtask

  logic [17:0] prev, cur, exp_data, d;
  int t0, busy_len;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    prev = 0; exp_data = 0;
    for (int i = 0; i < 20; i++) begin
      cur = 18'($urandom);
      command({3'd1, 1'b0, 1'b0, 1'b0, 6'd0});     // receive data
      put(cur);
      // command runs: busy for CMD_CYCLES clocks
      while (!busy) @(posedge clk);
      busy_len = 0;
      while (busy) begin busy_len++; @(posedge clk); end
      check("busy time", busy_len, 5);
      exp_data = 18'(cur * prev);
      prev = cur;
      command({3'd1, 1'b0, 1'b0, 1'b1, 6'd0});     // send data
      get(1'b0, d);
      check("product", d, exp_data);
    end
    // status while idle is DONE (0)
    command({3'd1, 1'b0, 1'b1, 1'b1, 6'd0});
    get(1'b1, d);
    check("status done", d, 0);
    // command-only request multiplies again: DATA <- DATA * OLD
    command({3'd1, 1'b1, 1'b0, 1'b0, 6'd0});
    @(posedge clk); #1 check("busy after command", busy, 1);
    while (busy) @(posedge clk);
    exp_data = 18'(exp_data * prev);
    command({3'd1, 1'b0, 1'b0, 1'b1, 6'd0});
    get(1'b0, d);
    check("product after command", d, exp_data);
    // a command for device 2 is accepted and ignored
    command({3'd2, 1'b0, 1'b0, 1'b0, 6'd0});
    repeat (4) @(posedge clk);
    check("ignored: no ready", ready, 0);
    check("ignored: not busy", busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
