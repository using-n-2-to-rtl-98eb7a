// tb_sic_ram: checks the SIC program memory: a write needs enable and write
// together, a read drives the addressed word only while enabled and not
// writing, and the output is all zeros otherwise.
`timescale 1ns/1ps
module tb_sic_ram;
  logic clk = 0;
  always #100 clk = ~clk;
  logic [12:0] addr = '0;
  logic [17:0] din = '0, dout;
  logic write = 0, enable = 0;
  logic [17:0] model [8192];
  int checks = 0, failures = 0;

  sic_ram dut (.clk, .addr, .data_in(din), .data_out(dout), .write, .enable);

  task automatic check(input string what, input logic [17:0] got, input logic [17:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h != %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill 64 scattered words
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      addr = 13'(i * 127); din = 18'($urandom); write = 1; enable = 1;
      model[i * 127] = din;
      @(negedge clk); enable = 0; write = 0;
      check("released while idle", dout, '0);
    end
    // write without enable must not store
    @(negedge clk); addr = 13'd127; din = 18'h15555; write = 1; enable = 0;
    @(negedge clk); write = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); addr = 13'(i * 127); enable = 1; write = 0;
      #1 check("read back", dout, model[i * 127]);
      write = 1;
      #1 check("no drive while writing", dout, '0);
      write = 0; enable = 0;
      #1 check("no drive while disabled", dout, '0);
    end
    // top address
    @(negedge clk); addr = 13'h1FFF; din = 18'h2BEEF; write = 1; enable = 1;
    @(negedge clk); write = 0;
    #1 check("top word", dout, 18'h2BEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
