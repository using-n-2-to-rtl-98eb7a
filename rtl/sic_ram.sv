// sic_ram: SIC program memory, 8192 words of 18 bits.
//
// The memory sits on the processor's memory address bus and on the shared
// I/O data bus.  While `enable` is high and `write` is low it drives the word
// at `addr` onto `data_out` (a combinational read, so a read completes inside
// the one clock period the processor allows for it); otherwise `data_out` is
// all zeros, which releases the wired-OR data bus.  While `enable` and `write`
// are both high the word on `data_in` is stored at `addr` on the rising edge
// of `clk`.  The port set (address, data, write, enable) and the one-period
// access follow the SIC memory description; the clock edge used for writes
// and the zero level of a released bus are this design's choices.  The
// contents are not reset: a program is loaded by the environment, or from
// INIT_FILE (hex, one word per line) when that parameter is not empty.
module sic_ram #(
  parameter int unsigned ADDR_W    = 13,
  parameter int unsigned DATA_W    = 18,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  input  logic              write,
  input  logic              enable
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial if (INIT_FILE != "") $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk)
    if (enable && write) mem[addr] <= data_in;

  assign data_out = (enable && !write) ? mem[addr] : '0;

endmodule
