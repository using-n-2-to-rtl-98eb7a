// sic_c_urom: microprogram ROM of the microprogrammed SIC, 512 words of 48
// bits, read combinationally from `addr`.
//
// The ROM is filled at start-up from sic_c_ucode_pkg::ucode(), this design's
// microprogram for the SIC instruction fetch, the four address types, the
// memory-reference instructions and the operate instructions.  A non-empty
// INIT_FILE (hex, one microword per line) replaces those contents, so that
// another microprogram can be loaded without changing the RTL.  The ROM size
// and the 48-bit word follow the SIC definition; the contents are not given
// there.
module sic_c_urom
  import sic_c_ucode_pkg::*;
#(
  parameter int unsigned ADDR_W    = 9,
  parameter int unsigned DATA_W    = 48,
  parameter string       INIT_FILE = ""
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);
  logic [DATA_W-1:0] rom [2**ADDR_W];
  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) rom[i] = DATA_W'(ucode(9'(i)));
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end
  assign data = rom[addr];
endmodule
