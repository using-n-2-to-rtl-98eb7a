// sic_c_ccgen: condition code generator (the condition multiplexer) of the
// microprogrammed SIC.
//
// Combinational.  Two multiplexers pick one bit from the 8 A conditions and
// one from the 32 B conditions; their OR, inverted when cond[8] is set, is
// the branch condition `cc` for the micro sequencer:
//   cc = cond[8] ^ (ina[cond[2:0]] | inb[cond[7:3]])
// Condition A bit 0 and the unused B bits are 0 and B bit 0 is 1 at the
// system level, so a microword tests one A bit (B select on a zero bit), one
// B bit (A select 0), branches always (both selects 0) or never (both 0,
// inverted).  The 8-bit / 32-bit multiplexer pair and the inversion bit
// follow the SIC definition; which cond bits select which multiplexer is
// this design's reading (3 select bits for the 8-input, 5 for the 32-input
// multiplexer).  cond[11:9] are not used.
module sic_c_ccgen (
  input  logic [7:0]  ina,
  input  logic [31:0] inb,
  input  logic [11:0] cond,
  output logic        cc
);
  assign cc = cond[8] ^ (ina[cond[2:0]] | inb[cond[7:3]]);
endmodule
