// sic_asm.svh: instruction encoders shared by the SIC testbenches.
// Each function returns one 18-bit SIC instruction word.
`ifndef SIC_ASM_SVH
`define SIC_ASM_SVH
// memory reference: opcode[17:15] type[14:13] address[12:0]
function automatic logic [17:0] mri(input logic [2:0] op, input logic [1:0] mode,
                                    input int unsigned a);
  return {op, mode, 13'(a)};
endfunction
// operate: 1110 then the event fields of bits 13:0
function automatic logic [17:0] opr(input logic [13:0] bits);
  return {4'b1110, bits};
endfunction
// I/O: 111101, device[11:9], command[8:7], direction[6], compare[5:0]
function automatic logic [17:0] iocmd(input logic [2:0] dev, input logic [1:0] cmd,
                                      input logic dir, input logic [5:0] comp);
  return {6'b111101, dev, cmd, dir, comp};
endfunction
// interrupt control: 11111, command[12:8], mask[7:0]
function automatic logic [17:0] intcmd(input logic [4:0] cmd, input logic [7:0] mask);
  return {5'b11111, cmd, mask};
endfunction
`endif
