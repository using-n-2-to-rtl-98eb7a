// sic_c_csgen: control signal generator (the control multiplexer) of the
// microprogrammed SIC.
//
// Combinational.  Decodes the misc-control field of the microword (bits
// 8:0) into two sets of one-cycle strobes: cont[3:0] sets one bit of outa
// (memory, handshake and bus-drive strobes) and cont[7:4] one bit of outb
// (register and flag strobes); code 0 of either is "no operation".  A memory
// write strobe (outa bit 1) also raises the memory enable (outa bit 2).
// This follows the SIC control-signal generator; cont[8] is not used by it.
module sic_c_csgen (
  input  logic [8:0]  cont,
  output logic [15:0] outa,
  output logic [15:0] outb
);
  always_comb begin
    outa = '0;
    outb = '0;
    outa[cont[3:0]] = 1'b1;
    outb[cont[7:4]] = 1'b1;
    if (cont[3:0] == 4'd1) outa[2] = 1'b1;
  end
endmodule
