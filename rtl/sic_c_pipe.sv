// sic_c_pipe: 48-bit microword pipeline register of the microprogrammed SIC.
//
// Latches the microprogram ROM output on the rising edge of `clk`; the
// datapath registers and the micro sequencer act on the falling edge, so a
// microword is executed in the clock period that follows its fetch while
// the next one is being looked up.  Field layout (SIC microword format):
//   47:39 next address   38:27 address (branch) control   26:24 unused
//   23:21 A bus source   20:18 B bus source   17:12 O bus destination
//   11:9  ALU function   8:0   misc control
// Rising-edge loading follows the SIC definition; the reset to an all-zero
// microword (which branches to address 0) is this design's addition.
module sic_c_pipe (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] in,
  output logic [47:0] out
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out <= '0;
    else        out <= in;
endmodule
