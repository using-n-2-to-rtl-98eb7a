// sic_c_buscon: bus control decoder of the microprogrammed SIC datapath.
//
// Combinational.  Turns the three bus fields of the microword into one-hot
// enables: con1 (bits 23:21) selects the A-bus source, con2 (bits 20:18) the
// B-bus source and con3 (bits 17:12) the register loaded from the O bus.
// Exactly one bit of a_con and of b_con is set; o_con has one bit set for
// codes 0..15 and none for larger codes.  The meaning of each enable
// (listed at the system level) follows the SIC bus-control table.
module sic_c_buscon (
  input  logic [2:0]  con1,
  input  logic [2:0]  con2,
  input  logic [5:0]  con3,
  output logic [7:0]  a_con,
  output logic [7:0]  b_con,
  output logic [15:0] o_con
);
  always_comb begin
    a_con = '0;
    b_con = '0;
    o_con = '0;
    a_con[con1] = 1'b1;
    b_con[con2] = 1'b1;
    if (con3 < 6'd16) o_con[con3[3:0]] = 1'b1;
  end
endmodule
