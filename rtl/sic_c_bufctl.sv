// sic_c_bufctl: buffer-channel registers of the microprogrammed SIC.
//
// BCR holds one request bit per buffer channel (set by a rising edge of the
// channel's BCRDY line or by bcr_set, cleared by bcr_clr for the channel
// selected by the 2-bit counter CC); BIOR holds each channel's transfer
// direction (bior_set marks channel CC as input); cc_inc steps CC.  The
// BUFRDY line of channel CC is high while bufrdy_c is.  Registers change on
// the falling edge of `clk`.  The outputs feed the condition multiplexer:
// any request (|BCR), the request of channel CC and its direction.
// The strobes and conditions are the ones the SIC control and condition
// tables list for these registers; collecting them in one unit is this
// design's own arrangement.
module sic_c_bufctl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] bcrdy,
  input  logic       bior_set,
  input  logic       bcr_clr,
  input  logic       bcr_set,
  input  logic       bufrdy_c,
  input  logic       cc_inc,
  output logic [3:0] bufrdy,
  output logic       bcr_any,
  output logic       bcr_cc,
  output logic       bior_cc,
  output logic [1:0] cc
);
  logic [3:0] bcr, bior, bcrdy_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcr <= '0; bior <= '0; bcrdy_q <= '0; cc <= '0;
    end else begin
      logic [3:0] b;
      bcrdy_q <= bcrdy;
      b = bcr | (bcrdy & ~bcrdy_q);
      if (bcr_set) b[cc] = 1'b1;
      if (bcr_clr) b[cc] = 1'b0;
      bcr <= b;
      if (bior_set) bior[cc] <= 1'b1;
      if (cc_inc)   cc <= cc + 1'b1;
    end
  end

  always_comb begin
    bufrdy = '0;
    bufrdy[cc] = bufrdy_c;
  end
  assign bcr_any = |bcr;
  assign bcr_cc  = bcr[cc];
  assign bior_cc = bior[cc];
endmodule
