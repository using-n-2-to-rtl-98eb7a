// sic_c_iohandle: interrupt and I/O-handshake unit of the microprogrammed
// SIC.
//
// Holds the interrupt mask MR, the interrupt request register INTR, the
// communication status register CSR and the flags intf (interrupt pending)
// and enif (interrupts enabled).  INTR collects rising edges of INTLINE.
// Register strobes act on the falling edge of `clk`:
//   clr_intf / clr_enif / set_enif   flag control
//   upd_intf    intf <- (INTR & MR) != 0 and enif
//   load_mr     MR   <- in[7:0]           (O bus)
//   and_intr    INTR <- INTR & in[7:0]    (clears the bits given as 0)
//   load_csr    CSR  <- in[11:0]          (O bus)
//   cap_csr     CSR  <- CSBUS
// Handshake outputs follow their strobes in the same cycle: drive_cs puts
// CSR on CSBUS and raises csrdy, accept_c raises accept and ready_c raises
// ready; datavalid is a flag set by dv_set and cleared by dv_clr.
// The registers and the strobe meanings follow the SIC I/O handler and
// bus-control tables; where the two tables disagree on which control word
// carries a strobe, the system-level wiring picks one (see sic_c_system).
module sic_c_iohandle (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  intline,
  input  logic [11:0] in,
  input  logic [11:0] csbus_i,
  output logic [11:0] csbus_o,
  output logic        csrdy,
  output logic        accept_o,
  output logic        datavalid_o,
  output logic        ready_o,
  input  logic        clr_intf,
  input  logic        clr_enif,
  input  logic        set_enif,
  input  logic        upd_intf,
  input  logic        load_mr,
  input  logic        and_intr,
  input  logic        load_csr,
  input  logic        cap_csr,
  input  logic        drive_cs,
  input  logic        accept_c,
  input  logic        dv_set,
  input  logic        dv_clr,
  input  logic        ready_c,
  output logic        intf,
  output logic        enif,
  output logic [11:0] csr,
  output logic [7:0]  mr,
  output logic [7:0]  intr
);
  logic [7:0] intline_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mr <= '0; intr <= '0; csr <= '0; intf <= 1'b0; enif <= 1'b0;
      intline_q <= '0; datavalid_o <= 1'b0;
    end else begin
      intline_q <= intline;
      intr <= (and_intr ? (intr & in[7:0]) : intr) | (intline & ~intline_q);
      if (load_mr)  mr <= in[7:0];
      if (load_csr) csr <= in;
      else if (cap_csr) csr <= csbus_i;
      if (clr_enif) enif <= 1'b0;
      else if (set_enif) enif <= 1'b1;
      if (clr_intf) intf <= 1'b0;
      else if (upd_intf) intf <= (|(intr & mr)) && enif;
      if (dv_set) datavalid_o <= 1'b1;
      else if (dv_clr) datavalid_o <= 1'b0;
    end
  end

  assign csbus_o  = drive_cs ? csr : '0;
  assign csrdy    = drive_cs;
  assign accept_o = accept_c;
  assign ready_o  = ready_c;
endmodule
