// sic_top: the three SIC descriptions side by side: the instruction-level
// model, the pin-level system and the microprogrammed system.
//
// The pin-level system (processor, memory and multiplier device, one
// register transfer per clock) and the microprogrammed system (the same
// instruction set run by a 48-bit microprogram over a one-ALU datapath, its
// own memory and multiplier device) share only the clock and reset; each
// keeps its own I/O lines, so a testbench can run the same program on both
// and compare.  The instruction-level model (one whole instruction per
// clock, own memory, no I/O) runs beside them.  Ports prefixed a_ belong to
// the instruction-level model, b_ belong to the pin-level system, c_ to the
// microprogrammed one; their meaning is given in sic_b_system and
// sic_c_system.  Putting the three descriptions in one top is this design's
// choice: the SIC modelling study builds them as separate models of the
// same machine.
module sic_top
  import sic_pkg::*;
#(
  parameter logic [2:0]  IO_DEV     = 3'd1,
  parameter int unsigned CMD_CYCLES = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  // instruction-level model
  input  logic                a_start,
  output logic                a_running,
  output word_t               a_ac,
  output addr_t               a_pc,
  output logic [31:0]         a_instr_count,
  // pin-level system
  input  logic                b_start,
  input  logic [INT_CHAN-1:0] b_intline,
  input  logic [BUF_CHAN-1:0] b_bcrdy,
  output logic [BUF_CHAN-1:0] b_bufrdy,
  output logic                b_bufend,
  input  word_t               b_ext_iobus,
  input  logic [STATUS_W-1:0] b_ext_csbus,
  input  logic                b_ext_ready,
  input  logic                b_ext_datavalid,
  input  logic                b_ext_accept,
  output word_t               b_iobus,
  output logic [STATUS_W-1:0] b_csbus,
  output logic                b_csrdy,
  output logic                b_ready,
  output logic                b_datavalid,
  output logic                b_accept,
  output addr_t               b_mabus,
  output logic                b_mwrite,
  output logic                b_menable,
  output logic                b_running,
  output word_t               b_ac,
  output addr_t               b_pc,
  output logic                b_lf,
  output logic                b_io_busy,
  // microprogrammed system
  input  logic [INT_CHAN-1:0] c_intline,
  input  logic [BUF_CHAN-1:0] c_bcrdy,
  output logic [BUF_CHAN-1:0] c_bufrdy,
  output logic                c_bufend,
  input  word_t               c_ext_iobus,
  input  logic [STATUS_W-1:0] c_ext_csbus,
  input  logic                c_ext_ready,
  input  logic                c_ext_datavalid,
  input  logic                c_ext_accept,
  output word_t               c_iobus,
  output logic [STATUS_W-1:0] c_csbus,
  output logic                c_csrdy,
  output logic                c_ready,
  output logic                c_datavalid,
  output logic                c_accept,
  output addr_t               c_mabus,
  output logic                c_mwrite,
  output logic                c_menable,
  output logic [8:0]          c_uaddr,
  output word_t               c_ac,
  output addr_t               c_pc,
  output addr_t               c_ia,
  output addr_t               c_ib,
  output logic                c_lf,
  output logic                c_enif,
  output logic                c_io_busy
);

  addr_t a_ia_unused, a_ib_unused;
  logic  a_lf_unused;
  sic_a_cpu u_a (
    .clk, .rst_n, .start(a_start), .running(a_running), .ac(a_ac), .pc(a_pc),
    .ia(a_ia_unused), .ib(a_ib_unused), .lf(a_lf_unused), .instr_count(a_instr_count)
  );

  sic_b_system #(.IO_DEV(IO_DEV), .CMD_CYCLES(CMD_CYCLES)) u_b (
    .clk, .rst_n, .start(b_start), .intline(b_intline), .bcrdy(b_bcrdy),
    .bufrdy(b_bufrdy), .bufend(b_bufend),
    .ext_iobus(b_ext_iobus), .ext_csbus(b_ext_csbus), .ext_ready(b_ext_ready),
    .ext_datavalid(b_ext_datavalid), .ext_accept(b_ext_accept),
    .iobus(b_iobus), .csbus(b_csbus), .csrdy(b_csrdy), .ready(b_ready),
    .datavalid(b_datavalid), .accept(b_accept), .mabus(b_mabus),
    .mwrite(b_mwrite), .menable(b_menable), .running(b_running), .ac(b_ac),
    .pc(b_pc), .lf(b_lf), .io_busy(b_io_busy)
  );

  sic_c_system #(.IO_DEV(IO_DEV), .CMD_CYCLES(CMD_CYCLES)) u_c (
    .clk, .rst_n, .intline(c_intline), .bcrdy(c_bcrdy),
    .bufrdy(c_bufrdy), .bufend(c_bufend),
    .ext_iobus(c_ext_iobus), .ext_csbus(c_ext_csbus), .ext_ready(c_ext_ready),
    .ext_datavalid(c_ext_datavalid), .ext_accept(c_ext_accept),
    .iobus(c_iobus), .csbus(c_csbus), .csrdy(c_csrdy), .ready(c_ready),
    .datavalid(c_datavalid), .accept(c_accept), .mabus(c_mabus),
    .mwrite(c_mwrite), .menable(c_menable), .uaddr(c_uaddr), .ac(c_ac),
    .pc(c_pc), .ia(c_ia), .ib(c_ib), .lf(c_lf), .enif(c_enif), .io_busy(c_io_busy)
  );

endmodule
