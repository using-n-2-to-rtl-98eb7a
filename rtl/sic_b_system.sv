// sic_b_system: the pin-level SIC system: processor, program memory and the
// multiplier I/O device on shared buses.
//
// Every shared signal is the OR of what its drivers put on it, the way the
// SIC system connects its parts (a released driver outputs zero):
//   IOBUS     = processor | memory | multiplier device | external devices
//   CSBUS     = processor | multiplier device | external devices
//   ready, datavalid, accept = OR of the same drivers.
// MABUS, write and enable go from the processor to the memory.  Further
// devices of the I/O bus (for example a buffered device answering the BCRDY
// / BUFRDY lines) attach through the ext_* inputs and see the bus values on
// the outputs.  The multiplier device answers to device number IO_DEV.
module sic_b_system
  import sic_pkg::*;
#(
  parameter logic [2:0]  IO_DEV     = 3'd1,
  parameter int unsigned CMD_CYCLES = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [INT_CHAN-1:0] intline,
  input  logic [BUF_CHAN-1:0] bcrdy,
  output logic [BUF_CHAN-1:0] bufrdy,
  output logic                bufend,
  // external devices on the I/O lines
  input  word_t               ext_iobus,
  input  logic [STATUS_W-1:0] ext_csbus,
  input  logic                ext_ready,
  input  logic                ext_datavalid,
  input  logic                ext_accept,
  // bus values
  output word_t               iobus,
  output logic [STATUS_W-1:0] csbus,
  output logic                csrdy,
  output logic                ready,
  output logic                datavalid,
  output logic                accept,
  output addr_t               mabus,
  output logic                mwrite,
  output logic                menable,
  // observation
  output logic                running,
  output word_t               ac,
  output addr_t               pc,
  output logic                lf,
  output logic                io_busy
);

  word_t               cpu_iobus, ram_iobus, dev_iobus;
  logic [STATUS_W-1:0] cpu_csbus, dev_csbus;
  logic                cpu_ready, cpu_dv, cpu_acc;
  logic                dev_ready, dev_dv, dev_acc;
  addr_t               ia_unused, ib_unused;
  logic                enif_unused;

  assign iobus     = cpu_iobus | ram_iobus | dev_iobus | ext_iobus;
  assign csbus     = cpu_csbus | dev_csbus | ext_csbus;
  assign ready     = cpu_ready | dev_ready | ext_ready;
  assign datavalid = cpu_dv    | dev_dv    | ext_datavalid;
  assign accept    = cpu_acc   | dev_acc   | ext_accept;

  sic_b_cpu u_cpu (
    .clk, .rst_n, .start, .intline, .bcrdy, .bufrdy, .bufend, .csrdy,
    .ready_i(ready), .ready_o(cpu_ready),
    .datavalid_i(datavalid), .datavalid_o(cpu_dv),
    .accept_i(accept), .accept_o(cpu_acc),
    .iobus_i(iobus), .iobus_o(cpu_iobus),
    .csbus_i(csbus), .csbus_o(cpu_csbus),
    .mabus, .mwrite, .menable,
    .running, .ac_o(ac), .pc_o(pc), .ia_o(ia_unused), .ib_o(ib_unused),
    .lf_o(lf), .enif_o(enif_unused)
  );

  sic_ram #(.ADDR_W(ADDR_W), .DATA_W(WORD_W)) u_ram (
    .clk, .addr(mabus), .data_in(iobus), .data_out(ram_iobus),
    .write(mwrite), .enable(menable)
  );

  sic_io_mult #(.WORD_W(WORD_W), .STATUS_W(STATUS_W), .DEV_ID(IO_DEV),
                .CMD_CYCLES(CMD_CYCLES)) u_io (
    .clk, .rst_n,
    .csbus_i(csbus), .csbus_o(dev_csbus),
    .iobus_i(iobus), .iobus_o(dev_iobus),
    .csrdy_i(csrdy),
    .ready_i(ready), .ready_o(dev_ready),
    .datavalid_i(datavalid), .datavalid_o(dev_dv),
    .accept_i(accept), .accept_o(dev_acc),
    .busy(io_busy)
  );

endmodule
