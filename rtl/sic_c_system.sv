// sic_c_system: the microprogrammed SIC: micro sequencer, microprogram ROM,
// pipeline register, bus-control decoder, control-signal and condition
// generators, the datapath registers around one ALU, the I/O handler, the
// buffer-channel registers, program memory and the multiplier I/O device.
//
// Microcycle: one clock.  On the rising edge the pipeline register takes the
// microword at the sequencer's address.  During the high phase the word's
// fields select one A-bus source, one B-bus source, the ALU function, one
// O-bus destination and up to two control strobes; the condition selected
// by the word is formed from the ALU result and status bits.  On the falling
// edge the destination register loads, the strobes act (memory writes also
// happen here) and the sequencer takes the next-address field when the
// condition holds or steps by one otherwise.
//
// Bus sources (A): 1 constant 1, 2 all ones, 3 interrupt vector 8 + 2 * (highest
// line of INTR & MR), 4 buffer descriptor address 32 + 2 * CC, 5 IR, 6 AC,
// 7 BWC.
// Bus sources (B): 1 constant 1, 2 all ones, 3 MR, 4 MD, 5 IA, 6 IB, 7 PC.
// O destinations: 1 IR, 2 IR address part, 5 AC, 6 AC <- O[18:1] (right
// rotate), 7 MD, 8 IA, 9 IB, 10 PC, 11 BWC, 12 MA, 13 CSR, 14 INTR <- INTR &
// O, 15 MR.
// A strobes: 1 memory write, 2 memory read, 3 accept, 4 datavalid on,
// 5 datavalid off, 6 ready, 7 bufend, 10 MD onto IOBUS, 11 CSR onto CSBUS
// with csrdy.  MD also drives IOBUS during a memory write and while the
// processor's datavalid flag is set, so that an output word stays on the bus
// for the whole handshake.  B strobes: 1 CSR <- CSBUS, 2 MD <- IOBUS, 3 BIOR[CC] set,
// 4 BCR[CC] clear, 5 BCR[CC] set, 6 BUFRDY[CC], 7 CC+1, 8 intf off, 9 enif
// off, 10 enif on, 11 lf off, 12 lf on, 13 lf <- O[0], 14 lf <- O[18],
// 15 intf <- pending & enif.
// Conditions A: 1 accept, 2 datavalid, 3 ready, 4 status compare
// |(IR[5:0] & CSR[5:0]), 5 BCR[CC], 6 BIOR[CC].  Conditions B: 0 true,
// 1 any BCR, 2 intf, 3 O = 0, 4 O < 0, 5 O > 0, 7 lf, 8 OPERATE skip
// (IR2 & O<0 | IR1 & O=0 | IR0 & O>0), 9 opcode 7, 10 IR17 & IR16,
// 11..26 IR[2..17].  Everything else reads 0.
//
// The block set, the bus structure, the clock phases and the microword
// fields follow the SIC Class C description; the numbering of sources,
// destinations, strobes and conditions is this design's reading of its
// tables.  The IR loads from the O bus (the register-transfer notation of
// the description shows it loading from MD, which would leave indexed
// addresses unformed).  Memory writes on the falling clock edge; the
// multiplier device is clocked on the rising edge.  Shared lines are ORs of
// their drivers, as in the pin-level system.
//
// A-bus codes 3 and 4 and B-bus code 3 are left blank in the SIC
// bus-control table; this design gives A3 and A4 the vector and descriptor
// addresses that the interrupt and buffer sequences of the pin-level
// processor form, and B3 the mask MR (for LAM and MII), since the datapath
// has no other way to produce these values.
//
// Unused decoder outputs (bus-source code 0 on A and B,
// destination codes 0, 3, 4 and 16..63, free strobe codes and microword bits
// 26:24) are spare codes of the microword format and are left unconnected;
// likewise the register copies of MD and BWC that only feed the buses.  The status compare uses CSR[5:0] only,
// matching the 6-bit compare field of the I/O instruction.
module sic_c_system
  import sic_pkg::*;
#(
  parameter logic [2:0]  IO_DEV     = 3'd1,
  parameter int unsigned CMD_CYCLES = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [INT_CHAN-1:0] intline,
  input  logic [BUF_CHAN-1:0] bcrdy,
  output logic [BUF_CHAN-1:0] bufrdy,
  output logic                bufend,
  input  word_t               ext_iobus,
  input  logic [STATUS_W-1:0] ext_csbus,
  input  logic                ext_ready,
  input  logic                ext_datavalid,
  input  logic                ext_accept,
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
  output logic [8:0]          uaddr,
  output word_t               ac,
  output addr_t               pc,
  output addr_t               ia,
  output addr_t               ib,
  output logic                lf,
  output logic                enif,
  output logic                io_busy
);

  logic [47:0] romdata, uw;
  logic [7:0]  a_con, b_con;
  logic [15:0] o_con, c1, c2;
  logic        cc;
  logic [7:0]  cond_a;
  logic [31:0] cond_b;

  word_t       abus, bbus;
  logic [18:0] obus;
  word_t       ir_q, ir_out, ir_cont, ac_out, md_out1, md_out2;
  word_t       ac_in;
  addr_t       bwc_out, ia_out, ib_out, pc_out;
  logic [11:0] csr;
  logic        intf, bcr_any, bcr_cc, bior_cc;
  logic [7:0]  mr, intr;
  logic [1:0]  ccnt;
  word_t       ram_iobus, dev_iobus;
  logic [STATUS_W-1:0] cpu_csbus, dev_csbus;
  logic        cpu_ready, cpu_dv, cpu_acc, dev_ready, dev_dv, dev_acc;

  // ---------------- control section
  sic_c_useq  u_useq (.clk, .rst_n, .in(uw[47:39]), .branch(cc), .out(uaddr));
  sic_c_urom  u_urom (.addr(uaddr), .data(romdata));
  sic_c_pipe  u_pipe (.clk, .rst_n, .in(romdata), .out(uw));
  sic_c_buscon u_buscon (.con1(uw[23:21]), .con2(uw[20:18]), .con3(uw[17:12]),
                         .a_con, .b_con, .o_con);
  sic_c_csgen u_csgen (.cont(uw[8:0]), .outa(c1), .outb(c2));
  sic_c_ccgen u_ccgen (.ina(cond_a), .inb(cond_b), .cond(uw[38:27]), .cc);

  // ---------------- buses
  assign abus = (a_con[1] ? WORD_W'(1) : '0) | (a_con[2] ? '1 : '0) |
                (a_con[3] ? word_t'(int_vector(intr & mr)) : '0) |
                (a_con[4] ? word_t'(buf_addr(ccnt)) : '0) |
                ir_out | ac_out | word_t'(bwc_out);
  assign bbus = (b_con[1] ? WORD_W'(1) : '0) | (b_con[2] ? '1 : '0) |
                (b_con[3] ? word_t'(mr) : '0) |
                md_out1 | word_t'(ia_out) | word_t'(ib_out) | word_t'(pc_out);

  sic_c_alu u_alu (.alu_func(uw[11:9]), .ina(abus), .inb(bbus), .lf, .out(obus));

  wire o_zero = (obus[17:0] == '0);
  wire o_neg  = obus[17];
  wire o_pos  = !o_neg && !o_zero;
  wire skip_f = (o_neg && ir_q[2]) || (o_zero && ir_q[1]) || (o_pos && ir_q[0]);

  assign cond_a = {1'b0, bior_cc, bcr_cc, |(ir_q[5:0] & csr[5:0]),
                   ready, datavalid, accept, 1'b0};
  assign cond_b = {5'b0, ir_cont[17:0], skip_f, lf, 1'b0, o_pos, o_neg, o_zero,
                   intf, bcr_any, 1'b1};

  // ---------------- registers
  sic_c_reg_ir u_ir (.clk, .rst_n, .en1(o_con[1]), .en2(o_con[2]), .oe(a_con[5]),
                     .in(obus[17:0]), .out(ir_out), .cont(ir_cont), .q(ir_q));

  assign ac_in = o_con[6] ? obus[18:1] : obus[17:0];
  sic_c_reg #(.W(WORD_W)) u_ac (.clk, .rst_n, .en(o_con[5] | o_con[6]), .oe(a_con[6]),
                                .in(ac_in), .out(ac_out), .q(ac));
  sic_c_reg_md u_md (.clk, .rst_n, .en1(o_con[7]), .en2(c2[2]),
                     .oe1(b_con[4]), .oe2(c1[10] | c1[1] | cpu_dv),
                     .in1(obus[17:0]), .in2(iobus),
                     .out1(md_out1), .out2(md_out2), .q());
  sic_c_reg #(.W(ADDR_W)) u_ia  (.clk, .rst_n, .en(o_con[8]),  .oe(b_con[5]),
                                 .in(obus[12:0]), .out(ia_out), .q(ia));
  sic_c_reg #(.W(ADDR_W)) u_ib  (.clk, .rst_n, .en(o_con[9]),  .oe(b_con[6]),
                                 .in(obus[12:0]), .out(ib_out), .q(ib));
  sic_c_reg #(.W(ADDR_W)) u_pc  (.clk, .rst_n, .en(o_con[10]), .oe(b_con[7]),
                                 .in(obus[12:0]), .out(pc_out), .q(pc));
  sic_c_reg #(.W(ADDR_W)) u_bwc (.clk, .rst_n, .en(o_con[11]), .oe(a_con[7]),
                                 .in(obus[12:0]), .out(bwc_out), .q());
  sic_c_reg_ma u_ma (.clk, .rst_n, .en(o_con[12]), .in(obus), .out(mabus));
  sic_c_lf     u_lf (.clk, .rst_n, .c(c2[14:11]), .in1(obus[0]), .in2(obus[18]), .out(lf));

  sic_c_iohandle u_ioh (
    .clk, .rst_n, .intline, .in(obus[11:0]), .csbus_i(csbus), .csbus_o(cpu_csbus),
    .csrdy, .accept_o(cpu_acc), .datavalid_o(cpu_dv), .ready_o(cpu_ready),
    .clr_intf(c2[8]), .clr_enif(c2[9]), .set_enif(c2[10]), .upd_intf(c2[15]),
    .load_mr(o_con[15]), .and_intr(o_con[14]), .load_csr(o_con[13]),
    .cap_csr(c2[1]), .drive_cs(c1[11]), .accept_c(c1[3]), .dv_set(c1[4]),
    .dv_clr(c1[5]), .ready_c(c1[6]),
    .intf, .enif, .csr, .mr, .intr
  );

  sic_c_bufctl u_buf (
    .clk, .rst_n, .bcrdy, .bior_set(c2[3]), .bcr_clr(c2[4]), .bcr_set(c2[5]),
    .bufrdy_c(c2[6]), .cc_inc(c2[7]), .bufrdy, .bcr_any, .bcr_cc, .bior_cc, .cc(ccnt)
  );
  assign bufend = c1[7];

  // ---------------- memory and I/O lines
  assign mwrite  = c1[1];
  assign menable = c1[2];
  assign iobus     = md_out2 | ram_iobus | dev_iobus | ext_iobus;
  assign csbus     = cpu_csbus | dev_csbus | ext_csbus;
  assign ready     = cpu_ready | dev_ready | ext_ready;
  assign datavalid = cpu_dv    | dev_dv    | ext_datavalid;
  assign accept    = cpu_acc   | dev_acc   | ext_accept;

  sic_ram #(.ADDR_W(ADDR_W), .DATA_W(WORD_W)) u_ram (
    .clk(~clk), .addr(mabus), .data_in(iobus), .data_out(ram_iobus),
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
