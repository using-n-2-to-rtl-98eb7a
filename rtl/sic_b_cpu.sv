// sic_b_cpu: pin-level SIC processor (the "Class B" implementation).
//
// SIC is an 18-bit single-accumulator machine with a 13-bit address space.
// This core executes every instruction as a sequence of register transfers,
// one transfer per clock, under a state machine that follows the SIC control
// sequence:
//   * between instructions it serves a pending buffer channel (BCR != 0)
//     first, then a pending interrupt (intf), then fetches: MA<-PC;
//     MD<-M[MA]; IR<-MD, PC<-PC+1 (3 clocks);
//   * MRI instructions form the effective address in IR[12:0] (direct 1 clock,
//     indirect 3, index A/B 2), then execute ISZ LAC AND TAD JMS DAC JMP;
//   * OPERATE instructions (IR[17:14]=1110) take three event times, one clock
//     each (Table III of the SIC definition): event 1 rotate or link/AC set,
//     clear, complement, halt; event 2 rotate or SZL DFA DFB DTA INA DTB INB;
//     event 3 rotate or skip on AC<0 / =0 / >0 (skipped after SZL);
//   * I/O instructions (IR[17:12]=111101) put IR[11:0] on the status bus with
//     `csrdy` and wait for `accept`, then move a data word or a status word
//     with the ready / datavalid / accept handshake, or set a buffer channel
//     direction bit in BIOR;
//   * INT instructions (IR[17:13]=11111) load, read or clear the mask MR and
//     the request register INTR and enable or disable interrupts;
//   * interrupt service stores PC at vector 8+2*line and continues at the
//     vector plus one; buffer service moves one word per request between
//     memory and a device, using a two-word descriptor at 32+2*channel
//     (negative word count, start address).
// Memory is accessed over MABUS / IOBUS with `menable` and `mwrite`; a read
// or a write takes one clock.  Shared lines (IOBUS, CSBUS, ready, datavalid,
// accept) have a separate input and output here; outputs are zero when not
// driven so that the system can wire-OR them.
//
// Taken from the SIC definition: registers and widths, instruction fields,
// the order of the transfers, the handshakes, interrupt and buffer
// descriptor addresses.  This design's own choices: the numeric codes of the
// INT-group commands (see sic_pkg), that INTR and BCR capture rising edges of
// INTLINE and BCRDY, the test (TST) group is a one-clock no-op, TAD leaves
// its carry in the link, JMS continues at the target plus one, HLT returns
// to the idle state that waits for `start`, and the link and AC actions of
// event 1 happen in the same clock.
module sic_b_cpu
  import sic_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [INT_CHAN-1:0] intline,
  input  logic [BUF_CHAN-1:0] bcrdy,
  output logic [BUF_CHAN-1:0] bufrdy,
  output logic                bufend,
  output logic                csrdy,
  input  logic                ready_i,
  output logic                ready_o,
  input  logic                datavalid_i,
  output logic                datavalid_o,
  input  logic                accept_i,
  output logic                accept_o,
  input  word_t               iobus_i,
  output word_t               iobus_o,
  input  logic [STATUS_W-1:0] csbus_i,
  output logic [STATUS_W-1:0] csbus_o,
  output addr_t               mabus,
  output logic                mwrite,
  output logic                menable,
  // observation of the programmer-visible state
  output logic                running,
  output word_t               ac_o,
  output addr_t               pc_o,
  output addr_t               ia_o,
  output addr_t               ib_o,
  output logic                lf_o,
  output logic                enif_o
);

  typedef enum logic [5:0] {
    S_IDLE,
    S_F0, S_F1, S_F2,
    S_EA0, S_EA_RD, S_EA_LD, S_EA_IDX,
    S_EX0, S_EX1, S_EX2, S_ST, S_JMS2,
    S_EV1, S_EV2, S_EV3,
    S_TST, S_INT,
    S_I0, S_I1, S_I2, S_I3,
    S_IO0, S_IO1, S_IO_OMD, S_IO_OWR, S_IO_ODV,
    S_IO_IRDY, S_IO_IACC, S_IO_IFIN, S_IO_BIOR,
    S_B_SCAN, S_B1, S_B2, S_B3, S_B4, S_B5, S_B6,
    S_B_ORD, S_B_OWR, S_B_ODV, S_B_IRDY, S_B_IST, S_B_IACC,
    S_B_END, S_B_WB1, S_B_WB2
  } state_e;

  state_e st;

  word_t                ac, md, ir;
  addr_t                pc, ma, ia, ib, bwc;
  logic                 lf, intf, enif;
  logic [INT_CHAN-1:0]  mr, intr, intline_q;
  logic [STATUS_W-1:0]  csr;
  logic [BUF_CHAN-1:0]  bcr, bior, bcrdy_q;
  logic [1:0]           cc;

  // IR fields
  opcode_e    opcode;
  amode_e     amode;
  addr_t      addr;
  assign opcode = opcode_e'(ir[17:15]);
  assign amode  = amode_e'(ir[14:13]);
  assign addr   = ir[12:0];

  // operate fields
  wire       rot_dir = ir[13];          // 0 left, 1 right
  wire       rot1    = ir[12];
  wire [1:0] ev1_1   = ir[11:10];
  wire [1:0] ev1_2   = ir[9:8];
  wire       rot2    = ir[7];
  wire [2:0] ev2     = ir[6:4];
  wire       rot3    = ir[3];
  wire       ev3_lt  = ir[2];
  wire       ev3_eq  = ir[1];
  wire       ev3_gt  = ir[0];
  // I/O fields
  wire [1:0] io_cmd  = ir[8:7];
  wire       io_data = ir[7];
  wire       io_dir  = ir[6];
  wire [5:0] io_comp = ir[5:0];
  wire [1:0] buf_ch  = ir[10:9];

  // rotate of the 19-bit link:accumulator pair
  word_t rot_ac;
  logic  rot_lf;
  always_comb begin
    if (rot_dir) begin
      rot_ac = {lf, ac[17:1]};
      rot_lf = ac[0];
    end else begin
      rot_ac = {ac[16:0], lf};
      rot_lf = ac[17];
    end
  end

  wire ac_neg  = ac[17];
  wire ac_zero = (ac == '0);
  wire ac_pos  = !ac_neg && !ac_zero;
  wire skip3   = (ev3_lt && ac_neg) || (ev3_eq && ac_zero) || (ev3_gt && ac_pos);

  wire [INT_CHAN-1:0] pending = intr & mr;
  wire                int_req = (|pending) && enif;

  // where an instruction goes when it ends: buffer service, then interrupt
  // service, then the next fetch
  state_e next_instr;
  always_comb begin
    if (|bcr)      next_instr = S_B_SCAN;
    else if (intf) next_instr = S_I0;
    else           next_instr = S_F0;
  end

  logic [INT_CHAN-1:0] intr_clr;
  logic [BUF_CHAN-1:0] bcr_clr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      ac        <= '0;
      md        <= '0;
      ir        <= '0;
      pc        <= '0;
      ma        <= '0;
      ia        <= '0;
      ib        <= '0;
      bwc       <= '0;
      lf        <= 1'b0;
      intf      <= 1'b0;
      enif      <= 1'b0;
      mr        <= '0;
      intr      <= '0;
      intline_q <= '0;
      csr       <= '0;
      bcr       <= '0;
      bior      <= '0;
      bcrdy_q   <= '0;
      cc        <= '0;
    end else begin
      intline_q <= intline;
      bcrdy_q   <= bcrdy;
      intr      <= (intr & ~intr_clr) | (intline & ~intline_q);
      bcr       <= (bcr & ~bcr_clr) | (bcrdy & ~bcrdy_q);

      unique case (st)
        S_IDLE: if (start) st <= next_instr;

        // ---------------- fetch
        S_F0: begin ma <= pc; st <= S_F1; end
        S_F1: begin md <= iobus_i; st <= S_F2; end
        S_F2: begin
          ir <= md;
          pc <= pc + 1'b1;
          if (int_req) intf <= 1'b1;
          if (md[17:15] != OP_OPR)  st <= S_EA0;
          else if (!md[14])         st <= S_EV1;
          else case (md[14:12])
            3'b100:  st <= S_TST;
            3'b101:  st <= S_IO0;
            default: st <= S_INT;
          endcase
        end

        // ---------------- effective address
        S_EA0: begin
          ma <= addr;
          unique case (amode)
            AM_DIRECT:   st <= S_EX0;
            AM_INDIRECT: st <= S_EA_RD;
            default:     st <= S_EA_IDX;
          endcase
        end
        S_EA_RD:  begin md <= iobus_i; st <= S_EA_LD; end
        S_EA_LD:  begin ir[12:0] <= md[12:0]; st <= S_EX0; end
        S_EA_IDX: begin
          ir[12:0] <= addr + ((amode == AM_INDEX_A) ? ia : ib);
          st <= S_EX0;
        end

        // ---------------- MRI execution
        S_EX0: begin
          if (opcode == OP_JMP) begin
            pc <= addr;
            st <= next_instr;
          end else begin
            ma <= addr;
            st <= S_EX1;
          end
        end
        S_EX1: begin
          unique case (opcode)
            OP_JMS:  begin md <= word_t'(pc); st <= S_ST; end
            OP_DAC:  begin md <= ac;          st <= S_ST; end
            default: begin md <= iobus_i;     st <= S_EX2; end
          endcase
        end
        S_EX2: begin
          unique case (opcode)
            OP_LAC:  begin ac <= md;      st <= next_instr; end
            OP_AND:  begin ac <= md & ac; st <= next_instr; end
            OP_TAD:  begin {lf, ac} <= {1'b0, md} + {1'b0, ac}; st <= next_instr; end
            default: begin md <= md + 1'b1; st <= S_ST; end   // ISZ
          endcase
        end
        S_ST: begin
          if (opcode == OP_ISZ && md == '0) pc <= pc + 1'b1;
          st <= (opcode == OP_JMS) ? S_JMS2 : next_instr;
        end
        S_JMS2: begin pc <= addr + 1'b1; st <= next_instr; end

        // ---------------- OPERATE, three event times
        S_EV1: begin
          st <= S_EV2;
          if (rot1) begin
            ac <= rot_ac; lf <= rot_lf;
          end else if (ev1_1 == 2'd3) begin
            st <= S_IDLE;                          // halt
          end else begin
            if (ev1_1 == 2'd1) lf <= 1'b1;
            if (ev1_1 == 2'd2) lf <= 1'b0;
            unique case (ev1_2)
              2'd1:    ac <= '1;
              2'd2:    ac <= '0;
              2'd3:    ac <= ~ac;
              default: ;
            endcase
          end
        end
        S_EV2: begin
          st <= S_EV3;
          if (rot2) begin
            ac <= rot_ac; lf <= rot_lf;
          end else begin
            unique case (ev2)
              3'd1: begin if (!lf) pc <= pc + 1'b1; st <= next_instr; end  // SZL
              3'd2: ac <= word_t'(ia);                                     // DFA
              3'd3: ac <= word_t'(ib);                                     // DFB
              3'd4: ia <= ac[12:0];                                        // DTA
              3'd5: ia <= ia + 1'b1;                                       // INA
              3'd6: ib <= ac[12:0];                                        // DTB
              3'd7: ib <= ib + 1'b1;                                       // INB
              default: ;
            endcase
          end
        end
        S_EV3: begin
          if (rot3) begin
            ac <= rot_ac; lf <= rot_lf;
          end else if (skip3) begin
            pc <= pc + 1'b1;
          end
          st <= next_instr;
        end

        S_TST: st <= next_instr;

        // ---------------- interrupt control instructions
        S_INT: begin
          unique case (ir[12:8])
            INT_LMI: mr   <= ir[7:0];
            INT_LMA: mr   <= ac[7:0];
            INT_LAM: ac   <= word_t'(mr);
            INT_MII: mr   <= mr & ~ir[7:0];
            INT_EAI: enif <= 1'b1;
            INT_DAI: enif <= 1'b0;
            default: ;                             // CLI: see intr_clr
          endcase
          st <= next_instr;
        end

        // ---------------- interrupt service
        S_I0: begin intf <= 1'b0; enif <= 1'b0; st <= S_I1; end
        S_I1: begin
          ir[12:0] <= int_vector(pending);
          ma       <= int_vector(pending);
          md       <= word_t'(pc);
          st       <= S_I2;
        end
        S_I2: st <= S_I3;                          // store PC
        S_I3: begin pc <= addr + 1'b1; st <= S_F0; end

        // ---------------- unbuffered I/O
        S_IO0: begin csr <= ir[11:0]; st <= S_IO1; end
        S_IO1: if (accept_i) begin
          unique case (io_cmd)
            2'd0, 2'd1: st <= io_dir ? S_IO_IRDY : S_IO_OMD;
            2'd2:       st <= S_IO_BIOR;
            default:    st <= next_instr;
          endcase
        end
        S_IO_OMD: begin md <= ac; st <= S_IO_OWR; end
        S_IO_OWR: if (ready_i) st <= S_IO_ODV;
        S_IO_ODV: if (accept_i) st <= next_instr;
        S_IO_IRDY: if (datavalid_i) begin
          if (io_data) csr <= csbus_i;
          else         md  <= iobus_i;
          st <= S_IO_IACC;
        end
        S_IO_IACC: if (!datavalid_i) st <= S_IO_IFIN;
        S_IO_IFIN: begin
          if (!io_data)                   ac <= md;
          else if (|(io_comp & csr[5:0])) pc <= pc + 1'b1;
          st <= next_instr;
        end
        S_IO_BIOR: begin bior[buf_ch] <= io_dir; st <= next_instr; end

        // ---------------- buffer channel service
        S_B_SCAN: begin
          if (bcr[cc]) begin
            ir[12:0] <= buf_addr(cc);
            st       <= S_B1;
          end else begin
            cc <= cc + 1'b1;
          end
        end
        S_B1: begin ma <= addr; st <= S_B2; end
        S_B2: begin md <= iobus_i; ir[12:0] <= addr + 1'b1; st <= S_B3; end
        S_B3: begin ma <= addr; bwc <= md[12:0]; st <= S_B4; end
        S_B4: begin md <= iobus_i; st <= S_B5; end
        S_B5: begin ma <= md[12:0] + bwc; st <= S_B6; end
        S_B6: begin
          bwc <= bwc + 1'b1;
          st  <= bior[cc] ? S_B_IRDY : S_B_ORD;
        end
        S_B_ORD: begin md <= iobus_i; st <= S_B_OWR; end
        S_B_OWR: if (ready_i) st <= S_B_ODV;
        S_B_ODV: if (accept_i) st <= S_B_END;
        S_B_IRDY: if (datavalid_i) begin md <= iobus_i; st <= S_B_IST; end
        S_B_IST:  st <= S_B_IACC;
        S_B_IACC: if (!datavalid_i) st <= S_B_END;
        S_B_END:  st <= (bwc == '0) ? next_instr : S_B_WB1;
        S_B_WB1: begin ma <= buf_addr(cc); md <= word_t'(bwc); st <= S_B_WB2; end
        S_B_WB2: st <= next_instr;

        default: st <= S_IDLE;
      endcase
    end
  end

  // register clears that share a clock with the edge capture above
  always_comb begin
    intr_clr = '0;
    bcr_clr  = '0;
    if (st == S_INT && ir[12:8] == INT_CLI) intr_clr = ir[7:0];
    if (st == S_B_SCAN && bcr[cc])          bcr_clr[cc] = 1'b1;
  end

  // ---------------- pins
  wire mem_rd = (st == S_F1) || (st == S_EA_RD) ||
                (st == S_EX1 && opcode != OP_JMS && opcode != OP_DAC) ||
                (st == S_B2) || (st == S_B4) || (st == S_B_ORD);
  wire mem_wr = (st == S_ST) || (st == S_I2) || (st == S_B_IST) || (st == S_B_WB2);

  assign menable     = mem_rd || mem_wr;
  assign mwrite      = mem_wr;
  assign mabus       = ma;
  assign iobus_o     = (mem_wr || st == S_IO_ODV || st == S_B_ODV) ? md : '0;
  assign csbus_o     = (st == S_IO1) ? csr : '0;
  assign csrdy       = (st == S_IO1);
  assign datavalid_o = (st == S_IO_ODV) || (st == S_B_ODV);
  assign ready_o     = (st == S_IO_IRDY) || (st == S_IO_IACC) ||
                       (st == S_B_IRDY) || (st == S_B_IST) || (st == S_B_IACC);
  assign accept_o    = (st == S_IO_IACC) || (st == S_B_IST) || (st == S_B_IACC);
  assign bufend      = (st == S_B_END) && (bwc == '0);
  always_comb begin
    bufrdy = '0;
    if (st == S_B6 || (st == S_B_END && bwc != '0)) bufrdy[cc] = 1'b1;
  end

  assign running = (st != S_IDLE);
  assign ac_o    = ac;
  assign pc_o    = pc;
  assign ia_o    = ia;
  assign ib_o    = ib;
  assign lf_o    = lf;
  assign enif_o  = enif;

  // a read and a write are never requested together
  assert property (@(posedge clk) !(mem_rd && mem_wr));
  // the processor drives datavalid only while it is not itself receiving
  assert property (@(posedge clk) !(datavalid_o && ready_o));

endmodule
