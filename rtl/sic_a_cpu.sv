// sic_a_cpu: instruction-level model of the SIC (the Class A description):
// processor state plus its own 8192-word program memory, executing one
// whole instruction per clock.
//
// Each rising edge while running performs the full instruction cycle in one
// step: fetch M[PC], form the effective address (direct, indirect through
// memory, or indexed by IA or IB), then execute.  Memory-reference
// instructions: ISZ, LAC, AND, TAD, JMS, DAC, JMP.  Operate instructions
// (opcode 7) are decoded by their whole 14-bit operate part, one function
// per instruction: NOP, HLT, CLA, STA, CMA, CLL, STL, SKP, SKZ, SZL, RAR,
// RAL, DTA, DTB, DFA, DFB, INA, INB, with the instruction-level codes
// (RAL = 0x2000, RAR = 0x3000; the pin-level machine uses other codes).  Unknown operate codes do nothing.
// There are no I/O or interrupt ports: the model exercises the instruction
// set only.  The program is placed in `mem` before `start`.
//
// Interface: `start` (one clock) begins execution at the current PC;
// `running` is high until a HLT executes.  `instr_count` counts executed
// instructions.  PC, AC, IA, IB and the link are visible.
//
// Follows the source: register set, field positions, the instruction list,
// operate codes, one instruction per time step, TAD leaving the link alone,
// SKP testing AC >= 0 (read here as the sign bit clear).  This design's
// choices: HLT stops the model (in the source it does nothing), JMS resumes
// at address + 1 after storing the return address at the address (the
// source's "PC = addr" would execute the stored return address), the
// start/running handshake and the reset to PC 0.
module sic_a_cpu
  import sic_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 8192
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  running,
  output word_t ac,
  output addr_t pc,
  output addr_t ia,
  output addr_t ib,
  output logic  lf,
  output logic [31:0] instr_count
);
  // Class A operate codes, operate part IR[13:0]
  localparam logic [13:0] A_NOP = 14'h0000, A_HLT = 14'h0C00, A_CLA = 14'h0200,
                          A_STA = 14'h0100, A_CMA = 14'h0300, A_CLL = 14'h0800,
                          A_STL = 14'h0400, A_SKP = 14'h0003, A_SKZ = 14'h0002,
                          A_SZL = 14'h0010, A_RAR = 14'h3000, A_RAL = 14'h2000,
                          A_DTA = 14'h0040, A_DTB = 14'h0060, A_DFA = 14'h0020,
                          A_DFB = 14'h0030, A_INA = 14'h0050, A_INB = 14'h0070;

  word_t mem [MEM_WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      ac <= '0; pc <= '0; ia <= '0; ib <= '0; lf <= 1'b0;
      instr_count <= '0;
    end else if (!running) begin
      if (start) running <= 1'b1;
    end else begin
      word_t   ir, md;
      addr_t   ea;
      opcode_e op;
      ir = mem[pc];
      op = opcode_e'(ir[17:15]);
      ea = ir[12:0];
      if (op != OP_OPR)
        unique case (amode_e'(ir[14:13]))
          AM_DIRECT:   ;
          AM_INDIRECT: ea = mem[ea][12:0];
          AM_INDEX_A:  ea = ea + ia;
          AM_INDEX_B:  ea = ea + ib;
        endcase
      md = mem[ea];
      pc <= pc + 1'b1;
      instr_count <= instr_count + 1;
      unique case (op)
        OP_ISZ: begin
          md = md + 1'b1;
          mem[ea] <= md;
          if (md == '0) pc <= pc + addr_t'(2);
        end
        OP_LAC: ac <= md;
        OP_AND: ac <= ac & md;
        OP_TAD: ac <= ac + md;
        OP_JMS: begin
          mem[ea] <= word_t'(addr_t'(pc + 1'b1));
          pc <= ea + 1'b1;
        end
        OP_DAC: mem[ea] <= ac;
        OP_JMP: pc <= ea;
        OP_OPR:
          case (ir[13:0])
            A_HLT: running <= 1'b0;
            A_CLA: ac <= '0;
            A_STA: ac <= '1;
            A_CMA: ac <= ~ac;
            A_CLL: lf <= 1'b0;
            A_STL: lf <= 1'b1;
            A_SKP: if (!ac[17]) pc <= pc + addr_t'(2);
            A_SKZ: if (ac == '0) pc <= pc + addr_t'(2);
            A_SZL: if (!lf) pc <= pc + addr_t'(2);
            A_RAR: begin ac <= {lf, ac[17:1]}; lf <= ac[0]; end
            A_RAL: begin ac <= {ac[16:0], lf}; lf <= ac[17]; end
            A_DTA: ia <= ac[12:0];
            A_DTB: ib <= ac[12:0];
            A_DFA: ac <= word_t'(ia);
            A_DFB: ac <= word_t'(ib);
            A_INA: ia <= ia + 1'b1;
            A_INB: ib <= ib + 1'b1;
            A_NOP:   ;
            default: ;                       // undefined codes do nothing
          endcase
      endcase
    end
  end

endmodule
