// sic_pkg: widths, instruction fields and opcodes shared by every SIC
// implementation (the instruction-level Class A core, the pin-level Class B
// core and the microprogrammed Class C system).
//
// The SIC word is 18 bits, of which the low 13 address 8192 words of memory.
// Bit positions of the instruction fields follow the SIC instruction formats:
// MRI = opcode[17:15] | address type[14:13] | address[12:0]; the OPERATE,
// INT and I/O groups use opcode 7 and split bits 14:0 further.  The numeric
// codes of the interrupt-control commands (INT group, bits 12:8) are this
// design's own choice, since the SIC definition names these instructions
// without giving their bit patterns.
package sic_pkg;

  localparam int unsigned WORD_W    = 18;
  localparam int unsigned ADDR_W    = 13;
  localparam int unsigned STATUS_W  = 12;
  localparam int unsigned INT_CHAN  = 8;
  localparam int unsigned BUF_CHAN  = 4;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // major opcodes, IR[17:15]
  typedef enum logic [2:0] {
    OP_ISZ = 3'd0,
    OP_LAC = 3'd1,
    OP_AND = 3'd2,
    OP_TAD = 3'd3,
    OP_JMS = 3'd4,
    OP_DAC = 3'd5,
    OP_JMP = 3'd6,
    OP_OPR = 3'd7
  } opcode_e;

  // address types, IR[14:13]
  typedef enum logic [1:0] {
    AM_DIRECT   = 2'd0,
    AM_INDIRECT = 2'd1,
    AM_INDEX_A  = 2'd2,
    AM_INDEX_B  = 2'd3
  } amode_e;

  // INT group commands, IR[12:8] (encoding chosen by this design)
  localparam logic [4:0] INT_LMI = 5'd0;  // MR   <- IR[7:0]
  localparam logic [4:0] INT_LMA = 5'd1;  // MR   <- AC[7:0]
  localparam logic [4:0] INT_LAM = 5'd2;  // AC   <- MR
  localparam logic [4:0] INT_MII = 5'd3;  // MR   <- MR & ~IR[7:0]
  localparam logic [4:0] INT_CLI = 5'd4;  // INTR <- INTR & ~IR[7:0]
  localparam logic [4:0] INT_EAI = 5'd5;  // enif <- 1
  localparam logic [4:0] INT_DAI = 5'd6;  // enif <- 0

  // interrupt vector: 8 + 2 * (highest pending, unmasked line)
  function automatic addr_t int_vector(input logic [INT_CHAN-1:0] pend);
    addr_t v;
    v = addr_t'(8);
    for (int i = 0; i < INT_CHAN; i++)
      if (pend[i]) v = addr_t'(8 + 2 * i);
    return v;
  endfunction

  // buffer channel descriptor address: 32 + 2 * channel
  function automatic addr_t buf_addr(input logic [1:0] ch);
    return addr_t'(32 + 2 * int'(ch));
  endfunction

endpackage
