// aemb_pkg: types and constants shared by the two-thread, coarse-grained AEMB core.
// The core executes the MicroBlaze (EDK 6.3) instruction set. The decoder (aemb_ctrl)
// turns each 32-bit instruction into an xctl_t record that travels with the instruction
// into the execute stage, where the integer unit, branch check, multiplier, barrel
// shifter and bus interfaces act on it. Opcode values follow the MicroBlaze encoding;
// MSR bit positions are counted from the least significant bit.
//
// Origin: the instruction encodings follow the MicroBlaze EDK 6.3 instruction set that AEMB
// implements, and MSR bit 29 as thread phase follows AEMB. The record layout, the other
// MSR bit positions, the exception codes and the injected interrupt word are choices of
// this implementation.
package aemb_pkg;

  // Where the write-back value of an instruction comes from. RES_ALU results are ready
  // at the end of the execute stage and can be forwarded; all others take 2 cycles.
  typedef enum logic [2:0] {
    RES_ALU = 3'd0,
    RES_MUL = 3'd1,
    RES_BSF = 3'd2,
    RES_LD  = 3'd3,
    RES_GET = 3'd4,
    RES_SPR = 3'd5
  } res_e;

  // Integer unit operation.
  typedef enum logic [3:0] {
    ALU_NONE   = 4'd0,
    ALU_ADD    = 4'd1,
    ALU_OR     = 4'd2,
    ALU_AND    = 4'd3,
    ALU_XOR    = 4'd4,
    ALU_ANDN   = 4'd5,
    ALU_SRA    = 4'd6,
    ALU_SRC    = 4'd7,
    ALU_SRL    = 4'd8,
    ALU_SEXT8  = 4'd9,
    ALU_SEXT16 = 4'd10,
    ALU_MSR    = 4'd11,
    ALU_LINK   = 4'd12
  } alu_e;

  // Program flow class.
  typedef enum logic [1:0] {
    BR_NONE = 2'd0,
    BR_UNC  = 2'd1,
    BR_CND  = 2'd2,
    BR_RET  = 2'd3
  } br_e;

  // Branch conditions of the conditional branch family (instruction bits 23:21).
  localparam logic [2:0] CND_EQ = 3'd0, CND_NE = 3'd1, CND_LT = 3'd2,
                         CND_LE = 3'd3, CND_GT = 3'd4, CND_GE = 3'd5;

  // Special purpose register selectors for mfs (instruction bits 3:0).
  localparam logic [3:0] SPR_PC = 4'h0, SPR_MSR = 4'h1, SPR_EAR = 4'h3, SPR_ESR = 4'h5;

  // MSR bit positions (LSB = 0).
  localparam int unsigned MSR_IE  = 1;   // interrupt enable
  localparam int unsigned MSR_C   = 2;   // arithmetic carry
  localparam int unsigned MSR_BIP = 3;   // break in progress
  localparam int unsigned MSR_MTX = 4;   // mutex bit used to split the two threads
  localparam int unsigned MSR_EE  = 8;   // exception enable
  localparam int unsigned MSR_EIP = 9;   // exception in progress
  localparam int unsigned MSR_PHA = 29;  // thread phase of the executing instruction
  localparam int unsigned MSR_CC  = 31;  // copy of the carry bit

  // Exception cause codes written to ESR[4:0].
  localparam logic [4:0] EC_UNALIGNED = 5'b00001;
  localparam logic [4:0] EC_ILLEGAL   = 5'b00010;
  localparam logic [4:0] EC_FPU       = 5'b00110;

  // Vectors.
  localparam logic [31:0] VEC_INT = 32'h0000_0010;
  localparam logic [31:0] VEC_EXC = 32'h0000_0020;

  // Instruction injected in place of a fetched word to take an interrupt:
  // branch absolute with link to r14, target VEC_INT, no delay slot.
  localparam logic [31:0] INSN_INT = {6'h2E, 5'd14, 5'b01100, 16'h0010};

  // Major opcodes used by the predecoder.
  localparam logic [5:0] OP_BR = 6'h26, OP_BRI = 6'h2E, OP_BCC = 6'h27, OP_BCCI = 6'h2F,
                         OP_RET = 6'h2D, OP_IMM = 6'h2C, OP_MSR = 6'h25;

  // Decoded instruction as held in the execute stage.
  typedef struct packed {
    logic        valid;
    logic        thr;       // thread (GPHA) of the instruction
    logic [31:0] pc;
    logic [4:0]  rd;
    logic        we;        // writes rd
    res_e        res;
    alu_e        alu;
    logic        sub;       // reverse subtract (rB - rA)
    logic        cin_msr;   // carry in from MSR[C]
    logic        keep;      // keep MSR[C]
    logic        cmp;
    logic        cmpu;
    br_e         br;
    logic        ds;        // branch has a delay slot
    logic        absol;     // absolute branch target
    logic        brk;       // break: sets BIP
    logic [2:0]  cond;
    logic        rti;       // return from interrupt
    logic        rtb;       // return from break
    logic        rte;       // return from exception
    logic        ld;
    logic        st;
    logic [1:0]  size;      // 0 byte, 1 half word, 2 word
    logic        get;
    logic        put;
    logic        xctl;      // accelerator control/status (1) or data (0) register
    logic [3:0]  xadr;      // accelerator address
    logic        mts;
    logic        msrclr;
    logic        msrset;
    logic [3:0]  spr;       // mfs source
    logic        bs_left;
    logic        bs_arith;
    logic        illegal;
    logic        fpu;
    logic        inj;       // injected interrupt branch
  } xctl_t;

  // True for every branch and return instruction.
  function automatic logic is_branch(input logic [31:0] i);
    logic [5:0] op;
    op = i[31:26];
    return (op == OP_BR) || (op == OP_BRI) || (op == OP_BCC) || (op == OP_BCCI) || (op == OP_RET);
  endfunction

  // True when a branch or return has a delay slot.
  function automatic logic has_dslot(input logic [31:0] i);
    logic [5:0] op;
    op = i[31:26];
    if (op == OP_BR || op == OP_BRI) return i[20];
    if (op == OP_BCC || op == OP_BCCI) return i[25];
    return op == OP_RET;
  endfunction

endpackage
