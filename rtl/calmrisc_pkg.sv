// calmrisc_pkg: types and constants shared by the CalmRISC core, its
// address generation units and the chip top.
//
// The core is an 8-bit register-memory RISC: an ALU instruction computes
// op1 <- op1 (+) op2, where op1 is always a register and op2 is a register,
// an immediate or a data-memory location; only stores write memory. Every
// instruction is one word and runs in one cycle through a three-stage
// pipeline (IF, ID/MEM, EX).
//
// The 8-bit data width, the register-memory scheme, the 12-bit program
// address (the PAGU incrementer width) and the generic coprocessor
// instructions follow the published architecture description. The
// instruction word below (its width, fields and opcode values), the number
// of registers, the ALU operation set, the flags and the branch conditions
// are this design's own: the description does not publish an encoding.
package calmrisc_pkg;

  localparam int unsigned DATA_W  = 8;   // 8-bit microcontroller
  localparam int unsigned PC_W    = 12;  // width of the PAGU incrementer
  localparam int unsigned DADDR_W = 8;   // data address width (own choice)
  localparam int unsigned NREGS   = 4;   // general registers (own choice)
  localparam int unsigned REG_AW  = $clog2(NREGS);
  localparam int unsigned COP_STATUS_W = 2; // coprocessor status inputs

  // Major opcode. Memory-operand classes are told apart by the early
  // decoder in IF so that DAGU can be armed for the ID/MEM stage.
  typedef enum logic [3:0] {
    OP_NOP   = 4'h0,  // no operation
    OP_ALU_R = 4'h1,  // rd <- rd fn rs
    OP_ALU_I = 4'h2,  // rd <- rd fn imm[7:0]
    OP_ALU_M = 4'h3,  // rd <- rd fn DM[imm[7:0]]          (direct)
    OP_ALU_X = 4'h4,  // rd <- rd fn DM[rs + imm[7:0]]     (indexed)
    OP_ST    = 4'h5,  // DM[imm[7:0]] <- rd                (direct)
    OP_STX   = 4'h6,  // DM[rs + imm[7:0]] <- rd           (indexed)
    OP_JMP   = 4'h7,  // pc <- imm                          (no stall)
    OP_BR    = 4'h8,  // if cond(fn) pc <- imm              (one stall)
    OP_COP   = 4'h9,  // coprocessor command imm, memory slot to coprocessor
    OP_CLD   = 4'hA   // coprocessor register transfer (fn[0]: 1 = to cop)
  } opcode_e;

  typedef enum logic [2:0] {
    FN_ADD = 3'd0,
    FN_ADC = 3'd1,
    FN_SUB = 3'd2,
    FN_SBC = 3'd3,
    FN_AND = 3'd4,
    FN_OR  = 3'd5,
    FN_XOR = 3'd6,
    FN_MOV = 3'd7   // rd <- op2 (a load when op2 is memory)
  } alu_fn_e;

  // Branch conditions, carried in the fn field of OP_BR. The last four read
  // the coprocessor status inputs directly.
  typedef enum logic [2:0] {
    CC_Z    = 3'd0,
    CC_NZ   = 3'd1,
    CC_C    = 3'd2,
    CC_NC   = 3'd3,
    CC_CS0  = 3'd4,  // cop_status[0] set
    CC_NCS0 = 3'd5,
    CC_CS1  = 3'd6,  // cop_status[1] set
    CC_NCS1 = 3'd7
  } cond_e;

  // One instruction word, 23 bits.
  typedef struct packed {
    opcode_e           op;
    logic [2:0]        fn;   // alu_fn_e, cond_e, or CLD direction in bit 0
    logic [REG_AW-1:0] rd;
    logic [REG_AW-1:0] rs;
    logic [11:0]       imm;  // immediate, data address/offset, target, cop command
  } insn_t;

  localparam int unsigned INSN_W = $bits(insn_t);

  typedef struct packed {
    logic z;
    logic c;
  } flags_t;

  // Assembler helpers for testbenches and ROM tables.
  function automatic insn_t mk(opcode_e op, logic [2:0] fn, int rd, int rs, int imm);
    insn_t i;
    i.op  = op;
    i.fn  = fn;
    i.rd  = REG_AW'(rd);
    i.rs  = REG_AW'(rs);
    i.imm = 12'(imm);
    return i;
  endfunction

endpackage
