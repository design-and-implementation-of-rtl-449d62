// rv_pkg: types and constants shared by the dual-issue RV32IM core.
//
// Holds the RV32 opcode map (the 5-bit opcode field inst[6:2]), the three
// instruction classes the issue logic steers on (branch, memory, ALU), the
// ALU operation encoding, and the decoded-instruction record that travels from
// the issue stage down each pipeline. The opcode values are those of the
// RISC-V base ISA; the class split (branch/ALU to pipe 0, memory/ALU to
// pipe 1) follows the core's pipeline assignment. The ALU encoding and the
// record layout are this design's own.
package rv_pkg;

  localparam int unsigned XLEN = 32;

  // Opcode field inst[6:2]
  typedef enum logic [4:0] {
    OPC_LOAD     = 5'b00000,
    OPC_MISC_MEM = 5'b00011,
    OPC_OP_IMM   = 5'b00100,
    OPC_AUIPC    = 5'b00101,
    OPC_STORE    = 5'b01000,
    OPC_OP       = 5'b01100,
    OPC_LUI      = 5'b01101,
    OPC_BRANCH   = 5'b11000,
    OPC_JALR     = 5'b11001,
    OPC_JAL      = 5'b11011,
    OPC_SYSTEM   = 5'b11100
  } opcode_e;

  // Instruction class used by the issue unit (Table 4.1 of the design notes)
  typedef enum logic [1:0] {
    CLS_ALU    = 2'd0,
    CLS_MEM    = 2'd1,
    CLS_BRANCH = 2'd2
  } iclass_e;

  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_PASSB,
    ALU_MUL, ALU_MULH, ALU_MULHSU, ALU_MULHU,
    ALU_DIV, ALU_DIVU, ALU_REM, ALU_REMU
  } alu_op_e;

  // Decoded instruction, as it enters the execute stage of a pipeline
  typedef struct packed {
    logic        valid;     // a real instruction (0 = bubble / NOP)
    logic [31:0] pc;
    logic [4:0]  opcode;
    logic [2:0]  funct3;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic        uses_rs1;
    logic        uses_rs2;
    logic        writes_rd; // writes a non-zero rd
    logic [31:0] imm;
    alu_op_e     alu_op;
    logic        src_a_pc;  // ALU operand A is the PC (AUIPC)
    logic        src_b_imm; // ALU operand B is the immediate
    logic        is_load;
    logic        is_store;
    logic        is_branch; // conditional branch
    logic        is_jal;
    logic        is_jalr;
  } dec_t;

  localparam dec_t DEC_NOP = '{
    valid: 1'b0, pc: 32'd0, opcode: 5'd0, funct3: 3'd0, rs1: 5'd0, rs2: 5'd0,
    rd: 5'd0, uses_rs1: 1'b0, uses_rs2: 1'b0, writes_rd: 1'b0, imm: 32'd0,
    alu_op: ALU_ADD, src_a_pc: 1'b0, src_b_imm: 1'b0, is_load: 1'b0,
    is_store: 1'b0, is_branch: 1'b0, is_jal: 1'b0, is_jalr: 1'b0
  };

  // Class of a raw instruction word
  function automatic iclass_e classify(input logic [31:0] inst);
    case (inst[6:2])
      OPC_BRANCH, OPC_JAL, OPC_JALR: return CLS_BRANCH;
      OPC_LOAD, OPC_STORE:           return CLS_MEM;
      default:                       return CLS_ALU;
    endcase
  endfunction

  // Result bypass source: a value that a later stage will write to rd
  typedef struct packed {
    logic        valid;
    logic [4:0]  rd;
    logic [31:0] data;
  } bypass_t;

endpackage
