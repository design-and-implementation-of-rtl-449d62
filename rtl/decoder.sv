// decoder: turns one RV32IM instruction word into the decoded record dec_t
// carried down a pipeline.
//
// Extracts the register fields, the sign-extended immediate of the I, S, B,
// U or J format, the ALU operation and the control flags. Which register
// fields an instruction reads and whether it writes rd are derived from the
// opcode. SYSTEM (CSR, ECALL, EBREAK) and FENCE instructions decode to a NOP
// that reads and writes nothing: this core has no CSR file. An unknown opcode
// is treated the same way. Combinational.
//
// The instruction formats are those of the RISC-V base ISA and M extension;
// the record layout is this design's own.
module decoder
  import rv_pkg::*;
(
  input  logic        valid,
  input  logic [31:0] inst,
  input  logic [31:0] pc,
  output dec_t        dec
);
  logic [4:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opc   = inst[6:2];
  assign f3    = inst[14:12];
  assign f7    = inst[31:25];
  assign imm_i = {{20{inst[31]}}, inst[31:20]};
  assign imm_s = {{20{inst[31]}}, inst[31:25], inst[11:7]};
  assign imm_b = {{19{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
  assign imm_u = {inst[31:12], 12'd0};
  assign imm_j = {{11{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};

  always_comb begin
    dec        = DEC_NOP;
    dec.pc     = pc;
    dec.opcode = opc;
    dec.funct3 = f3;
    dec.rs1    = inst[19:15];
    dec.rs2    = inst[24:20];
    dec.rd     = inst[11:7];
    if (valid && inst[1:0] == 2'b11) begin
      dec.valid = 1'b1;
      unique case (opc)
        OPC_LUI: begin
          dec.writes_rd = 1'b1; dec.imm = imm_u; dec.src_b_imm = 1'b1; dec.alu_op = ALU_PASSB;
        end
        OPC_AUIPC: begin
          dec.writes_rd = 1'b1; dec.imm = imm_u; dec.src_a_pc = 1'b1; dec.src_b_imm = 1'b1;
        end
        OPC_JAL: begin
          dec.writes_rd = 1'b1; dec.imm = imm_j; dec.is_jal = 1'b1;
        end
        OPC_JALR: begin
          dec.writes_rd = 1'b1; dec.uses_rs1 = 1'b1; dec.imm = imm_i; dec.is_jalr = 1'b1;
        end
        OPC_BRANCH: begin
          dec.uses_rs1 = 1'b1; dec.uses_rs2 = 1'b1; dec.imm = imm_b; dec.is_branch = 1'b1;
        end
        OPC_LOAD: begin
          dec.writes_rd = 1'b1; dec.uses_rs1 = 1'b1; dec.imm = imm_i; dec.src_b_imm = 1'b1;
          dec.is_load = 1'b1;
        end
        OPC_STORE: begin
          dec.uses_rs1 = 1'b1; dec.uses_rs2 = 1'b1; dec.imm = imm_s; dec.src_b_imm = 1'b1;
          dec.is_store = 1'b1;
        end
        OPC_OP_IMM: begin
          dec.writes_rd = 1'b1; dec.uses_rs1 = 1'b1; dec.imm = imm_i; dec.src_b_imm = 1'b1;
          unique case (f3)
            3'b000: dec.alu_op = ALU_ADD;
            3'b001: dec.alu_op = ALU_SLL;
            3'b010: dec.alu_op = ALU_SLT;
            3'b011: dec.alu_op = ALU_SLTU;
            3'b100: dec.alu_op = ALU_XOR;
            3'b101: dec.alu_op = inst[30] ? ALU_SRA : ALU_SRL;
            3'b110: dec.alu_op = ALU_OR;
            default: dec.alu_op = ALU_AND;
          endcase
        end
        OPC_OP: begin
          dec.writes_rd = 1'b1; dec.uses_rs1 = 1'b1; dec.uses_rs2 = 1'b1;
          if (f7 == 7'b0000001) begin
            unique case (f3)
              3'b000: dec.alu_op = ALU_MUL;
              3'b001: dec.alu_op = ALU_MULH;
              3'b010: dec.alu_op = ALU_MULHSU;
              3'b011: dec.alu_op = ALU_MULHU;
              3'b100: dec.alu_op = ALU_DIV;
              3'b101: dec.alu_op = ALU_DIVU;
              3'b110: dec.alu_op = ALU_REM;
              default: dec.alu_op = ALU_REMU;
            endcase
          end else begin
            unique case (f3)
              3'b000: dec.alu_op = inst[30] ? ALU_SUB : ALU_ADD;
              3'b001: dec.alu_op = ALU_SLL;
              3'b010: dec.alu_op = ALU_SLT;
              3'b011: dec.alu_op = ALU_SLTU;
              3'b100: dec.alu_op = ALU_XOR;
              3'b101: dec.alu_op = inst[30] ? ALU_SRA : ALU_SRL;
              3'b110: dec.alu_op = ALU_OR;
              default: dec.alu_op = ALU_AND;
            endcase
          end
        end
        default: ;  // FENCE, SYSTEM, unknown: no effect
      endcase
      if (dec.rd == 5'd0) dec.writes_rd = 1'b0;
    end
  end
endmodule
