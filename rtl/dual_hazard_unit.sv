// dual_hazard_unit: finds a dependency between the two instructions that the
// issue stage sends down the two pipelines in the same cycle.
//
// Inputs are the decoded register fields of the instruction in each pipe's
// decode slot and the priority bit from the issue unit (0: pipe 0 holds the
// older instruction, 1: pipe 1 does). The younger instruction may not read a
// register that the older one writes (read-after-write), because both would
// read the register file in the same cycle. stall_dual goes high in that case
// and the issue logic then sends only the older instruction. Combinational.
//
// Which source registers an instruction reads follows the core's dual hazard
// unit: pipe 0 (branch/ALU) reads rs1 for JALR, branches, register-immediate
// and register-register ALU operations and CSR operations with a register
// operand, rs2 for branches and register-register operations; pipe 1
// (memory/ALU) reads rs1 for loads, stores and ALU operations, rs2 for stores
// and register-register operations. Two additions are this design's own: the
// older instruction must really write a non-zero rd (a store's or branch's
// rd field is immediate bits), and two instructions writing the same register
// (write-after-write) also stall, so the two write-back ports never collide.
module dual_hazard_unit (
  input  logic       priority_i,
  input  logic       valid_0,
  input  logic [4:0] opcode_0,
  input  logic       funct3_2_0,   // funct3[2] of the pipe-0 instruction
  input  logic [4:0] rs1_0,
  input  logic [4:0] rs2_0,
  input  logic [4:0] rd_0,
  input  logic       valid_1,
  input  logic [4:0] opcode_1,
  input  logic       funct3_2_1,
  input  logic [4:0] rs1_1,
  input  logic [4:0] rs2_1,
  input  logic [4:0] rd_1,
  output logic       stall_dual
);
  import rv_pkg::*;

  logic uses_rs1_0, uses_rs2_0, uses_rs1_1, uses_rs2_1;
  logic writes_0, writes_1;

  // Source registers read by an instruction in a given pipe. Each pipe only
  // knows the classes it executes (pipe 0: branch/jump/ALU, pipe 1:
  // load/store/ALU); SYSTEM reads rs1 only in its register forms.
  function automatic logic [1:0] reads_rs(input logic [4:0] opc, input logic f3_2,
                                          input bit pipe1);
    logic [1:0] r;  // {rs2, rs1}
    unique case (opc)
      OPC_OP:                  r = 2'b11;
      OPC_OP_IMM:              r = 2'b01;
      OPC_SYSTEM:              r = {1'b0, !f3_2};
      OPC_BRANCH:              r = pipe1 ? 2'b00 : 2'b11;
      OPC_JALR:                r = pipe1 ? 2'b00 : 2'b01;
      OPC_LOAD:                r = pipe1 ? 2'b01 : 2'b00;
      OPC_STORE:               r = pipe1 ? 2'b11 : 2'b00;
      default:                 r = 2'b00;
    endcase
    return r;
  endfunction

  assign {uses_rs2_0, uses_rs1_0} = reads_rs(opcode_0, funct3_2_0, 1'b0);
  assign {uses_rs2_1, uses_rs1_1} = reads_rs(opcode_1, funct3_2_1, 1'b1);

  // opcodes that write rd: everything except branches, stores, fences, ECALL
  function automatic logic writes_rd(input logic [4:0] opc, input logic [4:0] rd);
    return rd != 5'd0 && !(opc inside {OPC_BRANCH, OPC_STORE, OPC_MISC_MEM});
  endfunction
  assign writes_0 = valid_0 && writes_rd(opcode_0, rd_0);
  assign writes_1 = valid_1 && writes_rd(opcode_1, rd_1);

  always_comb begin
    stall_dual = 1'b0;
    if (valid_0 && valid_1) begin
      if (!priority_i) begin   // pipe 0 older: pipe 1 must not read its rd
        stall_dual = writes_0 && ((uses_rs1_1 && rs1_1 == rd_0) ||
                                  (uses_rs2_1 && rs2_1 == rd_0));
      end else begin           // pipe 1 older: pipe 0 must not read its rd
        stall_dual = writes_1 && ((uses_rs1_0 && rs1_0 == rd_1) ||
                                  (uses_rs2_0 && rs2_0 == rd_1));
      end
      if (writes_0 && writes_1 && rd_0 == rd_1) stall_dual = 1'b1;
    end
  end

endmodule
