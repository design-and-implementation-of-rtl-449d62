// rv_asm_pkg: RV32IM instruction encoders for building test programs inside
// testbenches. Each function returns one 32-bit instruction word in the
// standard RISC-V formats (R, I, S, B, U, J); branch and jump offsets are in
// bytes relative to the instruction.
package rv_asm_pkg;

  function automatic logic [31:0] enc_r(input logic [6:0] f7, input logic [4:0] rs2,
      input logic [4:0] rs1, input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction

  function automatic logic [31:0] enc_i(input int imm, input logic [4:0] rs1,
      input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] opc);
    logic [11:0] i12;
    i12 = 12'(imm);
    return {i12, rs1, f3, rd, opc};
  endfunction

  function automatic logic [31:0] enc_s(input int imm, input logic [4:0] rs2,
      input logic [4:0] rs1, input logic [2:0] f3);
    logic [11:0] i12;
    i12 = 12'(imm);
    return {i12[11:5], rs2, rs1, f3, i12[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] enc_b(input int off, input logic [4:0] rs2,
      input logic [4:0] rs1, input logic [2:0] f3);
    logic [12:0] o;
    o = 13'(off);
    return {o[12], o[10:5], rs2, rs1, f3, o[4:1], o[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] enc_u(input logic [19:0] imm20, input logic [4:0] rd,
      input logic [6:0] opc);
    return {imm20, rd, opc};
  endfunction

  function automatic logic [31:0] enc_j(input int off, input logic [4:0] rd);
    logic [20:0] o;
    o = 21'(off);
    return {o[20], o[10:1], o[11], o[19:12], rd, 7'b1101111};
  endfunction

  // convenience mnemonics
  function automatic logic [31:0] ADDI(input logic [4:0] rd, rs1, input int imm);
    return enc_i(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] SLLI(input logic [4:0] rd, rs1, input int sh);
    return enc_i(sh & 31, rs1, 3'b001, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] SRLI(input logic [4:0] rd, rs1, input int sh);
    return enc_i(sh & 31, rs1, 3'b101, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] SRAI(input logic [4:0] rd, rs1, input int sh);
    return enc_i((sh & 31) | 32'h400, rs1, 3'b101, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] ALU_R(input logic [6:0] f7, input logic [2:0] f3,
      input logic [4:0] rd, rs1, rs2);
    return enc_r(f7, rs2, rs1, f3, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] ADD (input logic [4:0] rd, rs1, rs2); return ALU_R(7'h00, 3'd0, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SUB (input logic [4:0] rd, rs1, rs2); return ALU_R(7'h20, 3'd0, rd, rs1, rs2); endfunction
  function automatic logic [31:0] AND_(input logic [4:0] rd, rs1, rs2); return ALU_R(7'h00, 3'd7, rd, rs1, rs2); endfunction
  function automatic logic [31:0] OR_ (input logic [4:0] rd, rs1, rs2); return ALU_R(7'h00, 3'd6, rd, rs1, rs2); endfunction
  function automatic logic [31:0] XOR_(input logic [4:0] rd, rs1, rs2); return ALU_R(7'h00, 3'd4, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SLTU(input logic [4:0] rd, rs1, rs2); return ALU_R(7'h00, 3'd3, rd, rs1, rs2); endfunction
  function automatic logic [31:0] MUL (input logic [4:0] rd, rs1, rs2); return ALU_R(7'h01, 3'd0, rd, rs1, rs2); endfunction
  function automatic logic [31:0] MULH(input logic [4:0] rd, rs1, rs2); return ALU_R(7'h01, 3'd1, rd, rs1, rs2); endfunction
  function automatic logic [31:0] DIV (input logic [4:0] rd, rs1, rs2); return ALU_R(7'h01, 3'd4, rd, rs1, rs2); endfunction
  function automatic logic [31:0] REM (input logic [4:0] rd, rs1, rs2); return ALU_R(7'h01, 3'd6, rd, rs1, rs2); endfunction
  function automatic logic [31:0] LUI (input logic [4:0] rd, input logic [19:0] imm20); return enc_u(imm20, rd, 7'b0110111); endfunction
  function automatic logic [31:0] AUIPC(input logic [4:0] rd, input logic [19:0] imm20); return enc_u(imm20, rd, 7'b0010111); endfunction
  function automatic logic [31:0] LW  (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LB  (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'b000, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LHU (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'b101, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SW  (input logic [4:0] rs2, rs1, input int imm); return enc_s(imm, rs2, rs1, 3'b010); endfunction
  function automatic logic [31:0] SB  (input logic [4:0] rs2, rs1, input int imm); return enc_s(imm, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] SH  (input logic [4:0] rs2, rs1, input int imm); return enc_s(imm, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] BEQ (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] BNE (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] BLT (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'b100); endfunction
  function automatic logic [31:0] BGE (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'b101); endfunction
  function automatic logic [31:0] JAL (input logic [4:0] rd, input int off); return enc_j(off, rd); endfunction
  function automatic logic [31:0] JALR(input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
  localparam logic [31:0] NOP = 32'h0000_0013;

endpackage
