// alu: the single-cycle arithmetic unit of a pipeline's execute stage.
//
// Computes every RV32I register and immediate operation (add, subtract,
// shifts by the low five bits of b, set-less-than, logic) and the four
// M-extension multiplies (MUL, MULH, MULHSU, MULHU) from a 64-bit product.
// ALU_PASSB returns b (used by LUI). Divide and remainder are not done here
// but in the multi-cycle divider; for those codes the ALU returns 0.
// Purely combinational.
//
// The operation set is that of the RISC-V RV32IM base the core implements;
// doing multiplication in one cycle is this design's choice.
module alu
  import rv_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic signed [65:0] prod;
  logic               a_sx, b_sx;

  // sign-extend each operand for the signed forms of the high product
  assign a_sx = (op == ALU_MULH || op == ALU_MULHSU) ? a[31] : 1'b0;
  assign b_sx = (op == ALU_MULH) ? b[31] : 1'b0;
  assign prod = $signed({a_sx, a_sx, a}) * $signed({b_sx, b_sx, b});

  always_comb begin
    unique case (op)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_SLL:    y = a << b[4:0];
      ALU_SLT:    y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:   y = {31'd0, a < b};
      ALU_XOR:    y = a ^ b;
      ALU_SRL:    y = a >> b[4:0];
      ALU_SRA:    y = 32'($signed(a) >>> b[4:0]);
      ALU_OR:     y = a | b;
      ALU_AND:    y = a & b;
      ALU_PASSB:  y = b;
      ALU_MUL:    y = prod[31:0];
      ALU_MULH, ALU_MULHSU, ALU_MULHU: y = prod[63:32];
      default:    y = 32'd0;
    endcase
  end
endmodule
