// tb_alu: random and corner-case operands for every ALU operation, compared
// with results computed here from SystemVerilog's own arithmetic.
`timescale 1ns/1ps
module tb_alu;
  import rv_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  function automatic logic [31:0] ref_alu(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    longint sx, sz, ux, uz;
    sx = longint'(signed'(x)); sz = longint'(signed'(z));
    ux = longint'({32'd0, x}); uz = longint'({32'd0, z});
    case (o)
      ALU_ADD:    return x + z;
      ALU_SUB:    return x - z;
      ALU_SLL:    return x << z[4:0];
      ALU_SLT:    return (sx < sz) ? 1 : 0;
      ALU_SLTU:   return (ux < uz) ? 1 : 0;
      ALU_XOR:    return x ^ z;
      ALU_SRL:    return x >> z[4:0];
      ALU_SRA:    return 32'(sx >>> z[4:0]);
      ALU_OR:     return x | z;
      ALU_AND:    return x & z;
      ALU_PASSB:  return z;
      ALU_MUL:    return 32'(sx * sz);
      ALU_MULH:   return 32'((sx * sz) >>> 32);
      ALU_MULHSU: return 32'((sx * uz) >>> 32);
      ALU_MULHU:  return 32'((ux * uz) >> 32);
      default:    return 0;
    endcase
  endfunction

  logic [31:0] corner[6] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd31};

  initial begin
    for (int o = 0; o <= int'(ALU_MULHU); o++) begin
      for (int n = 0; n < 600; n++) begin
        op = alu_op_e'(o);
        a = (n < 36) ? corner[n % 6] : $urandom;
        b = (n < 36) ? corner[n / 6] : $urandom;
        #1;
        checks++;
        if (y !== ref_alu(op, a, b)) begin
          failures++;
          $display("FAIL: op %s a=%h b=%h y=%h expected %h", op.name(), a, b, y, ref_alu(op, a, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
