// tb_divider: DIV, DIVU, REM and REMU on random operands and on the RISC-V
// corner cases (division by zero, -2^31 / -1), compared with reference
// results; checks that each division takes exactly 33 cycles from request to
// done and that busy is high exactly until then.
`timescale 1ns/1ps
module tb_divider;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0, req = 0, advance = 0, busy, done;
  alu_op_e op;
  logic [31:0] a, b, result;
  int checks = 0, failures = 0;

  divider dut (.clk, .rst_n, .req, .op, .a, .b, .advance, .busy, .done, .result);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [31:0] ref_div(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    longint sx, sz;
    sx = longint'(signed'(x)); sz = longint'(signed'(z));
    case (o)
      ALU_DIV:  return (z == 0) ? 32'hFFFF_FFFF : 32'(sx / sz);
      ALU_DIVU: return (z == 0) ? 32'hFFFF_FFFF : x / z;
      ALU_REM:  return (z == 0) ? x : 32'(sx % sz);
      default:  return (z == 0) ? x : x % z;
    endcase
  endfunction

  initial begin
    int cyc;
    op = ALU_DIV; a = 0; b = 0;
    #22 rst_n = 1;
    for (int n = 0; n < 120; n++) begin
      @(negedge clk);
      op = alu_op_e'(int'(ALU_DIV) + n % 4);
      case (n / 4)
        0: begin a = $urandom; b = 0; end
        1: begin a = 32'h8000_0000; b = 32'hFFFF_FFFF; end
        2: begin a = 32'h8000_0000; b = 1; end
        3: begin a = 7; b = 32'hFFFF_FFFE; end
        default: begin a = $urandom; b = (n % 3 == 0) ? $urandom_range(100) + 1 : $urandom; end
      endcase
      req = 1; advance = 0; cyc = 0;
      #1 check(busy, "busy on request");
      while (!done) begin
        @(negedge clk); cyc++;
        if (cyc > 40) break;
      end
      check(cyc == 33, $sformatf("latency %0d cycles, expected 33", cyc));
      check(!busy, "busy low when done");
      check(result == ref_div(op, a, b),
            $sformatf("%s %h %h = %h expected %h", op.name(), a, b, result, ref_div(op, a, b)));
      advance = 1;
      @(negedge clk); req = 0; advance = 0;
      check(!done, "idle after advance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
