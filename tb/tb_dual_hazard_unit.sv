// tb_dual_hazard_unit: random register fields and opcodes for both decode
// slots, compared with a reference written from the dependency rules:
// the younger instruction (pipe 1 when priority is 0, pipe 0 when it is 1)
// may not read a register the older one writes, and the two may not write
// the same register. Directed cases cover each source-register use.
`timescale 1ns/1ps
module tb_dual_hazard_unit;
  logic       prio, v0, v1, f0, f1, stall;
  logic [4:0] op0, op1, a0, b0, d0, a1, b1, d1;
  int checks = 0, failures = 0;

  dual_hazard_unit dut (.priority_i(prio), .valid_0(v0), .opcode_0(op0), .funct3_2_0(f0),
    .rs1_0(a0), .rs2_0(b0), .rd_0(d0), .valid_1(v1), .opcode_1(op1), .funct3_2_1(f1),
    .rs1_1(a1), .rs2_1(b1), .rd_1(d1), .stall_dual(stall));

  logic [4:0] ops[11] = '{5'b00000, 5'b00011, 5'b00100, 5'b00101, 5'b01000, 5'b01100,
                          5'b01101, 5'b11000, 5'b11001, 5'b11011, 5'b11100};

  // reference: which fields each opcode reads and writes
  function automatic bit rd1(input logic [4:0] op, input logic f2);
    return op inside {5'b00000, 5'b01000, 5'b00100, 5'b01100, 5'b11000, 5'b11001} ||
           (op == 5'b11100 && !f2);
  endfunction
  function automatic bit rd2(input logic [4:0] op);
    return op inside {5'b01000, 5'b01100, 5'b11000};
  endfunction
  function automatic bit wr(input logic [4:0] op, input logic [4:0] rd);
    return rd != 0 && op inside {5'b00000, 5'b00100, 5'b00101, 5'b01100, 5'b01101,
                                 5'b11001, 5'b11011, 5'b11100};
  endfunction

  initial begin
    bit exp_s;
    int hits = 0;
    for (int n = 0; n < 20000; n++) begin
      prio = 1'($urandom); v0 = ($urandom_range(9) != 0); v1 = ($urandom_range(9) != 0);
      op0 = ops[$urandom_range(10)]; op1 = ops[$urandom_range(10)];
      // pipe 0 never holds memory operations, pipe 1 never branches
      if (op0 inside {5'b00000, 5'b01000}) op0 = 5'b01100;
      if (op1 inside {5'b11000, 5'b11001, 5'b11011}) op1 = 5'b00100;
      f0 = 1'($urandom); f1 = 1'($urandom);
      a0 = 5'($urandom_range(7)); b0 = 5'($urandom_range(7)); d0 = 5'($urandom_range(7));
      a1 = 5'($urandom_range(7)); b1 = 5'($urandom_range(7)); d1 = 5'($urandom_range(7));
      #1;
      exp_s = 0;
      if (v0 && v1) begin
        if (!prio) exp_s = wr(op0, d0) && ((rd1(op1, f1) && a1 == d0) || (rd2(op1) && b1 == d0));
        else       exp_s = wr(op1, d1) && ((rd1(op0, f0) && a0 == d1) || (rd2(op0) && b0 == d1));
        if (wr(op0, d0) && wr(op1, d1) && d0 == d1) exp_s = 1;
      end
      hits += int'(exp_s);
      checks++;
      if (stall !== exp_s) begin
        failures++;
        $display("FAIL: prio=%0d op0=%b rs=%0d,%0d rd=%0d op1=%b rs=%0d,%0d rd=%0d got %0d", prio,
                 op0, a0, b0, d0, op1, a1, b1, d1, stall);
      end
    end
    checks++;
    if (hits < 1000) begin failures++; $display("FAIL: too few hazards exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
