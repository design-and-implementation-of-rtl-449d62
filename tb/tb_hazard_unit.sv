// tb_hazard_unit: random decode-stage sources against a load in execute,
// compared with the load-use rule (stall when a used source register equals
// the load's non-zero destination).
`timescale 1ns/1ps
module tb_hazard_unit;
  logic v, u1, u2, ld, stall;
  logic [4:0] r1, r2, rd;
  int checks = 0, failures = 0, hits = 0;

  hazard_unit dut (.valid_id(v), .uses_rs1(u1), .rs1_id(r1), .uses_rs2(u2), .rs2_id(r2),
    .ex_is_load(ld), .rd_ex(rd), .stall_IF(stall));

  initial begin
    bit e;
    for (int n = 0; n < 5000; n++) begin
      v = 1'($urandom); u1 = 1'($urandom); u2 = 1'($urandom); ld = 1'($urandom);
      r1 = 5'($urandom_range(3)); r2 = 5'($urandom_range(3)); rd = 5'($urandom_range(3));
      #1;
      e = v && ld && rd != 0 && ((u1 && r1 == rd) || (u2 && r2 == rd));
      hits += int'(e);
      checks++;
      if (stall !== e) begin failures++; $display("FAIL: case %0d", n); end
    end
    checks++; if (hits < 100) begin failures++; $display("FAIL: few stalls exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
