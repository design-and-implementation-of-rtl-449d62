// tb_pc_logic: checks the PC sequence: reset vector and the start-up cycle,
// every row of the stall truth table (any pipeline or execute stall holds
// the PC, otherwise it advances by pc_increment), the dual-hazard advance by
// 4, and that a taken branch overrides every stall.
`timescale 1ns/1ps
module tb_pc_logic;
  logic clk = 0, rst_n = 0;
  logic s0, s1, sd, sx, tb_take, pair_valid;
  logic [31:0] tba, inc, pc, pc_next;
  int checks = 0, failures = 0;

  pc_logic #(.RESET_PC(32'h100)) dut (.clk, .rst_n, .stall_0(s0), .stall_1(s1), .stall_dual(sd),
    .stall_ex(sx), .take_branch(tb_take), .take_branch_addr(tba), .pc_increment(inc),
    .pc, .pc_next, .pair_valid);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [31:0] exp_pc;
    s0 = 0; s1 = 0; sd = 0; sx = 0; tb_take = 0; tba = 32'h0; inc = 32'd8;
    @(posedge clk); #1 check(pc == 32'h100 && !pair_valid, "reset PC");
    #6 rst_n = 1;
    @(negedge clk);
    check(pc == 32'h100 && pair_valid, "first pair valid at the reset vector");
    for (int n = 0; n < 400; n++) begin
      {s0, s1, sd} = 3'(n % 8);
      sx = (n % 16) >= 13;
      inc = (n % 3 == 0) ? 32'd4 : 32'd8;
      tb_take = (n % 11 == 5);
      tba = $urandom & ~32'd3;
      exp_pc = tb_take ? tba : (s0 || s1 || sx) ? pc : sd ? pc + 4 : pc + inc;
      #1 check(pc_next == exp_pc, $sformatf("case %0d: next %h expected %h", n, pc_next, exp_pc));
      @(negedge clk);
      check(pc == exp_pc, $sformatf("case %0d: pc register", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
