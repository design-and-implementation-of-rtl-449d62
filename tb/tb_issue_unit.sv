// tb_issue_unit: drives every combination of instruction classes through the
// issue unit and compares with the nine rows of the issue table (routing,
// issue_stall_0/1, priority, pc_increment), then checks the final issue
// decision under a pipeline stall, a flush, a dual-hazard stall and an
// invalid pair.
`timescale 1ns/1ps
module tb_issue_unit;
  import rv_asm_pkg::*;
  logic        pair_valid, stall_pipe, stall_dual, flush;
  logic [31:0] pc_a, inst_a, inst_b, inst_0, inst_1, pc_0, pc_1, pc_increment;
  logic        t0, t1, prio, s0, s1, ia, ib;
  int checks = 0, failures = 0;

  issue_unit dut (.pair_valid, .pc_a, .inst_a, .inst_b, .stall_pipe, .stall_dual, .flush,
    .inst_0, .pc_0, .inst_1, .pc_1, .issue_stall_0_tbl(t0), .issue_stall_1_tbl(t1),
    .priority_o(prio), .pc_increment, .issue_stall_0(s0), .issue_stall_1(s1),
    .issued_a(ia), .issued_b(ib));

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // one representative word per class, several forms each
  function automatic logic [31:0] word(input int cls, input int v);
    case (cls)
      0: return (v % 3 == 0) ? ADDI(5'd1, 5'd2, v) : (v % 3 == 1) ? MUL(5'd3, 5'd4, 5'd5) : LUI(5'd6, 20'(v));
      1: return (v % 2 == 0) ? LW(5'd7, 5'd8, v) : SW(5'd9, 5'd10, v);
      default: return (v % 3 == 0) ? BEQ(5'd1, 5'd2, 8) : (v % 3 == 1) ? JAL(5'd1, 16) : JALR(5'd0, 5'd1, 0);
    endcase
  endfunction

  initial begin
    // classes: 0 ALU, 1 MEM, 2 BRANCH. Expected: {pipe0 gets (0 NOP,1 older,2 younger),
    // pipe1 gets (...), stall_0, stall_1, prio, inc}
    int exp_p0, exp_p1, exp_s0, exp_s1, exp_pr, exp_inc;
    pc_a = 32'h40; pair_valid = 1; stall_pipe = 0; stall_dual = 0; flush = 0;
    for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) for (int v = 0; v < 6; v++) begin
      inst_a = word(a, v); inst_b = word(b, v + 1);
      // table rows
      if (a == 2)               begin exp_p0 = 1; exp_p1 = 0; exp_s0 = 0; exp_s1 = 1; exp_pr = 0; exp_inc = 4; end
      else if (a == 1 && b == 1) begin exp_p0 = 0; exp_p1 = 1; exp_s0 = 1; exp_s1 = 0; exp_pr = 1; exp_inc = 4; end
      else if (a == 1)          begin exp_p0 = 2; exp_p1 = 1; exp_s0 = 0; exp_s1 = 0; exp_pr = 1; exp_inc = 8; end
      else if (b == 2)          begin exp_p0 = 2; exp_p1 = 1; exp_s0 = 0; exp_s1 = 0; exp_pr = 1; exp_inc = 8; end
      else                      begin exp_p0 = 1; exp_p1 = 2; exp_s0 = 0; exp_s1 = 0; exp_pr = 0; exp_inc = 8; end
      #1;
      check(t0 == 1'(exp_s0) && t1 == 1'(exp_s1), $sformatf("row %0d/%0d issue_stall", a, b));
      check(prio == 1'(exp_pr), $sformatf("row %0d/%0d priority", a, b));
      check(pc_increment == 32'(exp_inc), $sformatf("row %0d/%0d pc_increment", a, b));
      if (exp_p0 == 1) check(inst_0 == inst_a && pc_0 == pc_a, $sformatf("row %0d/%0d pipe0 older", a, b));
      if (exp_p0 == 2) check(inst_0 == inst_b && pc_0 == pc_a + 4, $sformatf("row %0d/%0d pipe0 younger", a, b));
      if (exp_p1 == 1) check(inst_1 == inst_a && pc_1 == pc_a, $sformatf("row %0d/%0d pipe1 older", a, b));
      if (exp_p1 == 2) check(inst_1 == inst_b && pc_1 == pc_a + 4, $sformatf("row %0d/%0d pipe1 younger", a, b));
      check(s0 == t0 && s1 == t1 && ia && ib == (exp_inc == 8), $sformatf("row %0d/%0d no-hazard issue", a, b));
      // dual-hazard: only older issues
      stall_dual = 1; #1;
      check(ia && !ib, $sformatf("row %0d/%0d dual stall issues older only", a, b));
      check((exp_pr ? (s0 && !s1) : (!s0 && s1)), $sformatf("row %0d/%0d dual stall pipes", a, b));
      stall_dual = 0;
      // pipeline stall, flush, invalid pair: nothing issues
      stall_pipe = 1; #1; check(!ia && !ib && s0 && s1, "pipeline stall issues nothing"); stall_pipe = 0;
      flush = 1;      #1; check(!ia && !ib && s0 && s1, "flush issues nothing");          flush = 0;
      pair_valid = 0; #1; check(!ia && !ib && s0 && s1, "invalid pair issues nothing");   pair_valid = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
