// tb_dual_issue_top: end-to-end test of the dual-issue core at its default
// parameters.
//
// Assembles a program in the testbench, loads it through the load port while
// the core is in reset, and runs it. The program
//   1. writes a 7-element array {195,14,176,103,54,32,128} and its sorted copy
//      to data memory,
//   2. bubble-sorts the array in place,
//   3. computes a set of arithmetic and logic results (sum, dependent sum,
//      multiply, divide, remainder, high multiply, and/or/xor, shifts,
//      logical not) and stores them,
//   4. reports a debug marker around a block of 32 independent ALU
//      instructions, so that the issue rate can be measured,
//   5. calls a compare subroutine (JAL/JALR) that checks the sorted array
//      word by word, and writes 1 (equal) or 0 to the debug address.
// The testbench checks the reported result, the sorted array and every
// arithmetic result against values it computes itself, that the 34
// instructions between the two markers took at most 20 cycles (two
// instructions per cycle plus the start-up of the block), and that every
// mechanism of the core happened: dual issue, both priorities, a pair split
// by the memory/memory rule, a branch issued alone, a dual-hazard split,
// a load-use stall, a divider stall and a taken branch.
`timescale 1ns/1ps
module tb_dual_issue_top;
  import rv_asm_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load_we = 1'b0;
  logic [31:0] load_addr = '0, load_data = '0;
  logic        dbg_valid, retire0, retire1;
  logic [31:0] dbg_data;

  dual_issue_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ program
  logic [31:0] prog[$];
  function automatic int here();
    return prog.size() * 4;
  endfunction
  function automatic void li(input logic [4:0] rd, input int val);
    int hi, lo;
    lo = (val << 20) >>> 20;           // sign-extended low 12 bits
    hi = (val - lo) >>> 12;
    prog.push_back(LUI(rd, 20'(hi)));
    prog.push_back(ADDI(rd, rd, lo));
  endfunction

  int unsorted[7] = '{195, 14, 176, 103, 54, 32, 128};
  int sorted_v[7] = '{14, 32, 54, 103, 128, 176, 195};
  int A = 1234567, B = -321, C = 32'h7ABC_DEF0, D = 13, F = -7;
  int exp_res[15];
  // registers holding the 15 results, in the order they are stored
  logic [4:0] res_reg[15] = '{5'd5, 5'd6, 5'd7, 5'd8, 5'd9, 5'd11, 5'd12, 5'd13, 5'd14,
                              5'd15, 5'd16, 5'd17, 5'd18, 5'd19, 5'd26};

  initial begin
    int outer_l, inner_l, inner_done_p, noswap_p, cmp_l, loop_l, ok_p, call_p;
    // 1. data set-up
    prog.push_back(ADDI(5'd1, 5'd0, 32'h100));
    prog.push_back(ADDI(5'd3, 5'd0, 32'h180));
    for (int k = 0; k < 7; k++) begin
      prog.push_back(ADDI(5'd2, 5'd0, unsorted[k]));
      prog.push_back(SW(5'd2, 5'd1, 4 * k));
      prog.push_back(ADDI(5'd4, 5'd0, sorted_v[k]));
      prog.push_back(SW(5'd4, 5'd3, 4 * k));
    end
    // 2. bubble sort
    prog.push_back(ADDI(5'd10, 5'd0, 7));
    outer_l = here();
    prog.push_back(ADDI(5'd11, 5'd0, 0));
    prog.push_back(ADDI(5'd12, 5'd0, 0));
    prog.push_back(ADDI(5'd13, 5'd10, -1));
    inner_l = here();
    inner_done_p = prog.size(); prog.push_back(NOP);     // bge x12,x13,inner_done
    prog.push_back(SLLI(5'd14, 5'd12, 2));
    prog.push_back(ADD(5'd15, 5'd1, 5'd14));
    prog.push_back(LW(5'd16, 5'd15, 0));
    prog.push_back(LW(5'd17, 5'd15, 4));
    noswap_p = prog.size(); prog.push_back(NOP);         // bge x17,x16,noswap
    prog.push_back(SW(5'd17, 5'd15, 0));
    prog.push_back(SW(5'd16, 5'd15, 4));
    prog.push_back(ADDI(5'd11, 5'd11, 1));
    prog[noswap_p] = BGE(5'd17, 5'd16, here() - noswap_p * 4);
    prog.push_back(ADDI(5'd12, 5'd12, 1));
    prog.push_back(JAL(5'd0, inner_l - here()));
    prog[inner_done_p] = BGE(5'd12, 5'd13, here() - inner_done_p * 4);
    prog.push_back(BNE(5'd11, 5'd0, outer_l - here()));
    // 3. arithmetic and logic
    li(5'd20, A); li(5'd21, B); li(5'd22, C); li(5'd23, D); li(5'd24, F);
    prog.push_back(ADDI(5'd25, 5'd0, 32'h200));
    prog.push_back(ADD (5'd5,  5'd20, 5'd21));            // r_sum
    prog.push_back(ADDI(5'd6,  5'd5, 10));                // r_sum1
    prog.push_back(MUL (5'd7,  5'd20, 5'd21));            // r_mul
    prog.push_back(DIV (5'd8,  5'd20, 5'd21));            // r_div
    prog.push_back(DIV (5'd9,  5'd21, 5'd23));            // b/d
    prog.push_back(MUL (5'd11, 5'd24, 5'd23));            // r_mul2
    prog.push_back(AND_(5'd12, 5'd22, 5'd23));
    prog.push_back(OR_ (5'd13, 5'd22, 5'd23));
    prog.push_back(SRAI(5'd14, 5'd22, 12));
    prog.push_back(SLLI(5'd15, 5'd22, 12));
    prog.push_back(XOR_(5'd16, 5'd22, 5'd23));
    prog.push_back(enc_i(1, 5'd23, 3'b011, 5'd17, 7'b0010011)); // !d (sltiu)
    prog.push_back(REM (5'd18, 5'd20, 5'd21));
    prog.push_back(MULH(5'd19, 5'd20, 5'd22));
    prog.push_back(SUB (5'd26, 5'd21, 5'd20));
    foreach (res_reg[k]) prog.push_back(SW(res_reg[k], 5'd25, 4 * k));
    // 4. issue-rate block between two debug markers
    prog.push_back(LUI(5'd29, 20'h2));
    prog.push_back(ADDI(5'd29, 5'd29, 32'h10));
    prog.push_back(ADDI(5'd2, 5'd0, 32'hA));
    prog.push_back(SW(5'd2, 5'd29, 0));
    for (int k = 0; k < 32; k++) prog.push_back(ADDI(5'(5 + k % 8), 5'd0, k));
    prog.push_back(ADDI(5'd2, 5'd0, 32'hB));
    prog.push_back(SW(5'd2, 5'd29, 0));
    // 5. compare subroutine call, report, halt
    call_p = prog.size(); prog.push_back(NOP);            // jal x31, cmp
    prog.push_back(SW(5'd30, 5'd29, 0));
    prog.push_back(JAL(5'd0, 0));
    cmp_l = here();
    prog[call_p] = JAL(5'd31, cmp_l - call_p * 4);
    prog.push_back(ADDI(5'd30, 5'd0, 1));
    prog.push_back(ADDI(5'd26, 5'd0, 0));
    prog.push_back(ADDI(5'd28, 5'd0, 28));
    loop_l = here();
    prog.push_back(ADD(5'd5, 5'd1, 5'd26));
    prog.push_back(ADD(5'd6, 5'd3, 5'd26));
    prog.push_back(LW(5'd7, 5'd5, 0));
    prog.push_back(LW(5'd8, 5'd6, 0));
    ok_p = prog.size(); prog.push_back(NOP);              // beq x7,x8,ok
    prog.push_back(ADDI(5'd30, 5'd0, 0));
    prog[ok_p] = BEQ(5'd7, 5'd8, here() - ok_p * 4);
    prog.push_back(ADDI(5'd26, 5'd26, 4));
    prog.push_back(BLT(5'd26, 5'd28, loop_l - here()));
    prog.push_back(JALR(5'd0, 5'd31, 0));
  end

  // expected arithmetic results, computed here
  initial begin
    exp_res[0]  = A + B;
    exp_res[1]  = A + B + 10;
    exp_res[2]  = A * B;
    exp_res[3]  = A / B;
    exp_res[4]  = B / D;
    exp_res[5]  = F * D;
    exp_res[6]  = C & D;
    exp_res[7]  = C | D;
    exp_res[8]  = C >>> 12;
    exp_res[9]  = C << 12;
    exp_res[10] = C ^ D;
    exp_res[11] = (D == 0) ? 1 : 0;
    exp_res[12] = A % B;
    exp_res[13] = 32'((64'(signed'(A)) * 64'(signed'(C))) >>> 32);
    exp_res[14] = B - A;
  end

  // ------------------------------------------------------ event counters
  int n_dual, n_prio1, n_memmem, n_branch_alone, n_dual_haz, n_load_use, n_div_stall,
      n_taken, n_retired;
  int cycle = 0;
  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (dut.u_issue.issued_a && dut.u_issue.issued_b) n_dual <= n_dual + 1;
      if (dut.u_issue.issued_a && dut.u_issue.issued_b && dut.prio) n_prio1 <= n_prio1 + 1;
      if (dut.u_issue.issued_a && dut.tbl_stall_0) n_memmem <= n_memmem + 1;
      if (dut.u_issue.issued_a && dut.tbl_stall_1) n_branch_alone <= n_branch_alone + 1;
      if (dut.u_issue.issued_a && dut.stall_dual && !dut.tbl_stall_0 && !dut.tbl_stall_1)
        n_dual_haz <= n_dual_haz + 1;
      if (dut.pair_valid && (dut.stall_0 || dut.stall_1) && !dut.stall_ex) n_load_use <= n_load_use + 1;
      if (dut.stall_ex) n_div_stall <= n_div_stall + 1;
      if (dut.take_branch) n_taken <= n_taken + 1;
      n_retired <= n_retired + int'(retire0) + int'(retire1);
    end
  end

  // ---------------------------------------------------------------- run
  int t_a = -1, t_b = -1, result = -1;
  always_ff @(posedge clk) begin
    if (dbg_valid) begin
      if (dbg_data == 32'hA) t_a <= cycle;
      else if (dbg_data == 32'hB) t_b <= cycle;
      else result <= int'(dbg_data);
    end
  end

  localparam int WATCHDOG = 20000;
  initial begin
    #(10 * WATCHDOG);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_dual = 0; n_prio1 = 0; n_memmem = 0; n_branch_alone = 0; n_dual_haz = 0;
    n_load_use = 0; n_div_stall = 0; n_taken = 0; n_retired = 0;
    repeat (3) @(posedge clk);
    foreach (prog[k]) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = 32'(4 * k); load_data = prog[k];
    end
    @(negedge clk);
    load_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    wait (result != -1);
    repeat (5) @(posedge clk);

    $display("program of %0d instructions: %0d retired in %0d cycles", prog.size(), n_retired, cycle);
    check(result == 1, "program reports sorted array equal to reference");
    for (int k = 0; k < 7; k++)
      check(dut.u_dmem.mem[64 + k] == 32'(sorted_v[k]),
            $sformatf("sorted[%0d] = %0d, expected %0d", k, dut.u_dmem.mem[64 + k], sorted_v[k]));
    for (int k = 0; k < 15; k++)
      check(dut.u_dmem.mem[128 + k] == 32'(exp_res[k]),
            $sformatf("result %0d = %h, expected %h", k, dut.u_dmem.mem[128 + k], exp_res[k]));
    check(t_a >= 0 && t_b > t_a && (t_b - t_a) <= 20 && (t_b - t_a) >= 17,
          $sformatf("34 independent instructions took %0d cycles, expected 17..20", t_b - t_a));
    $display("events: dual=%0d prio1=%0d memmem=%0d branch_alone=%0d dual_hazard=%0d load_use=%0d div_stall=%0d taken=%0d",
             n_dual, n_prio1, n_memmem, n_branch_alone, n_dual_haz, n_load_use, n_div_stall, n_taken);
    check(n_dual > 0, "dual issue happened");
    check(n_prio1 > 0, "pair with the older instruction in pipe 1 happened");
    check(n_memmem > 0, "memory/memory split happened");
    check(n_branch_alone > 0, "branch issued alone happened");
    check(n_dual_haz > 0, "dual-hazard split happened");
    check(n_load_use > 0, "load-use stall happened");
    check(n_div_stall >= 66, "two divides stalled execute for 33 cycles each");
    check(n_taken > 0, "taken branch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
