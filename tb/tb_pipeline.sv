// tb_pipeline: runs a short program through one pipeline configured with
// both roles (branch and memory), the testbench acting as the issue stage,
// register bank and data memory. The program exercises forwarding from MEM
// and WB, a load followed by a use (the testbench inserts the bubble a
// hazard unit would), two back-to-back divides holding execute, a taken
// and a not-taken branch, JAL and JALR with link values, byte and halfword
// stores and loads, AUIPC, LUI and MULH. Final register and memory values
// are compared with values worked out by hand, and squashed instructions
// must leave no trace.
`timescale 1ns/1ps
module tb_pipeline;
  import rv_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic hold, ex_is_load, div_busy, take_branch, rf_we, retire;
  logic [4:0] ex_rd, rf_rd;
  logic [31:0] take_branch_addr, rf_wdata;
  bypass_t byp_mem, byp_wb;
  bypass_t [3:0] byp;
  logic dwb_cyc, dwb_stb, dwb_we, dwb_ack;
  logic [31:0] dwb_adr, dwb_dat_w, dwb_dat_r;
  logic [3:0] dwb_sel;
  logic [31:0] inst, pc;
  logic valid;
  dec_t dec;
  logic [31:0] rs1_val, rs2_val;
  logic [31:0] regs[32];
  logic [31:0] dmem[16];
  int checks = 0, failures = 0;

  decoder u_dec (.valid, .inst, .pc, .dec);
  pipeline #(.HAS_BRANCH(1'b1), .HAS_MEM(1'b1)) dut (
    .clk, .rst_n, .hold, .id_dec(dec), .id_rs1_val(rs1_val), .id_rs2_val(rs2_val),
    .byp_in(byp), .ex_is_load, .ex_rd, .div_busy, .take_branch, .take_branch_addr,
    .byp_mem, .byp_wb, .rf_we, .rf_rd, .rf_wdata, .retire,
    .dwb_cyc_o(dwb_cyc), .dwb_stb_o(dwb_stb), .dwb_we_o(dwb_we), .dwb_adr_o(dwb_adr),
    .dwb_dat_o(dwb_dat_w), .dwb_sel_o(dwb_sel), .dwb_ack_i(dwb_ack), .dwb_dat_i(dwb_dat_r));

  always #5 clk = ~clk;
  assign hold = div_busy;
  assign byp  = {bypass_t'('0), bypass_t'('0), byp_wb, byp_mem};

  // register bank model with write-first reads
  always_comb begin
    rs1_val = (rf_we && rf_rd == dec.rs1) ? rf_wdata : regs[dec.rs1];
    rs2_val = (rf_we && rf_rd == dec.rs2) ? rf_wdata : regs[dec.rs2];
    if (dec.rs1 == 0) rs1_val = 0;
    if (dec.rs2 == 0) rs2_val = 0;
  end
  always_ff @(posedge clk) if (rst_n && rf_we && rf_rd != 0) regs[rf_rd] <= rf_wdata;

  // data memory model: one-cycle acknowledge
  always_ff @(posedge clk) begin
    dwb_ack <= rst_n && dwb_stb;
    if (dwb_stb && dwb_we) begin
      for (int k = 0; k < 4; k++) if (dwb_sel[k]) dmem[dwb_adr[5:2]][8*k +: 8] <= dwb_dat_w[8*k +: 8];
    end else if (dwb_stb) dwb_dat_r <= dmem[dwb_adr[5:2]];
  end

  logic [31:0] prog[30];
  initial begin
    prog = '{ADDI(1, 0, 5), ADDI(2, 0, 7), ADD(3, 1, 2), SUB(4, 3, 1), SW(4, 0, 16),
             LW(5, 0, 16), ADD(6, 5, 5), DIV(7, 6, 1), REM(13, 6, 1), ADD(8, 7, 13),
             BEQ(8, 8, 8), ADDI(9, 0, 99), JAL(10, 8), ADDI(9, 0, 98), ADDI(11, 0, -1),
             SB(11, 0, 21), SH(1, 0, 22), LW(12, 0, 20), LB(14, 0, 21), LHU(15, 0, 22),
             AUIPC(16, 20'd1), LUI(17, 20'h12345), ADDI(18, 0, 100), JALR(19, 18, 0),
             ADDI(9, 0, 97), BNE(0, 0, 8), ADDI(20, 0, 1), SLTU(21, 0, 11), MULH(22, 11, 11),
             JAL(0, 0)};
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #20000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int idx, holds, taken;
  logic       prev_load;
  logic [4:0] prev_rd;
  initial begin
    logic [31:0] exp_r[32];
    for (int k = 0; k < 32; k++) begin regs[k] = 0; exp_r[k] = 0; end
    for (int k = 0; k < 16; k++) dmem[k] = 0;
    valid = 0; inst = NOP; pc = 0; idx = 0; holds = 0; taken = 0; prev_load = 0; prev_rd = 0;
    #22 rst_n = 1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      if (hold) begin
        holds++;
      end else if (take_branch) begin
        taken++;
        valid = 0; prev_load = 0;
        idx = int'(take_branch_addr) / 4;
      end else begin
        logic [31:0] w;
        w = prog[idx];
        // load-use: hold the dependent instruction back one cycle
        if (prev_load && prev_rd != 0 && (w[19:15] == prev_rd || w[24:20] == prev_rd)) begin
          valid = 0; prev_load = 0;
        end else begin
          valid = 1; inst = w; pc = 32'(idx * 4);
          prev_load = (w[6:0] == 7'b0000011); prev_rd = w[11:7];
          idx++;
        end
      end
    end
    exp_r[1] = 5; exp_r[2] = 7; exp_r[3] = 12; exp_r[4] = 7; exp_r[5] = 7; exp_r[6] = 14;
    exp_r[7] = 2; exp_r[13] = 4; exp_r[8] = 6; exp_r[9] = 0; exp_r[10] = 52;
    exp_r[11] = 32'hFFFF_FFFF; exp_r[12] = 32'h0005_FF00; exp_r[14] = 32'hFFFF_FFFF;
    exp_r[15] = 5; exp_r[16] = 80 + 4096; exp_r[17] = 32'h1234_5000; exp_r[18] = 100;
    exp_r[19] = 96; exp_r[20] = 1; exp_r[21] = 1; exp_r[22] = 0;
    for (int k = 1; k < 23; k++)
      check(regs[k] == exp_r[k], $sformatf("x%0d = %h expected %h", k, regs[k], exp_r[k]));
    check(dmem[4] == 7, "word store");
    check(dmem[5] == 32'h0005_FF00, "byte and halfword stores");
    check(holds == 66, $sformatf("two divides held execute %0d cycles, expected 66", holds));
    check(taken > 3, "branches and jumps taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
