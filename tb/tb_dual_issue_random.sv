// tb_dual_issue_random: random-program test of the whole dual-issue core
// against an instruction-set model written in this testbench.
//
// Each of NPROG programs holds PLEN random instructions over registers
// x1..x8 (so that most instructions depend on recent ones): ALU register and
// immediate operations, LUI, AUIPC, multiplies, occasional divides and
// remainders, word/halfword/byte loads and stores to a 256-byte region,
// forward conditional branches, forward JAL and forward JALR to an absolute address. The
// program ends with a store of 1 to the debug address and a jump-to-self.
// The model runs the same program from the same starting memory; after the
// core reports completion, all registers and the memory region are compared.
// The core is reset and reloaded between programs. Across all programs the
// testbench also requires that dual issue, the dual-hazard split, the
// load-use stall, the divider stall and taken branches all occurred, and
// reports the instructions per cycle.
`timescale 1ns/1ps
module tb_dual_issue_random;
  import rv_asm_pkg::*;

  localparam int NPROG = 24;
  localparam int PLEN  = 300;

  logic        clk = 1'b0, rst_n = 1'b0, load_we = 1'b0;
  logic [31:0] load_addr = '0, load_data = '0, dbg_data;
  logic        dbg_valid, retire0, retire1;

  dual_issue_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------- program builder
  logic [31:0] prog[$];
  function automatic logic [4:0] rr();   // random working register
    return 5'($urandom_range(8, 1));
  endfunction

  function automatic void gen_program();
    prog.delete();
    prog.push_back(ADDI(5'd10, 5'd0, 32'h100));          // x10: data base, kept constant
    while (prog.size() < PLEN) begin
      int k, left;
      k = $urandom_range(99);
      left = PLEN - prog.size();
      if (k < 30) begin
        logic [6:0] f7; logic [2:0] f3;
        f3 = 3'($urandom);
        f7 = ((f3 == 3'd0 || f3 == 3'd5) && $urandom_range(1)) ? 7'h20 : 7'h00;
        prog.push_back(ALU_R(f7, f3, rr(), rr(), rr()));
      end else if (k < 48) begin
        logic [2:0] f3;
        f3 = 3'($urandom);
        if (f3 == 3'd1) prog.push_back(SLLI(rr(), rr(), $urandom_range(31)));
        else if (f3 == 3'd5) prog.push_back($urandom_range(1) ? SRAI(rr(), rr(), $urandom_range(31))
                                                              : SRLI(rr(), rr(), $urandom_range(31)));
        else prog.push_back(enc_i($urandom_range(4095) - 2048, rr(), f3, rr(), 7'b0010011));
      end else if (k < 52) begin
        prog.push_back($urandom_range(1) ? LUI(rr(), 20'($urandom)) : AUIPC(rr(), 20'($urandom)));
      end else if (k < 57) begin
        prog.push_back(ALU_R(7'h01, 3'($urandom_range(3)), rr(), rr(), rr()));
      end else if (k < 59) begin
        prog.push_back(ALU_R(7'h01, 3'($urandom_range(7, 4)), rr(), rr(), rr()));
      end else if (k < 72) begin
        int sz; logic [2:0] f3;
        sz = $urandom_range(2);
        f3 = (sz == 2) ? 3'b010 : (3'(sz) | ($urandom_range(1) ? 3'b100 : 3'b000));
        prog.push_back(enc_i(($urandom_range(255) >> sz) << sz, 5'd10, f3, rr(), 7'b0000011));
      end else if (k < 84) begin
        int sz;
        sz = $urandom_range(2);
        prog.push_back(enc_s(($urandom_range(255) >> sz) << sz, rr(), 5'd10, 3'(sz)));
      end else if (k < 94 && left > 5) begin
        logic [2:0] f3s[6] = '{3'd0, 3'd1, 3'd4, 3'd5, 3'd6, 3'd7};
        prog.push_back(enc_b(4 * $urandom_range(4, 2), rr(), rr(), f3s[$urandom_range(5)]));
      end else if (k < 97 && left > 5) begin
        prog.push_back(JAL($urandom_range(1) ? rr() : 5'd0, 4 * $urandom_range(4, 2)));
      end else if (left > 5) begin
        prog.push_back(JALR(rr(), 5'd0, 32'(prog.size() * 4 + 4 * $urandom_range(4, 2))));
      end
    end
    // report and stop
    prog.push_back(LUI(5'd11, 20'h2));
    prog.push_back(ADDI(5'd11, 5'd11, 32'h10));
    prog.push_back(ADDI(5'd12, 5'd0, 1));
    prog.push_back(SW(5'd12, 5'd11, 0));
    prog.push_back(JAL(5'd0, 0));
  endfunction

  // ------------------------------------------------- instruction-set model
  logic [31:0] xr[32];
  logic [7:0]  mem_b[2048];

  function automatic logic [31:0] ld(input int a, input int n);
    logic [31:0] v;
    v = 0;
    for (int i = 0; i < n; i++) v[8*i +: 8] = mem_b[(a + i) % 2048];
    return v;
  endfunction

  task automatic run_model();
    int pc, steps;
    pc = 0; steps = 0;
    for (int i = 0; i < 32; i++) xr[i] = 0;
    while (pc / 4 < prog.size() - 1 && steps < 10 * PLEN) begin
      logic [31:0] w, a, b, r, imm_i, imm_s, imm_b, imm_j;
      logic [4:0] rd;
      logic [2:0] f3;
      logic wr;
      longint sa, sb, ua, ub;
      int npc, addr;
      w = prog[pc / 4];
      rd = w[11:7]; f3 = w[14:12];
      a = xr[w[19:15]]; b = xr[w[24:20]];
      sa = longint'(signed'(a)); sb = longint'(signed'(b));
      ua = longint'({32'd0, a}); ub = longint'({32'd0, b});
      imm_i = {{20{w[31]}}, w[31:20]};
      imm_s = {{20{w[31]}}, w[31:25], w[11:7]};
      imm_b = {{19{w[31]}}, w[31], w[7], w[30:25], w[11:8], 1'b0};
      imm_j = {{11{w[31]}}, w[31], w[19:12], w[20], w[30:21], 1'b0};
      npc = pc + 4; wr = 1; r = 0;
      case (w[6:0])
        7'b0110111: r = {w[31:12], 12'd0};
        7'b0010111: r = 32'(pc) + {w[31:12], 12'd0};
        7'b1101111: begin r = 32'(pc + 4); npc = pc + int'(imm_j); end
        7'b1100111: begin r = 32'(pc + 4); npc = int'((a + imm_i) & ~32'd1); end
        7'b1100011: begin
          bit t;
          case (f3)
            3'd0: t = a == b;  3'd1: t = a != b;
            3'd4: t = sa < sb; 3'd5: t = sa >= sb;
            3'd6: t = ua < ub; default: t = ua >= ub;
          endcase
          if (t) npc = pc + int'(imm_b);
          wr = 0;
        end
        7'b0000011: begin
          addr = int'(a + imm_i);
          case (f3)
            3'd0: r = 32'(signed'(8'(ld(addr, 1))));
            3'd1: r = 32'(signed'(16'(ld(addr, 2))));
            3'd4: r = ld(addr, 1);
            3'd5: r = ld(addr, 2);
            default: r = ld(addr, 4);
          endcase
        end
        7'b0100011: begin
          addr = int'(a + imm_s);
          if (addr != 32'h2010)   // the debug word does not reach memory
            for (int i = 0; i < (1 << f3[1:0]); i++) mem_b[(addr + i) % 2048] = b[8*i +: 8];
          wr = 0;
        end
        7'b0010011: begin
          case (f3)
            3'd0: r = a + imm_i;
            3'd1: r = a << w[24:20];
            3'd2: r = (sa < longint'(signed'(imm_i))) ? 1 : 0;
            3'd3: r = (a < imm_i) ? 1 : 0;
            3'd4: r = a ^ imm_i;
            3'd5: r = w[30] ? 32'(sa >>> w[24:20]) : a >> w[24:20];
            3'd6: r = a | imm_i;
            default: r = a & imm_i;
          endcase
        end
        7'b0110011: begin
          if (w[31:25] == 7'h01) begin
            case (f3)
              3'd0: r = 32'(sa * sb);
              3'd1: r = 32'((sa * sb) >>> 32);
              3'd2: r = 32'((sa * ub) >>> 32);
              3'd3: r = 32'((ua * ub) >> 32);
              3'd4: r = (b == 0) ? 32'hFFFF_FFFF : (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) ? a : 32'(sa / sb);
              3'd5: r = (b == 0) ? 32'hFFFF_FFFF : a / b;
              3'd6: r = (b == 0) ? a : (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) ? 0 : 32'(sa % sb);
              default: r = (b == 0) ? a : a % b;
            endcase
          end else begin
            case (f3)
              3'd0: r = w[30] ? a - b : a + b;
              3'd1: r = a << b[4:0];
              3'd2: r = (sa < sb) ? 1 : 0;
              3'd3: r = (a < b) ? 1 : 0;
              3'd4: r = a ^ b;
              3'd5: r = w[30] ? 32'(sa >>> b[4:0]) : a >> b[4:0];
              3'd6: r = a | b;
              default: r = a & b;
            endcase
          end
        end
        default: wr = 0;
      endcase
      if (wr && rd != 0) xr[rd] = r;
      pc = npc;
      steps++;
    end
  endtask

  // ------------------------------------------------------ event counters
  int n_dual = 0, n_dual_haz = 0, n_load_use = 0, n_div = 0, n_taken = 0, n_ret = 0, n_cyc = 0;
  always_ff @(posedge clk) if (rst_n && dut.pair_valid) begin
    n_cyc <= n_cyc + 1;
    n_ret <= n_ret + int'(retire0) + int'(retire1);
    if (dut.u_issue.issued_a && dut.u_issue.issued_b) n_dual <= n_dual + 1;
    if (dut.u_issue.issued_a && dut.stall_dual && !dut.tbl_stall_0 && !dut.tbl_stall_1) n_dual_haz <= n_dual_haz + 1;
    if ((dut.stall_0 || dut.stall_1) && !dut.stall_ex) n_load_use <= n_load_use + 1;
    if (dut.stall_ex) n_div <= n_div + 1;
    if (dut.take_branch) n_taken <= n_taken + 1;
  end

  initial begin
    #(10 * 400000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPROG; p++) begin
      int t;
      gen_program();
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      foreach (prog[k]) begin
        @(negedge clk);
        load_we = 1'b1; load_addr = 32'(4 * k); load_data = prog[k];
      end
      @(negedge clk);
      load_we = 1'b0;
      // the model starts from the data memory as the core will find it
      for (int k = 0; k < 512; k++)
        for (int i = 0; i < 4; i++) mem_b[4 * k + i] = dut.u_dmem.mem[k][8*i +: 8];
      run_model();
      rst_n = 1'b1;
      t = 0;
      while (!(dbg_valid && dbg_data == 1) && t < 20000) begin @(posedge clk); t++; end
      check(t < 20000, $sformatf("program %0d finished", p));
      repeat (4) @(posedge clk);
      for (int r = 1; r < 32; r++)
        check(dut.u_rf.regs[r] == xr[r],
              $sformatf("program %0d: x%0d = %h, model %h", p, r, dut.u_rf.regs[r], xr[r]));
      for (int k = 64; k < 128; k++)
        check(dut.u_dmem.mem[k] == {mem_b[4*k+3], mem_b[4*k+2], mem_b[4*k+1], mem_b[4*k]},
              $sformatf("program %0d: memory word %0d", p, k));
    end
    $display("events: dual=%0d dual_hazard=%0d load_use=%0d div_stall=%0d taken=%0d; %0d instructions in %0d cycles",
             n_dual, n_dual_haz, n_load_use, n_div, n_taken, n_ret, n_cyc);
    check(n_dual > 0 && n_dual_haz > 0 && n_load_use > 0 && n_div > 0 && n_taken > 0,
          "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
