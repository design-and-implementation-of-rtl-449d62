// dual_issue_top: a statically scheduled, in-order dual-issue RV32IM core
// with its separate instruction and data memories.
//
// Every cycle the instruction memory returns the pair of words at pc and
// pc + 4. The issue unit steers them: pipe 0 takes branches, jumps and ALU
// work, pipe 1 loads, stores and ALU work, and a branch never has a
// younger partner. Each pipe's instruction is decoded and reads two operands
// from the shared four-read, two-write register bank. Three hazard checks run
// in this same issue stage: one hazard unit per pipe (a load result needed
// right away: hold the PC and issue nothing), and the dual hazard unit (the
// younger instruction depends on the older, or both write one register:
// issue only the older and advance the PC by 4). A busy divider in either
// pipe holds both execute stages. Branches resolve in pipe 0's execute stage;
// a taken branch or jump squashes the pair being issued and redirects the PC,
// costing one cycle. Results are forwarded between and within the two pipes
// from their MEM and WB stages.
//
// Ports: clk, rst_n (active low, asynchronous). While rst_n is low the
// program is loaded into the instruction memory through load_we/load_addr/
// load_data (byte address, one 32-bit word per cycle). A word store to
// DEBUG_ADDR does not reach the data memory; it appears on dbg_valid/dbg_data
// for one cycle (the test programs report their result this way).
// retire0/retire1 pulse for each instruction leaving write-back in each pipe.
//
// The split into issue unit, dual hazard unit, pipeline hazard units, PC
// logic, four-port register bank and separate instruction/data memories is
// the core's organisation; the debug address 0x2010 is the one its test
// programs write. Pipeline depth, forwarding and memory sizes beyond the
// 512-word default are this design's choices.
module dual_issue_top
  import rv_pkg::*;
#(
  parameter logic [31:0] RESET_PC        = 32'h0000_0000,
  parameter int unsigned IMEM_ADDR_WIDTH = 9,
  parameter int unsigned DMEM_ADDR_WIDTH = 9,
  parameter logic [31:0] DEBUG_ADDR      = 32'h0000_2010
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  output logic        dbg_valid,
  output logic [31:0] dbg_data,
  output logic        retire0,
  output logic        retire1
);
  // ------------------------------------------------------- fetch and PC logic
  logic [31:0] pc, pc_next, pc_increment, take_branch_addr;
  logic        pair_valid, take_branch;
  logic        stall_0, stall_1, stall_dual, stall_ex;
  logic [31:0] inst_a, inst_b;
  logic        imem_stall, imem_ack, imem_err;

  pc_logic #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .stall_0, .stall_1, .stall_dual, .stall_ex,
    .take_branch, .take_branch_addr, .pc_increment,
    .pc, .pc_next, .pair_valid
  );

  inst_mem #(.ADDR_WIDTH(IMEM_ADDR_WIDTH)) u_imem (
    .clk_i(clk), .rst_i(!rst_n), .cyc_i(1'b1),
    .stb_i(rst_n ? 1'b1 : load_we), .we_i(!rst_n),
    .adr_i(rst_n ? pc_next : load_addr), .dat_i(load_data), .sel_i(4'hF),
    .stall_o(imem_stall), .ack_o(imem_ack), .err_o(imem_err),
    .dat_o(inst_a), .dat1_o(inst_b)
  );

  // -------------------------------------------------------------- issue stage
  logic [31:0] inst_0, inst_1, pc_0, pc_1;
  logic        tbl_stall_0, tbl_stall_1, prio;
  logic        issue_stall_0, issue_stall_1, issued_a, issued_b;

  issue_unit u_issue (
    .pair_valid, .pc_a(pc), .inst_a, .inst_b,
    .stall_pipe(stall_0 || stall_1 || stall_ex), .stall_dual, .flush(take_branch),
    .inst_0, .pc_0, .inst_1, .pc_1,
    .issue_stall_0_tbl(tbl_stall_0), .issue_stall_1_tbl(tbl_stall_1),
    .priority_o(prio), .pc_increment,
    .issue_stall_0, .issue_stall_1, .issued_a, .issued_b
  );

  dec_t dec_0, dec_1, id_dec_0, id_dec_1;
  decoder u_dec0 (.valid(pair_valid && !tbl_stall_0), .inst(inst_0), .pc(pc_0), .dec(dec_0));
  decoder u_dec1 (.valid(pair_valid && !tbl_stall_1), .inst(inst_1), .pc(pc_1), .dec(dec_1));

  dual_hazard_unit u_dhaz (
    .priority_i(prio),
    .valid_0(dec_0.valid), .opcode_0(dec_0.opcode), .funct3_2_0(dec_0.funct3[2]),
    .rs1_0(dec_0.rs1), .rs2_0(dec_0.rs2), .rd_0(dec_0.rd),
    .valid_1(dec_1.valid), .opcode_1(dec_1.opcode), .funct3_2_1(dec_1.funct3[2]),
    .rs1_1(dec_1.rs1), .rs2_1(dec_1.rs2), .rd_1(dec_1.rd),
    .stall_dual
  );

  logic       ex_is_load_0, ex_is_load_1;
  logic [4:0] ex_rd_0, ex_rd_1;

  hazard_unit u_haz0 (
    .valid_id(dec_0.valid), .uses_rs1(dec_0.uses_rs1), .rs1_id(dec_0.rs1),
    .uses_rs2(dec_0.uses_rs2), .rs2_id(dec_0.rs2),
    .ex_is_load(ex_is_load_1), .rd_ex(ex_rd_1), .stall_IF(stall_0)
  );
  hazard_unit u_haz1 (
    .valid_id(dec_1.valid), .uses_rs1(dec_1.uses_rs1), .rs1_id(dec_1.rs1),
    .uses_rs2(dec_1.uses_rs2), .rs2_id(dec_1.rs2),
    .ex_is_load(ex_is_load_1), .rd_ex(ex_rd_1), .stall_IF(stall_1)
  );

  always_comb begin
    id_dec_0 = dec_0;
    id_dec_1 = dec_1;
    id_dec_0.valid = dec_0.valid && !issue_stall_0;
    id_dec_1.valid = dec_1.valid && !issue_stall_1;
  end

  // ---------------------------------------------------------- register bank
  logic [3:0][4:0]  rf_raddr;
  logic [3:0][31:0] rf_rdata;
  logic [1:0]       rf_we;
  logic [1:0][4:0]  rf_waddr;
  logic [1:0][31:0] rf_wdata;

  assign rf_raddr = {dec_1.rs2, dec_1.rs1, dec_0.rs2, dec_0.rs1};

  reg_bank u_rf (
    .clk, .rst_n, .raddr(rf_raddr), .rdata(rf_rdata),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  // -------------------------------------------------------------- pipelines
  bypass_t          byp_mem_0, byp_mem_1, byp_wb_0, byp_wb_1;
  bypass_t [3:0]    byp;
  logic             div_busy_0, div_busy_1, tb_1;
  logic [31:0]      tba_1;
  logic             dwb0_cyc, dwb0_stb, dwb0_we;
  logic [31:0]      dwb0_adr, dwb0_dat;
  logic [3:0]       dwb0_sel;
  logic             dwb_cyc, dwb_stb, dwb_we, dwb_ack;
  logic [31:0]      dwb_adr, dwb_dat_w, dwb_dat_r;
  logic [3:0]       dwb_sel;

  // youngest stage first; the two entries of one stage never share an rd
  assign byp      = {byp_wb_1, byp_wb_0, byp_mem_1, byp_mem_0};
  assign stall_ex = div_busy_0 || div_busy_1;

  pipeline #(.HAS_BRANCH(1'b1), .HAS_MEM(1'b0)) u_pipe0 (
    .clk, .rst_n, .hold(stall_ex), .id_dec(id_dec_0),
    .id_rs1_val(rf_rdata[0]), .id_rs2_val(rf_rdata[1]), .byp_in(byp),
    .ex_is_load(ex_is_load_0), .ex_rd(ex_rd_0), .div_busy(div_busy_0),
    .take_branch, .take_branch_addr,
    .byp_mem(byp_mem_0), .byp_wb(byp_wb_0),
    .rf_we(rf_we[0]), .rf_rd(rf_waddr[0]), .rf_wdata(rf_wdata[0]), .retire(retire0),
    .dwb_cyc_o(dwb0_cyc), .dwb_stb_o(dwb0_stb), .dwb_we_o(dwb0_we), .dwb_adr_o(dwb0_adr),
    .dwb_dat_o(dwb0_dat), .dwb_sel_o(dwb0_sel), .dwb_ack_i(1'b0), .dwb_dat_i(32'd0)
  );

  pipeline #(.HAS_BRANCH(1'b0), .HAS_MEM(1'b1)) u_pipe1 (
    .clk, .rst_n, .hold(stall_ex), .id_dec(id_dec_1),
    .id_rs1_val(rf_rdata[2]), .id_rs2_val(rf_rdata[3]), .byp_in(byp),
    .ex_is_load(ex_is_load_1), .ex_rd(ex_rd_1), .div_busy(div_busy_1),
    .take_branch(tb_1), .take_branch_addr(tba_1),
    .byp_mem(byp_mem_1), .byp_wb(byp_wb_1),
    .rf_we(rf_we[1]), .rf_rd(rf_waddr[1]), .rf_wdata(rf_wdata[1]), .retire(retire1),
    .dwb_cyc_o(dwb_cyc), .dwb_stb_o(dwb_stb), .dwb_we_o(dwb_we), .dwb_adr_o(dwb_adr),
    .dwb_dat_o(dwb_dat_w), .dwb_sel_o(dwb_sel), .dwb_ack_i(dwb_ack), .dwb_dat_i(dwb_dat_r)
  );

  // ------------------------------------------------------------ data memory
  logic is_dbg, dmem_stall, dmem_err;
  assign is_dbg = dwb_stb && dwb_we && dwb_adr == DEBUG_ADDR;

  data_mem #(.ADDR_WIDTH(DMEM_ADDR_WIDTH)) u_dmem (
    .clk_i(clk), .rst_i(!rst_n), .cyc_i(dwb_cyc), .stb_i(dwb_stb && !is_dbg),
    .we_i(dwb_we), .adr_i(dwb_adr), .dat_i(dwb_dat_w), .sel_i(dwb_sel),
    .stall_o(dmem_stall), .ack_o(dwb_ack), .err_o(dmem_err), .dat_o(dwb_dat_r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dbg_valid <= 1'b0;
      dbg_data  <= '0;
    end else begin
      dbg_valid <= is_dbg;
      if (is_dbg) dbg_data <= dwb_dat_w;
    end
  end

endmodule
