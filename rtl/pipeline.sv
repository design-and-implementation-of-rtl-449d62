// pipeline: the execute, memory and write-back stages of one of the core's
// two pipelines.
//
// The shared issue stage hands each pipe one decoded instruction per cycle
// (id_dec, a bubble when id_dec.valid is low) together with its two register
// operands read from the register bank. Stages:
//   EX  operands are taken from the forwarding network (byp_in, youngest
//       stage first) or from the ID/EX register; the ALU computes; branches
//       and jumps resolve here (pipe 0 only) and redirect fetch with
//       take_branch; divides run on the multi-cycle divider (div_busy).
//   MEM loads and stores (pipe 1 only) drive the data-memory Wishbone master
//       with the byte lanes aligned to the address.
//   WB  the load word arrives from the data memory (one-cycle acknowledge),
//       is sign or zero extended, and the result is written to the register
//       bank through this pipe's write port.
// The MEM and WB results are offered to both pipes' forwarding networks
// (byp_mem, byp_wb); a load in MEM offers nothing, which is why the hazard
// unit stalls an instruction that needs a load result right behind it.
// hold freezes EX (while either pipe's divider is busy); EX then keeps
// refreshing its operands from the forwarding network, and a bubble enters
// MEM. Both pipes are held together, so they stay in step.
//
// HAS_BRANCH and HAS_MEM select the pipe's role: pipe 0 executes branch and
// ALU instructions, pipe 1 memory and ALU instructions, as in the core's
// design. Forwarding, the operand refresh on hold and the stage at which
// branches resolve are this design's choices. There is no misaligned-access
// trap: a misaligned halfword or word access uses the aligned word.
module pipeline
  import rv_pkg::*;
#(
  parameter bit          HAS_BRANCH = 1'b1,
  parameter bit          HAS_MEM    = 1'b0,
  parameter int unsigned NBYP       = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 hold,
  input  dec_t                 id_dec,
  input  logic [31:0]          id_rs1_val,
  input  logic [31:0]          id_rs2_val,
  input  bypass_t [NBYP-1:0]   byp_in,
  // to the hazard units
  output logic                 ex_is_load,
  output logic [4:0]           ex_rd,
  output logic                 div_busy,
  // branch redirect
  output logic                 take_branch,
  output logic [31:0]          take_branch_addr,
  // forwarding sources
  output bypass_t              byp_mem,
  output bypass_t              byp_wb,
  // register bank write port
  output logic                 rf_we,
  output logic [4:0]           rf_rd,
  output logic [31:0]          rf_wdata,
  output logic                 retire,
  // data memory Wishbone master
  output logic                 dwb_cyc_o,
  output logic                 dwb_stb_o,
  output logic                 dwb_we_o,
  output logic [31:0]          dwb_adr_o,
  output logic [31:0]          dwb_dat_o,
  output logic [3:0]           dwb_sel_o,
  input  logic                 dwb_ack_i,
  input  logic [31:0]          dwb_dat_i
);
  // ---------------------------------------------------------------- EX stage
  dec_t        ex;
  logic [31:0] ex_rs1, ex_rs2;
  logic [31:0] fwd_rs1, fwd_rs2;

  function automatic logic [31:0] forward(input logic [4:0] r, input logic [31:0] dflt,
                                          input bypass_t [NBYP-1:0] src);
    logic [31:0] v;
    v = dflt;
    for (int i = NBYP - 1; i >= 0; i--)   // index 0 has the highest priority
      if (src[i].valid && src[i].rd == r) v = src[i].data;
    return (r == 5'd0) ? 32'd0 : v;
  endfunction

  assign fwd_rs1 = forward(ex.rs1, ex_rs1, byp_in);
  assign fwd_rs2 = forward(ex.rs2, ex_rs2, byp_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex     <= DEC_NOP;
      ex_rs1 <= '0;
      ex_rs2 <= '0;
    end else if (hold) begin
      ex_rs1 <= fwd_rs1;
      ex_rs2 <= fwd_rs2;
    end else begin
      ex     <= id_dec;
      ex_rs1 <= id_rs1_val;
      ex_rs2 <= id_rs2_val;
    end
  end

  logic [31:0] op_a, op_b, alu_y, div_y, ex_result;
  logic        is_div, div_done, cond;

  assign op_a = ex.src_a_pc  ? ex.pc  : fwd_rs1;
  assign op_b = ex.src_b_imm ? ex.imm : fwd_rs2;

  alu u_alu (.op(ex.alu_op), .a(op_a), .b(op_b), .y(alu_y));

  assign is_div = ex.valid && ex.opcode == OPC_OP &&
                  ex.alu_op inside {ALU_DIV, ALU_DIVU, ALU_REM, ALU_REMU};

  divider u_div (
    .clk, .rst_n, .req(is_div), .op(ex.alu_op), .a(fwd_rs1), .b(fwd_rs2),
    .advance(!hold), .busy(div_busy), .done(div_done), .result(div_y)
  );

  always_comb begin
    unique case (ex.funct3)
      3'b000:  cond = fwd_rs1 == fwd_rs2;
      3'b001:  cond = fwd_rs1 != fwd_rs2;
      3'b100:  cond = $signed(fwd_rs1) <  $signed(fwd_rs2);
      3'b101:  cond = $signed(fwd_rs1) >= $signed(fwd_rs2);
      3'b110:  cond = fwd_rs1 <  fwd_rs2;
      3'b111:  cond = fwd_rs1 >= fwd_rs2;
      default: cond = 1'b0;
    endcase
  end

  assign take_branch = HAS_BRANCH && ex.valid && !hold &&
                       (ex.is_jal || ex.is_jalr || (ex.is_branch && cond));
  assign take_branch_addr = ex.is_jalr ? ((fwd_rs1 + ex.imm) & ~32'd1) : (ex.pc + ex.imm);

  assign ex_result = (ex.is_jal || ex.is_jalr) ? ex.pc + 32'd4 :
                     is_div                    ? div_y : alu_y;

  assign ex_is_load = HAS_MEM && ex.valid && ex.is_load;
  assign ex_rd      = ex.rd;

  // --------------------------------------------------------------- MEM stage
  typedef struct packed {
    logic        valid;
    logic        writes_rd;
    logic [4:0]  rd;
    logic        is_load;
    logic        is_store;
    logic [2:0]  funct3;
    logic [31:0] result;
    logic [31:0] store_data;
  } mem_t;

  mem_t mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem <= '0;
    else if (hold) mem <= '0;
    else begin
      mem.valid      <= ex.valid;
      mem.writes_rd  <= ex.valid && ex.writes_rd;
      mem.rd         <= ex.rd;
      mem.is_load    <= HAS_MEM && ex.valid && ex.is_load;
      mem.is_store   <= HAS_MEM && ex.valid && ex.is_store;
      mem.funct3     <= ex.funct3;
      mem.result     <= ex_result;
      mem.store_data <= fwd_rs2;
    end
  end

  logic [1:0] boff;
  assign boff      = mem.result[1:0];
  assign dwb_cyc_o = mem.is_load || mem.is_store;
  assign dwb_stb_o = mem.is_load || mem.is_store;
  assign dwb_we_o  = mem.is_store;
  assign dwb_adr_o = {mem.result[31:2], 2'b00};

  always_comb begin
    unique case (mem.funct3[1:0])
      2'b00: begin
        dwb_sel_o = 4'b0001 << boff;
        dwb_dat_o = {4{mem.store_data[7:0]}};
      end
      2'b01: begin
        dwb_sel_o = boff[1] ? 4'b1100 : 4'b0011;
        dwb_dat_o = {2{mem.store_data[15:0]}};
      end
      default: begin
        dwb_sel_o = 4'b1111;
        dwb_dat_o = mem.store_data;
      end
    endcase
  end

  assign byp_mem = '{valid: mem.writes_rd && !mem.is_load, rd: mem.rd, data: mem.result};

  // ---------------------------------------------------------------- WB stage
  typedef struct packed {
    logic        valid;
    logic        writes_rd;
    logic [4:0]  rd;
    logic        is_load;
    logic [2:0]  funct3;
    logic [1:0]  boff;
    logic [31:0] result;
  } wb_t;

  wb_t wb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wb <= '0;
    else begin
      wb.valid     <= mem.valid;
      wb.writes_rd <= mem.writes_rd;
      wb.rd        <= mem.rd;
      wb.is_load   <= mem.is_load;
      wb.funct3    <= mem.funct3;
      wb.boff      <= boff;
      wb.result    <= mem.result;
    end
  end

  logic [31:0] ld_word, ld_val;
  assign ld_word = dwb_dat_i >> {wb.boff, 3'b000};
  always_comb begin
    unique case (wb.funct3)
      3'b000:  ld_val = {{24{ld_word[7]}},  ld_word[7:0]};
      3'b001:  ld_val = {{16{ld_word[15]}}, ld_word[15:0]};
      3'b100:  ld_val = {24'd0, ld_word[7:0]};
      3'b101:  ld_val = {16'd0, ld_word[15:0]};
      default: ld_val = dwb_dat_i;
    endcase
  end

  assign rf_we    = wb.writes_rd;
  assign rf_rd    = wb.rd;
  assign rf_wdata = wb.is_load ? ld_val : wb.result;
  assign retire   = wb.valid;
  assign byp_wb   = '{valid: wb.writes_rd, rd: wb.rd, data: rf_wdata};

  // A load's data must be acknowledged in its write-back cycle
  a_load_ack : assert property (@(posedge clk) disable iff (!rst_n) wb.is_load |-> dwb_ack_i)
    else $error("pipeline: load in write-back without data acknowledge");

  // Forwarding never needs a load still in MEM (the hazard unit stalls first)
  a_no_load_use : assert property (@(posedge clk) disable iff (!rst_n)
    (ex.valid && mem.is_load && mem.rd != 5'd0) |->
      !((ex.uses_rs1 && ex.rs1 == mem.rd) || (ex.uses_rs2 && ex.rs2 == mem.rd)))
    else $error("pipeline: load-use reached execute without a stall");

endmodule
